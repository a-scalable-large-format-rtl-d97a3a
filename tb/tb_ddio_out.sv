// Testbench for the DDIO output model at 125 MHz. First random data is sent
// on both halves of each clock period and the output is sampled in the
// middle of each half; then the forwarding configuration (1 on the high
// half, 0 on the low half) must reproduce the clock. aclr must clear the
// output.
module tb_ddio_out;
  logic outclock = 0, aclr = 1, datain_h = 0, datain_l = 0, dataout;
  int checks = 0, failures = 0;

  ddio_out dut (.*);

  always #4 outclock = ~outclock;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic exp_h, exp_l;
  initial begin
    #2 chk(dataout == 0, "cleared");
    #10 aclr = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge outclock);
      datain_h = 1'($urandom);
      datain_l = 1'($urandom);
      exp_h = datain_h;
      exp_l = datain_l;
      @(posedge outclock);
      #2 chk(dataout == exp_h, "high half carries datain_h");
      datain_h = 1'($urandom);       // changes after the edge must not show
      @(negedge outclock);
      #2 chk(dataout == exp_l, "low half carries datain_l");
    end
    datain_h = 1; datain_l = 1;
    @(negedge outclock) datain_h = 1; datain_l = 0;
    repeat (2) @(posedge outclock);
    for (int i = 0; i < 40; i++) begin
      #1 chk(dataout == outclock, "forwarded clock follows outclock");
      #2 chk(dataout == outclock, "forwarded clock follows outclock");
      #1;
    end
    aclr = 1;
    #1 chk(dataout == 0 || !outclock && datain_l == 0, "aclr clears");
    @(posedge outclock) #1 chk(dataout == 0, "stays clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
