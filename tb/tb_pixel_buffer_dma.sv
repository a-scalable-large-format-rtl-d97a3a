// Testbench for pixel_buffer_dma on a 16x4 frame at base address 100. A
// memory model answers granted reads two cycles later with a value computed
// from the address, and withholds the grant at random. Each frame is read
// out at one pixel per four clocks and compared pixel by pixel; one frame is
// cut short by a restart, which must rewind to the first pixel. A pop right
// after a restart must find the FIFO empty and report underflow.
module tb_pixel_buffer_dma;
  localparam int H = 16, V = 4, NPIX = H * V, BASE = 100, AW = 12;
  logic clk = 0, rst_n = 0;
  logic restart = 0, pop = 0, underflow;
  zc_pkg::rgb_t pix;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [AW-1:0] rd_addr;
  logic [31:0] rd_rdata;
  int checks = 0, failures = 0, underflows = 0;

  pixel_buffer_dma #(.H_ACTIVE(H), .V_ACTIVE(V), .AW(AW), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] f(input logic [AW-1:0] a);
    return {8'hA5, 24'(a) * 24'h010203 ^ 24'h5A3C1E};
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // two-stage memory pipeline
  logic          v1, v2;
  logic [AW-1:0] a1, a2;
  always @(posedge clk) begin
    rd_gnt <= ($urandom % 4) != 0;
    v1 <= rd_req && rd_gnt && rst_n; a1 <= rd_addr;
    v2 <= v1;               a2 <= a1;
  end
  assign rd_rvalid = v2;
  assign rd_rdata  = f(a2);

  always @(posedge clk) if (rst_n) begin
    if (rd_req) chk(rd_addr >= AW'(BASE) && rd_addr < AW'(BASE + NPIX), "read inside the frame");
    if (underflow) underflows++;
  end

  task automatic do_restart();
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
  endtask

  task automatic read_frame(input int n);
    for (int i = 0; i < n; i++) begin
      repeat (3) @(negedge clk);
      chk(pix == f(AW'(BASE + i))[23:0], "pixel value");
      chk(!underflow, "no underflow at the display rate");
      pop = 1;
      @(negedge clk) pop = 0;
    end
  endtask

  initial begin
    rd_gnt = 0; v1 = 0; v2 = 0; a1 = '0; a2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 4; fr++) begin
      do_restart();
      if (fr == 1) begin
        // pop at once: the FIFO was just flushed
        pop = 1;
        #1 chk(underflow && pix == '0, "underflow right after restart");
        @(negedge clk) pop = 0;
        do_restart();
      end
      repeat (60) @(negedge clk);
      read_frame(fr == 2 ? 10 : NPIX);
    end
    do_restart();
    repeat (60) @(negedge clk);
    read_frame(NPIX);
    chk(underflows == 1, "exactly one underflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
