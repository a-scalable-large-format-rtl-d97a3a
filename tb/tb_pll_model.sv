// Testbench for the PLL model. A 50 MHz input is applied; the testbench
// measures the outputs with the simulation clock: lock after 16 input edges,
// 10 ns periods with 50 % duty on c0 and c1, c1 rising 1.5 ns before each c0
// rising edge, an 8 ns period on c2, and loss of lock and silent outputs
// while areset is high, followed by a new lock.
module tb_pll_model;
  logic inclk0 = 0, areset = 1;
  logic c0, c1, c2, locked;
  int checks = 0, failures = 0;

  pll_model dut (.*);

  always #10 inclk0 = ~inclk0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  realtime t_c0 = -1, t_c0f = -1, t_c1 = -1, t_c2 = -1;
  int n_c0 = 0, n_c1 = 0, n_c2 = 0;

  always @(posedge c0) begin
    if (t_c0 >= 0 && locked) chk(near($realtime - t_c0, 10.0), "c0 period");
    if (t_c1 >= 0 && locked && n_c0 > 0) chk(near($realtime - t_c1, 1.5), "c1 leads c0 by 1.5 ns");
    t_c0 = $realtime;
    n_c0++;
  end
  always @(negedge c0) if (locked && t_c0 >= 0) chk(near($realtime - t_c0, 5.0), "c0 duty");
  always @(posedge c1) begin
    if (t_c1 >= 0 && locked) chk(near($realtime - t_c1, 10.0), "c1 period");
    t_c1 = $realtime;
    n_c1++;
  end
  always @(posedge c2) begin
    if (t_c2 >= 0 && locked) chk(near($realtime - t_c2, 8.0), "c2 period");
    t_c2 = $realtime;
    n_c2++;
  end

  initial begin
    #55 areset = 0;
    // lock after 16 input rising edges
    repeat (15) @(posedge inclk0);
    #1 chk(!locked, "not locked before 16 edges");
    @(posedge inclk0);
    #1 chk(locked, "locked at 16 edges");
    #1000;
    chk(n_c0 >= 99 && n_c1 >= 99 && n_c2 >= 124, "edge counts over 1 us");
    areset = 1;
    #1 chk(!locked && !c0 && !c1 && !c2, "outputs stop on areset");
    n_c0 = 0;
    #200 chk(n_c0 == 0, "no c0 edges while reset");
    areset = 0;
    t_c0 = -1; t_c1 = -1; t_c2 = -1;
    repeat (16) @(posedge inclk0);
    #1 chk(locked, "locked again");
    #500;
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
