// Testbench for vga_sync_gen at the default 640x480 timing. The pixel enable
// is high on two of every three clocks. Every cycle the outputs are compared
// with a position computed from the number of enables seen since reset, and
// the sync pulse counts per frame are checked.
module tb_vga_sync_gen;
  logic clk = 0, rst_n = 0, pix_en = 0;
  logic hsync_n, vsync_n, active, vblank_start;
  logic [11:0] x, y;
  int checks = 0, failures = 0;
  longint n = 0;          // pixel enables seen
  int cyc = 0;

  vga_sync_gen dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at n=%0d", what, n);
    end
  endtask

  int h, v, hs_pulses, vs_pulses, act_pix, vb_pulses;
  logic hs_prev = 1, vs_prev = 1;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    h = int'(n % 800);
    v = int'((n / 800) % 525);
    chk(x == 12'(h) && y == 12'(v), "position");
    chk(active == (h < 640 && v < 480), "active");
    chk(hsync_n == !(h >= 656 && h < 752), "hsync");
    chk(vsync_n == !(v >= 490 && v < 492), "vsync");
    chk(vblank_start == (pix_en && h == 0 && v == 480), "vblank_start");
    if (pix_en) begin
      if (active) act_pix++;
      if (vblank_start) vb_pulses++;
      n = n + 1;
    end
    if (hs_prev && !hsync_n) hs_pulses++;
    if (vs_prev && !vsync_n) vs_pulses++;
    hs_prev = hsync_n;
    vs_prev = vsync_n;
    pix_en <= (cyc % 3 != 2);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n == 2 * 800 * 525);
    @(posedge clk);
    chk(act_pix == 2 * 640 * 480, "visible pixels per two frames");
    chk(hs_pulses == 2 * 525, "hsync pulses per two frames");
    chk(vs_pulses == 2, "vsync pulses per two frames");
    chk(vb_pulses == 2, "vblank pulses per two frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
