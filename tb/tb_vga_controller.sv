// Testbench for vga_controller at the default 640x480, 60 Hz timing. A
// memory model returns, two cycles after each read, a colour computed from
// the address. The monitor side is sampled at every rising edge of vga_clk,
// as a DAC would: each visible pixel must carry the colour of its raster
// position, blanked pixels must be black, and each frame must have 480 lines
// of 640 pixels, 525 hsync pulses and last 800 x 525 pixel clocks of 4 system
// clocks each. Two frames are checked.
module tb_vga_controller;
  localparam int AW = 20;
  logic clk = 0, rst_n = 0;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [AW-1:0] rd_addr;
  logic [31:0] rd_rdata;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, underflow;
  logic [7:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  vga_controller dut (.*);

  always #5 clk = ~clk;

  function automatic logic [23:0] f(input int a);
    return 24'(a) * 24'h00_0107 ^ 24'h3C_5A_99;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic          v1, v2;
  logic [AW-1:0] a1, a2;
  assign rd_gnt = rd_req;
  always @(posedge clk) begin
    v1 <= rd_req && rst_n; a1 <= rd_addr;
    v2 <= v1;     a2 <= a1;
  end
  assign rd_rvalid = v2;
  assign rd_rdata  = {8'h00, f(int'(a2))};

  logic vclk_prev = 0, hs_prev = 1, vs_prev = 1;
  int k = 0;             // visible pixels seen in this frame
  int frames = 0, hs_pulses = 0, vclk_edges = 0, clk_since = 0, underflows = 0;
  longint vs_edge_cyc = -1, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (underflow) underflows++;
    if (!vclk_prev && vga_clk) begin
      vclk_edges++;
      chk(clk_since == 4 || vclk_edges == 1, "vga_clk period of 4 clocks");
      clk_since = 0;
      if (vga_blank_n) begin
        chk({vga_r, vga_g, vga_b} == f(k), "visible pixel colour");
        k++;
      end else begin
        chk({vga_r, vga_g, vga_b} == 24'h0, "black while blanked");
      end
      if (hs_prev && !vga_hs) hs_pulses++;
      if (vs_prev && !vga_vs) begin
        if (vs_edge_cyc >= 0) begin
          chk(k == 640 * 480, "visible pixels per frame");
          chk(hs_pulses == 525, "lines per frame");
          chk(cyc - vs_edge_cyc == 800 * 525 * 4, "frame period in clocks");
          frames++;
        end
        vs_edge_cyc = cyc;
        k = 0;
        hs_pulses = 0;
      end
      hs_prev = vga_hs;
      vs_prev = vga_vs;
    end
    clk_since++;
    vclk_prev = vga_clk;
  end

  initial begin
    v1 = 0; v2 = 0; a1 = '0; a2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (frames == 2);
    chk(underflows == 0, "no FIFO underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
