// Full-size end-to-end testbench of the display wall with its clocking: the
// 50 MHz board clock drives the PLL model, and the wall runs at its default
// size, a host and two zero-client modules with 640x480 screens (a 1280x480
// wall). The host memory model holds a computed 1280x480 picture. Like the
// external SDRAM it works on sdram_clk, the 100 MHz clock 1.5 ns ahead of the
// system clock: it answers two system cycles after a grant and withholds
// grants at random. Each module has a behavioural 4 MB SRAM. The host sends
// the whole picture once; then a complete frame is captured from each
// module's VGA outputs and every pixel is compared with its half of the
// picture. The forwarded PHY transmit clocks must run at 125 MHz.
//
// Mechanisms counted (each must occur): fragments kept by module 0 and by
// module 1, fragments forwarded by module 0 to module 1, image writes held
// off by the display's SRAM priority, and backpressure on the first link.
// FIFO underflows and words leaving the end of the chain must not occur.
module tb_lfd_system;
  import zc_pkg::*;
  localparam int N = 2, H = 640, V = 480, AW = 20, SRC_AW = 25;
  logic clk_50 = 0, rst_n = 0, clk, sdram_clk;
  logic eth_gtx_clk [N+1];
  logic start = 0, busy, done;
  logic src_req, src_gnt, src_rvalid;
  logic [SRC_AW-1:0] src_addr;
  logic [31:0] src_rdata;
  logic tail_valid, tail_ready = 1;
  beat_t tail_beat;
  logic [AW-1:0] sram_addr [N];
  logic [31:0] sram_dq_o [N], sram_dq_i [N];
  logic sram_dq_oe [N], sram_ce_n [N], sram_oe_n [N], sram_we_n [N];
  logic vga_clk [N], vga_hs [N], vga_vs [N], vga_blank_n [N];
  logic [7:0] vga_r [N], vga_g [N], vga_b [N];
  logic frag_kept [N], frag_fwd [N], write_stall [N], underflow [N], host_stall;
  int checks = 0, failures = 0;

  lfd_system dut (.*);

  assign clk = sdram_clk;   // the testbench's models run on the SDRAM clock

  for (genvar i = 0; i < N; i++) begin : g_mem
    sram_model #(.AW(AW)) u_mem (.clk, .addr(sram_addr[i]), .dq_o(sram_dq_o[i]),
      .dq_i(sram_dq_i[i]), .dq_oe(sram_dq_oe[i]), .ce_n(sram_ce_n[i]),
      .oe_n(sram_oe_n[i]), .we_n(sram_we_n[i]));
  end

  always #10 clk_50 = ~clk_50;

  function automatic logic [23:0] img(input int a);
    return 24'(a) * 24'h000B07 ^ 24'hC0FFEE;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // host memory (answers only once the wall is out of reset)
  bit go = 0;
  logic v1, v2;
  logic [SRC_AW-1:0] a1, a2;
  // The grant is decided at the sdram_clk edge and seen by the wall at the
  // system clock edge 1.5 ns later, so the request is paired with the new
  // grant value here.
  bit gnt_next;
  always @(posedge clk) begin
    gnt_next = ($urandom % 4) != 0;
    src_gnt <= gnt_next;
    v1 <= src_req && gnt_next && go; a1 <= src_addr;
    v2 <= v1;                        a2 <= a1;
  end
  assign src_rvalid = v2;
  assign src_rdata  = {8'h00, img(int'(a2))};

  // mechanism counters
  int kept [N], fwd0 = 0, stalls = 0, link_bp = 0, underflows = 0, tail_words = 0;
  initial for (int i = 0; i < N; i++) kept[i] = 0;
  always @(posedge clk) if (go) begin
    if (frag_kept[0]) kept[0]++;
    if (frag_kept[1]) kept[1]++;
    if (frag_fwd[0])  fwd0++;
    if (write_stall[0] || write_stall[1]) stalls++;
    if (underflow[0] || underflow[1]) underflows++;
    if (host_stall) link_bp++;
    if (tail_valid) tail_words++;
  end

  // forwarded transmit clocks: 125 MHz
  int gtx_edges [N+1];
  realtime gtx_last [N+1];
  for (genvar i = 0; i <= N; i++) begin : g_gtx
    initial begin gtx_edges[i] = 0; gtx_last[i] = -1; end
    always @(posedge eth_gtx_clk[i]) begin
      if (gtx_last[i] >= 0 && gtx_edges[i] < 1000)
        chk(($realtime - gtx_last[i]) > 7.99 && ($realtime - gtx_last[i]) < 8.01, "gtx clock period");
      gtx_last[i] = $realtime;
      gtx_edges[i]++;
    end
  end

  // monitor capture, one checker per screen
  bit sent = 0;
  int frames_checked [N];
  for (genvar i = 0; i < N; i++) begin : g_mon
    logic vclk_prev = 0, vs_prev = 1;
    int k = 0;
    bit armed = 0;
    initial frames_checked[i] = 0;
    always @(posedge clk) if (rst_n) begin
      if (!vclk_prev && vga_clk[i]) begin
        if (vs_prev && !vga_vs[i]) begin
          if (armed) begin
            chk(k == H * V, "visible pixels per frame");
            frames_checked[i]++;
          end
          k = 0;
          armed = sent;
        end
        if (vga_blank_n[i]) begin
          if (armed)
            chk({vga_r[i], vga_g[i], vga_b[i]} == img((k / H) * N * H + i * H + (k % H)),
                "displayed pixel");
          k++;
        end
        vs_prev = vga_vs[i];
      end
      vclk_prev = vga_clk[i];
    end
  end

  longint t0, t1;
  initial begin
    v1 = 0; v2 = 0; a1 = '0; a2 = '0; src_gnt = 0;
    #100 rst_n = 1;
    repeat (20) @(posedge clk);
    go = 1;
    @(negedge clk) start = 1;
    t0 = $time;
    @(negedge clk) start = 0;
    wait (done);
    t1 = $time;
    repeat (10) @(posedge clk);
    sent = 1;
    $display("wall image sent in %0d clocks", (t1 - t0) / 10);
    wait (frames_checked[0] >= 1 && frames_checked[1] >= 1);
    $display("kept: module0 %0d, module1 %0d; forwarded by module0 %0d", kept[0], kept[1], fwd0);
    $display("write stalls %0d, link backpressure %0d, underflows %0d, tail words %0d",
             stalls, link_bp, underflows, tail_words);
    chk(kept[0] == V * H / FRAG_PIXELS, "fragments kept by module 0");
    chk(kept[1] == V * H / FRAG_PIXELS, "fragments kept by module 1");
    chk(fwd0 == V * H / FRAG_PIXELS, "fragments forwarded by module 0");
    chk(stalls > 0, "display priority held off writes");
    chk(link_bp > 0, "link backpressure happened");
    chk(underflows == 0, "no display FIFO underflow");
    chk(tail_words == 0, "nothing left the end of the chain");
    for (int i = 0; i <= N; i++) chk(gtx_edges[i] > 1000, "gtx clock running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
