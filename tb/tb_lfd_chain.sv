// Scalability testbench of the display wall: a chain of four zero-client
// modules with reduced 40x6 screens and short porches (a 160x6 wall), so that
// fragments cross up to three forwarding hops. The host memory model holds a
// computed picture and withholds grants at random; the end of the chain
// applies random backpressure. The picture is sent twice (the second time
// with different contents) and after each transfer a complete frame is
// captured from every module and compared pixel by pixel with its part of
// the picture. Fragment counts per module (kept and forwarded) are checked
// against the numbers the chain position implies.
module tb_lfd_chain;
  import zc_pkg::*;
  localparam int N = 4, H = 40, V = 6, AW = 12, SRC_AW = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic src_req, src_gnt, src_rvalid;
  logic [SRC_AW-1:0] src_addr;
  logic [31:0] src_rdata;
  logic tail_valid, tail_ready;
  beat_t tail_beat;
  logic [AW-1:0] sram_addr [N];
  logic [31:0] sram_dq_o [N], sram_dq_i [N];
  logic sram_dq_oe [N], sram_ce_n [N], sram_oe_n [N], sram_we_n [N];
  logic vga_clk [N], vga_hs [N], vga_vs [N], vga_blank_n [N];
  logic [7:0] vga_r [N], vga_g [N], vga_b [N];
  logic frag_kept [N], frag_fwd [N], write_stall [N], underflow [N], host_stall;
  int checks = 0, failures = 0;

  lfd_top #(.NUM_MODULES(N), .H_ACTIVE(H), .H_FP(4), .H_SYNC(8), .H_BP(4),
            .V_ACTIVE(V), .V_FP(1), .V_SYNC(2), .V_BP(1), .AW(AW), .SRC_AW(SRC_AW)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_mem
    sram_model #(.AW(AW)) u_mem (.clk, .addr(sram_addr[i]), .dq_o(sram_dq_o[i]),
      .dq_i(sram_dq_i[i]), .dq_oe(sram_dq_oe[i]), .ce_n(sram_ce_n[i]),
      .oe_n(sram_oe_n[i]), .we_n(sram_we_n[i]));
  end

  always #5 clk = ~clk;

  int pass_no = 0;
  function automatic logic [23:0] img(input int a);
    return 24'(a) * 24'h000B07 ^ 24'hC0FFEE ^ 24'(pass_no * 24'h111111);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // host memory
  logic v1, v2;
  logic [SRC_AW-1:0] a1, a2;
  always @(posedge clk) begin
    src_gnt <= ($urandom % 4) != 0;
    v1 <= src_req && src_gnt && rst_n; a1 <= src_addr;
    v2 <= v1;                          a2 <= a1;
  end
  assign src_rvalid = v2;
  assign src_rdata  = {8'h00, img(int'(a2))};

  // mechanism counters
  int kept [N], fwd [N], stalls = 0, link_bp = 0, underflows = 0, tail_words = 0;
  initial for (int i = 0; i < N; i++) begin kept[i] = 0; fwd[i] = 0; end
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (frag_kept[i])   kept[i]++;
      if (frag_fwd[i])    fwd[i]++;
      if (write_stall[i]) stalls++;
      if (underflow[i])   underflows++;
    end
    if (host_stall) link_bp++;
    if (tail_valid && tail_ready) tail_words++;
    tail_ready <= ($urandom % 2) == 0;
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
      if (!sent) armed = 0;   // a new picture is on its way
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

  function automatic bit all_checked(input int n);
    for (int i = 0; i < N; i++) if (frames_checked[i] < n) return 0;
    return 1;
  endfunction

  initial begin
    v1 = 0; v2 = 0; a1 = '0; a2 = '0; src_gnt = 0; tail_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      sent = 0;
      pass_no = p;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      repeat (10) @(posedge clk);
      sent = 1;
      while (!all_checked(p + 1)) @(posedge clk);
    end
    for (int i = 0; i < N; i++) begin
      $display("module %0d: kept %0d, forwarded %0d", i, kept[i], fwd[i]);
      chk(kept[i] == 2 * V * H / FRAG_PIXELS, "fragments kept");
      chk(fwd[i] == 2 * (N - 1 - i) * V * H / FRAG_PIXELS, "fragments forwarded");
    end
    $display("write stalls %0d, link backpressure %0d, underflows %0d, tail words %0d",
             stalls, link_bp, underflows, tail_words);
    chk(stalls > 0, "display priority held off writes");
    chk(link_bp > 0, "link backpressure happened");
    chk(underflows == 0, "no display FIFO underflow");
    chk(tail_words == 0, "nothing left the end of the chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
