// Testbench for one zero_client module (ID 1) on a reduced 40x6 screen with
// short porches. The fragments that cover this screen (ID 1) are sent mixed
// with fragments for IDs 0 and 2, with random gaps, while the downstream
// link applies random backpressure. Checked: exactly the foreign fragments
// leave on tx, in order and unchanged; the SRAM holds every pixel of this
// screen at its offset; and a whole frame shown after the transfer carries
// the sent picture pixel by pixel, with no FIFO underflow. Also counted:
// SRAM writes that had to wait for the display.
module tb_zero_client;
  import zc_pkg::*;
  localparam int H = 40, V = 6, AW = 12;
  localparam logic [7:0] MY_ID = 8'd1;
  logic clk = 0, rst_n = 0;
  logic [7:0] module_id = MY_ID;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  beat_t rx_beat, tx_beat;
  logic [AW-1:0] sram_addr;
  logic [31:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n;
  logic [7:0] vga_r, vga_g, vga_b;
  logic frag_local, frag_fwd, frag_done, write_stall, underflow;
  int checks = 0, failures = 0;

  zero_client #(.H_ACTIVE(H), .H_FP(4), .H_SYNC(8), .H_BP(4),
                .V_ACTIVE(V), .V_FP(1), .V_SYNC(2), .V_BP(1), .AW(AW)) dut (.*);
  sram_model #(.AW(AW)) u_mem (.clk, .addr(sram_addr), .dq_o(sram_dq_o), .dq_i(sram_dq_i),
                               .dq_oe(sram_dq_oe), .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n));

  always #5 clk = ~clk;

  function automatic logic [23:0] pic(input int id, input int off);
    return 24'(off) * 24'h010305 ^ {8'(id), 16'hA5C3};
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  beat_t q_tx[$];
  int n_fwd = 0, n_loc = 0, n_done = 0, stalls = 0, underflows = 0;

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      chk(q_tx.size() > 0 && tx_beat == q_tx[0], "forwarded word");
      if (q_tx.size() > 0) void'(q_tx.pop_front());
    end
    if (frag_fwd) n_fwd++;
    if (frag_local) n_loc++;
    if (frag_done) n_done++;
    if (write_stall) stalls++;
    if (underflow) underflows++;
    tx_ready <= ($urandom % 3) != 0;
  end

  task automatic send(input beat_t b);
    @(negedge clk);
    while ($urandom % 6 == 0) @(negedge clk);
    rx_valid = 1;
    rx_beat  = b;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    @(negedge clk) rx_valid = 0;
  endtask

  task automatic send_frag(input int id, input int off);
    beat_t b;
    b.sop = 1; b.eop = 0; b.data = pack_hdr(8'(id), 24'(off));
    if (id != MY_ID) q_tx.push_back(b);
    send(b);
    for (int k = 0; k < FRAG_PIXELS; k++) begin
      b.sop = 0; b.eop = (k == FRAG_PIXELS - 1);
      b.data = {8'h00, pic(id, off + k)};
      if (id != MY_ID) q_tx.push_back(b);
      send(b);
    end
  endtask

  // sample the monitor side at rising vga_clk
  logic vclk_prev = 0, vs_prev = 1;
  int k = 0, frames_checked = 0;
  bit armed = 0;
  always @(posedge clk) if (rst_n) begin
    if (!vclk_prev && vga_clk) begin
      if (vs_prev && !vga_vs) begin
        if (armed) begin
          chk(k == H * V, "visible pixels per frame");
          frames_checked++;
        end
        k = 0;
        armed = (n_done == H * V / FRAG_PIXELS);
      end
      if (vga_blank_n) begin
        if (armed) chk({vga_r, vga_g, vga_b} == pic(MY_ID, k), "displayed pixel");
        k++;
      end
      vs_prev = vga_vs;
    end
    vclk_prev = vga_clk;
  end

  initial begin
    rx_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int off = 0; off < H * V; off += FRAG_PIXELS) begin
      send_frag(0, off);
      send_frag(1, off);
      if (off % 40 == 0) send_frag(2, off);
    end
    wait (q_tx.size() == 0);
    repeat (5) @(posedge clk);
    chk(n_loc == H * V / FRAG_PIXELS && n_done == n_loc, "own fragments written");
    chk(n_fwd == H * V / FRAG_PIXELS + (H * V / 40), "foreign fragments forwarded");
    for (int i = 0; i < H * V; i++)
      chk(u_mem.mem[i][23:0] == pic(MY_ID, i), "image buffer contents");
    wait (frames_checked == 2);
    chk(stalls > 0, "writes waited for the display");
    chk(underflows == 0, "no FIFO underflow");
    $display("own %0d, forwarded %0d, write stalls %0d", n_loc, n_fwd, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
