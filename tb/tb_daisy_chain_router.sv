// Testbench for daisy_chain_router with module ID 2. 400 random fragments
// (IDs 0..3, 1 to 20 pixels, random gaps) are sent while both outputs apply
// random backpressure. Every word must come out, in order and unchanged, on
// the local port if its fragment carries ID 2 and on the forward port
// otherwise; the per-fragment pulses must match the counts sent each way.
module tb_daisy_chain_router;
  import zc_pkg::*;
  localparam logic [7:0] MY_ID = 8'd2;
  localparam int NFRAG = 400;
  logic clk = 0, rst_n = 0;
  logic [7:0] module_id = MY_ID;
  logic in_valid = 0, in_ready, loc_valid, loc_ready = 0, fwd_valid, fwd_ready = 0;
  beat_t in_beat, loc_beat, fwd_beat;
  logic frag_local, frag_fwd;
  int checks = 0, failures = 0;

  daisy_chain_router dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  beat_t q_loc[$], q_fwd[$];
  int n_loc_sent = 0, n_fwd_sent = 0, n_loc_pulse = 0, n_fwd_pulse = 0;
  int words_loc = 0, words_fwd = 0;

  always @(posedge clk) if (rst_n) begin
    if (loc_valid && loc_ready) begin
      chk(q_loc.size() > 0 && loc_beat == q_loc[0], "local word");
      if (q_loc.size() > 0) void'(q_loc.pop_front());
      words_loc++;
    end
    if (fwd_valid && fwd_ready) begin
      chk(q_fwd.size() > 0 && fwd_beat == q_fwd[0], "forwarded word");
      if (q_fwd.size() > 0) void'(q_fwd.pop_front());
      words_fwd++;
    end
    if (frag_local) n_loc_pulse++;
    if (frag_fwd)   n_fwd_pulse++;
    loc_ready <= ($urandom % 3) != 0;
    fwd_ready <= ($urandom % 2) != 0;
  end

  task automatic send(input beat_t b);
    @(negedge clk);
    while ($urandom % 4 == 0) @(negedge clk);
    in_valid = 1;
    in_beat  = b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAG; f++) begin
      logic [7:0] id;
      int len;
      beat_t b;
      id  = 8'($urandom % 4);
      len = 1 + $urandom % 20;
      b.sop = 1; b.eop = 0; b.data = pack_hdr(id, 24'($urandom));
      if (id == MY_ID) begin q_loc.push_back(b); n_loc_sent++; end
      else             begin q_fwd.push_back(b); n_fwd_sent++; end
      send(b);
      for (int k = 0; k < len; k++) begin
        b.sop = 0; b.eop = (k == len - 1);
        // pixel words may look like headers for any ID
        b.data = {8'($urandom % 4), 24'($urandom)};
        if (id == MY_ID) q_loc.push_back(b); else q_fwd.push_back(b);
        send(b);
      end
    end
    repeat (20) @(posedge clk);
    chk(q_loc.size() == 0 && q_fwd.size() == 0, "all words delivered");
    chk(n_loc_pulse == n_loc_sent, "local fragment count");
    chk(n_fwd_pulse == n_fwd_sent, "forwarded fragment count");
    chk(n_loc_sent > 0 && n_fwd_sent > 0, "both routes used");
    $display("local %0d fragments / %0d words, forwarded %0d / %0d",
             n_loc_pulse, words_loc, n_fwd_pulse, words_fwd);
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
