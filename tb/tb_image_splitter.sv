// Testbench for image_splitter on a small wall: 3 screens of 40x3 pixels. A
// host-memory model returns, two cycles after each granted read, a colour
// computed from the address, and withholds grants at random; the stream sink
// applies random backpressure. The testbench rebuilds the expected fragment
// sequence on its own (line by line, screen by screen, 20 pixels at a time)
// and compares every word, then checks the done pulse and fragment count.
// The image is sent twice to check that a second start works.
module tb_image_splitter;
  import zc_pkg::*;
  localparam int N = 3, H = 40, V = 3, AW = 16;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, frag_sent;
  logic src_req, src_gnt, src_rvalid;
  logic [AW-1:0] src_addr;
  logic [31:0] src_rdata;
  logic out_valid, out_ready = 0;
  beat_t out_beat;
  int checks = 0, failures = 0;

  image_splitter #(.NUM_MODULES(N), .H_ACTIVE(H), .V_ACTIVE(V), .SRC_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] img(input int a);
    return {8'hEE, 24'(a) * 24'h000301 ^ 24'h123456};
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic v1, v2;
  logic [AW-1:0] a1, a2;
  always @(posedge clk) begin
    src_gnt <= ($urandom % 3) != 0;
    v1 <= src_req && src_gnt && rst_n; a1 <= src_addr;
    v2 <= v1;                          a2 <= a1;
  end
  assign src_rvalid = v2;
  assign src_rdata  = img(int'(a2));

  beat_t exp_q[$];
  int frags = 0, dones = 0;

  task automatic build_expected();
    for (int y = 0; y < V; y++)
      for (int m = 0; m < N; m++)
        for (int c = 0; c < H / FRAG_PIXELS; c++) begin
          beat_t b;
          b.sop = 1; b.eop = 0;
          b.data = pack_hdr(8'(m), 24'(y * H + c * FRAG_PIXELS));
          exp_q.push_back(b);
          for (int k = 0; k < FRAG_PIXELS; k++) begin
            b.sop = 0; b.eop = (k == FRAG_PIXELS - 1);
            b.data = {8'h00, img(y * N * H + m * H + c * FRAG_PIXELS + k)[23:0]};
            exp_q.push_back(b);
          end
        end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      chk(exp_q.size() > 0 && out_beat == exp_q[0], "fragment word");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (frag_sent) frags++;
    if (done) dones++;
    out_ready <= ($urandom % 4) != 0;
  end

  initial begin
    v1 = 0; v2 = 0; a1 = '0; a2 = '0; src_gnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      build_expected();
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      chk(busy, "busy after start");
      wait (done);
      @(negedge clk);
      chk(!busy, "idle after done");
      chk(exp_q.size() == 0, "whole image sent");
    end
    repeat (2) @(posedge clk);
    chk(frags == 2 * V * N * (H / FRAG_PIXELS), "fragment count");
    chk(dones == 2, "done pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
