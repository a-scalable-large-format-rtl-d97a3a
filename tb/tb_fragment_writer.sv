// Testbench for fragment_writer with the image buffer at word 1000. 200
// fragments of 20 pixels with random offsets are sent while the SRAM grant
// is withheld at random, as the display port would. Every granted write must
// carry the next expected address (base + offset + k) and pixel; headers must
// be taken at once; frag_done must pulse once per fragment and write_stall
// exactly in the cycles a write waits.
module tb_fragment_writer;
  import zc_pkg::*;
  localparam int AW = 16, BASE = 1000, NFRAG = 200;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, wr_req, wr_gnt = 0, frag_done, write_stall;
  beat_t in_beat;
  logic [AW-1:0] wr_addr;
  logic [31:0] wr_data;
  int checks = 0, failures = 0;

  fragment_writer #(.AW(AW), .FB_BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct { logic [AW-1:0] a; logic [31:0] d; } wr_t;
  wr_t q[$];
  int dones = 0, stalls = 0, writes = 0;

  always @(posedge clk) if (rst_n) begin
    if (wr_req && wr_gnt) begin
      chk(q.size() > 0 && wr_addr == q[0].a && wr_data == q[0].d, "write address and data");
      if (q.size() > 0) void'(q.pop_front());
      writes++;
    end
    chk(write_stall == (wr_req && !wr_gnt), "write_stall");
    if (in_valid && in_beat.sop) chk(in_ready && !wr_req, "header taken at once");
    if (write_stall) stalls++;
    if (frag_done) dones++;
    wr_gnt <= ($urandom % 3) != 0;
  end

  task automatic send(input beat_t b);
    @(negedge clk);
    while ($urandom % 5 == 0) @(negedge clk);
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
      int off;
      beat_t b;
      off = $urandom % 30000;
      b.sop = 1; b.eop = 0; b.data = pack_hdr(8'($urandom), 24'(off));
      send(b);
      for (int k = 0; k < FRAG_PIXELS; k++) begin
        wr_t w;
        b.sop = 0; b.eop = (k == FRAG_PIXELS - 1);
        b.data = $urandom;
        w.a = AW'(BASE + off + k);
        w.d = {8'h00, b.data[23:0]};
        q.push_back(w);
        send(b);
      end
    end
    repeat (10) @(posedge clk);
    chk(q.size() == 0, "all pixels written");
    chk(writes == NFRAG * FRAG_PIXELS, "write count");
    chk(dones == NFRAG, "fragments done");
    chk(stalls > 0, "writes stalled by the arbiter");
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
