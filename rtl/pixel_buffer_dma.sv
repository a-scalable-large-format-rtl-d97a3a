// Pixel buffer DMA: streams the frame from the SRAM image buffer to the
// sync generator.
//
// The DMA walks the frame in raster order, from word BASE to word
// BASE + H_ACTIVE*V_ACTIVE - 1, and keeps a small FIFO topped up ahead of the
// display. It issues a read whenever the FIFO plus the reads still in flight
// leave room, so it asks for the SRAM "as soon as possible" and, at one word
// per pixel period (every fourth clock), leaves the remaining SRAM cycles to
// the writer. 'pop' takes the pixel at the FIFO head; pix shows that head
// without delay (show-ahead). A pop from an empty FIFO shows black and
// pulses 'underflow'.
//
// 'restart' (the sync generator's vertical-blank pulse) flushes the FIFO,
// rewinds to the top of the frame and drops the reads still in flight, so
// each frame starts aligned with the raster whatever happened before.
//
// Memory port: rd_req/rd_addr with a grant in the same cycle; data returns on
// rd_rvalid/rd_rdata some cycles later, in order. The FIFO depth is this
// design's choice.
module pixel_buffer_dma #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned AW       = 20,
  parameter int unsigned BASE     = 0,
  parameter int unsigned DEPTH    = 16   // FIFO words, a power of two
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          pop,
  output zc_pkg::rgb_t  pix,
  output logic          underflow,
  // SRAM read port
  output logic          rd_req,
  output logic [AW-1:0] rd_addr,
  input  logic          rd_gnt,
  input  logic          rd_rvalid,
  input  logic [31:0]   rd_rdata
);

  localparam int unsigned NPIX = H_ACTIVE * V_ACTIVE;
  localparam int unsigned PW   = $clog2(DEPTH);
  localparam int unsigned CW   = PW + 1;

  zc_pkg::rgb_t  fifo [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;       // words in the FIFO
  logic [CW-1:0] inflight;    // reads issued, data not yet returned
  logic [CW-1:0] drop;        // returns still to be discarded after a restart
  logic [AW-1:0] idx;         // next pixel index to fetch
  logic          push, do_pop, issue;

  always_comb begin
    rd_req    = !restart && (idx < AW'(NPIX)) && ((count + inflight) < CW'(DEPTH));
    rd_addr   = AW'(BASE) + idx;
    issue     = rd_req && rd_gnt;
    push      = rd_rvalid && (drop == '0) && !restart;
    do_pop    = pop && (count != '0) && !restart;
    underflow = pop && (count == '0);
    pix       = (count != '0) ? fifo[rd_ptr] : '0;
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr] <= rd_rdata[23:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      inflight <= '0;
      drop     <= '0;
      idx      <= '0;
    end else begin
      inflight <= inflight + CW'(issue) - CW'(rd_rvalid);
      if (restart) begin
        wr_ptr <= '0;
        rd_ptr <= '0;
        count  <= '0;
        idx    <= '0;
        drop   <= inflight - CW'(rd_rvalid);
      end else begin
        if (rd_rvalid && drop != '0) drop <= drop - 1'b1;
        if (issue)  idx    <= idx + 1'b1;
        if (push)   wr_ptr <= wr_ptr + 1'b1;
        if (do_pop) rd_ptr <= rd_ptr + 1'b1;
        count <= count + CW'(push) - CW'(do_pop);
      end
    end
  end

  no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
                                 push |-> (count < CW'(DEPTH)) || do_pop);

endmodule
