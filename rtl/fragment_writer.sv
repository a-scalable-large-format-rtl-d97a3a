// Fragment writer: stores the pixels of a fragment addressed to this module
// in the SRAM image buffer.
//
// The header word gives the offset of the fragment's first pixel on this
// module's screen; it is latched and the header is consumed at once. Each
// following pixel word is written to word FB_BASE + offset + k (k = 0, 1, ...)
// through the SRAM controller's second port. The write request is presented
// straight from the incoming word, and the word is accepted in the cycle the
// controller grants it; while the display DMA holds the SRAM, the grant is
// withheld and the stream stalls (write_stall is high). frag_done pulses
// with the last pixel of each fragment.
//
// Writing received pixels into the image buffer is what the processor of
// the original module does in software; here it is a small hardware engine.
module fragment_writer #(
  parameter int unsigned AW      = 20,
  parameter int unsigned FB_BASE = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  // fragments for this module
  input  logic          in_valid,
  input  zc_pkg::beat_t in_beat,
  output logic          in_ready,
  // SRAM write port
  output logic          wr_req,
  output logic [AW-1:0] wr_addr,
  output logic [31:0]   wr_data,
  input  logic          wr_gnt,
  // status
  output logic          frag_done,
  output logic          write_stall
);

  import zc_pkg::*;

  logic [AW-1:0] addr_q;    // SRAM word address of the next pixel
  frag_hdr_t     hdr;

  always_comb begin
    hdr         = frag_hdr_t'(in_beat.data);
    wr_req      = in_valid && !in_beat.sop;
    wr_addr     = addr_q;
    wr_data     = {8'h00, in_beat.data[23:0]};
    in_ready    = in_beat.sop ? 1'b1 : wr_gnt;
    frag_done   = wr_req && wr_gnt && in_beat.eop;
    write_stall = wr_req && !wr_gnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      addr_q <= '0;
    else if (in_valid && in_beat.sop) addr_q <= AW'(FB_BASE) + AW'(hdr.offset);
    else if (wr_req && wr_gnt)       addr_q <= addr_q + 1'b1;
  end

endmodule
