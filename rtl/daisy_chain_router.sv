// Daisy-chain router: the fragment-ID check of a zero-client module.
//
// Every fragment arriving from the upstream link is looked at once, on its
// header word. If the module ID in the header equals this module's own ID the
// whole fragment goes to the local port, to be written into the image buffer
// and displayed. Otherwise the fragment goes unchanged to the forward port,
// towards the next module of the chain. The decision made on the header is
// held for the rest of the fragment, up to its end-of-packet word.
//
// The router is a combinational demultiplexer: a word moves in the cycle in
// which the selected output is ready, with no added latency, and the input
// ready follows the selected output's ready. frag_local and frag_fwd pulse
// once per fragment routed each way. The match-or-forward rule follows the
// original system; the word-stream form is this design's own.
module daisy_chain_router (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [zc_pkg::ID_W-1:0] module_id,
  // upstream link
  input  logic                  in_valid,
  input  zc_pkg::beat_t         in_beat,
  output logic                  in_ready,
  // fragments for this module
  output logic                  loc_valid,
  output zc_pkg::beat_t         loc_beat,
  input  logic                  loc_ready,
  // fragments for modules further down the chain
  output logic                  fwd_valid,
  output zc_pkg::beat_t         fwd_beat,
  input  logic                  fwd_ready,
  // one pulse per fragment routed
  output logic                  frag_local,
  output logic                  frag_fwd
);

  import zc_pkg::*;

  logic      route_local_q;   // route of the fragment in progress
  logic      sel_local;
  frag_hdr_t hdr;

  always_comb begin
    hdr        = frag_hdr_t'(in_beat.data);
    sel_local  = in_beat.sop ? (hdr.module_id == module_id) : route_local_q;
    loc_beat   = in_beat;
    fwd_beat   = in_beat;
    loc_valid  = in_valid &&  sel_local;
    fwd_valid  = in_valid && !sel_local;
    in_ready   = sel_local ? loc_ready : fwd_ready;
    frag_local = in_valid && in_ready && in_beat.sop &&  sel_local;
    frag_fwd   = in_valid && in_ready && in_beat.sop && !sel_local;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   route_local_q <= 1'b0;
    else if (in_valid && in_ready && in_beat.sop) route_local_q <= sel_local;
  end

  // Framing: a header only after the previous fragment has ended.
  logic in_pkt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       in_pkt <= 1'b0;
    else if (in_valid && in_ready)    in_pkt <= !in_beat.eop;
  end
  framing : assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid && in_pkt |-> !in_beat.sop);

endmodule
