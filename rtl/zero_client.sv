// Zero-client module: drives one screen of the display wall.
//
// Fragments arrive on the upstream link (rx). The daisy-chain router checks
// the module ID in each header against this module's own ID (module_id, a
// strap such as board switches). Matching fragments are written by the
// fragment writer into the SRAM image buffer; all others go through a
// TX_DEPTH-word transmit FIFO to the downstream link (tx), towards the next
// module. The VGA controller reads the image buffer continuously and shows
// it at 640x480, 60 Hz. Display reads and image writes share the SRAM through
// the SRAM controller, which always serves the display first.
//
// Timing: a word moves from rx to the transmit FIFO in the cycle it is
// accepted and can leave on tx in the next. A pixel word is written to SRAM
// in the cycle it is accepted unless the display holds the SRAM in that
// cycle. The Ethernet MAC, its DMA engines and the PHY of the original module
// are not part of this block: rx and tx are the fragment streams those would
// carry. The external SRAM connects to the sram_* pins.
module zero_client #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned PIX_DIV  = 4,
  parameter int unsigned AW       = 20,
  parameter int unsigned FB_BASE  = 0,
  parameter int unsigned TX_DEPTH = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [zc_pkg::ID_W-1:0] module_id,
  // upstream link
  input  logic                    rx_valid,
  input  zc_pkg::beat_t           rx_beat,
  output logic                    rx_ready,
  // downstream link
  output logic                    tx_valid,
  output zc_pkg::beat_t           tx_beat,
  input  logic                    tx_ready,
  // external SRAM
  output logic [AW-1:0]           sram_addr,
  output logic [31:0]             sram_dq_o,
  input  logic [31:0]             sram_dq_i,
  output logic                    sram_dq_oe,
  output logic                    sram_ce_n,
  output logic                    sram_oe_n,
  output logic                    sram_we_n,
  // monitor
  output logic                    vga_clk,
  output logic [7:0]              vga_r,
  output logic [7:0]              vga_g,
  output logic [7:0]              vga_b,
  output logic                    vga_hs,
  output logic                    vga_vs,
  output logic                    vga_blank_n,
  // status pulses
  output logic                    frag_local,
  output logic                    frag_fwd,
  output logic                    frag_done,
  output logic                    write_stall,
  output logic                    underflow
);

  import zc_pkg::*;

  logic          loc_valid, loc_ready, fwd_valid, fwd_ready;
  beat_t         loc_beat, fwd_beat;
  logic          wr_req, wr_gnt;
  logic [AW-1:0] wr_addr;
  logic [31:0]   wr_data;
  logic          rd_req, rd_gnt, rd_rvalid;
  logic [AW-1:0] rd_addr;
  logic [31:0]   rd_rdata;
  logic          b_rvalid;
  logic [31:0]   b_rdata;

  daisy_chain_router u_router (
    .clk, .rst_n, .module_id,
    .in_valid (rx_valid), .in_beat (rx_beat), .in_ready (rx_ready),
    .loc_valid, .loc_beat, .loc_ready,
    .fwd_valid, .fwd_beat, .fwd_ready,
    .frag_local, .frag_fwd
  );

  stream_fifo #(.DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .in_valid  (fwd_valid), .in_beat (fwd_beat), .in_ready (fwd_ready),
    .out_valid (tx_valid),  .out_beat (tx_beat), .out_ready (tx_ready)
  );

  fragment_writer #(.AW(AW), .FB_BASE(FB_BASE)) u_writer (
    .clk, .rst_n,
    .in_valid (loc_valid), .in_beat (loc_beat), .in_ready (loc_ready),
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .frag_done, .write_stall
  );

  sram_ctrl #(.AW(AW)) u_sram (
    .clk, .rst_n,
    .a_req (rd_req), .a_addr (rd_addr), .a_gnt (rd_gnt),
    .a_rvalid (rd_rvalid), .a_rdata (rd_rdata),
    .b_req (wr_req), .b_we (1'b1), .b_addr (wr_addr), .b_wdata (wr_data),
    .b_gnt (wr_gnt), .b_rvalid, .b_rdata,
    .sram_addr, .sram_dq_o, .sram_dq_i, .sram_dq_oe,
    .sram_ce_n, .sram_oe_n, .sram_we_n
  );

  vga_controller #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .PIX_DIV(PIX_DIV), .AW(AW), .FB_BASE(FB_BASE)
  ) u_vga (
    .clk, .rst_n,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .vga_clk, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n,
    .underflow
  );

  // The write port never reads back.
  logic unused;
  assign unused = ^{b_rvalid, b_rdata};

endmodule
