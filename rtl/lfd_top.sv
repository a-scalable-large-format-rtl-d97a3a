// Large-format display wall: a host module and a daisy chain of zero-client
// modules, one per screen.
//
// The host's image splitter reads the wall image (NUM_MODULES screens side
// by side) from host memory and sends it as fragments, each tagged with the
// ID of the screen it belongs to. Module 0 receives them; every module keeps
// the fragments carrying its own ID and passes the rest to the next module,
// so one link from the host feeds any number of screens. Module i has ID i.
// With the defaults two 640x480 screens form a 1280x480 wall.
//
// Each link of the chain stands for the Gigabit-Ethernet hop between two
// boards (MAC, DMA, PHY and cable are outside this RTL) and is modelled as
// the fragment word stream with valid/ready. The stream leaving the last
// module (fragments whose ID no module owns) is brought out on tail_*.
// External parts are brought out as ports: the host memory read port
// (src_*), each module's SRAM pins and each module's VGA pins, indexed by
// module. Per-module status pulses (fragment kept, fragment forwarded, write
// held off by the display, display FIFO underflow) and host_stall (the first
// link refusing a word) are brought out for monitoring.
module lfd_top #(
  parameter int unsigned NUM_MODULES = 2,
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned H_FP        = 16,
  parameter int unsigned H_SYNC      = 96,
  parameter int unsigned H_BP        = 48,
  parameter int unsigned V_ACTIVE    = 480,
  parameter int unsigned V_FP        = 10,
  parameter int unsigned V_SYNC      = 2,
  parameter int unsigned V_BP        = 33,
  parameter int unsigned PIX_DIV     = 4,
  parameter int unsigned AW          = 20,
  parameter int unsigned SRC_AW      = 25,
  parameter int unsigned TX_DEPTH    = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // host memory read port
  output logic                    src_req,
  output logic [SRC_AW-1:0]       src_addr,
  input  logic                    src_gnt,
  input  logic                    src_rvalid,
  input  logic [31:0]             src_rdata,
  // stream leaving the end of the chain
  output logic                    tail_valid,
  output zc_pkg::beat_t           tail_beat,
  input  logic                    tail_ready,
  // per-module SRAM pins
  output logic [AW-1:0]           sram_addr  [NUM_MODULES],
  output logic [31:0]             sram_dq_o  [NUM_MODULES],
  input  logic [31:0]             sram_dq_i  [NUM_MODULES],
  output logic                    sram_dq_oe [NUM_MODULES],
  output logic                    sram_ce_n  [NUM_MODULES],
  output logic                    sram_oe_n  [NUM_MODULES],
  output logic                    sram_we_n  [NUM_MODULES],
  // per-module monitor outputs
  output logic                    vga_clk     [NUM_MODULES],
  output logic [7:0]              vga_r       [NUM_MODULES],
  output logic [7:0]              vga_g       [NUM_MODULES],
  output logic [7:0]              vga_b       [NUM_MODULES],
  output logic                    vga_hs      [NUM_MODULES],
  output logic                    vga_vs      [NUM_MODULES],
  output logic                    vga_blank_n [NUM_MODULES],
  // status pulses, per module and of the first link
  output logic                    frag_kept   [NUM_MODULES],
  output logic                    frag_fwd    [NUM_MODULES],
  output logic                    write_stall [NUM_MODULES],
  output logic                    underflow   [NUM_MODULES],
  output logic                    host_stall
);

  import zc_pkg::*;

  // link[i] enters module i; link[NUM_MODULES] leaves the last module.
  logic  link_valid [NUM_MODULES+1];
  beat_t link_beat  [NUM_MODULES+1];
  logic  link_ready [NUM_MODULES+1];

  logic  frag_sent;

  image_splitter #(
    .NUM_MODULES(NUM_MODULES), .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE),
    .SRC_AW(SRC_AW)
  ) u_host (
    .clk, .rst_n, .start, .busy, .done, .frag_sent,
    .src_req, .src_addr, .src_gnt, .src_rvalid, .src_rdata,
    .out_valid (link_valid[0]), .out_beat (link_beat[0]), .out_ready (link_ready[0])
  );

  for (genvar i = 0; i < NUM_MODULES; i++) begin : g_zc
    logic frag_done;   // not needed at this level

    zero_client #(
      .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
      .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
      .PIX_DIV(PIX_DIV), .AW(AW), .TX_DEPTH(TX_DEPTH)
    ) u_zc (
      .clk, .rst_n,
      .module_id (ID_W'(i)),
      .rx_valid (link_valid[i]),   .rx_beat (link_beat[i]),   .rx_ready (link_ready[i]),
      .tx_valid (link_valid[i+1]), .tx_beat (link_beat[i+1]), .tx_ready (link_ready[i+1]),
      .sram_addr (sram_addr[i]), .sram_dq_o (sram_dq_o[i]), .sram_dq_i (sram_dq_i[i]),
      .sram_dq_oe (sram_dq_oe[i]), .sram_ce_n (sram_ce_n[i]),
      .sram_oe_n (sram_oe_n[i]), .sram_we_n (sram_we_n[i]),
      .vga_clk (vga_clk[i]), .vga_r (vga_r[i]), .vga_g (vga_g[i]), .vga_b (vga_b[i]),
      .vga_hs (vga_hs[i]), .vga_vs (vga_vs[i]), .vga_blank_n (vga_blank_n[i]),
      .frag_local (frag_kept[i]), .frag_fwd (frag_fwd[i]), .frag_done,
      .write_stall (write_stall[i]), .underflow (underflow[i])
    );
  end

  assign tail_valid                = link_valid[NUM_MODULES];
  assign tail_beat                 = link_beat[NUM_MODULES];
  assign link_ready[NUM_MODULES]   = tail_ready;

  // the host offers a word the first module cannot take yet
  assign host_stall = link_valid[0] && !link_ready[0];

  logic unused;
  assign unused = frag_sent;

endmodule
