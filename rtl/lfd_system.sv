// Display wall with its board clocking: lfd_top (host splitter and the
// daisy chain of zero-client modules) driven from the board's 50 MHz
// oscillator through the PLL.
//
// The PLL makes the 100 MHz system clock (c0) for all logic, a 100 MHz copy
// shifted by -1.5 ns (c1) that leaves on sdram_clk for the host's external
// SDRAM, and a 125 MHz transmit clock (c2). One DDIO output register per
// Ethernet transmitter (the host's and each module's downstream port)
// forwards c2 as an edge-aligned transmit clock to its PHY on
// eth_gtx_clk[0..NUM_MODULES]; index 0 is the host.
//
// The logic leaves reset only when rst_n is high and the PLL is locked: the
// reset is asserted at once and released through two flip-flops on the
// system clock. One PLL serves every board here; on real hardware each board
// has its own oscillator and PLL and the network separates their clocks.
// Apart from clk_50, sdram_clk and eth_gtx_clk, the ports are those of
// lfd_top and are timed by the system clock, whose rising edges come 1.5 ns
// after those of sdram_clk.
module lfd_system #(
  parameter int unsigned NUM_MODULES = 2,
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned V_ACTIVE    = 480,
  parameter int unsigned AW          = 20,
  parameter int unsigned SRC_AW      = 25
) (
  input  logic                    clk_50,
  input  logic                    rst_n,
  // clocks to the external parts
  output logic                    sdram_clk,
  output logic                    eth_gtx_clk [NUM_MODULES+1],
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
  // status pulses
  output logic                    frag_kept   [NUM_MODULES],
  output logic                    frag_fwd    [NUM_MODULES],
  output logic                    write_stall [NUM_MODULES],
  output logic                    underflow   [NUM_MODULES],
  output logic                    host_stall
);

  logic       clk_sys, clk_tx, locked;
  logic [1:0] rst_sync = 2'b00;   // power-up value, as FPGA flip-flops have

  pll_model u_pll (
    .inclk0 (clk_50),
    .areset (!rst_n),
    .c0     (clk_sys),
    .c1     (sdram_clk),
    .c2     (clk_tx),
    .locked
  );

  // asynchronous assertion, synchronous release
  always_ff @(posedge clk_sys or negedge locked) begin
    if (!locked) rst_sync <= 2'b00;
    else         rst_sync <= {rst_sync[0], 1'b1};
  end

  for (genvar i = 0; i <= NUM_MODULES; i++) begin : g_gtx
    ddio_out u_ddio (
      .outclock (clk_tx),
      .aclr     (!locked),
      .datain_h (1'b1),
      .datain_l (1'b0),
      .dataout  (eth_gtx_clk[i])
    );
  end

  lfd_top #(
    .NUM_MODULES(NUM_MODULES), .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE),
    .AW(AW), .SRC_AW(SRC_AW)
  ) u_wall (
    .clk (clk_sys), .rst_n (rst_sync[1]),
    .start, .busy, .done,
    .src_req, .src_addr, .src_gnt, .src_rvalid, .src_rdata,
    .tail_valid, .tail_beat, .tail_ready,
    .sram_addr, .sram_dq_o, .sram_dq_i, .sram_dq_oe, .sram_ce_n, .sram_oe_n, .sram_we_n,
    .vga_clk, .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n,
    .frag_kept, .frag_fwd, .write_stall, .underflow, .host_stall
  );

endmodule
