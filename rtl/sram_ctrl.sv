// SRAM controller of the VGA image buffer, with a fixed-priority arbiter.
//
// The image buffer is an external asynchronous SRAM shared by two masters:
//   port A - the pixel buffer DMA of the VGA controller (reads only). The
//            monitor must never starve, so port A has absolute priority and
//            is granted in every cycle in which it requests.
//   port B - the writer of received image data (the processor port in the
//            original system). It is granted only in cycles port A leaves
//            free, i.e. "when the memory is available".
// Grants are combinational (x_gnt in the request cycle). The granted access
// is registered onto the SRAM pins in the next cycle; write data is driven
// in that cycle with we_n low. For a read, the SRAM drives sram_dq_i during
// that cycle and the controller captures it at its end, so read data arrives
// on x_rdata with x_rvalid two cycles after the granted request. One access
// completes per clock (a 10 ns SRAM at the 100 MHz system clock).
//
// The data bus is split into dq_o / dq_i / dq_oe; the bidirectional pad is
// outside this block. Consecutive writes keep we_n low while the address
// moves on; a board whose SRAM needs the address stable around each we_n
// pulse must gate we_n with an inverted clock or leave a cycle between
// writes. The 32-bit word (one 24-bit pixel per word) and the
// 2^20-word depth (4 MB) are this design's choice for the 4 MB SRAM of the
// prototype.
module sram_ctrl #(
  parameter int unsigned AW = 20,   // word address width: 2^20 x 32 bit = 4 MB
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // port A: display read port, highest priority
  input  logic          a_req,
  input  logic [AW-1:0] a_addr,
  output logic          a_gnt,
  output logic          a_rvalid,
  output logic [DW-1:0] a_rdata,
  // port B: image write / read port, served when port A is idle
  input  logic          b_req,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic          b_gnt,
  output logic          b_rvalid,
  output logic [DW-1:0] b_rdata,
  // SRAM pins
  output logic [AW-1:0] sram_addr,
  output logic [DW-1:0] sram_dq_o,
  input  logic [DW-1:0] sram_dq_i,
  output logic          sram_dq_oe,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n
);

  typedef enum logic [1:0] {ACC_NONE, ACC_A_RD, ACC_B_RD, ACC_B_WR} acc_t;

  acc_t acc_q;      // access now on the pins

  always_comb begin
    a_gnt = a_req;
    b_gnt = b_req && !a_req;
  end

  // Stage 1: put the granted access on the pins.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= ACC_NONE;
      sram_addr  <= '0;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
    end else begin
      sram_dq_oe <= 1'b0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      acc_q      <= ACC_NONE;
      if (a_gnt) begin
        acc_q     <= ACC_A_RD;
        sram_addr <= a_addr;
        sram_ce_n <= 1'b0;
        sram_oe_n <= 1'b0;
      end else if (b_gnt) begin
        sram_addr <= b_addr;
        sram_ce_n <= 1'b0;
        if (b_we) begin
          acc_q      <= ACC_B_WR;
          sram_dq_o  <= b_wdata;
          sram_dq_oe <= 1'b1;
          sram_we_n  <= 1'b0;
        end else begin
          acc_q      <= ACC_B_RD;
          sram_oe_n  <= 1'b0;
        end
      end
    end
  end

  // Stage 2: capture read data at the end of the pin cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rvalid <= 1'b0;
      b_rvalid <= 1'b0;
      a_rdata  <= '0;
      b_rdata  <= '0;
    end else begin
      a_rvalid <= (acc_q == ACC_A_RD);
      b_rvalid <= (acc_q == ACC_B_RD);
      if (acc_q == ACC_A_RD) a_rdata <= sram_dq_i;
      if (acc_q == ACC_B_RD) b_rdata <= sram_dq_i;
    end
  end

  // At most one master owns the pins, and the display is never refused.
  a_never_refused : assert property (@(posedge clk) disable iff (!rst_n) a_req |-> a_gnt);
  one_grant       : assert property (@(posedge clk) disable iff (!rst_n) !(a_gnt && b_gnt));

endmodule
