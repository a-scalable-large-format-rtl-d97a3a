// Behavioural model of the external asynchronous SRAM image buffer
// (testbench only). Reads are combinational from the address while ce_n and
// oe_n are low; a write is taken at the clock edge that ends a cycle with
// ce_n and we_n low, which is how the controller drives the pins. Contents
// start at zero.
module sram_model #(
  parameter int unsigned AW = 20
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   dq_o,     // from the controller
  output logic [31:0]   dq_i,     // to the controller
  input  logic          dq_oe,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);
  logic [31:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  assign dq_i = (!ce_n && !oe_n) ? mem[addr] : 32'hDEAD_BEEF;

  always @(posedge clk)
    if (!ce_n && !we_n && dq_oe) mem[addr] <= dq_o;
endmodule
