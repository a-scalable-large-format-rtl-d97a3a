// Synchronous FIFO for the fragment word stream.
//
// A circular buffer of DEPTH beats with a valid/ready handshake on both
// sides. in_ready depends only on the fill level (registered state), so a
// FIFO breaks the ready path between neighbouring modules of the daisy chain.
// out_beat shows the oldest beat without delay. A beat written into an empty
// FIFO can be read in the next cycle.
module stream_fifo #(
  parameter int unsigned DEPTH = 32   // a power of two
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  zc_pkg::beat_t in_beat,
  output logic          in_ready,
  output logic          out_valid,
  output zc_pkg::beat_t out_beat,
  input  logic          out_ready
);

  localparam int unsigned PW = $clog2(DEPTH);

  zc_pkg::beat_t mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic [PW:0]   count;
  logic          wr, rd;

  always_comb begin
    in_ready  = (count != (PW+1)'(DEPTH));
    out_valid = (count != '0);
    out_beat  = mem[rd_ptr];
    wr        = in_valid && in_ready;
    rd        = out_valid && out_ready;
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= in_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr) wr_ptr <= wr_ptr + 1'b1;
      if (rd) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (PW+1)'(wr) - (PW+1)'(rd);
    end
  end

endmodule
