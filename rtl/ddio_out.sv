// Behavioural model of the FPGA's double-data-rate output register (the
// DDIO module), used to forward a clock to an external Ethernet PHY.
//
// datain_h is captured at the rising edge of outclock and datain_l at the
// falling edge; dataout shows the high-phase value while outclock is high
// and the low-phase value while it is low. With datain_h = 1 and
// datain_l = 0 the output is a copy of outclock whose edges come from the
// same output register as the data pins, so the PHY receives a transmit
// clock edge-aligned with them, which a clock routed straight to a pin would
// not give. aclr clears both halves. On an FPGA this is a vendor I/O cell
// (the output multiplexer switches on the clock itself, which ordinary logic
// should not do); this model reproduces its function, not its timing.
module ddio_out (
  input  logic outclock,
  input  logic aclr,
  input  logic datain_h,
  input  logic datain_l,
  output logic dataout
);

  logic h_q = 1'b0, l_q = 1'b0;   // power-up values of the I/O registers

  always_ff @(posedge outclock or posedge aclr) begin
    if (aclr) h_q <= 1'b0;
    else      h_q <= datain_h;
  end

  always_ff @(negedge outclock or posedge aclr) begin
    if (aclr) l_q <= 1'b0;
    else      l_q <= datain_l;
  end

  assign dataout = outclock ? h_q : l_q;

endmodule
