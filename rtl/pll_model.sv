// Behavioural model (not synthesizable) of the board PLL that makes the
// system clocks from the 50 MHz oscillator. On an FPGA this is the vendor's
// analog PLL macro; the model only reproduces what the rest of the design
// sees of it.
//
// Outputs, all starting at the first rising edge of inclk0:
//   c0 - 100 MHz system clock, rising edges aligned with inclk0
//   c1 - 100 MHz clock shifted by C1_PHASE_NS (-1.5 ns: it rises 1.5 ns
//        before c0), for the external SDRAM, so that the memory sees the
//        controller's signals with margin despite the FPGA's I/O delays
//   c2 - 125 MHz transmit clock for the Gigabit-Ethernet PHYs
// 'locked' rises at the LOCK_CYCLES-th rising edge of inclk0 after areset is
// released; each output then starts with its next full pulse. While not
// locked the outputs stay low; areset drops lock and stops them at once.
// The 50 MHz input, the two 100 MHz outputs and the -1.5 ns shift are the
// prototype's; the 125 MHz output (the standard Gigabit transmit clock) and
// the lock time are this model's assumptions.
module pll_model #(
  parameter real         C0_PERIOD_NS = 10.0,
  parameter real         C1_PERIOD_NS = 10.0,
  parameter real         C1_PHASE_NS  = -1.5,
  parameter real         C2_PERIOD_NS = 8.0,
  parameter int unsigned LOCK_CYCLES  = 16
) (
  input  logic inclk0,
  input  logic areset,
  output logic c0,
  output logic c1,
  output logic c2,
  output logic locked
);

  logic        g0, g1, g2;        // free-running oscillators
  int unsigned edges = 0;         // input edges since areset
  logic        lock_q = 1'b0;

  initial begin
    g0 = 1'b0;
    g1 = 1'b0;
    g2 = 1'b0;
    @(posedge inclk0);
    fork
      forever begin
        g0 = 1'b1; #(C0_PERIOD_NS / 2.0);
        g0 = 1'b0; #(C0_PERIOD_NS / 2.0);
      end
      begin
        // a negative shift is a delay of one period less the shift
        #(C1_PHASE_NS < 0.0 ? C1_PERIOD_NS + C1_PHASE_NS : C1_PHASE_NS);
        forever begin
          g1 = 1'b1; #(C1_PERIOD_NS / 2.0);
          g1 = 1'b0; #(C1_PERIOD_NS / 2.0);
        end
      end
      forever begin
        g2 = 1'b1; #(C2_PERIOD_NS / 2.0);
        g2 = 1'b0; #(C2_PERIOD_NS / 2.0);
      end
    join
  end

  always @(posedge inclk0 or posedge areset) begin
    if (areset) begin
      edges  <= 0;
      lock_q <= 1'b0;
    end else begin
      if (edges < LOCK_CYCLES) edges <= edges + 1;
      lock_q <= (edges >= LOCK_CYCLES - 1);
    end
  end

  assign locked = lock_q;

  // Each output starts at a falling edge of its oscillator after lock, so
  // no output begins with a shortened pulse.
  logic e0 = 1'b0, e1 = 1'b0, e2 = 1'b0;
  always @(negedge g0 or negedge locked) e0 <= locked;
  always @(negedge g1 or negedge locked) e1 <= locked;
  always @(negedge g2 or negedge locked) e2 <= locked;

  assign c0 = g0 && e0;
  assign c1 = g1 && e1;
  assign c2 = g2 && e2;

endmodule
