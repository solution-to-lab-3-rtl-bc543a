// gated_pulse_fsm: asynchronous gated pulse generator.
//
// Watches two inputs, clk and gate, and drives an active-low output y:
//  * gate rises while clk is high: y goes low for the next clk-low phase,
//    high for the clk-high phase after it, and low again for the following
//    clk-low phase (two pulses), then stays high while gate stays high;
//  * gate rises while clk is low: y goes low for the next clk-high phase
//    (one pulse), then stays high while gate stays high;
//  * gate low: y high.
//
// Structure: a fundamental-mode asynchronous machine. Three set/reset
// latches hold the state code q (see gpf_pkg), combinational excitation
// logic computes their set/reset inputs from clk, gate and q, and an XOR
// decodes y from q. There is no clock in the synchronous sense: clk is just
// an input of the flow table. The state assignment makes every transition
// a single-bit change, so the feedback loop is free of critical races.
// Inputs must change one at a time, with the loop settled in between.
//
// The loop through the latches is the circuit itself, so tools report a
// combinational loop and latches here; both are intended.
//
// rst (asynchronous clear to state 0) is this implementation's addition in
// place of the power-on value of the state bits; tie it low after start-up.
module gated_pulse_fsm (
  input  logic       clk,
  input  logic       gate,
  input  logic       rst,
  output logic       y,
  output logic [2:0] q
);

  logic [2:0] s, r;

  excitation_logic u_exc (
    .c (clk),
    .g (gate),
    .q (q),
    .s (s),
    .r (r)
  );

  for (genvar i = 0; i < 3; i++) begin : g_state
    sr_latch u_bit (
      .rst (rst),
      .s   (s[i]),
      .r   (r[i]),
      .q   (q[i])
    );
  end

  output_logic u_out (
    .q (q),
    .y (y)
  );

endmodule
