// output_logic: Moore output of the gated pulse generator.
//
// y = q2 ^ q1 ^ ~q0 (an inverter and a three-input XOR). y is low in states
// 3, 5 and 6, the pulse states, and high in 0, 1, 2 and 4. Because states 5
// and 6 also serve as transit states on some rerouted transitions, y can
// glitch low for one latch delay on those transitions in hardware; this
// follows the published design and is not filtered here.
//
// Interface: q in, y out, purely combinational.
module output_logic (
  input  logic [2:0] q,
  output logic       y
);

  assign y = q[2] ^ q[1] ^ ~q[0];

endmodule
