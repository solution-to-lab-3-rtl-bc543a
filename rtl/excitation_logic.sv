// excitation_logic: set/reset inputs of the three state latches.
//
// Pure combinational logic, two-level AND-OR, derived from the SR flow table
// with don't-cares:
//   S0 = c & ~g & ~q2 & q1            R0 = ~c & ~g  |  ~c & q2
//   S1 = c & ~q0                      R1 = ~c & (~g ^ q0)
//   S2 = c & ~q1 & q0 | ~c & g & q1 & ~q0
//   R2 = c & ~g  |  ~g & ~q1
// c is the clk input and g the gate input. The equations are the design's
// own; the second product of S2 needs the g literal (state 6 with clk and
// gate both low must not set q2).
//
// Interface: c, g, q in; s, r out (bit i drives latch i). No timing of its
// own: every path is combinational.
module excitation_logic (
  input  logic       c,
  input  logic       g,
  input  logic [2:0] q,
  output logic [2:0] s,
  output logic [2:0] r
);

  always_comb begin
    s[0] = c & ~g & ~q[2] & q[1];
    r[0] = (~c & ~g) | (~c & q[2]);
    s[1] = c & ~q[0];
    r[1] = ~c & (~g ^ q[0]);
    s[2] = (c & ~q[1] & q[0]) | (~c & g & q[1] & ~q[0]);
    r[2] = (c & ~g) | (~g & ~q[1]);
  end

endmodule
