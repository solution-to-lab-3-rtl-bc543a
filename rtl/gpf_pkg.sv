// gpf_pkg: state codes of the gated pulse generator.
//
// The asynchronous machine has seven stable/transit states after flow-table
// minimisation. Each is given a 3-bit code {q2,q1,q0} chosen on a cube so
// that every transition the machine makes flips exactly one bit: where two
// states that must connect are not neighbours, the transition is routed
// through a third state (0<->1 through 6, 2->0 through 5, 2->1 through 6).
// Code 3'b111 is unused. The codes are the design's own published
// assignment; the enum names are this implementation's.
package gpf_pkg;

  typedef enum logic [2:0] {
    ST0 = 3'b000,  // clk low,  gate low (also: gate rose at clk low, clk still low)
    ST1 = 3'b011,  // clk high, gate low or high, no pulse pending
    ST2 = 3'b110,  // gate high after the pulses, clk high or low
    ST3 = 3'b001,  // first pulse of the double pulse (clk low)
    ST4 = 3'b101,  // gap between the two pulses (clk high)
    ST5 = 3'b100,  // second pulse (clk low); also transit 2->0
    ST6 = 3'b010   // single pulse (clk high); also transit 0<->1 and 2->1
  } state_t;

endpackage
