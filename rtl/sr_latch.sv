// sr_latch: one bit of asynchronous state memory.
//
// Behaves as the set/reset latch of the machine's state tables: s=1 sets q,
// r=1 clears q, s=r=0 holds. s=r=1 is forbidden by the excitation logic; if
// it happens anyway, reset wins, as it does on a flip-flop with asynchronous
// preset and clear (the state bits are realised that way: clock and data
// input tied low, preset = s, clear = r).
//
// rst is an extra asynchronous clear, this implementation's addition, that
// plays the role of the power-on initial value (all state bits 0).
//
// Interface: level-sensitive, no clock. q follows s/r with no delay in
// simulation. The element is a latch on purpose, so synthesis reports a
// latch here. Once it is placed in the state loop of gated_pulse_fsm, a
// linter reports a circular combinational path through q: that loop is how
// an asynchronous machine stores its state, and it is intended. The same
// linter may also say that no latch is found in this always_latch block
// once the loop is flattened; synthesis does map it to a latch.
module sr_latch (
  input  logic rst,
  input  logic s,
  input  logic r,
  output logic q
);

  always_latch begin
    if (rst || r) q = 1'b0;
    else if (s)   q = 1'b1;
  end

endmodule
