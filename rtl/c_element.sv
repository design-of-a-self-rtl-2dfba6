// Two-input Muller C-element.
//
// The output copies the inputs when both carry the same value and keeps its
// previous value while they differ. It is the state-holding element of the
// asynchronous switch (C1 and C2) and of every self-timed ring stage.
//
// Interface: inputs a and b, output y. There is no clock; y changes as soon
// as a and b agree on a value different from y.
//
// The element is written as a level-sensitive latch that is transparent
// while both inputs are equal. The latch is the intended
// storage of a C-element (the gate's keeper), so the latch that lint and
// synthesis report is correct; synthesis maps it to a latch cell, or it is
// replaced by a library C-element. The function is the standard one; the
// latch form, the zero delay and the absence of set/reset pins (the
// switch's C1 and C2 have none; the ring stages' set/reset lives in the
// ring model) are this design's choices.
`timescale 1ns / 1ps
module c_element (
  input  logic a,
  input  logic b,
  output logic y
);

  always_latch begin
    if (a == b) y = a;
  end

endmodule
