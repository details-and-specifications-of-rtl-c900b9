// change_detect: flags a change of an 8-bit input.
//
// A reg_8 copies the input on every clock; the XOR of input and copy,
// OR-reduced, is high in the one cycle where the input differs from its
// previous value. changed is combinational from d, so it is valid in the
// cycle the new value appears. After reset the copy is 0, so a non-zero
// input is reported as a change once. Structure as specified; the reset
// value is this design's choice.
module change_detect (
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] d,
  output logic       changed
);

  logic [7:0] last_q;

  reg_8 u_last (.clock, .reset, .en(1'b1), .d(d), .q(last_q));

  assign changed = |(d ^ last_q);

endmodule
