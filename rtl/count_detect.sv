// count_detect: the "Detection" cell used throughout the design.
//
// It reports whether a COUNT value is non-zero, i.e. whether the register it
// belongs to still holds a channel with transfers left to perform. The design
// uses the same cell in COMPARE_1 (Transfer Engine), in the SELECT_1 generator
// and in the Counter's completion detection. Its gate-level form is not
// given; a reduction OR over the count is this implementation's choice.
// Purely combinational.
module count_detect #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] count,
  output logic         nonzero
);
  assign nonzero = |count;
endmodule
