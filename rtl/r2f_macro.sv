// r2f_macro: reconfigurable-to-fixed interface macro.
//
// Each of the W bits crossing from a reconfigurable area into the fixed part
// of the chip passes through a LUT configured as a two-input AND with a
// control line: out = in AND control. While control is low (the area is
// being reconfigured) every output is held at 0, so transients on the
// reconfigurable side cannot reach the fixed logic. Purely combinational.
// The AND function and the 8-bit width follow the Artemis macro; using one
// shared control input for all bits is this design's choice (all control
// lines are driven by the same reconf_n signal).
module r2f_macro #(
  parameter int W = 8
) (
  input  logic [W-1:0] in,
  input  logic         control,
  output logic [W-1:0] out
);
  always_comb out = in & {W{control}};
endmodule
