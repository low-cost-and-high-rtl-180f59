// slut: 6x1 sub look-up table (SLUT).
//
// Any Boolean function of six inputs, held as a 64-entry truth table in the
// parameter INIT: output y = INIT[a]. In the target FPGA this is exactly one
// logic block (four 4-input LUTs joined by the F5 and F6 multiplexers), so a
// SLUT costs one block and one logic delay. The SLUT is the unit into which
// every wider table is cut.
//
// Interface: a[5:0] address (a[5] is the most significant of the six
// variables, C in the 8x1 example, a[0] is H); y the stored bit.
// Timing: purely combinational; the register that follows it belongs to the
// enclosing stage.
//
// The six-input size and its role follow the method; the bit order of the
// address is this design's choice.
module slut
  import lut_pkg::*;
#(
  parameter logic [SLUT_DEPTH-1:0] INIT = '0
) (
  input  logic [SLUT_IN-1:0] a,
  output logic               y
);

  assign y = INIT[a];

endmodule
