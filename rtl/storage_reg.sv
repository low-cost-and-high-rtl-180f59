// storage_reg: pipeline storage between stages of the partitioned LUT.
//
// A bank of W edge-triggered D flip-flops, loaded on every rising clock
// edge. It holds the SLUT outputs ("4-bit storage") and the upper address
// bits that travel beside them ("2-bit storage") so that each stage of the
// table does one logic delay per clock and a new address can enter every
// clock.
//
// Interface: clk, d[W-1:0] in, q[W-1:0] out. Timing: q is d one clock later.
// The stages are named in the method; having no reset and no clock enable is
// this design's choice: the data in flight needs neither, and the valid flag
// of the top level marks which words are meaningful.
module storage_reg #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) q <= d;

endmodule
