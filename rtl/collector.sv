// collector: collection function F(A,B,Ti) with its output storage.
//
// Merges the four partial results T0..T3 of a split table into the final
// bit, choosing by the two address bits A (more significant) and B that the
// sub-tables did not see:
//   S = A'B'T0 + A'BT1 + AB'T2 + ABT3
// The function is written as this sum of products and registered, so that
// it costs one logic block (six inputs) and one clock. With SEL = 1 it
// becomes the two-input form S = A'T0 + AT1, used where the number of upper
// address bits is odd. W independent copies share the select inputs.
//
// Interface: clk; sel[SEL-1:0] = {A,B}; t[2**SEL-1:0][W-1:0] partial
// results; s[W-1:0] result. Timing: s follows sel and t by one clock.
// The equation and the output storage follow the method; the width W and
// the SEL = 1 form are this design's generalisations.
module collector
  import lut_pkg::*;
#(
  parameter int unsigned SEL = COLL_SEL,
  parameter int unsigned W   = 1
) (
  input  logic                     clk,
  input  logic [SEL-1:0]           sel,
  input  logic [2**SEL-1:0][W-1:0] t,
  output logic [W-1:0]             s
);

  logic [W-1:0] f;

  // Sum of products: one product term per minterm of the select inputs.
  always_comb begin
    f = '0;
    for (int unsigned i = 0; i < 2 ** SEL; i++) begin
      f = f | ({W{sel == SEL'(i)}} & t[i]);
    end
  end

  always_ff @(posedge clk) s <= f;

endmodule
