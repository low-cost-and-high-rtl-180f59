// lut8x1: 8-input, 1-output look-up table built from four 6x1 SLUTs.
//
// The 256-entry truth table of S(A,B,C,D,E,F,G,H) is cut, along the two
// most significant variables A and B, into four 64-entry sub-tables
// T0..T3 of the six variables C..H (the four quadrants of the 16x16
// Karnaugh map). Each sub-table is one SLUT. Their outputs are caught in a
// 4-bit storage register while A and B are caught in a 2-bit storage
// register; the registered collection function
//   S = A'B'T0 + A'BT1 + AB'T2 + ABT3
// then picks the right partial result. Cost: 4 SLUT blocks + 1 collection
// block = 5 blocks (20 logic cells), each path one logic delay per clock.
//
// Interface: clk; a[7:0] = {A,B,C,D,E,F,G,H}; s the table bit.
// Parameter INIT: truth table, bit k is S for address k, so sub-table Ti
// holds INIT[64*i +: 64].
// Timing: s is the entry for the address presented two clocks earlier
// (SLUT stage, collection stage); a new address is accepted every clock.
//
// The split, the storages and the equation follow the method; the address
// bit order and the absence of a reset are this design's choices.
module lut8x1
  import lut_pkg::*;
#(
  parameter logic [4*SLUT_DEPTH-1:0] INIT = '0
) (
  input  logic       clk,
  input  logic [7:0] a,
  output logic       s
);

  logic [3:0]        t_comb;   // T0..T3 from the SLUTs
  logic [3:0][0:0]   t_q;      // 4-bit storage
  logic [1:0]        ab_q;     // 2-bit storage of A,B

  for (genvar i = 0; i < 4; i++) begin : g_slut
    slut #(.INIT(INIT[i*SLUT_DEPTH +: SLUT_DEPTH])) u_slut (
      .a(a[SLUT_IN-1:0]),
      .y(t_comb[i])
    );
  end

  storage_reg #(.W(4)) u_t_store  (.clk(clk), .d(t_comb),  .q(t_q));
  storage_reg #(.W(2)) u_ab_store (.clk(clk), .d(a[7:6]),  .q(ab_q));

  collector #(.SEL(COLL_SEL), .W(1)) u_coll (
    .clk(clk),
    .sel(ab_q),
    .t  (t_q),
    .s  (s)
  );

endmodule
