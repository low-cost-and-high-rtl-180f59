// lut_nx1: N-input, 1-output look-up table built from 6x1 SLUTs.
//
// The 2^N-entry truth table is cut along its most significant address bits
// into 6-input sub-tables (SLUTs), 2^(N-6) of them, and the sub-table
// outputs are merged by a tree of registered collection functions of at
// most six inputs each, so that every stage is one logic block and one
// logic delay. The first two levels are 8x1 tables (lut8x1: four SLUTs and
// a 4:1 collection function on address bits 7:6), 2^(N-8) of them, all fed
// with address bits 7:0. Above them, level k merges the results of level
// k-1 in fours with a 4:1 collection function on the next two address bits
// (8+2(k-1) and up); when an odd number of bits is left, the last level is
// the 2:1 form on the single top bit. The address bits above bit 7 are
// carried through one storage register per stage so that they reach their
// collection function in the same clock as the partial results.
// N = 6 is one SLUT with its storage; N = 7 is two SLUTs and a 2:1
// collection function on bit 6.
// For N = 10: sixteen SLUTs, 4 + 1 collection functions (21 blocks).
//
// Interface: clk; a[N-1:0] address; s table bit. Parameter TABLE: bit k is
// the entry for address k.
// Timing: LATENCY = 1 for N = 6, 2 for N = 7 and 8, 2 + ceil((N-8)/2)
// above (3 for N = 10); a new address is accepted every clock.
//
// The 6-input sub-tables and the collection function S = A'B'T0 + A'BT1 +
// AB'T2 + ABT3 follow the method. Building the levels above 8 inputs as a
// tree of the same collection function, the 2:1 form for odd N, and the
// address bit order are this design's reading of it.
module lut_nx1
  import lut_pkg::*;
#(
  parameter int unsigned N = TOP_N,
  parameter logic [2**N-1:0] TABLE = '0
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  output logic         s
);

  // Collection levels above the 8x1 tables.
  localparam int unsigned UPPER  = (N > SLUT_IN + 2) ? N - (SLUT_IN + 2) : 0;
  localparam int unsigned LEVELS = (UPPER + 1) / 2;

  if (N < SLUT_IN) begin : g_too_small
    $error("lut_nx1: N must be at least %0d", SLUT_IN);

  end else if (N == SLUT_IN) begin : g_n6
    logic y;
    slut #(.INIT(TABLE)) u_slut (.a(a), .y(y));
    storage_reg #(.W(1)) u_store (.clk(clk), .d(y), .q(s));

  end else if (N == SLUT_IN + 1) begin : g_n7
    logic [1:0]      t_comb;
    logic [1:0][0:0] t_q;
    logic            a_q;
    for (genvar i = 0; i < 2; i++) begin : g_slut
      slut #(.INIT(TABLE[i*SLUT_DEPTH +: SLUT_DEPTH])) u_slut (
        .a(a[SLUT_IN-1:0]), .y(t_comb[i]));
    end
    storage_reg #(.W(2)) u_t_store (.clk(clk), .d(t_comb), .q(t_q));
    storage_reg #(.W(1)) u_a_store (.clk(clk), .d(a[N-1]), .q(a_q));
    collector #(.SEL(1), .W(1)) u_coll (.clk(clk), .sel(a_q), .t(t_q), .s(s));

  end else if (N == SLUT_IN + 2) begin : g_n8
    lut8x1 #(.INIT(TABLE)) u_lut8 (.clk(clk), .a(a), .s(s));

  end else begin : g_tree
    localparam int unsigned G = 2 ** UPPER;   // number of 8x1 tables

    logic [G-1:0][0:0]   p8;     // 8x1 results
    logic [UPPER-1:0]    hi1;    // upper bits after the SLUT stage
    logic [UPPER-1:0]    hi2;    // upper bits after the 8x1 collection

    for (genvar g = 0; g < G; g++) begin : g_lut8
      lut8x1 #(.INIT(TABLE[g*4*SLUT_DEPTH +: 4*SLUT_DEPTH])) u_lut8 (
        .clk(clk), .a(a[SLUT_IN+1:0]), .s(p8[g]));
    end

    storage_reg #(.W(UPPER)) u_hi_store1 (
      .clk(clk), .d(a[N-1:SLUT_IN+2]), .q(hi1));
    storage_reg #(.W(UPPER)) u_hi_store2 (.clk(clk), .d(hi1), .q(hi2));

    for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
      localparam int unsigned LO  = 2 * (k - 1);          // first select bit
      localparam int unsigned SB  = (UPPER - LO >= 2) ? 2 : 1;
      localparam int unsigned CIN = G >> LO;               // inputs of level
      localparam int unsigned CNT = CIN >> SB;             // collectors

      logic [CIN-1:0][0:0] pin;     // results of the level below
      logic [UPPER-1:0]    hin;     // upper bits aligned with pin
      logic [CNT-1:0]      pout;

      if (k == 1) begin : g_first
        assign pin = p8;
        assign hin = hi2;
      end else begin : g_next
        assign pin = g_lvl[k-1].pout;
        assign hin = g_lvl[k-1].g_hi.hout;
      end

      for (genvar c = 0; c < CNT; c++) begin : g_coll
        collector #(.SEL(SB), .W(1)) u_coll (
          .clk(clk),
          .sel(hin[LO +: SB]),
          .t  (pin[c*(2**SB) +: 2**SB]),
          .s  (pout[c]));
      end

      if (k < LEVELS) begin : g_hi
        logic [UPPER-1:0] hout;   // upper bits for the level above
        storage_reg #(.W(UPPER)) u_hi_store (.clk(clk), .d(hin), .q(hout));
      end
    end

    assign s = g_lvl[LEVELS].pout[0];
  end

endmodule
