// lut_pkg: constants and table functions shared by the partitioned look-up
// table modules.
//
// A wide look-up table is split into 6-input sub-tables (SLUTs), each of
// which fits one logic block, and the sub-table outputs are merged by 4:1
// collection functions. This package holds the sizes of that split and the
// function that fills the tables with their sine contents.
//
// The sine word for address i of an N-input, W-bit table is
//   floor( (2^(W-1) - 0.5) * sin(2*pi*i / 2^N) + 2^(W-1) )
// which spans 0 .. 2^W-1 over one full period. The table holds a sine
// because the look-up table is described as turning linear input data into
// sinusoidal output data; the exact scaling and rounding are this design's
// choice.
package lut_pkg;

  // Number of address inputs of one sub-table (one logic block).
  localparam int unsigned SLUT_IN = 6;
  // Number of entries of one sub-table.
  localparam int unsigned SLUT_DEPTH = 2 ** SLUT_IN;
  // Select inputs of one collection function (A and B of S = f(A,B,Ti)).
  localparam int unsigned COLL_SEL = 2;

  // Address and word width of the 10x10 table of the case study.
  localparam int unsigned TOP_N = 10;
  localparam int unsigned TOP_W = 10;

  localparam real PI = 3.14159265358979323846;

  // Sine word stored at address i of an n-input, w-bit table.
  function automatic int unsigned sine_word(int unsigned i, int unsigned n,
                                            int unsigned w);
    real amp, s;
    amp = (2.0 ** (w - 1)) - 0.5;
    s   = $sin(2.0 * PI * real'(i) / (2.0 ** n));
    return int'($floor(amp * s + (2.0 ** (w - 1))));
  endfunction

  // One output bit of the 10x10 sine table, as a 1024-entry truth table
  // (entry a at bit position a).
  function automatic logic [2**TOP_N-1:0] sine_bit_table(int unsigned bitpos);
    logic [2**TOP_N-1:0] t;
    int unsigned word;
    for (int unsigned a = 0; a < 2 ** TOP_N; a++) begin
      word = sine_word(a, TOP_N, TOP_W);
      t[a] = 1'((word >> bitpos) & 1);
    end
    return t;
  endfunction

endpackage
