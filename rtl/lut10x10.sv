// lut10x10: 10-bit-address, 10-bit-word sine look-up table, partitioned
// into 6-input sub-tables so that it runs at the clock rate of a single
// logic block.
//
// A direct table of this size would be one very wide function per output
// bit; a table rewritten as minimised Boolean equations is small but has a
// long logic path. Here each of the ten output bits is its own 10x1 table
// (lut_nx1): sixteen 6-input SLUTs merged by a two-level tree of
// registered 4:1 collection functions. The address is first caught in an
// input register, so the table is:
//   clock 1: input register
//   clock 2: SLUTs -> storage
//   clock 3: first collection level (address bits 7:6)
//   clock 4: second collection level (address bits 9:8) -> data
// i.e. four clocks from address to word, with one new address per clock.
// The stored word for address i is
//   floor(511.5 * sin(2*pi*i/1024) + 512)
// (see lut_pkg::sine_word), one full period of a sine from 0 to 1023.
//
// Interface: clk; rst_n synchronous active-low reset, clears only the valid
// pipeline; in_valid/addr present an address; out_valid/data return its word
// four clocks later. There is no back-pressure: the table accepts an address
// every clock.
//
// The table size, the sub-table split and the four-clock latency follow the
// method; the sine scaling, the input register as the fourth stage and the
// valid flag are this design's choices.
module lut10x10
  import lut_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TOP_N-1:0]  addr,
  output logic              out_valid,
  output logic [TOP_W-1:0]  data
);

  localparam int unsigned LATENCY = 4;

  logic [TOP_N-1:0]   addr_q;
  logic [LATENCY-1:0] vld_pipe;

  // Input register.
  storage_reg #(.W(TOP_N)) u_in_store (.clk(clk), .d(addr), .q(addr_q));

  // One partitioned 10x1 table per output bit.
  for (genvar b = 0; b < TOP_W; b++) begin : g_bit
    lut_nx1 #(.N(TOP_N), .TABLE(sine_bit_table(b))) u_bit (
      .clk(clk),
      .a  (addr_q),
      .s  (data[b])
    );
  end

  // Valid flag travelling with the address.
  always_ff @(posedge clk) begin
    if (!rst_n) vld_pipe <= '0;
    else        vld_pipe <= {vld_pipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vld_pipe[LATENCY-1];

endmodule
