// tb_lut_nx1: self-checking test of the N-input partitioned look-up table.
// Six instances, N = 6 .. 11, each with its own pseudo-random truth table
// from a 32-bit xorshift generator, are fed the same address stream: every
// address of the widest table in order, then 1500 random ones. Each output
// is compared with the entry of the address applied exactly LAT(N) clocks
// earlier, where LAT is the expected pipeline depth: 1 for N = 6, 2 for 7
// and 8, 3 for 9 and 10, 4 for 11. N = 10 is the default size.
module tb_lut_nx1;
  localparam int unsigned NMIN = 6;
  localparam int unsigned NMAX = 11;
  localparam int unsigned LAT [NMIN:NMAX] = '{1, 2, 2, 3, 3, 4};

  function automatic logic [2**NMAX-1:0] make_table(int unsigned seed);
    logic [2**NMAX-1:0] t;
    logic [31:0]        x = 32'h1234_5678 ^ seed;
    for (int i = 0; i < 2 ** NMAX; i++) begin
      x = x ^ (x << 13);
      x = x ^ (x >> 17);
      x = x ^ (x << 5);
      t[i] = x[7];
    end
    return t;
  endfunction

  logic clk = 1'b0;
  logic [NMAX-1:0] a;
  logic [NMAX-1:0] hist [8];
  int n_applied = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_dut
    localparam logic [2**n-1:0] TABLE = (2**n)'(make_table(n));
    logic s;

    lut_nx1 #(.N(n), .TABLE(TABLE)) dut (.clk(clk), .a(a[n-1:0]), .s(s));

    // Checked at the falling edge, after the history has been updated.
    always @(negedge clk) begin
      #1;
      if (n_applied > LAT[n]) begin
        logic [n-1:0] ea;
        ea = hist[LAT[n]-1][n-1:0];
        checks++;
        if (s !== TABLE[ea]) begin
          failures++;
          $display("N=%0d addr %0d: got %b expected %b", n, ea, s, TABLE[ea]);
        end
      end
    end
  end

  task automatic apply(input logic [NMAX-1:0] na);
    a = na;
    @(negedge clk);
    for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = na;
    n_applied++;
  endtask

  initial begin
    a = '0;
    @(negedge clk);
    for (int i = 0; i < 2 ** NMAX; i++) apply(NMAX'(i));
    for (int i = 0; i < 1500; i++) apply(NMAX'($urandom));
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
