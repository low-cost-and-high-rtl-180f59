// tb_lut8x1: self-checking test of the 8x1 partitioned look-up table.
// A fixed pseudo-random 256-entry truth table is loaded; all 256 addresses
// are streamed one per clock, then 500 random ones. Every output is
// compared with the table entry of the address applied exactly two clocks
// earlier, which checks both the contents and the two-clock latency.
module tb_lut8x1;
  localparam logic [255:0] INIT =
    256'h9F3C_51A2_E08D_7B46_C2F9_1D84_36AE_5B70_0A1F_E9C3_74B2_68D5_F10E_23A9_BC47_865D;
  localparam int unsigned LAT = 2;

  logic clk = 1'b0;
  logic [7:0] a;
  logic       s;
  logic [7:0] hist [LAT+1];
  int checks = 0, failures = 0;

  lut8x1 #(.INIT(INIT)) dut (.clk(clk), .a(a), .s(s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [7:0] na, input int n);
    a = na;
    @(negedge clk);
    for (int k = LAT; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = na;
    if (n >= LAT) begin
      checks++;
      if (s !== INIT[hist[LAT-1]]) begin
        failures++;
        $display("addr %0d: got %b expected %b", hist[LAT-1], s, INIT[hist[LAT-1]]);
      end
    end
  endtask

  initial begin
    int n = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin step(8'(i), n); n++; end
    for (int i = 0; i < 500; i++) begin step(8'($urandom), n); n++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
