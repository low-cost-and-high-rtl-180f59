// tb_slut: self-checking test of the 6x1 sub look-up table.
// Two instances with different truth tables are swept over all 64
// addresses; each output is compared with the bit picked out of the truth
// table by shifting, done here in the testbench.
module tb_slut;
  localparam logic [63:0] INIT_A = 64'hDEAD_BEEF_0123_ABCD;
  localparam logic [63:0] INIT_B = 64'h8000_0000_0000_0001;

  logic [5:0] a;
  logic       ya, yb;
  int checks = 0, failures = 0;

  slut #(.INIT(INIT_A)) dut_a (.a(a), .y(ya));
  slut #(.INIT(INIT_B)) dut_b (.a(a), .y(yb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = 6'(i);
      #1;
      checks += 2;
      if (ya !== 1'((INIT_A >> i) & 64'd1)) begin
        failures++; $display("A: addr %0d got %b", i, ya);
      end
      if (yb !== ((i == 0) || (i == 63))) begin
        failures++; $display("B: addr %0d got %b", i, yb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
