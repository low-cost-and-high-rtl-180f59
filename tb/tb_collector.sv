// tb_collector: self-checking test of the registered collection function.
// The 4:1 form (S = A'B'T0 + A'BT1 + AB'T2 + ABT3) is driven through all
// 64 combinations of A, B, T0..T3; the 2:1 form, three bits wide, through
// random inputs. The result is checked one clock after the inputs, against
// a reference written as an index into the partial results.
module tb_collector;
  logic clk = 1'b0;

  logic [1:0]      sel4;
  logic [3:0][0:0] t4;
  logic            s4;

  logic            sel2;
  logic [1:0][2:0] t2;
  logic [2:0]      s2;

  int checks = 0, failures = 0;

  collector #(.SEL(2), .W(1)) dut4 (.clk(clk), .sel(sel4), .t(t4), .s(s4));
  collector #(.SEL(1), .W(3)) dut2 (.clk(clk), .sel(sel2), .t(t2), .s(s2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       exp4;
  logic [2:0] exp2;

  initial begin
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      {sel4, t4} = 6'(i);
      sel2 = 1'($urandom);
      t2   = 6'($urandom);
      exp4 = t4[sel4];
      exp2 = sel2 ? t2[1] : t2[0];
      @(negedge clk);
      checks += 2;
      if (s4 !== exp4) begin
        failures++; $display("4:1 sel=%0d t=%b got %b", sel4, t4, s4);
      end
      if (s2 !== exp2) begin
        failures++; $display("2:1 sel=%0d got %b exp %b", sel2, s2, exp2);
      end
    end
    for (int i = 0; i < 200; i++) begin
      sel4 = 2'($urandom); t4 = 4'($urandom);
      sel2 = 1'($urandom); t2 = 6'($urandom);
      exp4 = t4[sel4];
      exp2 = sel2 ? t2[1] : t2[0];
      @(negedge clk);
      checks += 2;
      if (s4 !== exp4) failures++;
      if (s2 !== exp2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
