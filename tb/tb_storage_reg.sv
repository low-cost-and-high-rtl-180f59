// tb_storage_reg: self-checking test of the pipeline storage register.
// Random words are applied every clock; each clock the output must equal
// the word applied one clock before.
module tb_storage_reg;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  storage_reg #(.W(W)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      prev = W'($urandom);
      d = prev;
      @(negedge clk);
      checks++;
      if (q !== prev) begin
        failures++; $display("cycle %0d: q=%h expected %h", i, q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
