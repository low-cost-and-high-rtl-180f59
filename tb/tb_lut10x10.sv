// tb_lut10x10: end-to-end test of the 10-bit sine look-up table at its
// full size (no parameter is overridden).
//
// The expected word for each address is computed here from the sine
// formula  floor(511.5 * sin(2*pi*i/1024) + 512). The test
//   1. resets and checks that no word is reported valid,
//   2. streams all 1024 addresses back to back, one per clock,
//   3. sends 2000 random addresses with random idle gaps,
//   4. asserts reset in the middle of a burst and checks the pipeline empties.
// Every output word is matched, in order, against the addresses sent, and
// the clock count from each address to its word must be 4. It counts how
// often each mechanism happened: back-to-back words, idle gaps carried
// through the pipeline, every one of the 16 sub-tables (address bits 9:6)
// and every select value of both collection levels, and the mid-burst
// reset; one that never happened is a failure.
module tb_lut10x10;
  localparam int unsigned LAT = 4;
  localparam real PI_TB = 3.14159265358979323846;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  logic [9:0] addr;
  logic       out_valid;
  logic [9:0] data;

  int checks = 0, failures = 0;
  int cycle = 0;

  // Mechanism counters.
  int n_back_to_back = 0;   // valid word right after a valid word
  int n_gap          = 0;   // idle cycle seen at the output
  int n_reset_flush  = 0;   // reset in a burst emptied the pipeline
  int n_sub [16];           // words served by each SLUT group (bits 9:6)
  int n_l1  [4];            // first collection level select (bits 7:6)
  int n_l2  [4];            // second collection level select (bits 9:8)

  lut10x10 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .addr(addr),
    .out_valid(out_valid), .data(data)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ref_word(int unsigned i);
    real v;
    v = 511.5 * $sin(2.0 * PI_TB * real'(i) / 1024.0) + 512.0;
    return int'($floor(v));
  endfunction

  int unsigned expect_addr [$];
  int          expect_cyc  [$];
  logic        last_valid = 1'b0;

  // Output monitor, sampled at the falling edge.
  always @(negedge clk) begin
    cycle++;
    if (rst_n && out_valid) begin
      int unsigned ea;
      int          ec;
      checks++;
      if (expect_addr.size() == 0) begin
        failures++; $display("cycle %0d: unexpected valid word", cycle);
      end else begin
        ea = expect_addr.pop_front();
        ec = expect_cyc.pop_front();
        if (data !== 10'(ref_word(ea))) begin
          failures++;
          $display("addr %0d: got %0d expected %0d", ea, data, ref_word(ea));
        end
        checks++;
        if (cycle - ec != LAT) begin
          failures++;
          $display("addr %0d: latency %0d", ea, cycle - ec);
        end
        n_sub[ea >> 6]++;
        n_l1[(ea >> 6) & 3]++;
        n_l2[ea >> 8]++;
        if (last_valid) n_back_to_back++;
      end
    end else if (rst_n && last_valid) begin
      n_gap++;
    end
    last_valid = rst_n && out_valid;
  end

  // Apply one input cycle: drive at the falling edge, record what was sent.
  task automatic send(input logic v, input logic [9:0] a);
    in_valid = v;
    addr     = a;
    if (v) begin
      expect_addr.push_back(int'(a));
      expect_cyc.push_back(cycle + 1);
    end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; addr = '0;
    repeat (3) @(negedge clk);
    // 1. reset: nothing valid
    checks++;
    if (out_valid) begin failures++; $display("valid during reset"); end
    rst_n = 1'b1;
    repeat (LAT + 1) send(1'b0, '0);
    checks++;
    if (out_valid) begin failures++; $display("valid after reset with no input"); end

    // 2. all addresses back to back
    for (int i = 0; i < 1024; i++) send(1'b1, 10'(i));
    // 3. random addresses with random gaps
    for (int i = 0; i < 2000; i++) begin
      if (($urandom % 4) == 0) send(1'b0, 10'($urandom));
      send(1'b1, 10'($urandom));
    end
    repeat (LAT + 2) send(1'b0, '0);
    checks++;
    if (expect_addr.size() != 0) begin
      failures++; $display("%0d words never came out", expect_addr.size());
    end

    // 4. reset in the middle of a burst
    for (int i = 0; i < 3; i++) send(1'b1, 10'($urandom));
    expect_addr.delete(); expect_cyc.delete();
    rst_n = 1'b0;
    send(1'b0, '0);
    rst_n = 1'b1;
    begin
      automatic bit seen = 1'b0;
      for (int i = 0; i < LAT + 1; i++) begin
        if (out_valid) seen = 1'b1;
        send(1'b0, '0);
      end
      checks++;
      if (seen) begin failures++; $display("reset did not empty the pipeline"); end
      else n_reset_flush++;
    end

    // Mechanism coverage
    checks++;
    if (n_back_to_back == 0) begin failures++; $display("no back-to-back words"); end
    checks++;
    if (n_gap == 0) begin failures++; $display("no idle gap seen"); end
    checks++;
    if (n_reset_flush == 0) begin failures++; $display("no reset flush"); end
    for (int g = 0; g < 16; g++) begin
      checks++;
      if (n_sub[g] == 0) begin failures++; $display("sub-table %0d unused", g); end
    end
    for (int g = 0; g < 4; g++) begin
      checks += 2;
      if (n_l1[g] == 0) begin failures++; $display("level-1 select %0d unused", g); end
      if (n_l2[g] == 0) begin failures++; $display("level-2 select %0d unused", g); end
    end
    $display("back-to-back=%0d gaps=%0d reset_flush=%0d", n_back_to_back, n_gap,
             n_reset_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
