// qam128_mapper_tb: applies all 128 bit patterns and checks that each point
// lies on the 128-point cross constellation (odd levels within -11 .. 11,
// no point with |I| >= 9 and |Q| >= 9), that all 128 points are distinct,
// that they follow the column-by-column order from I = -11, top to bottom,
// and the one-clock latency.
module qam128_mapper_tb;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [6:0] bits = '0;
  logic out_valid;
  logic signed [5:0] i_out, q_out;
  int checks = 0, failures = 0;

  qam128_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen [int];
  int prev_i, prev_q, ai, aq;

  initial begin
    prev_i = -99; prev_q = 99;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      in_valid = 1; bits = 7'(k);
      @(negedge clk);
      in_valid = 0;
      ai = (i_out < 0) ? -int'(i_out) : int'(i_out);
      aq = (q_out < 0) ? -int'(q_out) : int'(q_out);
      checks++;
      if (!out_valid || ai > 11 || aq > 11 || (ai % 2) != 1 || (aq % 2) != 1 || (ai >= 9 && aq >= 9)) begin
        failures++;
        if (failures < 10) $display("k=%0d point %0d,%0d off the constellation", k, i_out, q_out);
      end
      // ordering: I never decreases; within a column Q decreases
      checks++;
      if (int'(i_out) < prev_i || (int'(i_out) == prev_i && int'(q_out) >= prev_q)) begin
        failures++;
        if (failures < 10) $display("k=%0d point %0d,%0d out of order", k, i_out, q_out);
      end
      prev_i = int'(i_out); prev_q = int'(q_out);
      seen[int'(i_out) * 100 + int'(q_out)] = 1;
    end
    checks++;
    if (seen.num() != 128) begin failures++; $display("only %0d distinct points", seen.num()); end
    // first and last points of the order
    in_valid = 1; bits = 7'd0;
    @(negedge clk) bits = 7'd127;
    checks++;
    if (i_out != -11 || q_out != 7) failures++;
    @(negedge clk) in_valid = 0;
    checks++;
    if (i_out != 11 || q_out != -7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
