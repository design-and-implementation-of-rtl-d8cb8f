// qam256_mapper_tb: applies all 256 bit patterns and checks the 256-QAM
// point against a reference Gray mapping (I from bits 7:4, Q from bits 3:0,
// level = 2p - 15 resp. 15 - 2p for Gray position p), the point -15 + 9j for
// bits 0,1,0,0,0,0,0,0 on In1..In8, that neighbouring levels differ in one
// bit, and the one-clock latency of out_valid.
module qam256_mapper_tb;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0] bits = '0;
  logic out_valid;
  logic signed [5:0] i_out, q_out;
  int checks = 0, failures = 0;

  qam256_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Level of a 4-bit Gray word, found by search over the Gray sequence.
  function automatic int level(input logic [3:0] g);
    for (int p = 0; p < 16; p++) if (4'(p ^ (p >> 1)) == g) return 2 * p - 15;
    return 99;
  endfunction

  int ei, eq;
  int seen [int];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      in_valid = 1; bits = 8'(k);
      @(negedge clk);
      in_valid = 0;
      ei = level(bits[7:4]);
      eq = -level(bits[3:0]);
      checks++;
      if (!out_valid || int'(i_out) != ei || int'(q_out) != eq) begin
        failures++;
        if (failures < 10) $display("k=%0d got %0d,%0d v=%b expected %0d,%0d", k, i_out, q_out, out_valid, ei, eq);
      end
      seen[int'(i_out) * 100 + int'(q_out)] = 1;
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    checks++;
    if (seen.num() != 256) begin failures++; $display("only %0d distinct points", seen.num()); end
    // In1 = bits[0] ... In8 = bits[7]: In2 = 1 -> bits = 8'b0000_0010
    in_valid = 1; bits = 8'b0000_0010;
    @(negedge clk) in_valid = 0;
    checks++;
    if (i_out != -15 || q_out != 9) begin failures++; $display("example point %0d %0d", i_out, q_out); end
    // Gray property on the rails: level positions p and p+1 differ in one bit
    for (int p = 0; p < 15; p++) begin
      checks++;
      if ($countones(4'(p ^ (p >> 1)) ^ 4'((p + 1) ^ ((p + 1) >> 1))) != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
