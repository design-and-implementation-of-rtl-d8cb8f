// cyclic_prefix_tb: sends random 256-sample frames with gaps and checks the
// 288-sample output: samples 224 .. 255 first, then 0 .. 255, starting one
// clock after the last input sample, with out_first and out_last in place.
module cyclic_prefix_tb;
  localparam int N = 256, CP = 32;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic out_valid, out_first, out_last;
  logic signed [15:0] out_re, out_im;
  int checks = 0, failures = 0;

  cyclic_prefix #(.N(N), .CP_LEN(CP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] ref_re [N], ref_im [N];
  int src;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 3; f++) begin
      for (int k = 0; k < N; k++) begin
        in_valid = 1;
        in_re = 16'($urandom); in_im = 16'($urandom);
        ref_re[k] = in_re; ref_im[k] = in_im;
        @(negedge clk);
        checks++;
        if (out_valid != (k == N - 1)) failures++;
        in_valid = 0;
        if (k < N - 1 && $urandom_range(3) == 0) begin
          @(negedge clk);
        end
      end
      for (int n = 0; n < N + CP; n++) begin
        src = (n < CP) ? N - CP + n : n - CP;
        checks++;
        if (!out_valid || out_re != ref_re[src] || out_im != ref_im[src]
            || out_first != (n == 0) || out_last != (n == N + CP - 1)) begin
          failures++;
          if (failures < 10) $display("frame %0d out %0d: %0d expected %0d", f, n, out_re, ref_re[src]);
        end
        @(negedge clk);
      end
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
