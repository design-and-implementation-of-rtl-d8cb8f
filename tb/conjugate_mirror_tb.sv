// conjugate_mirror_tb: random half spectra of 127 tones; checks bin k = X_k,
// bin 256-k = conj(X_k) for k = 1 .. 127 and zero DC and Nyquist bins.
module conjugate_mirror_tb;
  localparam int N = 128;
  logic signed [5:0] tone_re [N-1], tone_im [N-1];
  logic signed [5:0] bin_re [2*N], bin_im [2*N];
  int checks = 0, failures = 0;

  conjugate_mirror #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int t = 0; t < N - 1; t++) begin
        tone_re[t] = 6'(2 * int'($urandom_range(11)) - 11);
        tone_im[t] = 6'(2 * int'($urandom_range(11)) - 11);
      end
      #1;
      checks++;
      if (bin_re[0] != 0 || bin_im[0] != 0 || bin_re[N] != 0 || bin_im[N] != 0) begin
        failures++;
        $display("DC or Nyquist bin not zero");
      end
      for (int k = 1; k < N; k++) begin
        checks++;
        if (bin_re[k] != tone_re[k-1] || bin_im[k] != tone_im[k-1]) failures++;
        checks++;
        if (bin_re[2*N-k] != tone_re[k-1] || int'(bin_im[2*N-k]) != -int'(tone_im[k-1])) begin
          failures++;
          if (failures < 10) $display("bin %0d: %0d,%0d", 2*N-k, bin_re[2*N-k], bin_im[2*N-k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
