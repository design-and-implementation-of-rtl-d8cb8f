// ifft_radix2_tb: checks the 256-point inverse FFT against a direct inverse
// DFT computed in floating point, for random complex 256-QAM-range frames
// and for a Hermitian (real-output) frame; also checks the start-to-done
// latency of LOG2N*NFFT/2 + 1 clocks.
module ifft_radix2_tb;
  localparam int LOG2N = 8;
  localparam int NFFT  = 2**LOG2N;
  localparam int SYM_W = 6;
  localparam int W     = 16;
  localparam real SCALE = 512.0;     // 2^IN_SHIFT
  localparam real TOL   = 6.0;       // LSBs
  localparam real PI    = 3.14159265358979323846;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic signed [SYM_W-1:0] in_re [NFFT], in_im [NFFT];
  logic signed [W-1:0]     out_re [NFFT], out_im [NFFT];
  int checks = 0, failures = 0;

  ifft_radix2 #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input bit hermitian);
    int cycles;
    real ref_re, ref_im, ang, err;
    for (int k = 0; k < NFFT; k++) begin
      in_re[k] = SYM_W'(2 * int'($urandom_range(15)) - 15);
      in_im[k] = SYM_W'(2 * int'($urandom_range(15)) - 15);
    end
    if (hermitian) begin
      in_re[0] = 0; in_im[0] = 0; in_re[NFFT/2] = 0; in_im[NFFT/2] = 0;
      for (int k = 1; k < NFFT/2; k++) begin
        in_re[NFFT-k] = in_re[k];
        in_im[NFFT-k] = -in_im[k];
      end
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != LOG2N * NFFT / 2 + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cycles, LOG2N * NFFT / 2 + 1);
    end
    for (int n = 0; n < NFFT; n++) begin
      ref_re = 0.0; ref_im = 0.0;
      for (int k = 0; k < NFFT; k++) begin
        ang = 2.0 * PI * real'((k * n) % NFFT) / real'(NFFT);
        ref_re += real'(in_re[k]) * $cos(ang) - real'(in_im[k]) * $sin(ang);
        ref_im += real'(in_re[k]) * $sin(ang) + real'(in_im[k]) * $cos(ang);
      end
      ref_re = ref_re * SCALE / real'(NFFT);
      ref_im = ref_im * SCALE / real'(NFFT);
      err = (real'(out_re[n]) - ref_re);
      if (err < 0) err = -err;
      checks++;
      if (err > TOL) begin
        failures++;
        if (failures < 10) $display("n=%0d re %0d ref %f", n, out_re[n], ref_re);
      end
      err = (real'(out_im[n]) - ref_im);
      if (err < 0) err = -err;
      checks++;
      if (err > TOL) begin
        failures++;
        if (failures < 10) $display("n=%0d im %0d ref %f", n, out_im[n], ref_im);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NFFT; k++) begin in_re[k] = 0; in_im[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // single tone: bin 1 -> one cycle of a complex exponential
    for (int k = 0; k < NFFT; k++) begin in_re[k] = 0; in_im[k] = 0; end
    run_frame(0);
    run_frame(0);
    run_frame(1);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
