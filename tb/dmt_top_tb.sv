// dmt_top_tb: end-to-end test of the whole modulator at its default sizes
// (256-point IFFT, 32-sample prefix). Phase 1 streams random bits into both
// transmitters (complex: one bit per clock, real: one bit every second
// clock) for FRAMES frames each and checks every output sample against a
// floating-point reference built independently of the RTL:
//  - complex: bits -> 256-QAM by Gray level search, 256 bins,
//    x(n) = 2^9/256 * sum_k X_k exp(+j 2 pi k n / 256)
//  - real: bits -> 128-QAM cross points by enumeration, tones 1..127,
//    x(n) = 2^9/256 * 2 * sum_k [a_k cos(2 pi k n/256) - b_k sin(2 pi k n/256)]
// then the cyclic prefix (samples 224..255 first). It also checks the
// latency from the clock cycle that presents a frame's last bit to the
// cycle with out_first (1285 clocks), that every burst's 32-sample prefix
// repeats its last 32 samples, and that no overrun occurs at these bit
// rates. Phase 2 feeds the real transmitter one bit per clock, faster than
// its IFFT can take frames, and checks that the overrun report fires once.
// Each mechanism (complex frame, real frame with conjugate-symmetric
// spectrum, cyclic prefix, overrun) is counted and must have happened.
module dmt_top_tb;
  localparam int  NFFT   = 256;
  localparam int  CP     = 32;
  localparam int  FRAMES = 2;
  localparam int  LAT    = 1285;
  localparam real TOL    = 8.0;
  localparam real SCALE  = 512.0;
  localparam real PI     = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic c_en = 0, c_bit = 0, r_en = 0, r_bit = 0;
  logic c_valid, c_first, c_last, c_ovr, r_valid, r_first, r_last, r_ovr;
  logic signed [15:0] c_re, c_im, r_re;
  int checks = 0, failures = 0;
  int cyc = 0;

  dmt_top dut (
    .clk, .rst,
    .cplx_bit_en(c_en), .cplx_bit_in(c_bit), .cplx_valid(c_valid), .cplx_first(c_first),
    .cplx_last(c_last), .cplx_re(c_re), .cplx_im(c_im), .cplx_overrun(c_ovr),
    .real_bit_en(r_en), .real_bit_in(r_bit), .real_valid(r_valid), .real_first(r_first),
    .real_last(r_last), .real_out(r_re), .real_overrun(r_ovr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference mappings ----
  function automatic int gray_level(input int g);
    for (int p = 0; p < 16; p++) if ((p ^ (p >> 1)) == g) return 2 * p - 15;
    return 0;
  endfunction

  function automatic void cross_point(input int k, output int pi_, output int pq);
    int n = 0;
    pi_ = 0; pq = 0;
    for (int i = -11; i <= 11; i += 2)
      for (int q = 11; q >= -11; q -= 2) begin
        int ai = (i < 0) ? -i : i;
        int aq = (q < 0) ? -q : q;
        if (ai >= 9 && aq >= 9) continue;
        if (n == k) begin pi_ = i; pq = q; end
        n++;
      end
  endfunction

  // expected output bursts, 288 samples each, and the cycle of the last bit
  real c_exp_re [FRAMES][NFFT + CP], c_exp_im [FRAMES][NFFT + CP];
  real r_exp    [FRAMES][NFFT + CP];
  int  c_last_bit [FRAMES], r_last_bit [FRAMES];

  task automatic drive_complex();
    int sym;
    real xr [NFFT], xi [NFFT], ang, acc_r, acc_i, t_re [NFFT], t_im [NFFT];
    for (int f = 0; f < FRAMES; f++) begin
      for (int k = 0; k < NFFT; k++) begin
        sym = 0;
        for (int b = 0; b < 8; b++) begin
          @(negedge clk);
          c_en = 1; c_bit = 1'($urandom_range(1));
          sym = (sym << 1) | int'(c_bit);     // first bit is the MSB
        end
        xr[k] = gray_level(sym >> 4);
        xi[k] = -gray_level(sym & 15);
      end
      @(posedge clk) c_last_bit[f] = cyc;
      for (int n = 0; n < NFFT; n++) begin
        acc_r = 0.0; acc_i = 0.0;
        for (int k = 0; k < NFFT; k++) begin
          ang = 2.0 * PI * real'((k * n) % NFFT) / NFFT;
          acc_r += xr[k] * $cos(ang) - xi[k] * $sin(ang);
          acc_i += xr[k] * $sin(ang) + xi[k] * $cos(ang);
        end
        t_re[n] = acc_r * SCALE / NFFT;
        t_im[n] = acc_i * SCALE / NFFT;
      end
      for (int n = 0; n < NFFT + CP; n++) begin
        c_exp_re[f][n] = t_re[(n < CP) ? NFFT - CP + n : n - CP];
        c_exp_im[f][n] = t_im[(n < CP) ? NFFT - CP + n : n - CP];
      end
    end
    @(negedge clk) c_en = 0;
  endtask

  task automatic drive_real();
    int sym, pi_, pq;
    real a [NFFT/2], b [NFFT/2], ang, acc, t [NFFT];
    for (int f = 0; f < FRAMES; f++) begin
      for (int k = 1; k < NFFT / 2; k++) begin
        sym = 0;
        for (int i = 0; i < 7; i++) begin
          @(negedge clk);
          r_en = 1; r_bit = 1'($urandom_range(1));
          sym = (sym << 1) | int'(r_bit);
          @(negedge clk) r_en = 0;
        end
        cross_point(sym, pi_, pq);
        a[k] = pi_; b[k] = pq;
      end
      r_last_bit[f] = cyc - 1;
      for (int n = 0; n < NFFT; n++) begin
        acc = 0.0;
        for (int k = 1; k < NFFT / 2; k++) begin
          ang = 2.0 * PI * real'((k * n) % NFFT) / NFFT;
          acc += a[k] * $cos(ang) - b[k] * $sin(ang);
        end
        t[n] = 2.0 * acc * SCALE / NFFT;
      end
      for (int n = 0; n < NFFT + CP; n++) r_exp[f][n] = t[(n < CP) ? NFFT - CP + n : n - CP];
    end
  endtask

  function automatic bit off(input real got, input real exp_v);
    real d = got - exp_v;
    return (d > TOL) || (d < -TOL);
  endfunction

  int c_frames = 0, r_frames = 0, c_n = 0, r_n = 0;
  int prefixes = 0, overruns = 0;
  bit phase2 = 0;
  logic signed [15:0] c_burst_re [NFFT + CP], c_burst_im [NFFT + CP], r_burst [NFFT + CP];

  // cyclic prefix: burst sample n (n < CP) equals burst sample n + NFFT
  task automatic check_prefix(input bit is_real);
    bit ok = 1;
    for (int n = 0; n < CP; n++) begin
      if (is_real) ok &= (r_burst[n] == r_burst[n + NFFT]);
      else ok &= (c_burst_re[n] == c_burst_re[n + NFFT]) && (c_burst_im[n] == c_burst_im[n + NFFT]);
    end
    checks++;
    if (!ok) begin failures++; $display("prefix differs from frame tail"); end
    else prefixes++;
  endtask

  // output checkers
  always @(posedge clk) if (!rst && !phase2) begin
    if (c_valid) begin
      if (c_first) begin
        c_n = 0;
        checks++;
        if (cyc != c_last_bit[c_frames] + LAT) begin
          failures++;
          $display("complex latency %0d, expected %0d", cyc - c_last_bit[c_frames], LAT);
        end
      end
      checks++;
      if (off(real'(c_re), c_exp_re[c_frames][c_n]) || off(real'(c_im), c_exp_im[c_frames][c_n])
          || c_last != (c_n == NFFT + CP - 1)) begin
        failures++;
        if (failures < 10) $display("complex frame %0d sample %0d: %0d,%0d expected %f,%f",
          c_frames, c_n, c_re, c_im, c_exp_re[c_frames][c_n], c_exp_im[c_frames][c_n]);
      end
      c_burst_re[c_n] = c_re; c_burst_im[c_n] = c_im;
      c_n++;
      if (c_last) begin c_frames++; check_prefix(0); end
    end
    if (r_valid) begin
      if (r_first) begin
        r_n = 0;
        checks++;
        if (cyc != r_last_bit[r_frames] + LAT) begin
          failures++;
          $display("real latency %0d, expected %0d", cyc - r_last_bit[r_frames], LAT);
        end
      end
      checks++;
      if (off(real'(r_re), r_exp[r_frames][r_n]) || r_last != (r_n == NFFT + CP - 1)) begin
        failures++;
        if (failures < 10) $display("real frame %0d sample %0d: %0d expected %f",
          r_frames, r_n, r_re, r_exp[r_frames][r_n]);
      end
      r_burst[r_n] = r_re;
      r_n++;
      if (r_last) begin r_frames++; check_prefix(1); end
    end
    if (c_ovr || r_ovr) begin
      failures++;
      $display("unexpected overrun");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      drive_complex();
      drive_real();
    join
    wait (c_frames == FRAMES && r_frames == FRAMES);
    repeat (5) @(posedge clk);
    checks++;
    if (c_valid || r_valid) failures++;
    // phase 2: real bits at one per clock -> frames every 889 clocks, IFFT
    // needs 1025 -> the second frame finds the IFFT busy
    phase2 = 1;
    for (int i = 0; i < 2 * 127 * 7; i++) begin
      @(negedge clk);
      r_en = 1; r_bit = 1'($urandom_range(1));
      if (r_ovr) overruns++;
    end
    @(negedge clk) r_en = 0;
    repeat (4) begin
      if (r_ovr) overruns++;
      @(negedge clk);
    end
    $display("complex frames %0d, real frames %0d, prefixes %0d, overruns %0d",
             c_frames, r_frames, prefixes, overruns);
    checks++;
    if (c_frames == 0) begin failures++; $display("no complex frame"); end
    checks++;
    if (r_frames == 0) begin failures++; $display("no real frame"); end
    checks++;
    if (prefixes == 0) begin failures++; $display("no cyclic prefix checked"); end
    checks++;
    if (overruns != 1) begin failures++; $display("expected exactly one overrun, saw %0d", overruns); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
