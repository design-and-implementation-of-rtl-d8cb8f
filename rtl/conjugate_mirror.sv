// conjugate_mirror: Hermitian extension of a half spectrum (real DMT).
//
// For real transmission the 2N-point IFFT must see a spectrum whose upper
// half is the complex conjugate of the lower half, so that its output is
// real. The N-1 data tones X_1 .. X_(N-1) come in (index t of the input
// holds tone t+1); the block places X_k on bin k and conj(X_k) = a_k - j b_k
// on bin 2N-k, and sets the DC bin 0 and the Nyquist bin N to zero. This is
// the conjugate block and equations (1)-(2) of the modulator's design;
// the zero DC and Nyquist bins follow from the tone range k = 1 .. N-1 given
// there.
//
// Purely combinational. Interface: tone_re/tone_im (N-1 entries, signed
// SYM_W) in; bin_re/bin_im (2N entries) out.
module conjugate_mirror #(
  parameter int N     = 128,
  parameter int SYM_W = 6
) (
  input  logic signed [SYM_W-1:0] tone_re [N-1],
  input  logic signed [SYM_W-1:0] tone_im [N-1],
  output logic signed [SYM_W-1:0] bin_re  [2*N],
  output logic signed [SYM_W-1:0] bin_im  [2*N]
);

  always_comb begin
    bin_re[0] = '0;
    bin_im[0] = '0;
    bin_re[N] = '0;
    bin_im[N] = '0;
    for (int k = 1; k < N; k++) begin
      bin_re[k]       = tone_re[k-1];
      bin_im[k]       = tone_im[k-1];
      bin_re[2*N - k] = tone_re[k-1];
      bin_im[2*N - k] = -tone_im[k-1];
    end
  end

endmodule
