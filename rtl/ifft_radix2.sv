// ifft_radix2: in-place radix-2 decimation-in-time inverse FFT of 2^LOG2N
// points, with a parallel frame in and a parallel frame out.
//
// On start the NFFT input bins (signed SYM_W QAM levels) are loaded in one
// clock into a register file of NFFT complex words, at bit-reversed
// addresses and scaled by 2^IN_SHIFT. One butterfly per clock then runs
// through LOG2N stages of NFFT/2 butterflies each. Butterfly b of stage s
// (span h = 2^s, position p = b mod h) combines words i = (b/h)*2h + p and
// i + h with the twiddle exp(+j*2*pi*p/(2h)):
//     t = X[i+h] * W,   X[i] = (X[i] + t) / 2,   X[i+h] = (X[i] - t) / 2.
// The halving in every stage keeps the words from growing, so the result is
//     x(n) = (1/NFFT) * sum_k X_k * exp(+j*2*pi*k*n/NFFT) * 2^IN_SHIFT,
// the normalised inverse DFT (the same scaling as a numerical ifft). For a
// Hermitian input spectrum this is x(n) of the real-transmission equation
// (3) divided by NFFT. Products are rounded to nearest; the halving
// truncates.
//
// The document fixes the transform (inverse DFT, 256 points, parallel in
// and out); the sequential radix-2 architecture, the fixed-point format and
// the scaling are this design's own. Twiddles are a constant table of
// NFFT/2 cos/sin pairs in Q(TW_FRAC) built at elaboration.
//
// Interface: start with in_re/in_im; busy high while computing; done pulses
// for one clock when out_re/out_im hold the result. The outputs stay valid
// until the next start. Latency: start to done is LOG2N*NFFT/2 + 1 clocks
// (1025 for 256 points). A start while busy is ignored (an assertion flags
// it). Synchronous active-high reset.
module ifft_radix2
  import dmt_pkg::bitrev, dmt_pkg::twiddle;
#(
  parameter int LOG2N    = 8,
  parameter int SYM_W    = 6,
  parameter int W        = 16,
  parameter int IN_SHIFT = 9,
  parameter int TW_W     = 16,
  parameter int TW_FRAC  = 14
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic signed [SYM_W-1:0] in_re  [2**LOG2N],
  input  logic signed [SYM_W-1:0] in_im  [2**LOG2N],
  output logic                    busy,
  output logic                    done,
  output logic signed [W-1:0]     out_re [2**LOG2N],
  output logic signed [W-1:0]     out_im [2**LOG2N]
);

  localparam int NFFT = 2**LOG2N;
  localparam int HALF = NFFT / 2;

  // Twiddle ROM: entry m holds cos and sin of 2*pi*m/NFFT.
  logic signed [TW_W-1:0] tw_cos_rom [HALF];
  logic signed [TW_W-1:0] tw_sin_rom [HALF];
  for (genvar m = 0; m < HALF; m++) begin : g_tw
    localparam logic [63:0] SC = twiddle(m, NFFT, TW_FRAC);
    assign tw_cos_rom[m] = SC[0 +: TW_W];
    assign tw_sin_rom[m] = SC[32 +: TW_W];
  end

  logic signed [W-1:0] mem_re [NFFT];
  logic signed [W-1:0] mem_im [NFFT];

  // Input bins at their bit-reversed load addresses.
  logic signed [W-1:0] ld_re [NFFT];
  logic signed [W-1:0] ld_im [NFFT];
  for (genvar j = 0; j < NFFT; j++) begin : g_load
    localparam int SRC = int'(bitrev(j, LOG2N));
    assign ld_re[j] = W'(in_re[SRC]) <<< IN_SHIFT;
    assign ld_im[j] = W'(in_im[SRC]) <<< IN_SHIFT;
  end

  logic [$clog2(LOG2N)-1:0] stage;
  logic [LOG2N-2:0]         bfly;
  logic                     last_bfly;

  // Butterfly addressing and arithmetic.
  logic [LOG2N-1:0]           ia, ib, pos;
  logic [LOG2N-2:0]           tw_idx;
  logic signed [TW_W-1:0]     tw_c, tw_s;
  logic signed [W+TW_W:0]     b_re, b_im, p_re, p_im;
  logic signed [W:0]          t_re, t_im;
  logic signed [W+1:0]        s_re, s_im, d_re, d_im;

  always_comb begin
    pos    = LOG2N'(bfly) & LOG2N'((1 << stage) - 1);
    ia     = LOG2N'((LOG2N'(bfly) >> stage) << (stage + 1)) | pos;
    ib     = ia | LOG2N'(1 << stage);
    tw_idx = (LOG2N-1)'(pos << ($bits(stage)'(LOG2N - 1) - stage));
    tw_c = tw_cos_rom[tw_idx];
    tw_s = tw_sin_rom[tw_idx];
    b_re = (W+TW_W+1)'(mem_re[ib]);
    b_im = (W+TW_W+1)'(mem_im[ib]);
    p_re = b_re * (W+TW_W+1)'(tw_c) - b_im * (W+TW_W+1)'(tw_s)
         + (W+TW_W+1)'(1 <<< (TW_FRAC - 1));
    p_im = b_re * (W+TW_W+1)'(tw_s) + b_im * (W+TW_W+1)'(tw_c)
         + (W+TW_W+1)'(1 <<< (TW_FRAC - 1));
    t_re = (W+1)'(p_re >>> TW_FRAC);
    t_im = (W+1)'(p_im >>> TW_FRAC);
    s_re = (W+2)'(mem_re[ia]) + (W+2)'(t_re);
    s_im = (W+2)'(mem_im[ia]) + (W+2)'(t_im);
    d_re = (W+2)'(mem_re[ia]) - (W+2)'(t_re);
    d_im = (W+2)'(mem_im[ia]) - (W+2)'(t_im);
    last_bfly = (stage == $bits(stage)'(LOG2N - 1)) && (&bfly);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      stage <= '0;
      bfly  <= '0;
      for (int k = 0; k < NFFT; k++) begin
        mem_re[k] <= '0;
        mem_im[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          stage <= '0;
          bfly  <= '0;
          for (int k = 0; k < NFFT; k++) begin
            mem_re[k] <= ld_re[k];
            mem_im[k] <= ld_im[k];
          end
        end
      end else begin
        mem_re[ia] <= W'(s_re >>> 1);
        mem_im[ia] <= W'(s_im >>> 1);
        mem_re[ib] <= W'(d_re >>> 1);
        mem_im[ib] <= W'(d_im >>> 1);
        bfly <= bfly + 1'b1;
        if (&bfly) stage <= stage + 1'b1;
        if (last_bfly) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign out_re = mem_re;
  assign out_im = mem_im;

  // A new frame must not arrive while the previous one is being transformed.
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (rst) busy |-> !start)
    else $error("ifft_radix2: start while busy, frame ignored");

endmodule
