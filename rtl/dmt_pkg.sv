// dmt_pkg: constants and helper functions shared by the DMT modulator blocks.
//
// The frame sizes are those of the modulator's design table: a 256-point
// IFFT (2N = 256, N = 128 tones for real transmission), a 32-sample cyclic
// prefix, 6-bit QAM levels. The fixed-point choices (16-bit IFFT words, input
// levels scaled by 2^9, Q14 twiddles) are this design's own.
//
// tw_rom() builds the twiddle table at elaboration time with integer
// arithmetic only (Taylor series in Q30), so no real-valued system function
// is needed: entry m holds cos(2*pi*m/NFFT) and sin(2*pi*m/NFFT) in Q(TW_FRAC)
// for m = 0 .. NFFT/2-1, packed as {sin, cos}.
package dmt_pkg;

  localparam int NFFT     = 256;   // IFFT points (2N)
  localparam int LOG2NFFT = 8;
  localparam int CP_LEN   = 32;    // cyclic prefix samples
  localparam int SYM_W    = 6;     // width of one QAM level (I or Q)
  localparam int W        = 16;    // IFFT / sample word width
  localparam int IN_SHIFT = 9;     // QAM level -> IFFT word scaling (2^9)
  localparam int TW_W     = 16;    // twiddle width
  localparam int TW_FRAC  = 14;    // twiddle fraction bits

  // Bit-reverse the low 'bits' bits of v.
  function automatic int unsigned bitrev(input int unsigned v, input int bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  // sin(x) and cos(x) for 0 <= x <= pi/2, x and result in Q30.
  function automatic longint q30_sin(input longint x);
    longint term, sum;
    term = x;
    sum  = x;
    for (int i = 1; i <= 8; i++) begin
      term = -(((term * x) >>> 30) * x >>> 30) / longint'((2 * i) * (2 * i + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  function automatic longint q30_cos(input longint x);
    longint term, sum;
    term = 64'sd1 <<< 30;
    sum  = term;
    for (int i = 1; i <= 8; i++) begin
      term = -(((term * x) >>> 30) * x >>> 30) / longint'((2 * i - 1) * (2 * i));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // Twiddle m of an n-point transform, rounded to Q(frac): returns
  // {sin, cos} of 2*pi*m/n as two 32-bit fields, for 0 <= m < n/2. Quadrant symmetry keeps the
  // series argument within [0, pi/2].
  function automatic logic [63:0] twiddle(input int m, input int n, input int frac);
    localparam longint PI_Q30 = 64'sd3373259426;   // round(pi * 2^30)
    longint x, c, s, cr, sr;
    int q, r;
    q = (4 * m) / n;          // quadrant 0 or 1
    r = m - q * (n / 4);      // remainder inside the quadrant
    x = (PI_Q30 * 2 * longint'(r)) / longint'(n); // 2*pi*r/n in Q30
    c = q30_cos(x);
    s = q30_sin(x);
    if (q != 0) begin         // angle + pi/2: cos -> -sin, sin -> cos
      longint t;
      t = c;
      c = -s;
      s = t;
    end
    cr = (c + (64'sd1 <<< (29 - frac))) >>> (30 - frac);
    sr = (s + (64'sd1 <<< (29 - frac))) >>> (30 - frac);
    return {sr[31:0], cr[31:0]};
  endfunction

endpackage
