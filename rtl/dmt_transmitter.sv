// dmt_transmitter: one discrete multitone (DMT) modulator chain.
//
// Serial data bits are grouped into QAM symbols, one symbol per tone; a
// frame of tones is transformed by a 256-point inverse FFT into one DMT
// symbol in the time domain, which is serialised and sent with a cyclic
// prefix:
//
//   bits -> serial_to_parallel -> QAM mapper -> frame_assembler
//        [-> conjugate_mirror] -> ifft_radix2 -> parallel_to_serial
//        -> cyclic_prefix -> samples
//
// REAL_TX = 0, complex transmission: 8 bits per tone, 256-QAM, all 256 IFFT
// bins carry data, the output is complex (I and Q rails, for a quadrature
// up-converter).
// REAL_TX = 1, real transmission: 7 bits per tone, 128-QAM on tones
// 1 .. N-1 (N = NFFT/2 = 128, so 127 data tones), the upper bins carry the
// complex conjugates, DC and Nyquist are zero, and the IFFT output is real:
// only out_re is used and out_im is zero.
//
// The chain and its sizes follow the document. Pacing is this design's own:
// bits are accepted when bit_en is high; one frame needs 2048 (complex) or
// 889 (real) accepted bits, and the IFFT is busy for 1025 clocks after each
// frame, so bit_en may be high at most every clock for complex and at most
// every second clock for real transmission. A frame that completes while the
// IFFT is still busy is dropped and reported on overrun. The time samples
// leave in bursts of NFFT + CP_LEN = 288 samples, one per clock, with
// out_first on the first prefix sample.
//
// Latency, from the clock cycle that presents the last bit of a frame on
// bit_in to the cycle in which out_first is high:
// 1 (S/P) + 1 (mapper) + 1 (frame) + 1025 (IFFT) + 256 (P/S) + 1 (CP)
// = 1285 clocks.
module dmt_transmitter
  import dmt_pkg::NFFT, dmt_pkg::LOG2NFFT, dmt_pkg::CP_LEN, dmt_pkg::SYM_W,
         dmt_pkg::W, dmt_pkg::IN_SHIFT, dmt_pkg::TW_W, dmt_pkg::TW_FRAC;
#(
  parameter bit REAL_TX = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bit_en,
  input  logic                bit_in,
  output logic                out_valid,
  output logic                out_first,
  output logic                out_last,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                overrun
);

  localparam int BITS  = REAL_TX ? 7 : 8;
  localparam int NSYM  = REAL_TX ? NFFT / 2 - 1 : NFFT;

  // Serial to parallel.
  logic [BITS-1:0] sp_bits;
  logic            sp_valid;

  serial_to_parallel #(.BITS(BITS)) u_sp (
    .clk, .rst, .bit_en, .bit_in, .taps(sp_bits), .sym_valid(sp_valid)
  );

  // Symbol mapping.
  logic                    map_valid;
  logic signed [SYM_W-1:0] map_i, map_q;

  if (REAL_TX) begin : g_qam128
    qam128_mapper #(.SYM_W(SYM_W)) u_map (
      .clk, .rst, .in_valid(sp_valid), .bits(sp_bits),
      .out_valid(map_valid), .i_out(map_i), .q_out(map_q)
    );
  end else begin : g_qam256
    qam256_mapper #(.SYM_W(SYM_W)) u_map (
      .clk, .rst, .in_valid(sp_valid), .bits(sp_bits),
      .out_valid(map_valid), .i_out(map_i), .q_out(map_q)
    );
  end

  // Frame of tones.
  logic                    frame_valid, ifft_busy, ifft_done;
  logic signed [SYM_W-1:0] frame_re [NSYM];
  logic signed [SYM_W-1:0] frame_im [NSYM];
  logic signed [SYM_W-1:0] bin_re   [NFFT];
  logic signed [SYM_W-1:0] bin_im   [NFFT];

  frame_assembler #(.NSYM(NSYM), .SYM_W(SYM_W)) u_frame (
    .clk, .rst, .in_valid(map_valid), .i_in(map_i), .q_in(map_q),
    .sink_ready(~ifft_busy), .frame_valid, .frame_re, .frame_im, .overrun
  );

  if (REAL_TX) begin : g_conj
    conjugate_mirror #(.N(NFFT / 2), .SYM_W(SYM_W)) u_conj (
      .tone_re(frame_re), .tone_im(frame_im), .bin_re, .bin_im
    );
  end else begin : g_direct
    assign bin_re = frame_re;
    assign bin_im = frame_im;
  end

  // Inverse FFT.
  logic signed [W-1:0] time_re [NFFT];
  logic signed [W-1:0] time_im [NFFT];

  ifft_radix2 #(
    .LOG2N(LOG2NFFT), .SYM_W(SYM_W), .W(W), .IN_SHIFT(IN_SHIFT),
    .TW_W(TW_W), .TW_FRAC(TW_FRAC)
  ) u_ifft (
    .clk, .rst, .start(frame_valid), .in_re(bin_re), .in_im(bin_im),
    .busy(ifft_busy), .done(ifft_done), .out_re(time_re), .out_im(time_im)
  );

  // Parallel to serial and cyclic prefix.
  logic                ps_valid, ps_last;
  logic signed [W-1:0] ps_re, ps_im;

  parallel_to_serial #(.N(NFFT), .W(W), .COMPLEX(!REAL_TX)) u_ps (
    .clk, .rst, .load(ifft_done), .in_re(time_re), .in_im(time_im),
    .out_valid(ps_valid), .out_last(ps_last), .out_re(ps_re), .out_im(ps_im)
  );

  cyclic_prefix #(.N(NFFT), .CP_LEN(CP_LEN), .W(W), .COMPLEX(!REAL_TX)) u_cp (
    .clk, .rst, .in_valid(ps_valid), .in_re(ps_re), .in_im(ps_im),
    .out_valid, .out_first, .out_last, .out_re, .out_im
  );

endmodule
