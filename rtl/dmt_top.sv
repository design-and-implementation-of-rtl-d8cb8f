// dmt_top: the complex and the real DMT transmitter side by side.
//
// Complex transmission: 256-QAM on 256 tones, 256-point IFFT, 32-sample
// cyclic prefix; the I/Q sample stream (cplx_re, cplx_im) is meant for a
// quadrature up-converter and band-pass filter outside this design.
// Real transmission: 128-QAM on tones 1 .. 127 with conjugate-symmetric
// upper tones, 256-point IFFT, 32-sample cyclic prefix; a single real
// sample stream (real_out) drives the line, e.g. through a DAC.
//
// The two chains share only clock and reset. Each takes serial data bits
// with its own bit enable and emits bursts of 288 samples (one per clock)
// per DMT symbol, marked by *_valid, *_first and *_last; *_overrun reports a
// frame dropped because bits came faster than the IFFT can take frames (see
// dmt_transmitter). The real chain's imaginary rail is zero by construction
// and is not brought out. Synchronous active-high reset.
module dmt_top
  import dmt_pkg::W;
(
  input  logic                clk,
  input  logic                rst,
  // complex transmitter
  input  logic                cplx_bit_en,
  input  logic                cplx_bit_in,
  output logic                cplx_valid,
  output logic                cplx_first,
  output logic                cplx_last,
  output logic signed [W-1:0] cplx_re,
  output logic signed [W-1:0] cplx_im,
  output logic                cplx_overrun,
  // real transmitter
  input  logic                real_bit_en,
  input  logic                real_bit_in,
  output logic                real_valid,
  output logic                real_first,
  output logic                real_last,
  output logic signed [W-1:0] real_out,
  output logic                real_overrun
);

  dmt_transmitter #(.REAL_TX(1'b0)) u_complex (
    .clk, .rst, .bit_en(cplx_bit_en), .bit_in(cplx_bit_in),
    .out_valid(cplx_valid), .out_first(cplx_first), .out_last(cplx_last),
    .out_re(cplx_re), .out_im(cplx_im), .overrun(cplx_overrun)
  );

  logic signed [W-1:0] real_im_unused;

  dmt_transmitter #(.REAL_TX(1'b1)) u_real (
    .clk, .rst, .bit_en(real_bit_en), .bit_in(real_bit_in),
    .out_valid(real_valid), .out_first(real_first), .out_last(real_last),
    .out_re(real_out), .out_im(real_im_unused), .overrun(real_overrun)
  );

endmodule
