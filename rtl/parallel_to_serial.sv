// parallel_to_serial: one parallel IFFT frame -> a stream of N samples.
//
// The IFFT delivers all N time samples of a DMT symbol at once. On load the
// frame is copied into a holding register file (so the IFFT is free to
// start on the next frame) and then sent out one sample per clock, sample 0
// first, with out_valid high and out_last marking sample N-1. With COMPLEX = 0
// (real transmission) only the real rail is stored and out_im is zero.
//
// The P/S function follows the document; the holding register, one sample
// per clock and the strobes are this design's own. A load while a frame is
// still being sent restarts with the new frame (an assertion flags it).
//
// Interface: load with in_re/in_im (N entries, signed W); out_valid,
// out_re/out_im, out_last. The first sample appears one clock after load;
// the frame takes N clocks. Synchronous active-high reset.
module parallel_to_serial #(
  parameter int N       = 256,
  parameter int W       = 16,
  parameter bit COMPLEX = 1'b1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic signed [W-1:0] in_re [N],
  input  logic signed [W-1:0] in_im [N],
  output logic                out_valid,
  output logic                out_last,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  logic signed [W-1:0]  hold_re [N];
  logic [$clog2(N)-1:0] idx;
  logic                 active;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      idx    <= '0;
      for (int k = 0; k < N; k++) hold_re[k] <= '0;
    end else if (load) begin
      active <= 1'b1;
      idx    <= '0;
      hold_re <= in_re;
    end else if (active) begin
      idx <= idx + 1'b1;
      if (idx == $bits(idx)'(N - 1)) active <= 1'b0;
    end
  end

  assign out_valid = active;
  assign out_last  = active && (idx == $bits(idx)'(N - 1));
  assign out_re    = hold_re[idx];

  if (COMPLEX) begin : g_im
    logic signed [W-1:0] hold_im [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 0; k < N; k++) hold_im[k] <= '0;
      end else if (load) begin
        hold_im <= in_im;
      end
    end
    assign out_im = hold_im[idx];
  end else begin : g_no_im
    assign out_im = '0;
  end

  a_load_when_idle: assert property (@(posedge clk) disable iff (rst) load |-> !active)
    else $error("parallel_to_serial: frame loaded while the previous one is being sent");

endmodule
