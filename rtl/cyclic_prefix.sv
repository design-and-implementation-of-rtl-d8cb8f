// cyclic_prefix: inserts the cyclic prefix in front of each DMT symbol.
//
// The N serial samples of one IFFT frame are written into a frame buffer as
// they arrive. After the N-th sample the block sends N + CP_LEN samples, one
// per clock: first the last CP_LEN samples of the frame (the prefix, buffer
// addresses N-CP_LEN .. N-1), then the whole frame from address 0. out_first
// marks the first prefix sample and out_last the final sample. With
// COMPLEX = 0 only the real rail is buffered and out_im is zero.
//
// The prefix (a copy of the frame's tail put in front of it, 32 samples for
// a 256-point IFFT) follows the document; the single frame buffer and the
// strobes are this design's own. Because the prefix can only be sent once
// the tail has arrived, the output lags the input by one frame; the buffer
// is free again after the N + CP_LEN output clocks, and input arriving
// before that is an error (an assertion flags it).
//
// Interface: in_valid/in_re/in_im in; out_valid, out_first, out_last,
// out_re/out_im out. The first output sample comes one clock after the last
// input sample. Synchronous active-high reset.
module cyclic_prefix #(
  parameter int N       = 256,
  parameter int CP_LEN  = 32,
  parameter int W       = 16,
  parameter bit COMPLEX = 1'b1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_first,
  output logic                out_last,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int OUT_LEN = N + CP_LEN;

  logic signed [W-1:0]          buf_re [N];
  logic [$clog2(N)-1:0]         wr_idx;
  logic [$clog2(OUT_LEN)-1:0]   out_cnt;
  logic [$clog2(N)-1:0]         rd_idx;
  logic                         sending;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_idx  <= '0;
      out_cnt <= '0;
      sending <= 1'b0;
      for (int k = 0; k < N; k++) buf_re[k] <= '0;
    end else begin
      if (in_valid && !sending) begin
        buf_re[wr_idx] <= in_re;
        wr_idx <= wr_idx + 1'b1;
        if (wr_idx == $bits(wr_idx)'(N - 1)) begin
          wr_idx  <= '0;
          sending <= 1'b1;
          out_cnt <= '0;
        end
      end
      if (sending) begin
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt == $bits(out_cnt)'(OUT_LEN - 1)) sending <= 1'b0;
      end
    end
  end

  // Prefix: addresses N-CP_LEN .. N-1, then the frame: 0 .. N-1.
  always_comb begin
    if (out_cnt < $bits(out_cnt)'(CP_LEN)) rd_idx = $bits(rd_idx)'(N - CP_LEN) + $bits(rd_idx)'(out_cnt);
    else                                   rd_idx = $bits(rd_idx)'(out_cnt - $bits(out_cnt)'(CP_LEN));
  end

  assign out_valid = sending;
  assign out_first = sending && (out_cnt == '0);
  assign out_last  = sending && (out_cnt == $bits(out_cnt)'(OUT_LEN - 1));
  assign out_re    = buf_re[rd_idx];

  if (COMPLEX) begin : g_im
    logic signed [W-1:0] buf_im [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int k = 0; k < N; k++) buf_im[k] <= '0;
      end else if (in_valid && !sending) begin
        buf_im[wr_idx] <= in_im;
      end
    end
    assign out_im = buf_im[rd_idx];
  end else begin : g_no_im
    assign out_im = '0;
  end

  a_no_input_while_sending: assert property (@(posedge clk) disable iff (rst) sending |-> !in_valid)
    else $error("cyclic_prefix: input sample arrived while the previous symbol is being sent");

endmodule
