// frame_assembler: QAM symbol stream -> one parallel DMT frame.
//
// In the modulator the symbol mapper delivers one QAM point per symbol
// period, while the IFFT takes a whole frame of tones at once. This block
// writes the incoming points into an NSYM-entry register file, tone by tone
// in arrival order, and when the last tone of a frame is written it raises
// frame_valid for one cycle; frame_re/frame_im then hold the complete frame.
// The IFFT loads the frame in that cycle, so writing of the next frame can
// start right away.
//
// Handing over a frame only works when the IFFT is idle: sink_ready low
// while a frame completes means the IFFT is still busy and the frame is
// lost, which is reported by a one-cycle overrun pulse (frame_valid is then
// not raised). The document describes the parallel hand-over of a frame to
// the IFFT; the register file, the strobes and the overrun report are this
// design's own.
//
// Interface: in_valid/i_in/q_in in (signed SYM_W); sink_ready in;
// frame_valid, frame_re/frame_im (NSYM entries), overrun out. frame_valid
// follows the last symbol's in_valid by one clock. Synchronous active-high
// reset.
module frame_assembler #(
  parameter int NSYM  = 256,
  parameter int SYM_W = 6
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [SYM_W-1:0] i_in,
  input  logic signed [SYM_W-1:0] q_in,
  input  logic                    sink_ready,
  output logic                    frame_valid,
  output logic signed [SYM_W-1:0] frame_re [NSYM],
  output logic signed [SYM_W-1:0] frame_im [NSYM],
  output logic                    overrun
);

  logic [$clog2(NSYM)-1:0] wr_idx;
  logic                    full;   // last tone of the frame was just written

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_idx <= '0;
      full   <= 1'b0;
      for (int k = 0; k < NSYM; k++) begin
        frame_re[k] <= '0;
        frame_im[k] <= '0;
      end
    end else begin
      full <= 1'b0;
      if (in_valid) begin
        frame_re[wr_idx] <= i_in;
        frame_im[wr_idx] <= q_in;
        if (wr_idx == $bits(wr_idx)'(NSYM - 1)) begin
          wr_idx <= '0;
          full   <= 1'b1;
        end else begin
          wr_idx <= wr_idx + 1'b1;
        end
      end
    end
  end

  assign frame_valid = full & sink_ready;
  assign overrun     = full & ~sink_ready;

endmodule
