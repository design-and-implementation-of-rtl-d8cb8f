// qam256_mapper: 8 bits -> one 256-QAM constellation point.
//
// The symbol value k = bits (bits[0] is Out1 of the S/P converter) is split
// into an in-phase half k[7:4] and a quadrature half k[3:0]. Each half is a
// Gray code of a level position p = 0..15; the levels are I = 2p - 15 and
// Q = 15 - 2p, so both rails take the odd values -15 .. 15 and neighbouring
// points differ in one bit. This is the square Gray mapping of common
// baseband QAM modulators; the document gives the level set and 6-bit rails
// and one mapped point (bits 0,1,0,0,0,0,0,0 on In1..In8 -> -15 + 9j), which
// this mapping reproduces. The bit assignment itself is this design's choice.
//
// Interface: in_valid/bits in; out_valid with i_out/q_out (signed SYM_W)
// registered, one clock of latency. Synchronous active-high reset clears
// out_valid and the levels.
module qam256_mapper #(
  parameter int SYM_W = 6
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [7:0]              bits,
  output logic                    out_valid,
  output logic signed [SYM_W-1:0] i_out,
  output logic signed [SYM_W-1:0] q_out
);

  // Position of a 4-bit Gray code word.
  function automatic logic [3:0] gray_pos(input logic [3:0] g);
    return g ^ (g >> 1) ^ (g >> 2) ^ (g >> 3);
  endfunction

  logic signed [SYM_W-1:0] i_lvl, q_lvl;

  always_comb begin
    i_lvl = SYM_W'(signed'({2'b00, gray_pos(bits[7:4]), 1'b0}) - 7'sd15);
    q_lvl = SYM_W'(7'sd15 - signed'({2'b00, gray_pos(bits[3:0]), 1'b0}));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= i_lvl;
        q_out <= q_lvl;
      end
    end
  end

endmodule
