// serial_to_parallel: serial bit stream -> BITS parallel bits per symbol.
//
// A chain of BITS enabled delay registers, as in the modulator's S/P
// converter: every accepted bit (bit_en high) shifts the chain by one, so
// taps[0] (Out1) holds the newest bit and taps[BITS-1] the oldest. Read as a
// number, taps is the symbol with the first-received bit as its MSB.
// BITS = 8 feeds the 256-QAM mapper (complex transmission), BITS = 7 the
// 128-QAM mapper (real transmission).
//
// The delay chain follows the document. The symbol strobe is this design's
// own: a modulo-BITS counter of accepted bits raises sym_valid for one cycle,
// in the cycle after the BITS-th bit of a symbol was accepted, while taps
// hold that whole symbol.
//
// Interface: clk, rst (synchronous, active high, clears chain and counter),
// bit_en/bit_in in; taps, sym_valid out. Latency: one clock from the last bit
// of a symbol to sym_valid.
module serial_to_parallel #(
  parameter int BITS = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            bit_en,
  input  logic            bit_in,
  output logic [BITS-1:0] taps,
  output logic            sym_valid
);

  logic [$clog2(BITS+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      taps      <= '0;
      cnt       <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (bit_en) begin
        taps <= {taps[BITS-2:0], bit_in};
        if (cnt == $bits(cnt)'(BITS - 1)) begin
          cnt       <= '0;
          sym_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
