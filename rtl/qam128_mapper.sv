// qam128_mapper: 7 bits -> one 128-QAM cross-constellation point.
//
// The 128 points are the 12 x 12 grid of odd levels -11 .. 11 with the four
// 2 x 2 corner blocks (|I| >= 9 and |Q| >= 9) removed, so both rails stay
// within -11 .. 11 as in the modulator's 128-QAM output. Symbol value k
// (bits[0] is Out1 of the S/P converter) selects the k-th remaining point,
// counting column by column from I = -11 and, inside a column, from the top
// (Q = 11) down. The level set and 6-bit rails follow the document; the
// ordering of points is this design's own choice (the document does not
// give its bit-to-point table).
//
// The table is built at elaboration by cross_point() and held in a constant
// ROM. Interface: in_valid/bits in; out_valid with i_out/q_out (signed
// SYM_W) registered, one clock of latency; synchronous active-high reset.
module qam128_mapper #(
  parameter int SYM_W = 6
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [6:0]              bits,
  output logic                    out_valid,
  output logic signed [SYM_W-1:0] i_out,
  output logic signed [SYM_W-1:0] q_out
);

  // Point k of the cross constellation as {I, Q}, two signed 8-bit fields.
  function automatic logic [15:0] cross_point(input int k);
    int n;
    logic [15:0] pt;
    n  = 0;
    pt = '0;
    for (int i = -11; i <= 11; i += 2) begin
      for (int q = 11; q >= -11; q -= 2) begin
        if (!((i >= 9 || i <= -9) && (q >= 9 || q <= -9))) begin
          if (n == k) pt = {8'(i), 8'(q)};
          n++;
        end
      end
    end
    return pt;
  endfunction

  // Constellation ROM.
  logic signed [SYM_W-1:0] rom_i [128];
  logic signed [SYM_W-1:0] rom_q [128];
  for (genvar k = 0; k < 128; k++) begin : g_rom
    localparam logic [15:0] PT = cross_point(k);
    assign rom_i[k] = SYM_W'(signed'(PT[15:8]));
    assign rom_q[k] = SYM_W'(signed'(PT[7:0]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= rom_i[bits];
        q_out <= rom_q[bits];
      end
    end
  end

endmodule
