// serial_to_parallel_tb: drives random bits with a random bit enable into a
// 7-bit and an 8-bit converter and checks every tap against a reference
// delay line, and that sym_valid rises exactly one clock after every 7th
// (8th) accepted bit, with taps then holding the last 7 (8) bits, first bit
// as MSB.
module serial_to_parallel_tb;
  logic clk = 0, rst = 1, bit_en = 0, bit_in = 0;
  logic [6:0] taps7;
  logic [7:0] taps8;
  logic       v7, v8;
  int checks = 0, failures = 0;

  serial_to_parallel #(.BITS(7)) dut7 (.clk, .rst, .bit_en, .bit_in, .taps(taps7), .sym_valid(v7));
  serial_to_parallel #(.BITS(8)) dut8 (.clk, .rst, .bit_en, .bit_in, .taps(taps8), .sym_valid(v8));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] hist;      // last 8 accepted bits, newest in bit 0
  int         nacc;      // accepted bits since reset
  bit         exp7, exp8;

  initial begin
    hist = '0; nacc = 0; exp7 = 0; exp8 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // outputs reflect the bits accepted up to the last edge
      checks++;
      if (taps7 !== hist[6:0] || taps8 !== hist) begin
        failures++;
        if (failures < 10) $display("cyc %0d taps %b %b expected %b", cyc, taps7, taps8, hist);
      end
      checks++;
      if (v7 !== exp7 || v8 !== exp8) begin
        failures++;
        if (failures < 10) $display("cyc %0d valid %b%b expected %b%b", cyc, v7, v8, exp7, exp8);
      end
      bit_en = ($urandom_range(3) != 0);
      bit_in = 1'($urandom_range(1));
      exp7 = 0; exp8 = 0;
      if (bit_en) begin
        hist = {hist[6:0], bit_in};
        nacc++;
        exp7 = (nacc % 7 == 0);
        exp8 = (nacc % 8 == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
