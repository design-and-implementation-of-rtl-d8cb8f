// frame_assembler_tb: streams random QAM levels into a 256-tone assembler
// with gaps, and checks that frame_valid rises one clock after the 256th
// symbol, that the frame then holds the symbols in arrival order, and that a
// frame completing while sink_ready is low is reported as overrun instead.
module frame_assembler_tb;
  localparam int NSYM = 256;
  logic clk = 0, rst = 1, in_valid = 0, sink_ready = 1;
  logic signed [5:0] i_in = '0, q_in = '0;
  logic frame_valid, overrun;
  logic signed [5:0] frame_re [NSYM], frame_im [NSYM];
  int checks = 0, failures = 0;

  frame_assembler #(.NSYM(NSYM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [5:0] ref_re [NSYM], ref_im [NSYM];

  task automatic send_frame(input bit ready);
    for (int k = 0; k < NSYM; k++) begin
      @(negedge clk);
      // no output strobe while the frame is being filled
      checks++;
      if (frame_valid || overrun) failures++;
      in_valid = 1;
      i_in = 6'(2 * int'($urandom_range(15)) - 15);
      q_in = 6'(2 * int'($urandom_range(15)) - 15);
      ref_re[k] = i_in; ref_im[k] = q_in;
      if (k < NSYM - 1 && $urandom_range(1) != 0) begin
        @(negedge clk) in_valid = 0;
        checks++;
        if (frame_valid || overrun) failures++;
      end
    end
    sink_ready = ready;
    @(negedge clk) in_valid = 0;
    checks++;
    if (frame_valid !== ready || overrun !== !ready) begin
      failures++;
      $display("strobes valid=%b overrun=%b, ready=%b", frame_valid, overrun, ready);
    end
    for (int k = 0; k < NSYM; k++) begin
      checks++;
      if (frame_re[k] != ref_re[k] || frame_im[k] != ref_im[k]) begin
        failures++;
        if (failures < 10) $display("tone %0d: %0d,%0d expected %0d,%0d", k, frame_re[k], frame_im[k], ref_re[k], ref_im[k]);
      end
    end
    @(negedge clk);
    checks++;
    if (frame_valid || overrun) failures++;
    sink_ready = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    send_frame(1);
    send_frame(1);
    send_frame(0);
    send_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
