// parallel_to_serial_tb: loads random 256-sample frames into a complex and a
// real-only converter and checks that sample n leaves n+1 clocks after load,
// out_last on sample 255, and that the real-only variant drives out_im = 0.
module parallel_to_serial_tb;
  localparam int N = 256;
  logic clk = 0, rst = 1, load = 0;
  logic signed [15:0] in_re [N], in_im [N];
  logic v_c, l_c, v_r, l_r;
  logic signed [15:0] re_c, im_c, re_r, im_r;
  int checks = 0, failures = 0;

  parallel_to_serial #(.N(N), .COMPLEX(1'b1)) dut_c (.clk, .rst, .load, .in_re, .in_im,
    .out_valid(v_c), .out_last(l_c), .out_re(re_c), .out_im(im_c));
  parallel_to_serial #(.N(N), .COMPLEX(1'b0)) dut_r (.clk, .rst, .load, .in_re, .in_im,
    .out_valid(v_r), .out_last(l_r), .out_re(re_r), .out_im(im_r));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [15:0] ref_re [N], ref_im [N];

  initial begin
    for (int k = 0; k < N; k++) begin in_re[k] = 0; in_im[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 3; f++) begin
      for (int k = 0; k < N; k++) begin
        in_re[k] = 16'($urandom); in_im[k] = 16'($urandom);
        ref_re[k] = in_re[k]; ref_im[k] = in_im[k];
      end
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      // the source may change right after load
      for (int k = 0; k < N; k++) begin in_re[k] = 0; in_im[k] = 0; end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (!v_c || re_c != ref_re[n] || im_c != ref_im[n] || l_c != (n == N - 1)) begin
          failures++;
          if (failures < 10) $display("frame %0d sample %0d: %0d %0d", f, n, re_c, im_c);
        end
        checks++;
        if (!v_r || re_r != ref_re[n] || im_r != 0 || l_r != (n == N - 1)) failures++;
        @(negedge clk);
      end
      checks++;
      if (v_c || v_r) failures++;
      repeat ($urandom_range(20)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
