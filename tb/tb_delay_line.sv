// tb_delay_line: self-checking testbench of the delay registers.
// Instances with D = 4, 2, 1 and 16 are fed the same random stream with
// random pauses of en; each output must equal the value shifted in D
// advancing cycles earlier (zero before that, after reset).
module tb_delay_line;
  localparam int W = 21;
  logic clk = 0, rst = 1, en = 0;
  logic signed [W-1:0] d_re = 0, d_im = 0;
  logic signed [W-1:0] q4_re, q4_im, q2_re, q2_im, q1_re, q1_im, q16_re, q16_im;
  logic signed [W-1:0] hist_re [$], hist_im [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  delay_line #(.W(W), .D(4))  d4  (.clk, .rst, .en, .d_re, .d_im, .q_re(q4_re),  .q_im(q4_im));
  delay_line #(.W(W), .D(2))  d2  (.clk, .rst, .en, .d_re, .d_im, .q_re(q2_re),  .q_im(q2_im));
  delay_line #(.W(W), .D(1))  d1  (.clk, .rst, .en, .d_re, .d_im, .q_re(q1_re),  .q_im(q1_im));
  delay_line #(.W(W), .D(16)) d16 (.clk, .rst, .en, .d_re, .d_im, .q_re(q16_re), .q_im(q16_im));

  function automatic logic signed [W-1:0] past_re(int d);
    return (hist_re.size() >= d) ? hist_re[hist_re.size() - d] : '0;
  endfunction
  function automatic logic signed [W-1:0] past_im(int d);
    return (hist_im.size() >= d) ? hist_im[hist_im.size() - d] : '0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks += 4;
      if (q4_re !== past_re(4) || q4_im !== past_im(4)) failures++;
      if (q2_re !== past_re(2) || q2_im !== past_im(2)) failures++;
      if (q1_re !== past_re(1) || q1_im !== past_im(1)) failures++;
      if (q16_re !== past_re(16) || q16_im !== past_im(16)) failures++;
      d_re = W'($urandom); d_im = W'($urandom);
      en = ($urandom_range(3) != 0);
      if (en) begin
        hist_re.push_back(d_re);
        hist_im.push_back(d_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
