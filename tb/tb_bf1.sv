// tb_bf1: self-checking testbench of Butterfly unit I.
// Drives random operands with random en, and checks one clock later that
// the registered outputs hold a+b and a-b when en was high and keep their
// old values when it was low.
module tb_bf1;
  localparam int W = 21;
  logic clk = 0, rst = 1, en = 0;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, s_re, s_im, d_re, d_im;
  logic signed [W-1:0] e_sr, e_si, e_dr, e_di;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bf1 #(.W(W)) dut (.*);

  function automatic logic signed [W-1:0] rnd();
    return W'($urandom_range(1 << 19) - (1 << 18));
  endfunction

  initial begin
    a_re = 0; a_im = 0; b_re = 0; b_im = 0;
    e_sr = 0; e_si = 0; e_dr = 0; e_di = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      a_re = rnd(); a_im = rnd(); b_re = rnd(); b_im = rnd();
      en = ($urandom_range(3) != 0);
      if (en) begin
        e_sr = a_re + b_re; e_si = a_im + b_im;
        e_dr = a_re - b_re; e_di = a_im - b_im;
      end
      @(posedge clk); #1;
      checks++;
      if (s_re !== e_sr || s_im !== e_si || d_re !== e_dr || d_im !== e_di) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: s=%0d,%0d d=%0d,%0d exp %0d,%0d %0d,%0d",
                                   i, s_re, s_im, d_re, d_im, e_sr, e_si, e_dr, e_di);
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
