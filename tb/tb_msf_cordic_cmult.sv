// tb_msf_cordic_cmult: self-checking testbench of the shift-add complex
// multiplier. Random data samples times random unit twiddles (plus the
// corner values +-1, +-j), with random pauses of en. The expected product
// is computed exactly with 64-bit integers, (AC - BD) and (AD + BC) rounded
// to nearest by TW-2 bits, and must match bit for bit exactly TW advancing
// cycles after the operands were presented.
module tb_msf_cordic_cmult;
  localparam int W = 21, TW = 16, FR = TW - 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, en = 0;
  logic signed [W-1:0]  a_re = 0, a_im = 0, p_re, p_im;
  logic signed [TW-1:0] w_re = 0, w_im = 0;
  longint exp_re [$], exp_im [$];
  int checks = 0, failures = 0, issued = 0;

  always #5 clk = ~clk;
  msf_cordic_cmult #(.W(W), .TW(TW)) dut (.*);

  function automatic longint rnd_shift(longint v);
    return (v + (64'sd1 <<< (FR - 1))) >>> FR;
  endfunction

  initial begin
    real ang;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      // Compare: the product of the operands issued TW advances ago.
      if (issued > TW && en) begin
        checks++;
        if (longint'(p_re) != exp_re[0] || longint'(p_im) != exp_im[0]) begin
          failures++;
          if (failures < 5) $display("FAIL got %0d,%0d exp %0d,%0d", p_re, p_im, exp_re[0], exp_im[0]);
        end
      end
      if (issued >= TW && en) begin
        void'(exp_re.pop_front());
        void'(exp_im.pop_front());
      end
      en = ($urandom_range(4) != 0);
      if (en) begin
        a_re = W'(int'($urandom_range(1 << 20)) - (1 << 19));
        a_im = W'(int'($urandom_range(1 << 20)) - (1 << 19));
        case (i % 9)
          0: begin w_re = TW'(1 << FR);  w_im = 0; end
          1: begin w_re = 0; w_im = -TW'(1 << FR); end
          2: begin w_re = -TW'(1 << FR); w_im = 0; end
          default: begin
            ang = 2.0 * PI * real'($urandom_range(9999)) / 10000.0;
            w_re = TW'($rtoi($cos(ang) * 16384.0));
            w_im = TW'($rtoi($sin(ang) * 16384.0));
          end
        endcase
        exp_re.push_back(rnd_shift(longint'(a_re) * longint'(w_re) - longint'(a_im) * longint'(w_im)));
        exp_im.push_back(rnd_shift(longint'(a_re) * longint'(w_im) + longint'(a_im) * longint'(w_re)));
        issued++;
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
