// tb_sw2: self-checking testbench of switching unit SW2.
// Two instances, forward (-j) and inverse (+j). With c = 0 both operands
// pass; with c = 1 the upper operand passes and the lower one X+Yj becomes
// Y-Xj (forward) or -Y+Xj (inverse).
module tb_sw2;
  localparam int W = 21;
  logic c;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [W-1:0] f0_re, f0_im, f1_re, f1_im, i0_re, i0_im, i1_re, i1_im;
  int checks = 0, failures = 0;

  sw2 #(.W(W), .INVERSE(1'b0)) dut_f (.c, .a_re, .a_im, .b_re, .b_im,
    .y0_re(f0_re), .y0_im(f0_im), .y1_re(f1_re), .y1_im(f1_im));
  sw2 #(.W(W), .INVERSE(1'b1)) dut_i (.c, .a_re, .a_im, .b_re, .b_im,
    .y0_re(i0_re), .y0_im(i0_im), .y1_re(i1_re), .y1_im(i1_im));

  initial begin
    for (int i = 0; i < 200; i++) begin
      c = 1'(i % 2);
      a_re = W'($urandom_range(1 << 19) - (1 << 18)); a_im = W'($urandom_range(1 << 19) - (1 << 18));
      b_re = W'($urandom_range(1 << 19) - (1 << 18)); b_im = W'($urandom_range(1 << 19) - (1 << 18));
      #1;
      checks += 2;
      if (f0_re !== a_re || f0_im !== a_im || i0_re !== a_re || i0_im !== a_im) failures++;
      if (c) begin
        if (f1_re !== b_im || f1_im !== -b_re) failures++;
        if (i1_re !== -b_im || i1_im !== b_re) failures++;
      end else begin
        if (f1_re !== b_re || f1_im !== b_im || i1_re !== b_re || i1_im !== b_im) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
