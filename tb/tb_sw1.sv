// tb_sw1: self-checking testbench of switching unit SW1.
// Random operands and control: control 0 must pass both inputs straight,
// control 1 must interchange them.
module tb_sw1;
  localparam int W = 21;
  logic ctrl;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, y0_re, y0_im, y1_re, y1_im;
  int checks = 0, failures = 0;
  int n_swap = 0;

  sw1 #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < 200; i++) begin
      ctrl = 1'($urandom_range(1));
      a_re = W'($urandom); a_im = W'($urandom);
      b_re = W'($urandom); b_im = W'($urandom);
      #1;
      checks++;
      if (ctrl) n_swap++;
      if (ctrl ? (y0_re !== b_re || y0_im !== b_im || y1_re !== a_re || y1_im !== a_im)
               : (y0_re !== a_re || y0_im !== a_im || y1_re !== b_re || y1_im !== b_im)) begin
        failures++;
        if (failures < 5) $display("FAIL ctrl=%0d", ctrl);
      end
    end
    checks++;
    if (n_swap == 0 || n_swap == 200) failures++;
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
