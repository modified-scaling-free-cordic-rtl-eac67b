// tb_bf2: self-checking testbench of Butterfly unit II.
// Checks the registered butterfly (a+b, a-b) and the two twiddle addresses
// of the counter logic against a model: after k advancing cycles the
// addresses are (k+OFS1) mod 8 and 2*((k+OFS2) mod 4) for the default
// STEP1 = 1, STEP2 = 2. en is random, so the counter must hold when low.
module tb_bf2;
  localparam int W = 21, OFS1 = 7, OFS2 = 2;
  logic clk = 0, rst = 1, en = 0;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, s_re, s_im, d_re, d_im;
  logic [2:0] tw_addr1, tw_addr2;
  logic signed [W-1:0] e_sr, e_si, e_dr, e_di;
  int k = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bf2 #(.W(W), .AW(3), .OFS1(OFS1), .OFS2(OFS2), .STEP1(1), .STEP2(2)) dut (.*);

  function automatic logic signed [W-1:0] rnd();
    return W'($urandom_range(1 << 19) - (1 << 18));
  endfunction

  initial begin
    a_re = 0; a_im = 0; b_re = 0; b_im = 0;
    e_sr = 0; e_si = 0; e_dr = 0; e_di = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (tw_addr1 != 3'((k + OFS1) % 8) || tw_addr2 != 3'(((k + OFS2) % 4) * 2)) begin
        failures++;
        if (failures < 5) $display("FAIL addr after %0d: %0d %0d", k, tw_addr1, tw_addr2);
      end
      a_re = rnd(); a_im = rnd(); b_re = rnd(); b_im = rnd();
      en = ($urandom_range(3) != 0);
      if (en) begin
        k++;
        e_sr = a_re + b_re; e_si = a_im + b_im;
        e_dr = a_re - b_re; e_di = a_im - b_im;
      end
      @(posedge clk); #1;
      checks++;
      if (s_re !== e_sr || s_im !== e_si || d_re !== e_dr || d_im !== e_di) begin
        failures++;
        if (failures < 5) $display("FAIL butterfly %0d", i);
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
