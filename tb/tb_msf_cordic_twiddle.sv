// tb_msf_cordic_twiddle: self-checking testbench of the modified
// scaling-free CORDIC twiddle generator.
// A forward and an inverse instance build their tables after reset; ready
// must rise within 200 clocks. Then both read ports of both instances are
// swept over the 8 addresses and compared with cos(2 pi n/16) -/+ j
// sin(2 pi n/16) in Q1.14 within 6 LSB (about 4e-4), the accuracy of the
// truncated Taylor-series micro-rotations.
module tb_msf_cordic_twiddle;
  localparam int TW = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  logic ready_f, ready_i;
  logic [2:0] addr1 = 0, addr2 = 0;
  logic signed [TW-1:0] f1_re, f1_im, f2_re, f2_im, i1_re, i1_im, i2_re, i2_im;
  int checks = 0, failures = 0, cycles = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;
  msf_cordic_twiddle #(.N(16), .TW(TW), .INVERSE(1'b0), .AW(3)) dut_f (.clk, .rst, .ready(ready_f),
    .addr1, .addr2, .w1_re(f1_re), .w1_im(f1_im), .w2_re(f2_re), .w2_im(f2_im));
  msf_cordic_twiddle #(.N(16), .TW(TW), .INVERSE(1'b1), .AW(3)) dut_i (.clk, .rst, .ready(ready_i),
    .addr1, .addr2, .w1_re(i1_re), .w1_im(i1_im), .w2_re(i2_re), .w2_im(i2_im));

  task automatic chk(string what, int n, logic signed [TW-1:0] got, real exp);
    real e;
    e = real'(got) - exp * 16384.0;
    if (e < 0) e = -e;
    if (e > max_err) max_err = e;
    checks++;
    if (e > 6.0) begin
      failures++;
      $display("FAIL %s n=%0d got %0d expected %0.1f", what, n, got, exp * 16384.0);
    end
  endtask

  initial begin
    real a;
    repeat (2) @(posedge clk);
    rst <= 0;
    while (!(ready_f && ready_i) && cycles < 1000) begin
      @(posedge clk);
      cycles++;
    end
    checks++;
    if (cycles > 200) begin
      failures++;
      $display("FAIL ready after %0d clocks", cycles);
    end
    for (int n = 0; n < 8; n++) begin
      addr1 = 3'(n);
      addr2 = 3'(7 - n);
      #1;
      a = 2.0 * PI * real'(n) / 16.0;
      chk("fwd re", n, f1_re, $cos(a));
      chk("fwd im", n, f1_im, -$sin(a));
      chk("inv re", n, i1_re, $cos(a));
      chk("inv im", n, i1_im, $sin(a));
      a = 2.0 * PI * real'(7 - n) / 16.0;
      chk("fwd re2", 7 - n, f2_re, $cos(a));
      chk("fwd im2", 7 - n, f2_im, -$sin(a));
      chk("inv re2", 7 - n, i2_re, $cos(a));
      chk("inv im2", 7 - n, i2_im, $sin(a));
    end
    $display("table ready after %0d clocks, max error %0.2f LSB", cycles, max_err);
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
