// tb_r22_mdc_ifft16: self-checking testbench of the 16-point MDC IFFT core.
//
// Streams NF frames of random spectra (plus flush frames) into the core,
// pair X(k), X(k+8) at position p carrying k = bitrev3(p), with random
// pauses of in_valid. Computes each frame's unscaled inverse DFT,
// sum_k X(k) e^(+j 2 pi k n / 16), in double precision and compares every
// output pair with it within a tolerance that covers the fixed-point
// twiddles and rounding. It also checks the natural n order on out_n and
// the latency of 2*TW + 11 accepted pairs.
module tb_r22_mdc_ifft16;
  import mdc_fft_pkg::*;

  localparam int DW = 16, TW = 16, IW = DW + GROWTH;
  localparam int NF = 12;              // frames checked
  localparam int NFLUSH = 6;           // frames to push the last ones out
  localparam int LAT = 2 * TW + 11;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready;
  logic signed [DW-1:0] in0_re = 0, in0_im = 0, in1_re = 0, in1_im = 0;
  logic out_valid;
  logic [2:0] out_n;
  logic signed [IW-1:0] out0_re, out0_im, out1_re, out1_im;

  int checks = 0, failures = 0;
  int xr [NF+NFLUSH][16];
  int xi [NF+NFLUSH][16];
  int kin;
  int accepted = 0, outputs = 0, stalls = 0;
  real max_err = 0.0;

  always #5 clk = ~clk;

  r22_mdc_ifft16 #(.N(16), .DW(DW), .TW(TW)) dut (.*);

  function automatic void dft(input int f, input int k, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int n = 0; n < 16; n++) begin
      real a;
      a = 2.0 * PI * real'(n * k) / 16.0;
      re += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
      im += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
    end
  endfunction

  task automatic check_val(input string what, input real got, input real exp, input real tol);
    real e;
    e = (got > exp) ? got - exp : exp - got;
    checks++;
    if (e > max_err) max_err = e;
    if (e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0.1f expected %0.1f", what, got, exp);
    end
  endtask

  // Output monitor.
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int f, pos;
      logic [2:0] kexp;
      real er, ei, tol;
      f = outputs / 8;
      pos = outputs % 8;
      kexp = 3'(pos);
      if (outputs == 0) begin
        checks++;
        if (accepted != LAT) begin
          failures++;
          $display("FAIL latency: first output after %0d pairs, expected %0d", accepted, LAT);
        end
      end
      if (f < NF) begin
        checks++;
        if (out_n != kexp) begin
          failures++;
          $display("FAIL out_n %0d expected %0d", out_n, kexp);
        end
        // Tolerance: 4 LSB of rounding plus 2e-4 of the frame's L1 norm for
        // the 14-bit CORDIC twiddles.
        tol = 4.0;
        for (int n = 0; n < 16; n++)
          tol += 2.0e-4 * (real'(xr[f][n] < 0 ? -xr[f][n] : xr[f][n]) + real'(xi[f][n] < 0 ? -xi[f][n] : xi[f][n]));
        dft(f, int'(kexp), er, ei);
        check_val("x(n).re", real'(out0_re), er, tol);
        check_val("x(n).im", real'(out0_im), ei, tol);
        dft(f, int'(kexp) + 8, er, ei);
        check_val("x(n+8).re", real'(out1_re), er, tol);
        check_val("x(n+8).im", real'(out1_im), ei, tol);
      end
      outputs++;
    end
    if (!rst && in_valid && in_ready) accepted++;
  end

  initial begin
    for (int f = 0; f < NF + NFLUSH; f++)
      for (int n = 0; n < 16; n++) begin
        // Full-scale tones on frame 0, random data elsewhere.
        if (f == 0) begin
          xr[f][n] = int'(16000.0 * $cos(2.0 * PI * 3.0 * n / 16.0));
          xi[f][n] = int'(16000.0 * $sin(2.0 * PI * 3.0 * n / 16.0));
        end else if (f == 1) begin
          xr[f][n] = 32767; xi[f][n] = -32768;
        end else begin
          xr[f][n] = int'($urandom_range(65535)) - 32768;
          xi[f][n] = int'($urandom_range(65535)) - 32768;
        end
      end
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (in_ready);
    @(posedge clk);
    for (int f = 0; f < NF + NFLUSH; f++) begin
      for (int n = 0; n < 8; n++) begin
        while ($urandom_range(3) == 0) begin
          in_valid <= 0;
          stalls++;
          @(posedge clk);
        end
        in_valid <= 1;
        kin = int'(bitrev3(3'(n)));
        in0_re <= DW'(xr[f][kin]);     in0_im <= DW'(xi[f][kin]);
        in1_re <= DW'(xr[f][kin + 8]); in1_im <= DW'(xi[f][kin + 8]);
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (outputs < NF * 8) begin
      failures++;
      $display("FAIL only %0d output pairs", outputs);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL no input pause was exercised");
    end
    $display("pairs in %0d, out %0d, pauses %0d, max error %0.2f LSB", accepted, outputs, stalls, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
