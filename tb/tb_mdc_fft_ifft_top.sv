// tb_mdc_fft_ifft_top: end-to-end testbench of the FFT/IFFT pair, run with
// every parameter at its default.
//
// Random 16-point frames enter the FFT with random pauses. Every FFT output
// pair is checked against a double-precision DFT, then divided by 16
// (rounded) and fed on the same cycle into the IFFT, which accepts the
// FFT's bit-reversed order directly. The IFFT, whose gain is 16, must give
// back x(n) in natural order, within the error of the two fixed-point
// passes. The latency of both pipelines (2*TW + 11 accepted pairs) is
// checked, and the testbench counts how often each mechanism of the design
// occurred: input pauses of each pipeline, SW1 interchanges, SW2 quarter
// turns, CORDIC micro-rotations of the 0.25 rad kind and of the 2^-s kind.
// A mechanism that never occurred counts as a failure.
module tb_mdc_fft_ifft_top;
  import mdc_fft_pkg::*;
  import tb_mech_pkg::*;

  localparam int DW = 16, TW = 16, IW = DW + GROWTH;
  localparam int NF = 10;              // frames checked end to end
  localparam int NFLUSH = 12;          // frames that push the last ones out
  localparam int LAT = 2 * TW + 11;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic fft_in_valid = 0, fft_in_ready;
  logic signed [DW-1:0] fft_in0_re = 0, fft_in0_im = 0, fft_in1_re = 0, fft_in1_im = 0;
  logic fft_out_valid;
  logic [2:0] fft_out_k;
  logic signed [IW-1:0] fft_out0_re, fft_out0_im, fft_out1_re, fft_out1_im;
  logic ifft_in_valid, ifft_in_ready;
  logic signed [DW-1:0] ifft_in0_re, ifft_in0_im, ifft_in1_re, ifft_in1_im;
  logic ifft_out_valid;
  logic [2:0] ifft_out_n;
  logic signed [IW-1:0] ifft_out0_re, ifft_out0_im, ifft_out1_re, ifft_out1_im;

  always #5 clk = ~clk;

  mdc_fft_ifft_top dut (.*);

  // FFT output / 16, rounded, straight into the IFFT.
  function automatic logic signed [DW-1:0] div16(logic signed [IW-1:0] v);
    return DW'((v + IW'(8)) >>> 4);
  endfunction
  assign ifft_in_valid = fft_out_valid;
  assign ifft_in0_re = div16(fft_out0_re);
  assign ifft_in0_im = div16(fft_out0_im);
  assign ifft_in1_re = div16(fft_out1_re);
  assign ifft_in1_im = div16(fft_out1_im);

  int checks = 0, failures = 0;
  int xr [NF+NFLUSH][16];
  int xi [NF+NFLUSH][16];
  real l1 [NF+NFLUSH];
  int fft_acc = 0, fft_outs = 0, ifft_acc = 0, ifft_outs = 0;
  real fft_max_err = 0.0, ifft_max_err = 0.0;
  // Mechanism counters: pauses here, the rest in monitors bound into the
  // pipelines and the CORDIC generators.
  int n_fft_pause = 0, n_ifft_pause = 0;

  bind r22_mdc_fft16 tb_core_mon #(.INVERSE(1'b0)) u_mon (
    .clk, .en, .ctrl1, .ctrl2, .ctrl3, .c_sw2);
  bind r22_mdc_ifft16 tb_core_mon #(.INVERSE(1'b1)) u_mon (
    .clk, .en, .ctrl1, .ctrl2, .ctrl3, .c_sw2);
  bind msf_cordic_twiddle tb_cordic_mon u_mon (
    .clk, .rot(state == S_ROT && z != '0), .quarter(msb == ZW - 1));

  task automatic check_val(string what, real got, real exp, real tol, ref real max_err);
    real e;
    e = (got > exp) ? got - exp : exp - got;
    if (e > max_err) max_err = e;
    checks++;
    if (e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0.1f expected %0.1f", what, got, exp);
    end
  endtask

  function automatic void dft(int f, int k, real sgn, output real re, output real im);
    real a;
    re = 0.0; im = 0.0;
    for (int n = 0; n < 16; n++) begin
      a = sgn * 2.0 * PI * real'(n * k) / 16.0;
      re += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
      im += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
    end
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      real er, ei;
      int f, pos, k;
      if (fft_out_valid) begin
        f = fft_outs / 8; pos = fft_outs % 8; k = int'(bitrev3(3'(pos)));
        if (fft_outs == 0) begin
          checks++;
          if (fft_acc != LAT) begin
            failures++;
            $display("FAIL FFT latency %0d", fft_acc);
          end
        end
        if (f < NF) begin
          checks++;
          if (int'(fft_out_k) != k) failures++;
          dft(f, k, -1.0, er, ei);
          check_val("X(k).re", real'(fft_out0_re), er, 4.0 + 2e-4 * l1[f], fft_max_err);
          check_val("X(k).im", real'(fft_out0_im), ei, 4.0 + 2e-4 * l1[f], fft_max_err);
          dft(f, k + 8, -1.0, er, ei);
          check_val("X(k+8).re", real'(fft_out1_re), er, 4.0 + 2e-4 * l1[f], fft_max_err);
          check_val("X(k+8).im", real'(fft_out1_im), ei, 4.0 + 2e-4 * l1[f], fft_max_err);
        end
        fft_outs++;
      end
      if (ifft_out_valid) begin
        f = ifft_outs / 8; pos = ifft_outs % 8;
        if (ifft_outs == 0) begin
          checks++;
          if (ifft_acc != LAT) begin
            failures++;
            $display("FAIL IFFT latency %0d", ifft_acc);
          end
        end
        if (f < NF) begin
          checks++;
          if (int'(ifft_out_n) != pos) failures++;
          // Round trip: the IFFT's gain of 16 undoes the division by 16, so
          // x(n) comes back; 16 roundings of up to 0.5 LSB in the division
          // plus the twiddle error of both passes.
          check_val("x(n).re", real'(ifft_out0_re), real'(xr[f][pos]), 12.0 + 4e-5 * l1[f], ifft_max_err);
          check_val("x(n).im", real'(ifft_out0_im), real'(xi[f][pos]), 12.0 + 4e-5 * l1[f], ifft_max_err);
          check_val("x(n+8).re", real'(ifft_out1_re), real'(xr[f][pos + 8]), 12.0 + 4e-5 * l1[f], ifft_max_err);
          check_val("x(n+8).im", real'(ifft_out1_im), real'(xi[f][pos + 8]), 12.0 + 4e-5 * l1[f], ifft_max_err);
        end
        ifft_outs++;
      end
      if (fft_in_valid && fft_in_ready) fft_acc++;
      if (ifft_in_valid && ifft_in_ready) ifft_acc++;
      // Mechanisms.
      if (fft_in_ready && !fft_in_valid) n_fft_pause++;
      if (ifft_in_ready && !ifft_in_valid && ifft_acc > 0) n_ifft_pause++;
    end
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    for (int f = 0; f < NF + NFLUSH; f++) begin
      l1[f] = 0.0;
      for (int n = 0; n < 16; n++) begin
        xr[f][n] = int'($urandom_range(32000)) - 16000;
        xi[f][n] = int'($urandom_range(32000)) - 16000;
        if (f == 0) xi[f][n] = 0;              // a real-valued frame
        l1[f] += real'(xr[f][n] < 0 ? -xr[f][n] : xr[f][n]) + real'(xi[f][n] < 0 ? -xi[f][n] : xi[f][n]);
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (fft_in_ready && ifft_in_ready);
    @(posedge clk);
    for (int f = 0; f < NF + NFLUSH; f++) begin
      for (int n = 0; n < 8; n++) begin
        while ($urandom_range(4) == 0) begin
          fft_in_valid <= 0;
          @(posedge clk);
        end
        fft_in_valid <= 1;
        fft_in0_re <= DW'(xr[f][n]);     fft_in0_im <= DW'(xi[f][n]);
        fft_in1_re <= DW'(xr[f][n + 8]); fft_in1_im <= DW'(xi[f][n + 8]);
        @(posedge clk);
      end
    end
    fft_in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (ifft_outs < NF * 8) begin
      failures++;
      $display("FAIL only %0d IFFT output pairs", ifft_outs);
    end
    expect_seen("FFT input pause", n_fft_pause);
    expect_seen("IFFT input pause", n_ifft_pause);
    expect_seen("FFT SW1 interchange", n_sw1_fft);
    expect_seen("IFFT SW1 interchange", n_sw1_ifft);
    expect_seen("FFT SW2 -j rotation", n_sw2_fft);
    expect_seen("IFFT SW2 +j rotation", n_sw2_ifft);
    expect_seen("CORDIC 0.25 rad micro-rotation", n_quarter);
    expect_seen("CORDIC 2^-s micro-rotation", n_small);
    $display("FFT: %0d pairs in, %0d out, max error %0.1f; IFFT: %0d in, %0d out, max error %0.1f",
             fft_acc, fft_outs, fft_max_err, ifft_acc, ifft_outs, ifft_max_err);
    $display("pauses fft %0d ifft %0d, SW1 %0d/%0d, SW2 %0d/%0d, CORDIC 0.25 rad %0d, 2^-s %0d",
             n_fft_pause, n_ifft_pause, n_sw1_fft, n_sw1_ifft, n_sw2_fft, n_sw2_ifft, n_quarter, n_small);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
