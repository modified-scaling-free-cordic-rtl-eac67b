// mdc_fft_ifft_top: the two-parallel MDC FFT and IFFT side by side.
//
// The forward transform (r22_mdc_fft16) and the inverse transform
// (r22_mdc_ifft16) are independent pipelines, each with its own CORDIC
// twiddle generator and its own ports; they share only clock and reset.
// The FFT's output pairs, scaled to DW bits, may be fed straight into the
// IFFT: the IFFT accepts X(k), X(k+8) in the FFT's bit-reversed k order.
// Interface and timing of each half are described in its own module.
module mdc_fft_ifft_top
  import mdc_fft_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int unsigned TW = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  // Forward transform.
  input  logic                        fft_in_valid,
  output logic                        fft_in_ready,
  input  logic signed [DW-1:0]        fft_in0_re, fft_in0_im,
  input  logic signed [DW-1:0]        fft_in1_re, fft_in1_im,
  output logic                        fft_out_valid,
  output logic [2:0]                  fft_out_k,
  output logic signed [DW+GROWTH-1:0] fft_out0_re, fft_out0_im,
  output logic signed [DW+GROWTH-1:0] fft_out1_re, fft_out1_im,
  // Inverse transform.
  input  logic                        ifft_in_valid,
  output logic                        ifft_in_ready,
  input  logic signed [DW-1:0]        ifft_in0_re, ifft_in0_im,
  input  logic signed [DW-1:0]        ifft_in1_re, ifft_in1_im,
  output logic                        ifft_out_valid,
  output logic [2:0]                  ifft_out_n,
  output logic signed [DW+GROWTH-1:0] ifft_out0_re, ifft_out0_im,
  output logic signed [DW+GROWTH-1:0] ifft_out1_re, ifft_out1_im
);

  r22_mdc_fft16 #(.N(N_POINTS), .DW(DW), .TW(TW)) u_fft (
    .clk, .rst,
    .in_valid(fft_in_valid), .in_ready(fft_in_ready),
    .in0_re(fft_in0_re), .in0_im(fft_in0_im),
    .in1_re(fft_in1_re), .in1_im(fft_in1_im),
    .out_valid(fft_out_valid), .out_k(fft_out_k),
    .out0_re(fft_out0_re), .out0_im(fft_out0_im),
    .out1_re(fft_out1_re), .out1_im(fft_out1_im)
  );

  r22_mdc_ifft16 #(.N(N_POINTS), .DW(DW), .TW(TW)) u_ifft (
    .clk, .rst,
    .in_valid(ifft_in_valid), .in_ready(ifft_in_ready),
    .in0_re(ifft_in0_re), .in0_im(ifft_in0_im),
    .in1_re(ifft_in1_re), .in1_im(ifft_in1_im),
    .out_valid(ifft_out_valid), .out_n(ifft_out_n),
    .out0_re(ifft_out0_re), .out0_im(ifft_out0_im),
    .out1_re(ifft_out1_re), .out1_im(ifft_out1_im)
  );

endmodule
