// bf1: Butterfly unit I of the two-parallel MDC pipeline.
//
// A registered radix-2 butterfly on two complex operands:
//   s = a + b,  d = a - b
// applied separately to the real and imaginary parts. The subtraction adds
// the two's complement of the subtrahend b, as the butterfly of the
// architecture prescribes. Sums are neither scaled nor saturated: the
// surrounding pipeline carries enough guard bits that they cannot
// overflow.
//
// Timing: the outputs are registered, one clock of latency. The register
// loads only on cycles with en = 1, so the pipeline can stall. The output
// register (and synchronous reset to zero) is this design's choice.
module bf1 #(
  parameter int unsigned W = 21
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] a_re, a_im,
  input  logic signed [W-1:0] b_re, b_im,
  output logic signed [W-1:0] s_re, s_im,
  output logic signed [W-1:0] d_re, d_im
);

  logic signed [W-1:0] nb_re, nb_im;   // two's complement of b

  always_comb begin
    nb_re = ~b_re + W'(1);
    nb_im = ~b_im + W'(1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_re <= '0; s_im <= '0; d_re <= '0; d_im <= '0;
    end else if (en) begin
      s_re <= a_re + b_re;
      s_im <= a_im + b_im;
      d_re <= a_re + nb_re;
      d_im <= a_im + nb_im;
    end
  end

endmodule
