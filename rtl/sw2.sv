// sw2: Switching unit SW2, the trivial-twiddle rotator of the 4-point stage.
//
// The upper operand A+Bj passes unchanged. The lower operand X+Yj goes
// through one multiplexer that selects either X+Yj (c = 0) or the operand
// rotated by a quarter turn (c = 1). In the FFT (INVERSE = 0) the rotation
// is the twiddle -j: (X+Yj)(-j) = Y - Xj. The IFFT (INVERSE = 1) needs the
// opposite rotation, +j: (X+Yj)(+j) = -Y + Xj. This replaces the complex
// multiplier the 4-point stage would otherwise need. The -j rotation and
// the single multiplexer follow the architecture; the +j variant for the
// inverse transform is this design's reading of "the opposite operation".
// Purely combinational.
module sw2 #(
  parameter int unsigned W       = 21,
  parameter bit          INVERSE = 1'b0
) (
  input  logic                c,
  input  logic signed [W-1:0] a_re, a_im,   // A+Bj
  input  logic signed [W-1:0] b_re, b_im,   // X+Yj
  output logic signed [W-1:0] y0_re, y0_im,
  output logic signed [W-1:0] y1_re, y1_im
);

  logic signed [W-1:0] r_re, r_im;   // rotated lower operand

  always_comb begin
    if (INVERSE) begin
      r_re = -b_im;
      r_im = b_re;
    end else begin
      r_re = b_im;
      r_im = -b_re;
    end
    y0_re = a_re;
    y0_im = a_im;
    y1_re = c ? r_re : b_re;
    y1_im = c ? r_im : b_im;
  end

endmodule
