// sw1: Switching unit SW1 (commutator switch) of the MDC pipeline.
//
// Two 2:1 multiplexers share one control. With ctrl = 0 both inputs pass
// straight through; with ctrl = 1 they are interchanged (upper output takes
// the lower input and vice versa). Together with a delay of D registers in
// front of the lower input and behind the upper output it reorders the two
// data streams so that the next butterfly stage sees the samples it must
// combine (those D positions apart). Purely combinational.
module sw1 #(
  parameter int unsigned W = 21
) (
  input  logic                ctrl,
  input  logic signed [W-1:0] a_re, a_im,   // upper input
  input  logic signed [W-1:0] b_re, b_im,   // lower input
  output logic signed [W-1:0] y0_re, y0_im, // upper output
  output logic signed [W-1:0] y1_re, y1_im  // lower output
);

  always_comb begin
    y0_re = ctrl ? b_re : a_re;
    y0_im = ctrl ? b_im : a_im;
    y1_re = ctrl ? a_re : b_re;
    y1_im = ctrl ? a_im : b_im;
  end

endmodule
