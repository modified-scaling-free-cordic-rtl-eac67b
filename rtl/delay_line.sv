// delay_line: the "nD" delay registers of the MDC pipeline.
//
// A complex shift register of D stages. Each cycle with en = 1 every stage
// takes the value of the one before it, so the output is the input from D
// shifts earlier. The pipeline uses it with D = 4, 2, 1 around the SW1
// switches, and with D equal to the multiplier latency to keep the branch
// without a multiplier aligned with the one that has it (the latter is this
// design's choice). D = 0 is a plain wire. Reset clears all stages.
module delay_line #(
  parameter int unsigned W = 21,
  parameter int unsigned D = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] d_re, d_im,
  output logic signed [W-1:0] q_re, q_im
);

  if (D == 0) begin : g_wire
    assign q_re = d_re;
    assign q_im = d_im;
  end else begin : g_shift
    logic signed [W-1:0] sr_re [D];
    logic signed [W-1:0] sr_im [D];

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(D); i++) begin
          sr_re[i] <= '0;
          sr_im[i] <= '0;
        end
      end else if (en) begin
        sr_re[0] <= d_re;
        sr_im[0] <= d_im;
        for (int i = 1; i < int'(D); i++) begin
          sr_re[i] <= sr_re[i-1];
          sr_im[i] <= sr_im[i-1];
        end
      end
    end

    assign q_re = sr_re[D-1];
    assign q_im = sr_im[D-1];
  end

endmodule
