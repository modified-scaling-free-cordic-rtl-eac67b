// tb_cordic_mon: monitor bound into each CORDIC twiddle generator. Counts
// the micro-rotations it performs, split into the 0.25 rad kind (most
// significant 1 at bit 15) and the 2^-s kind, in tb_mech_pkg.
module tb_cordic_mon (
  input logic clk,
  input logic rot,
  input logic quarter
);
  import tb_mech_pkg::*;
  always @(posedge clk) begin
    if (rot) begin
      if (quarter) n_quarter++;
      else         n_small++;
    end
  end
endmodule
