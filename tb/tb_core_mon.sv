// tb_core_mon: monitor bound into each FFT/IFFT pipeline. On every clock
// the pipeline advances it counts the switch settings that interchange
// (SW1) or rotate (SW2) the data, in the counters of tb_mech_pkg.
module tb_core_mon #(
  parameter bit INVERSE = 1'b0
) (
  input logic clk,
  input logic en,
  input logic ctrl1, ctrl2, ctrl3,
  input logic c_sw2
);
  import tb_mech_pkg::*;
  always @(posedge clk) begin
    if (en) begin
      if (ctrl1 || ctrl2 || ctrl3) begin
        if (INVERSE) n_sw1_ifft++;
        else         n_sw1_fft++;
      end
      if (c_sw2) begin
        if (INVERSE) n_sw2_ifft++;
        else         n_sw2_fft++;
      end
    end
  end
endmodule
