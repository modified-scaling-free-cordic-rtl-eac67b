// tb_mech_pkg: counters of design mechanisms, shared by the monitors that
// are bound into the pipelines and the end-to-end testbench that reads them.
package tb_mech_pkg;
  int n_sw1_fft  = 0;   // SW1 interchanges in the FFT
  int n_sw1_ifft = 0;   // SW1 interchanges in the IFFT
  int n_sw2_fft  = 0;   // SW2 -j rotations
  int n_sw2_ifft = 0;   // SW2 +j rotations
  int n_quarter  = 0;   // CORDIC micro-rotations by 0.25 rad
  int n_small    = 0;   // CORDIC micro-rotations by 2^-s rad
endpackage
