// msf_cordic_cmult: shift-and-add complex multiplier of the MDC pipeline.
//
// Computes (A + Bj)(C + Dj) = (AC - BD) + (AD + BC)j, where A+Bj is a data
// sample and C+Dj a twiddle factor from the CORDIC generator (signed,
// Q1.(TW-2), magnitude at most 1.0). No hardware multiplier is used: the
// twiddle parts are split into sign and magnitude, and the magnitude is
// scanned one bit at a time. Where the bit is 1, the multiplicand, shifted
// left by the bit's index, is added into an accumulator; where it is 0
// nothing is added. Four accumulators build |C|A, |D|B, |D|A and |C|B. A
// final stage applies the twiddle signs through add/subtract units, forms
// AC - BD and AD + BC, and rounds to nearest by TW-2 bits back to W bits.
//
// The architecture scans one twiddle bit per clock. To accept one sample
// per clock, as the two-parallel pipeline requires, this design unrolls
// that scan into TW-1 pipeline stages, one bit per stage, followed by the
// output stage: latency TW clocks, throughput one product per clock. All
// registers advance only when en = 1. Accumulators are W+TW bits wide.
module msf_cordic_cmult #(
  parameter int unsigned W  = 21,
  parameter int unsigned TW = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [W-1:0]  a_re, a_im,
  input  logic signed [TW-1:0] w_re, w_im,
  output logic signed [W-1:0]  p_re, p_im
);

  localparam int unsigned MB = TW - 1;   // magnitude bits = bit stages
  localparam int unsigned AW = W + TW;   // accumulator width
  localparam int unsigned FR = TW - 2;   // twiddle fraction bits

  typedef logic signed [AW-1:0] acc_t;

  // Stage registers: index i holds the state after twiddle bit i.
  logic signed [W-1:0] sa_re [MB];
  logic signed [W-1:0] sa_im [MB];
  logic [MB-1:0]       smc   [MB];       // |C|
  logic [MB-1:0]       smd   [MB];       // |D|
  logic                ssc   [MB];       // sign of C
  logic                ssd   [MB];       // sign of D
  acc_t                ac    [MB];
  acc_t                bd    [MB];
  acc_t                ad    [MB];
  acc_t                bc    [MB];

  logic [TW-1:0] mag_c, mag_d;
  acc_t          re_full, im_full;

  always_comb begin
    mag_c = w_re[TW-1] ? TW'(-w_re) : TW'(w_re);
    mag_d = w_im[TW-1] ? TW'(-w_im) : TW'(w_im);
    // Sign units of the final stage.
    re_full = (ssc[MB-1] ? -ac[MB-1] : ac[MB-1]) - (ssd[MB-1] ? -bd[MB-1] : bd[MB-1]);
    im_full = (ssd[MB-1] ? -ad[MB-1] : ad[MB-1]) + (ssc[MB-1] ? -bc[MB-1] : bc[MB-1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(MB); i++) begin
        sa_re[i] <= '0; sa_im[i] <= '0;
        smc[i]   <= '0; smd[i]   <= '0;
        ssc[i]   <= 1'b0; ssd[i] <= 1'b0;
        ac[i]    <= '0; bd[i]    <= '0;
        ad[i]    <= '0; bc[i]    <= '0;
      end
      p_re <= '0;
      p_im <= '0;
    end else if (en) begin
      // Bit 0 of the twiddle magnitude.
      sa_re[0] <= a_re;
      sa_im[0] <= a_im;
      smc[0]   <= mag_c[MB-1:0];
      smd[0]   <= mag_d[MB-1:0];
      ssc[0]   <= w_re[TW-1];
      ssd[0]   <= w_im[TW-1];
      ac[0]    <= mag_c[0] ? acc_t'(a_re) : '0;
      bd[0]    <= mag_d[0] ? acc_t'(a_im) : '0;
      ad[0]    <= mag_d[0] ? acc_t'(a_re) : '0;
      bc[0]    <= mag_c[0] ? acc_t'(a_im) : '0;
      // Bits 1 .. MB-1: add the multiplicand shifted by the bit index.
      for (int i = 1; i < int'(MB); i++) begin
        sa_re[i] <= sa_re[i-1];
        sa_im[i] <= sa_im[i-1];
        smc[i]   <= smc[i-1];
        smd[i]   <= smd[i-1];
        ssc[i]   <= ssc[i-1];
        ssd[i]   <= ssd[i-1];
        ac[i] <= ac[i-1] + (smc[i-1][i] ? (acc_t'(sa_re[i-1]) <<< i) : acc_t'(0));
        bd[i] <= bd[i-1] + (smd[i-1][i] ? (acc_t'(sa_im[i-1]) <<< i) : acc_t'(0));
        ad[i] <= ad[i-1] + (smd[i-1][i] ? (acc_t'(sa_re[i-1]) <<< i) : acc_t'(0));
        bc[i] <= bc[i-1] + (smc[i-1][i] ? (acc_t'(sa_im[i-1]) <<< i) : acc_t'(0));
      end
      // Output stage: round to nearest and return to W bits.
      p_re <= W'((re_full + (acc_t'(1) <<< (FR - 1))) >>> FR);
      p_im <= W'((im_full + (acc_t'(1) <<< (FR - 1))) >>> FR);
    end
  end

  // A twiddle factor never exceeds 1.0 in magnitude.
  always_ff @(posedge clk) begin
    if (!rst && en) begin
      assert (mag_c <= TW'(1 << FR) && mag_d <= TW'(1 << FR))
        else $error("twiddle magnitude above 1.0");
    end
  end

endmodule
