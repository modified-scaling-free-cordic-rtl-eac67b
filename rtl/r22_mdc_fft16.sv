// r22_mdc_fft16: 16-point two-parallel pipelined MDC FFT with CORDIC
// twiddle generation and shift-add complex multipliers.
//
// Each accepted cycle takes two samples, x(n) on in0 and x(n+8) on in1,
// n = 0..7 over eight accepted cycles (one frame). Four decimation-in-
// frequency butterfly stages follow one another, joined by multipath delay
// commutators (a delay of D registers on the lower branch, switch SW1, a
// delay of D on the upper branch) with D = 4, 2, 1, so that each butterfly
// sees the two samples it must combine on its two inputs in the same cycle:
//
//   BF I -> x W16^n -> [4D|SW1|4D] -> BF II -> x W16^2m -> [2D|SW1|2D]
//        -> BF I -> SW2 (-j) -> [1D|SW1|1D] -> BF I -> X(k), X(k+8)
//
// The twiddle factors come from a modified scaling-free CORDIC generator;
// the counter in Butterfly unit II produces both multipliers' twiddle
// addresses. The -j factors after the third stage are done by SW2 (a
// multiplexer), not by a multiplier. The outputs leave as pairs X(k),
// X(k+8) with k in bit-reversed order 0,4,2,6,1,5,3,7, reported on out_k.
//
// The stage order, the unit types and the delays follow the architecture.
// This design's own choices: both twiddle multipliers sit on the lower
// branch (W16^n after stage 1, W16^2m after stage 2; a single lower-branch
// multiplier cannot apply the radix-2^2 stage-2 factors, which occur on both
// branches), a delay equal to the multiplier latency on the upper branch,
// a DW+5 bit data path (no scaling, no overflow), and the flow control.
//
// Flow control and timing: in_ready is high once the twiddle table is
// built. The whole pipeline advances only on cycles with in_valid and
// in_ready, so input may pause at any point. The first pair accepted after
// reset is n = 0 of the first frame and frames follow one another without
// a break in the count. A pair's results appear LAT = 2*TW + 11 accepted
// cycles later (43 for TW = 16), marked by out_valid.
module r22_mdc_fft16
  import mdc_fft_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned DW = 16,
  parameter int unsigned TW = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [DW-1:0]        in0_re, in0_im,
  input  logic signed [DW-1:0]        in1_re, in1_im,
  output logic                        out_valid,
  output logic [2:0]                  out_k,
  output logic signed [DW+GROWTH-1:0] out0_re, out0_im,
  output logic signed [DW+GROWTH-1:0] out1_re, out1_im
);

  localparam int unsigned IW  = DW + GROWTH;   // data path width
  localparam int          LM  = int'(TW);      // multiplier latency
  localparam int          L1  = 1 + LM;        // stage-1 output, n = 0
  localparam int          T3  = L1 + 5 + LM;   // stage-2 output, k = 0
  localparam int          T4  = T3 + 3;        // stage-3 output, k = 0
  localparam int          LAT = T4 + 2;        // input to output

  function automatic int unsigned pmod(int v, int m);
    return int'(unsigned'(((v % m) + m) % m));
  endfunction

  localparam logic [2:0] K1 = 3'(pmod(-L1, 8));
  localparam logic [2:0] K2 = 3'(pmod(-T3, 8));
  localparam logic [2:0] K3 = 3'(pmod(-T4, 8));
  localparam logic [2:0] KO = 3'(pmod(-LAT, 8));

  typedef logic signed [IW-1:0] d_t;

  logic       en, tw_ready;
  logic [2:0] ph;                 // accepted cycles, modulo 8
  int         seen;               // accepted cycles, saturating at LAT
  logic       ctrl1, ctrl2, ctrl3, c_sw2;

  logic [TW_AW-1:0]     tw_addr1, tw_addr2;
  logic signed [TW-1:0] w1_re, w1_im, w2_re, w2_im;

  d_t s1u_re, s1u_im, s1l_re, s1l_im;     // stage 1 outputs
  d_t m1u_re, m1u_im, m1l_re, m1l_im;     // after multiplier / matching delay
  d_t c1l_re, c1l_im;                     // lower branch after 4D
  d_t x1u_re, x1u_im, x1l_re, x1l_im;     // SW1 outputs
  d_t b2u_re, b2u_im;                     // upper branch after 4D
  d_t s2u_re, s2u_im, s2l_re, s2l_im;     // stage 2 outputs
  d_t m2u_re, m2u_im, m2l_re, m2l_im;
  d_t c2l_re, c2l_im;
  d_t x2u_re, x2u_im, x2l_re, x2l_im;
  d_t b3u_re, b3u_im;
  d_t s3u_re, s3u_im, s3l_re, s3l_im;     // stage 3 outputs
  d_t r3u_re, r3u_im, r3l_re, r3l_im;     // after SW2
  d_t c3l_re, c3l_im;
  d_t x3u_re, x3u_im, x3l_re, x3l_im;
  d_t b4u_re, b4u_im;

  assign in_ready = tw_ready;
  assign en       = in_valid && tw_ready;

  // Control: switch settings from the count of accepted pairs.
  always_ff @(posedge clk) begin
    if (rst) begin
      ph   <= '0;
      seen <= 0;
    end else if (en) begin
      ph <= ph + 3'd1;
      if (seen < LAT) seen <= seen + 1;
    end
  end

  always_comb begin
    // Position of the data at each switch, as bits of (ph - T) mod 8.
    ctrl1 = bitsel(ph + K1, 2'd2);   // swap in the second half of each 8
    ctrl2 = bitsel(ph + K2, 2'd1);   // swap in the second half of each 4
    ctrl3 = bitsel(ph + K3, 2'd0);   // swap every other pair
    c_sw2 = bitsel(ph + K3, 2'd0);   // -j on the second pair of each 4-point FFT
    out_k = bitrev3(ph + KO);
  end

  assign out_valid = en && (seen >= LAT);

  msf_cordic_twiddle #(.N(N), .TW(TW), .INVERSE(1'b0), .AW(TW_AW)) u_cordic (
    .clk, .rst, .ready(tw_ready),
    .addr1(tw_addr1), .addr2(tw_addr2),
    .w1_re, .w1_im, .w2_re, .w2_im
  );

  // ---- Stage 1: x(n) +/- x(n+8), then x W16^n on the lower branch.
  bf1 #(.W(IW)) u_bf_s1 (
    .clk, .rst, .en,
    .a_re(d_t'(in0_re)), .a_im(d_t'(in0_im)),
    .b_re(d_t'(in1_re)), .b_im(d_t'(in1_im)),
    .s_re(s1u_re), .s_im(s1u_im), .d_re(s1l_re), .d_im(s1l_im)
  );
  msf_cordic_cmult #(.W(IW), .TW(TW)) u_mul1 (
    .clk, .rst, .en, .a_re(s1l_re), .a_im(s1l_im),
    .w_re(w1_re), .w_im(w1_im), .p_re(m1l_re), .p_im(m1l_im)
  );
  delay_line #(.W(IW), .D(LM)) u_dm1 (
    .clk, .rst, .en, .d_re(s1u_re), .d_im(s1u_im), .q_re(m1u_re), .q_im(m1u_im)
  );

  // ---- Commutator, 4 delays.
  delay_line #(.W(IW), .D(4)) u_d1l (
    .clk, .rst, .en, .d_re(m1l_re), .d_im(m1l_im), .q_re(c1l_re), .q_im(c1l_im)
  );
  sw1 #(.W(IW)) u_sw1_1 (
    .ctrl(ctrl1), .a_re(m1u_re), .a_im(m1u_im), .b_re(c1l_re), .b_im(c1l_im),
    .y0_re(x1u_re), .y0_im(x1u_im), .y1_re(x1l_re), .y1_im(x1l_im)
  );
  delay_line #(.W(IW), .D(4)) u_d1u (
    .clk, .rst, .en, .d_re(x1u_re), .d_im(x1u_im), .q_re(b2u_re), .q_im(b2u_im)
  );

  // ---- Stage 2: Butterfly unit II with the twiddle address counter.
  bf2 #(.W(IW), .AW(TW_AW),
        .OFS1(pmod(-1, 8)), .STEP1(1),
        .OFS2(pmod(-(L1 + 5), 4)), .STEP2(2)) u_bf_s2 (
    .clk, .rst, .en,
    .a_re(b2u_re), .a_im(b2u_im), .b_re(x1l_re), .b_im(x1l_im),
    .s_re(s2u_re), .s_im(s2u_im), .d_re(s2l_re), .d_im(s2l_im),
    .tw_addr1, .tw_addr2
  );
  msf_cordic_cmult #(.W(IW), .TW(TW)) u_mul2 (
    .clk, .rst, .en, .a_re(s2l_re), .a_im(s2l_im),
    .w_re(w2_re), .w_im(w2_im), .p_re(m2l_re), .p_im(m2l_im)
  );
  delay_line #(.W(IW), .D(LM)) u_dm2 (
    .clk, .rst, .en, .d_re(s2u_re), .d_im(s2u_im), .q_re(m2u_re), .q_im(m2u_im)
  );

  // ---- Commutator, 2 delays.
  delay_line #(.W(IW), .D(2)) u_d2l (
    .clk, .rst, .en, .d_re(m2l_re), .d_im(m2l_im), .q_re(c2l_re), .q_im(c2l_im)
  );
  sw1 #(.W(IW)) u_sw1_2 (
    .ctrl(ctrl2), .a_re(m2u_re), .a_im(m2u_im), .b_re(c2l_re), .b_im(c2l_im),
    .y0_re(x2u_re), .y0_im(x2u_im), .y1_re(x2l_re), .y1_im(x2l_im)
  );
  delay_line #(.W(IW), .D(2)) u_d2u (
    .clk, .rst, .en, .d_re(x2u_re), .d_im(x2u_im), .q_re(b3u_re), .q_im(b3u_im)
  );

  // ---- Stage 3: 4-point butterflies, -j by SW2.
  bf1 #(.W(IW)) u_bf_s3 (
    .clk, .rst, .en,
    .a_re(b3u_re), .a_im(b3u_im), .b_re(x2l_re), .b_im(x2l_im),
    .s_re(s3u_re), .s_im(s3u_im), .d_re(s3l_re), .d_im(s3l_im)
  );
  sw2 #(.W(IW), .INVERSE(1'b0)) u_sw2 (
    .c(c_sw2), .a_re(s3u_re), .a_im(s3u_im), .b_re(s3l_re), .b_im(s3l_im),
    .y0_re(r3u_re), .y0_im(r3u_im), .y1_re(r3l_re), .y1_im(r3l_im)
  );

  // ---- Commutator, 1 delay.
  delay_line #(.W(IW), .D(1)) u_d3l (
    .clk, .rst, .en, .d_re(r3l_re), .d_im(r3l_im), .q_re(c3l_re), .q_im(c3l_im)
  );
  sw1 #(.W(IW)) u_sw1_3 (
    .ctrl(ctrl3), .a_re(r3u_re), .a_im(r3u_im), .b_re(c3l_re), .b_im(c3l_im),
    .y0_re(x3u_re), .y0_im(x3u_im), .y1_re(x3l_re), .y1_im(x3l_im)
  );
  delay_line #(.W(IW), .D(1)) u_d3u (
    .clk, .rst, .en, .d_re(x3u_re), .d_im(x3u_im), .q_re(b4u_re), .q_im(b4u_im)
  );

  // ---- Stage 4: 2-point butterflies give X(k), X(k+8).
  bf1 #(.W(IW)) u_bf_s4 (
    .clk, .rst, .en,
    .a_re(b4u_re), .a_im(b4u_im), .b_re(x3l_re), .b_im(x3l_im),
    .s_re(out0_re), .s_im(out0_im), .d_re(out1_re), .d_im(out1_im)
  );

  // The structure is that of a 16-point transform.
  if (N != N_POINTS) begin : g_bad_n
    $error("r22_mdc_fft16 supports N = 16 only");
  end

endmodule
