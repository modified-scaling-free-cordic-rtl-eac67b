// r22_mdc_ifft16: 16-point two-parallel pipelined MDC IFFT, the mirror
// image of r22_mdc_fft16.
//
// Each accepted cycle takes a pair X(k) on in0 and X(k+8) on in1, with k in
// the bit-reversed order 0,4,2,6,1,5,3,7 in which the FFT delivers them,
// and the outputs are 16*x(n) on out0 and 16*x(n+8) on out1 in natural
// order n = 0..7 (reported on out_n; no 1/16 scaling). The FFT's stages are
// undone in reverse order as decimation-in-time stages, with commutators of
// 1, 2 and 4 delays and the twiddles applied before the butterflies:
//
//   BF I -> [1D|SW1|1D] -> SW2 (+j) -> BF I -> [2D|SW1|2D] -> x W16^-2m
//        -> BF II -> [4D|SW1|4D] -> x W16^-n -> BF I -> x(n), x(n+8)
//
// The unit order and the delays follow the architecture. This design's own
// choices: SW2 rotates by +j and the CORDIC table holds conjugate twiddles
// (the inverse of the FFT's -j and W), a delay equal to the multiplier
// latency on the upper branch, the DW+5 bit data path and the flow control.
//
// Flow control and timing are those of r22_mdc_fft16: the pipeline advances
// on cycles with in_valid and in_ready, the first pair accepted after reset
// is k = 0 of the first frame, and results appear LAT = 2*TW + 11 accepted
// cycles later, marked by out_valid.
module r22_mdc_ifft16
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
  output logic [2:0]                  out_n,
  output logic signed [DW+GROWTH-1:0] out0_re, out0_im,
  output logic signed [DW+GROWTH-1:0] out1_re, out1_im
);

  localparam int unsigned IW  = DW + GROWTH;
  localparam int          LM  = int'(TW);      // multiplier latency
  localparam int          T1  = 1;             // stage-1 output, position 0
  localparam int          T2  = 3;             // stage-2 output, position 0
  localparam int          T3  = 6 + LM;        // stage-3 output, position 0
  localparam int          LAT = 11 + 2 * LM;   // input to output

  function automatic int unsigned pmod(int v, int m);
    return int'(unsigned'(((v % m) + m) % m));
  endfunction

  localparam logic [2:0] K1 = 3'(pmod(-T1, 8));
  localparam logic [2:0] KS = 3'(pmod(-(T1 + 1), 8));
  localparam logic [2:0] K2 = 3'(pmod(-T2, 8));
  localparam logic [2:0] K3 = 3'(pmod(-T3, 8));
  localparam logic [2:0] KO = 3'(pmod(-LAT, 8));

  typedef logic signed [IW-1:0] d_t;

  logic       en, tw_ready;
  logic [2:0] ph;
  int         seen;
  logic       ctrl1, ctrl2, ctrl3, c_sw2;

  logic [TW_AW-1:0]     tw_addr1, tw_addr2;
  logic signed [TW-1:0] w1_re, w1_im, w2_re, w2_im;

  d_t s1u_re, s1u_im, s1l_re, s1l_im;
  d_t c1l_re, c1l_im, x1u_re, x1u_im, x1l_re, x1l_im, b2u_re, b2u_im;
  d_t r2u_re, r2u_im, r2l_re, r2l_im;     // after SW2
  d_t s2u_re, s2u_im, s2l_re, s2l_im;
  d_t c2l_re, c2l_im, x2u_re, x2u_im, x2l_re, x2l_im, b3u_re, b3u_im;
  d_t m3u_re, m3u_im, m3l_re, m3l_im;     // after multiplier / matching delay
  d_t s3u_re, s3u_im, s3l_re, s3l_im;
  d_t c3l_re, c3l_im, x3u_re, x3u_im, x3l_re, x3l_im, b4u_re, b4u_im;
  d_t m4u_re, m4u_im, m4l_re, m4l_im;

  assign in_ready = tw_ready;
  assign en       = in_valid && tw_ready;

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
    ctrl1 = bitsel(ph + K1, 2'd0);   // swap every other pair
    c_sw2 = bitsel(ph + KS, 2'd0);   // +j on the second pair of each 4-point IFFT
    ctrl2 = bitsel(ph + K2, 2'd1);   // swap in the second half of each 4
    ctrl3 = bitsel(ph + K3, 2'd2);   // swap in the second half of each 8
    out_n = ph + KO;
  end

  assign out_valid = en && (seen >= LAT);

  msf_cordic_twiddle #(.N(N), .TW(TW), .INVERSE(1'b1), .AW(TW_AW)) u_cordic (
    .clk, .rst, .ready(tw_ready),
    .addr1(tw_addr1), .addr2(tw_addr2),
    .w1_re, .w1_im, .w2_re, .w2_im
  );

  // ---- Stage 1: 2-point butterflies on X(k), X(k+8).
  bf1 #(.W(IW)) u_bf_s1 (
    .clk, .rst, .en,
    .a_re(d_t'(in0_re)), .a_im(d_t'(in0_im)),
    .b_re(d_t'(in1_re)), .b_im(d_t'(in1_im)),
    .s_re(s1u_re), .s_im(s1u_im), .d_re(s1l_re), .d_im(s1l_im)
  );

  // ---- Commutator, 1 delay, then SW2 (+j).
  delay_line #(.W(IW), .D(1)) u_d1l (
    .clk, .rst, .en, .d_re(s1l_re), .d_im(s1l_im), .q_re(c1l_re), .q_im(c1l_im)
  );
  sw1 #(.W(IW)) u_sw1_1 (
    .ctrl(ctrl1), .a_re(s1u_re), .a_im(s1u_im), .b_re(c1l_re), .b_im(c1l_im),
    .y0_re(x1u_re), .y0_im(x1u_im), .y1_re(x1l_re), .y1_im(x1l_im)
  );
  delay_line #(.W(IW), .D(1)) u_d1u (
    .clk, .rst, .en, .d_re(x1u_re), .d_im(x1u_im), .q_re(b2u_re), .q_im(b2u_im)
  );
  sw2 #(.W(IW), .INVERSE(1'b1)) u_sw2 (
    .c(c_sw2), .a_re(b2u_re), .a_im(b2u_im), .b_re(x1l_re), .b_im(x1l_im),
    .y0_re(r2u_re), .y0_im(r2u_im), .y1_re(r2l_re), .y1_im(r2l_im)
  );

  // ---- Stage 2: 4-point butterflies.
  bf1 #(.W(IW)) u_bf_s2 (
    .clk, .rst, .en,
    .a_re(r2u_re), .a_im(r2u_im), .b_re(r2l_re), .b_im(r2l_im),
    .s_re(s2u_re), .s_im(s2u_im), .d_re(s2l_re), .d_im(s2l_im)
  );

  // ---- Commutator, 2 delays, then x W16^-2m on the lower branch.
  delay_line #(.W(IW), .D(2)) u_d2l (
    .clk, .rst, .en, .d_re(s2l_re), .d_im(s2l_im), .q_re(c2l_re), .q_im(c2l_im)
  );
  sw1 #(.W(IW)) u_sw1_2 (
    .ctrl(ctrl2), .a_re(s2u_re), .a_im(s2u_im), .b_re(c2l_re), .b_im(c2l_im),
    .y0_re(x2u_re), .y0_im(x2u_im), .y1_re(x2l_re), .y1_im(x2l_im)
  );
  delay_line #(.W(IW), .D(2)) u_d2u (
    .clk, .rst, .en, .d_re(x2u_re), .d_im(x2u_im), .q_re(b3u_re), .q_im(b3u_im)
  );
  msf_cordic_cmult #(.W(IW), .TW(TW)) u_mul1 (
    .clk, .rst, .en, .a_re(x2l_re), .a_im(x2l_im),
    .w_re(w1_re), .w_im(w1_im), .p_re(m3l_re), .p_im(m3l_im)
  );
  delay_line #(.W(IW), .D(LM)) u_dm1 (
    .clk, .rst, .en, .d_re(b3u_re), .d_im(b3u_im), .q_re(m3u_re), .q_im(m3u_im)
  );

  // ---- Stage 3: Butterfly unit II with the twiddle address counter.
  bf2 #(.W(IW), .AW(TW_AW),
        .OFS1(pmod(-(T2 + 2), 4)), .STEP1(2),
        .OFS2(pmod(-(T3 + 4), 8)), .STEP2(1)) u_bf_s3 (
    .clk, .rst, .en,
    .a_re(m3u_re), .a_im(m3u_im), .b_re(m3l_re), .b_im(m3l_im),
    .s_re(s3u_re), .s_im(s3u_im), .d_re(s3l_re), .d_im(s3l_im),
    .tw_addr1, .tw_addr2
  );

  // ---- Commutator, 4 delays, then x W16^-n on the lower branch.
  delay_line #(.W(IW), .D(4)) u_d3l (
    .clk, .rst, .en, .d_re(s3l_re), .d_im(s3l_im), .q_re(c3l_re), .q_im(c3l_im)
  );
  sw1 #(.W(IW)) u_sw1_3 (
    .ctrl(ctrl3), .a_re(s3u_re), .a_im(s3u_im), .b_re(c3l_re), .b_im(c3l_im),
    .y0_re(x3u_re), .y0_im(x3u_im), .y1_re(x3l_re), .y1_im(x3l_im)
  );
  delay_line #(.W(IW), .D(4)) u_d3u (
    .clk, .rst, .en, .d_re(x3u_re), .d_im(x3u_im), .q_re(b4u_re), .q_im(b4u_im)
  );
  msf_cordic_cmult #(.W(IW), .TW(TW)) u_mul2 (
    .clk, .rst, .en, .a_re(x3l_re), .a_im(x3l_im),
    .w_re(w2_re), .w_im(w2_im), .p_re(m4l_re), .p_im(m4l_im)
  );
  delay_line #(.W(IW), .D(LM)) u_dm2 (
    .clk, .rst, .en, .d_re(b4u_re), .d_im(b4u_im), .q_re(m4u_re), .q_im(m4u_im)
  );

  // ---- Stage 4: butterflies give 16*x(n), 16*x(n+8).
  bf1 #(.W(IW)) u_bf_s4 (
    .clk, .rst, .en,
    .a_re(m4u_re), .a_im(m4u_im), .b_re(m4l_re), .b_im(m4l_im),
    .s_re(out0_re), .s_im(out0_im), .d_re(out1_re), .d_im(out1_im)
  );

  if (N != N_POINTS) begin : g_bad_n
    $error("r22_mdc_ifft16 supports N = 16 only");
  end

endmodule
