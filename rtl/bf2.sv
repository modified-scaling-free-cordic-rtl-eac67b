// bf2: Butterfly unit II of the two-parallel MDC pipeline.
//
// Butterfly unit I (s = a + b, d = a - b, registered) plus the counter logic
// that addresses the twiddle factors. The counter counts the cycles on which
// the pipeline advances, modulo 8, from zero at reset. From it the unit
// derives two twiddle addresses: tw_addr1 (TWD OUT 1) for the CORDIC
// multiplier upstream of this butterfly and tw_addr2 (TWD OUT 2) for the one
// downstream of it. Each address is
//   tw_addr = ((count + OFS) mod (8 / STEP)) * STEP
// so STEP = 1 walks W16^0..W16^7 and STEP = 2 walks W16^0, W16^2, W16^4,
// W16^6 (the twiddles W8^m). The offsets make up for the pipeline latency
// between the counter and the multiplier and are set by the enclosing core.
// The addresses are combinational from the counter; the butterfly outputs
// have one clock of latency. The butterfly and the counter follow the
// architecture; the address formula and offsets are this design's own.
module bf2 #(
  parameter int unsigned W     = 21,
  parameter int unsigned AW    = 3,
  parameter int unsigned OFS1  = 7,
  parameter int unsigned OFS2  = 2,
  parameter int unsigned STEP1 = 1,
  parameter int unsigned STEP2 = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] a_re, a_im,
  input  logic signed [W-1:0] b_re, b_im,
  output logic signed [W-1:0] s_re, s_im,
  output logic signed [W-1:0] d_re, d_im,
  output logic [AW-1:0]       tw_addr1,
  output logic [AW-1:0]       tw_addr2
);

  localparam int unsigned SPAN = 1 << AW;      // twiddles in the table

  logic [AW-1:0] cnt;

  bf1 #(.W(W)) u_bf (
    .clk, .rst, .en,
    .a_re, .a_im, .b_re, .b_im,
    .s_re, .s_im, .d_re, .d_im
  );

  always_ff @(posedge clk) begin
    if (rst)     cnt <= '0;
    else if (en) cnt <= cnt + AW'(1);
  end

  always_comb begin
    tw_addr1 = AW'(((32'(cnt) + OFS1) % (SPAN / STEP1)) * STEP1);
    tw_addr2 = AW'(((32'(cnt) + OFS2) % (SPAN / STEP2)) * STEP2);
  end

endmodule
