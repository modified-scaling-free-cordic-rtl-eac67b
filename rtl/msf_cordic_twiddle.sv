// msf_cordic_twiddle: modified scaling-free CORDIC twiddle-factor generator.
//
// Produces the N/2 twiddle factors W_N^n = cos(2*pi*n/N) - j*sin(2*pi*n/N),
// n = 0 .. N/2-1, without a stored ROM of values. After reset one iterative
// CORDIC computes them one after another into a small register table and
// then raises ready; two read ports (addr1/w1, addr2/w2) serve the two
// complex multipliers of the pipeline. With INVERSE = 1 the table holds the
// conjugates W_N^-n used by the IFFT.
//
// CORDIC micro-rotation selection (as in the architecture): the angle is a
// 16-bit fraction of a radian, bit i weighing 2^(i-16). Each clock the most
// significant 1 of the remaining angle, at position M, chooses the
// rotation: if M = 15 the vector is rotated by 0.25 rad (shift s = 2) and
// 0.25 is subtracted from the angle; otherwise it is rotated by 2^-s rad
// with s = 16 - M and bit M is cleared. Iteration stops when the angle is
// zero. Each micro-rotation uses short Taylor series of cos and sin, so the
// vector keeps unit length and no scale-factor correction is needed:
//   cos(2^-s) ~ 1 - 2^-(2s+1) + 2^-(4s+5)
//   sin(2^-s) ~ 2^-s - 2^-(3s+3) - 2^-(3s+5) - 2^-(3s+7)
// The number of series terms, the start vector (1, 0), the folding of
// angles above pi/4 into the first octant (swap cos and sin) and into the
// first quadrant (negate), the 24-bit internal precision and the table
// filled once after reset are this design's choices.
//
// Timing: ready rises a few tens of clocks after reset (one clock to load
// each angle, one per micro-rotation, one to store). The read ports are
// combinational.
module msf_cordic_twiddle #(
  parameter int unsigned N       = 16,
  parameter int unsigned TW      = 16,
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned AW      = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic                 ready,
  input  logic [AW-1:0]        addr1,
  input  logic [AW-1:0]        addr2,
  output logic signed [TW-1:0] w1_re, w1_im,
  output logic signed [TW-1:0] w2_re, w2_im
);

  localparam int unsigned NT  = N / 2;     // table entries
  localparam int unsigned XW  = 24;        // internal vector width
  localparam int unsigned XF  = 21;        // internal fraction bits
  localparam int unsigned FR  = TW - 2;    // output fraction bits
  localparam int unsigned ZW  = 16;        // angle width
  // Angle step 2*pi/N in units of 2^-16 rad, scaled by 2^8 for rounding:
  // 2*pi * 2^24 = 105414357.
  localparam longint unsigned ANG_STEP_Q8 = 64'd105414357 / 64'(N);

  typedef enum logic [1:0] {S_LOAD, S_ROT, S_STORE, S_DONE} state_t;
  typedef logic signed [XW-1:0] vec_t;

  state_t          state;
  logic [AW-1:0]   idx;
  vec_t            x, y;
  logic [ZW-1:0]   z;
  logic            swap, quad;
  logic signed [TW-1:0] tab_re [NT];
  logic signed [TW-1:0] tab_im [NT];

  // Angle of the current entry, folded into [0, pi/4].
  int unsigned     r_q, rr;
  logic            swap_n, quad_n;
  logic [ZW-1:0]   z_load;
  // Micro-rotation.
  int unsigned     msb, s;
  logic [ZW-1:0]   z_next;
  vec_t            x_next, y_next;
  // Store.
  logic signed [TW-1:0] cr, sr, c_oct, s_oct, cos_phi, sin_phi;

  always_comb begin
    quad_n = (32'(idx) >= N / 4);
    r_q    = 32'(idx) % (N / 4);
    swap_n = (r_q > N / 8);
    rr     = swap_n ? (N / 4 - r_q) : r_q;
    z_load = ZW'((64'(rr) * ANG_STEP_Q8 + 64'd128) >> 8);

    // Most-significant-1 detector.
    msb = 0;
    for (int i = 0; i < int'(ZW); i++)
      if (z[i]) msb = i;
    z_next = z;
    if (msb == ZW - 1) begin
      s      = 2;
      z_next = z - ZW'(1 << (ZW - 2));     // subtract 0.25 rad
    end else begin
      s         = ZW - msb;
      z_next[msb] = 1'b0;
    end
    x_next = x - (x >>> (2*s+1)) + (x >>> (4*s+5))
               - (y >>> s) + (y >>> (3*s+3)) + (y >>> (3*s+5)) + (y >>> (3*s+7));
    y_next = y - (y >>> (2*s+1)) + (y >>> (4*s+5))
               + (x >>> s) - (x >>> (3*s+3)) - (x >>> (3*s+5)) - (x >>> (3*s+7));

    // Round to Q1.FR and undo the folding.
    cr      = TW'((x + (vec_t'(1) <<< (XF - FR - 1))) >>> (XF - FR));
    sr      = TW'((y + (vec_t'(1) <<< (XF - FR - 1))) >>> (XF - FR));
    c_oct   = swap ? sr : cr;
    s_oct   = swap ? cr : sr;
    cos_phi = quad ? -s_oct : c_oct;
    sin_phi = quad ? c_oct : s_oct;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_LOAD;
      idx   <= '0;
      x     <= '0;
      y     <= '0;
      z     <= '0;
      swap  <= 1'b0;
      quad  <= 1'b0;
      for (int i = 0; i < int'(NT); i++) begin
        tab_re[i] <= '0;
        tab_im[i] <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: begin
          x     <= vec_t'(1) <<< XF;
          y     <= '0;
          z     <= z_load;
          swap  <= swap_n;
          quad  <= quad_n;
          state <= S_ROT;
        end
        S_ROT: begin
          if (z == '0) begin
            state <= S_STORE;
          end else begin
            x <= x_next;
            y <= y_next;
            z <= z_next;
          end
        end
        S_STORE: begin
          tab_re[idx] <= cos_phi;
          tab_im[idx] <= INVERSE ? sin_phi : -sin_phi;
          if (32'(idx) == NT - 1) begin
            state <= S_DONE;
          end else begin
            idx   <= idx + AW'(1);
            state <= S_LOAD;
          end
        end
        default: state <= S_DONE;
      endcase
    end
  end

  assign ready = (state == S_DONE);

  always_comb begin
    w1_re = tab_re[addr1];
    w1_im = tab_im[addr1];
    w2_re = tab_re[addr2];
    w2_im = tab_im[addr2];
  end

endmodule
