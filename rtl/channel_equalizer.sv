// Zero-forcing channel estimator and equalizer. The real and imaginary
// branches are combined into x = Re{b_re} + j*Im{b_im}. At each reference
// signal (every 8 sub-carriers in every 4th symbol, sent with value 1.0) the
// combined value is held in a register and its complex reciprocal
// c = conj(x)/|x|^2 is formed with one divider and four multipliers. A
// sequential interpolator writes, between consecutive reference signals u1
// and u2 = u1 + 8, c_k = c_u1 + (c_u2 - c_u1)*(k - u1)/8 into a 144-entry
// RAM (one write per clock; the last reference value is also written to the
// sub-carriers above it). The RAM keeps the correction until the next
// reference symbol. The combined data run through a DLY-clock shift
// register and are multiplied by the correction read from the RAM (four
// multipliers). Input: bursts of consecutive sub-carriers, one per clock, as
// produced by the de-mapper. Output: DLY+1 clocks after the input, values
// scaled so that 1.0 = UNIT. Corrections are Q13 (1.0 = 8192), saturated.
module channel_equalizer
  import fbmc_pkg::*;
#(
  parameter int DLY = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [KW-1:0] in_k,
  input  logic [LW-1:0] in_l,
  input  cplx_t         in_re,
  input  cplx_t         in_im,
  output logic          out_valid,
  output logic [KW-1:0] out_k,
  output logic [LW-1:0] out_l,
  output cplx_t         out_val,
  output logic          est_update      // pulse: a reference signal was processed
);
  typedef struct packed {
    logic          v;
    logic [KW-1:0] k;
    logic [LW-1:0] l;
    cplx_t         x;
  } dly_t;

  cplx_t x_in;
  assign x_in = '{re: in_re.re, im: in_im.im};

  // ---- reference register and reciprocal ----
  logic          r_v;
  logic [KW-1:0] r_k;
  cplx_t         r_x;
  logic [31:0]   mag2;
  logic [40:0]   inv;
  logic signed [58:0] cre_w, cim_w;
  cplx_t         c_rec;
  always_comb begin
    mag2  = 32'(r_x.re * r_x.re) + 32'(r_x.im * r_x.im);
    inv   = (mag2 == 0) ? '1 : 41'((64'd1 << 40) / 64'(mag2));
    cre_w = 59'(r_x.re) * $signed({1'b0, inv});
    cim_w = -(59'(r_x.im) * $signed({1'b0, inv}));
    c_rec.re = sat16(33'(cre_w >>> 14));
    c_rec.im = sat16(33'(cim_w >>> 14));
    if ((cre_w >>> 14) > 59'sd32767)  c_rec.re = 16'sd32767;
    if ((cre_w >>> 14) < -59'sd32768) c_rec.re = -16'sd32768;
    if ((cim_w >>> 14) > 59'sd32767)  c_rec.im = 16'sd32767;
    if ((cim_w >>> 14) < -59'sd32768) c_rec.im = -16'sd32768;
  end

  logic          c_v;
  logic [KW-1:0] c_k;
  cplx_t         c_new;
  cplx_t         c_prev;
  logic          have_prev;

  // ---- interpolator ----
  logic          iact;
  logic [3:0]    ij, ilen;
  logic [KW-1:0] iu1;
  cplx_t         ic1, ic2;
  cplx_t         cram [NSC];
  cplx_t         ival;
  logic signed [20:0] dre, dim;
  always_comb begin
    dre = 21'(ic2.re - ic1.re) * 21'(ij);
    dim = 21'(ic2.im - ic1.im) * 21'(ij);
    if (ij >= 4'd8) ival = ic2;
    else begin
      ival.re = ic1.re + 16'(dre >>> 3);
      ival.im = ic1.im + 16'(dim >>> 3);
    end
  end

  // ---- data delay and product ----
  dly_t dl [DLY];
  cplx_t cr;
  logic signed [32:0] pr, pim;
  always_comb begin
    cr  = cram[dl[DLY-1].k];
    pr  = 33'(dl[DLY-1].x.re * cr.re) - 33'(dl[DLY-1].x.im * cr.im);
    pim = 33'(dl[DLY-1].x.re * cr.im) + 33'(dl[DLY-1].x.im * cr.re);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_v <= 1'b0; r_k <= '0; r_x <= '0; c_v <= 1'b0; c_k <= '0; c_new <= '0; c_prev <= '0;
      have_prev <= 1'b0; iact <= 1'b0; ij <= '0; ilen <= '0; iu1 <= '0; ic1 <= '0; ic2 <= '0;
      out_valid <= 1'b0; out_k <= '0; out_l <= '0; out_val <= '0; est_update <= 1'b0;
      for (int i = 0; i < DLY; i++) dl[i] <= '0;
      for (int i = 0; i < NSC; i++) cram[i] <= '0;
    end else begin
      r_v <= in_valid && is_pilot(int'(in_k), int'(in_l));
      if (in_valid && is_pilot(int'(in_k), int'(in_l))) begin
        r_k <= in_k;
        r_x <= x_in;
      end
      c_v        <= r_v;
      est_update <= r_v;
      if (r_v) begin
        c_k   <= r_k;
        c_new <= c_rec;
      end
      // a running job writes one RAM entry per clock; a new job started in
      // the same clock (below) takes over the job registers
      if (iact) begin
        cram[iu1 + KW'(ij)] <= ival;
        ij <= ij + 1'b1;
        if (ij == ilen) iact <= 1'b0;
      end
      if (c_v) begin
        c_prev    <= c_new;
        have_prev <= 1'b1;
        if (c_k != KW'(RS_F_SHIFT) && have_prev) begin
          iact <= 1'b1; ij <= '0; iu1 <= c_k - KW'(RS_F_SP); ic1 <= c_prev; ic2 <= c_new;
          ilen <= (c_k == KW'(RS_F_LAST)) ? 4'(RS_F_SP + NSC - 1 - RS_F_LAST) : 4'(RS_F_SP - 1);
        end
      end
      dl[0] <= '{v: in_valid, k: in_k, l: in_l, x: x_in};
      for (int i = 1; i < DLY; i++) dl[i] <= dl[i-1];
      out_valid  <= dl[DLY-1].v;
      out_k      <= dl[DLY-1].k;
      out_l      <= dl[DLY-1].l;
      out_val.re <= sat16(pr >>> 13);
      out_val.im <= sat16(pim >>> 13);
    end
  end

  // a new interpolation job must not start while one is running
  assert property (@(posedge clk) disable iff (!rst_n)
                   c_v && have_prev && c_k != KW'(RS_F_SHIFT) |-> !iact || ij == ilen);
endmodule
