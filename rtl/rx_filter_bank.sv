// Receive polyphase analysis filter bank for the two OQAM branches. Every
// base-rate input sample is written into a circular RAM of 8 symbols
// (M*8 entries, addresses increasing), which also acts as the buffer that
// lets the filter use samples from before the synchronisation peak. For the
// sample at sub-carrier filter m, 8 clock cycles then compute
//   y_re[m] = sum_{l=0..7} y[t - M*l] * g_re[M*(7-l) + m]
//   y_im[m] = sum_{l=0..7} y[t - M*l] * g_im[M*(7-l) + m]
// (coefficients flipped against the transmitter, g_im[i] = g[i - M/2]),
// with one multiplier pair per branch. In clock k = 0..7 the LUT address is
// m + M*k and the RAM address is wa + M*(k+1), wa being the address of the
// newest sample. A frame position counter P = M*l + m tags every output
// with (l, m); a sync strobe sets the position of the next input sample to
// SYNC_POS and restarts the symbol count, while the RAM contents are kept.
// Output: one branch pair per input sample, 9 clocks after it.
// Accumulators are 40 bits wide so the 8-tap sums cannot overflow; after the
// Q15 shift only the low 33 bits are used for saturation to 16 bits.
module rx_filter_bank
  import fbmc_pkg::*;
#(
  parameter int    MM        = M,
  parameter int    TAPS      = FB_TAPS,
  parameter int    NS        = NSYM,
  parameter int    SYNC_POS  = 0,
  parameter string PROTO     = "rtl/phydyas_k4_m256.hex",
  parameter int    PROTO_LEN = 4*M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sync,          // synchronisation strobe
  input  logic          in_valid,      // at most one every 8 clocks
  input  cplx_t         in_val,
  output logic          out_valid,
  output logic          out_first,     // m == 0
  output logic [$clog2(MM)-1:0] out_m,
  output logic [LW-1:0] out_l,
  output cplx_t         out_re,
  output cplx_t         out_im,
  output logic          ready          // RAM clear finished
);
  localparam int NN = MM * TAPS;
  localparam int AW = $clog2(NN);
  localparam int MW = $clog2(MM);
  localparam int PW = $clog2(MM * NS);

  logic signed [15:0] proto [PROTO_LEN];
  logic signed [15:0] lut1 [NN];
  logic signed [15:0] lut2 [NN];
  initial begin
    $readmemh(PROTO, proto);
    for (int i = 0; i < NN; i++) begin
      lut1[i] = (i < PROTO_LEN) ? proto[i] : 16'sd0;
      lut2[i] = (i >= MM/2 && i < PROTO_LEN + MM/2) ? proto[i - MM/2] : 16'sd0;
    end
  end

  cplx_t ram [NN];
  logic          clr;
  logic [AW-1:0] wa, mac_wa;
  logic [PW-1:0] pos, mac_pos;
  logic          sync_pend;
  logic [3:0]    k;                 // 8 = idle
  logic signed [39:0] acc_rr, acc_ri, acc_ir, acc_ii;

  logic [AW-1:0] la, ra;
  logic [MW-1:0] mm;
  assign mm = mac_pos[MW-1:0];
  always_comb begin
    la = AW'(mm) + AW'(MM) * AW'(k[2:0]);
    ra = mac_wa + AW'(MM) * (AW'(k[2:0]) + AW'(1));
  end

  cplx_t y;
  logic signed [31:0] prr, pri, pir, pii;
  always_comb begin
    y   = ram[ra];
    prr = y.re * lut1[la];
    pri = y.im * lut1[la];
    pir = y.re * lut2[la];
    pii = y.im * lut2[la];
  end

  logic signed [39:0] srr, sri, sir, sii;
  assign srr = (acc_rr + 40'(prr)) >>> 15;
  assign sri = (acc_ri + 40'(pri)) >>> 15;
  assign sir = (acc_ir + 40'(pir)) >>> 15;
  assign sii = (acc_ii + 40'(pii)) >>> 15;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr <= 1'b1; wa <= '0; mac_wa <= '0; pos <= '0; mac_pos <= '0; sync_pend <= 1'b0;
      k <= 4'd8; acc_rr <= '0; acc_ri <= '0; acc_ir <= '0; acc_ii <= '0;
      out_valid <= 1'b0; out_first <= 1'b0; out_m <= '0; out_l <= '0; out_re <= '0; out_im <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      if (sync) sync_pend <= 1'b1;
      if (clr) begin
        ram[wa] <= '0;
        wa <= wa + 1'b1;
        if (wa == AW'(NN-1)) clr <= 1'b0;
      end else begin
        if (k != 4'd8) begin
          k <= k + 1'b1;
          acc_rr <= acc_rr + 40'(prr);
          acc_ri <= acc_ri + 40'(pri);
          acc_ir <= acc_ir + 40'(pir);
          acc_ii <= acc_ii + 40'(pii);
          if (k == 4'd7) begin
            out_valid <= 1'b1;
            out_first <= mm == '0;
            out_m     <= mm;
            out_l     <= LW'(mac_pos >> MW);
            out_re    <= '{re: sat16(33'(srr)), im: sat16(33'(sri))};
            out_im    <= '{re: sat16(33'(sir)), im: sat16(33'(sii))};
          end
        end
        if (in_valid) begin
          logic [PW-1:0] p_now;
          p_now = (sync || sync_pend) ? PW'(SYNC_POS) : pos;
          sync_pend <= 1'b0;
          ram[wa] <= in_val;
          mac_wa  <= wa;
          mac_pos <= p_now;
          wa      <= wa + 1'b1;
          pos     <= (p_now == PW'(MM*NS-1)) ? '0 : p_now + 1'b1;
          k       <= '0;
          acc_rr <= '0; acc_ri <= '0; acc_ir <= '0; acc_ii <= '0;
        end
      end
    end
  end

  assign ready = !clr;

  // the 8-cycle MAC must finish before the next sample arrives
  assert property (@(posedge clk) disable iff (!rst_n) in_valid && !clr |-> k >= 4'd7);
endmodule
