// Transmit polyphase synthesis filter bank for the two OQAM branches.
// IFFT bursts (256 samples per branch at one per clock) are buffered in one
// FIFO per branch. Every 8 clocks (one base-rate sample) a sample pair is
// taken from the FIFOs and written into the branch RAMs, which hold the last
// 8 symbols; then 8 clock cycles compute the output sample
//   out = sum_{k=0..7} x_re[m, l-k]*g_re[m+M*k] + x_im[m, l-k]*g_im[m+M*k]
// with one multiplier pair per branch and an 8-sample accumulator.
// Addresses: LUT = mod(m + M*k, M*8), RAM = mod(LUT - M*l, M*8), so that
// symbol l is written at mod(m - M*l, M*8). The imaginary-branch half-symbol
// delay is done by shifting its coefficients: g_im[i] = g[i - M/2]. g is the
// K=4 PHYDYAS prototype (length 4M, Q15, table phydyas_k4_m256.hex); the
// LUTs are 8M deep and zero above the prototype. After reset the RAMs are
// cleared for M*8 cycles before samples are accepted. Latency from a FIFO
// read to the output sample: 9 clocks; output rate one sample per 8 clocks.
module tx_filter_bank
  import fbmc_pkg::*;
#(
  parameter int    MM        = M,
  parameter int    TAPS      = FB_TAPS,
  parameter int    FIFO_D    = 256,
  parameter string PROTO     = "rtl/phydyas_k4_m256.hex",
  parameter int    PROTO_LEN = 4*M
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,          // sample m = 0 of a symbol
  input  cplx_t in_re,             // real branch (IFFT 1 output)
  input  cplx_t in_im,             // imaginary branch (IFFT 2 output)
  output logic  out_valid,
  output cplx_t out_val,
  output logic  ready,             // RAM clear finished
  output logic  overflow           // sticky: FIFO overflow
);
  localparam int NN  = MM * TAPS;
  localparam int AW  = $clog2(NN);
  localparam int MW  = $clog2(MM);
  localparam int FAW = $clog2(FIFO_D);

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

  // ---- input FIFOs (one entry holds both branches and the first flag) ----
  typedef struct packed { logic first; cplx_t re; cplx_t im; } fent_t;
  fent_t fifo [FIFO_D];
  logic [FAW:0] wp, rp;
  logic empty, pop;
  assign empty = (wp == rp);

  // ---- RAMs ----
  cplx_t ram_re [NN];
  cplx_t ram_im [NN];

  logic          clr;
  logic [AW-1:0] clr_a;
  logic [2:0]    p;                 // clock index inside a sample slot
  logic [MW-1:0] wm;                // writer position
  logic [2:0]    wl;                // writer symbol, mod TAPS
  logic          started;
  logic [MW-1:0] mac_m;
  logic [2:0]    mac_l;
  logic          mac_act;
  logic [2:0]    k;
  logic signed [39:0] acc_re, acc_im;
  fent_t         head;

  assign head = fifo[rp[FAW-1:0]];
  assign pop  = !clr && p == 3'd0 && !empty;
  assign k    = p - 3'd1;
  assign ready = !clr;

  logic [AW-1:0] la, ra, wa;
  logic [MW-1:0] wm_eff;
  logic [2:0]    wl_eff;
  always_comb begin
    la = AW'(mac_m) + AW'(MM) * AW'(k);
    ra = la - AW'(MM) * AW'(mac_l);
    // a sample flagged first starts a new symbol at m = 0
    wm_eff = head.first ? '0 : wm;
    wl_eff = (head.first && started && wm != '0) ? wl + 3'd1 : wl;
    wa = AW'(wm_eff) - AW'(MM) * AW'(wl_eff);
  end

  logic signed [32:0] prr, pri;
  always_comb begin
    prr = 33'(ram_re[ra].re * lut1[la]) + 33'(ram_im[ra].re * lut2[la]);
    pri = 33'(ram_re[ra].im * lut1[la]) + 33'(ram_im[ra].im * lut2[la]);
  end

  logic signed [39:0] sum_re, sum_im;
  assign sum_re = (acc_re + 40'(prr)) >>> 15;
  assign sum_im = (acc_im + 40'(pri)) >>> 15;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; clr <= 1'b1; clr_a <= '0; p <= '0; wm <= '0; wl <= '0;
      started <= 1'b0; mac_m <= '0; mac_l <= '0; mac_act <= 1'b0;
      acc_re <= '0; acc_im <= '0; out_valid <= 1'b0; out_val <= '0; overflow <= 1'b0;
    end else begin
      if (in_valid) begin
        fifo[wp[FAW-1:0]] <= '{first: in_first, re: in_re, im: in_im};
        wp <= wp + 1'b1;
        if (wp - rp == (FAW+1)'(FIFO_D)) overflow <= 1'b1;
      end
      out_valid <= 1'b0;
      if (clr) begin
        ram_re[clr_a] <= '0;
        ram_im[clr_a] <= '0;
        clr_a <= clr_a + 1'b1;
        if (clr_a == AW'(NN-1)) clr <= 1'b0;
      end else begin
        p <= p + 1'b1;
        // MAC for the sample written in the previous slot, k = p-1
        if (mac_act) begin
          if (p == 3'd0) begin
            out_valid  <= 1'b1;
            out_val.re <= sat16(33'(sum_re));
            out_val.im <= sat16(33'(sum_im));
            acc_re <= '0;
            acc_im <= '0;
          end else begin
            acc_re <= acc_re + 40'(prr);
            acc_im <= acc_im + 40'(pri);
          end
        end
        if (p == 3'd0) begin
          mac_act <= pop;
          if (pop) begin
            ram_re[wa] <= head.re;
            ram_im[wa] <= head.im;
            rp      <= rp + 1'b1;
            started <= 1'b1;
            mac_m   <= wm_eff;
            mac_l   <= wl_eff;
            wm      <= wm_eff + 1'b1;
            wl      <= (wm_eff == MW'(MM-1)) ? wl_eff + 3'd1 : wl_eff;
          end
        end
      end
    end
  end
endmodule
