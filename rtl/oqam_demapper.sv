// OQAM de-mapper. Takes the two FFT outputs (real and imaginary branch,
// bins m = 0..255 in order, symbol index l as a tag), removes the
// transmitter phase by multiplying both branches with j^(-m-2l), and
// re-indexes bins to grid sub-carriers: sub-carrier k = 1..71 comes from
// bin k + 184 and k = 72..143 from bin k - 71; guard bins and DC are
// dropped and sub-carrier 0 is zero. Bins are collected in one half of a
// ping-pong buffer; after bin 255 the 144 sub-carriers stream out in order,
// one per clock, with k and l. Latency: first sub-carrier 1 clock after bin
// 255.
module oqam_demapper
  import fbmc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [7:0]    in_m,
  input  logic [LW-1:0] in_l,
  input  cplx_t         in_re,
  input  cplx_t         in_im,
  output logic          out_valid,
  output logic [KW-1:0] out_k,
  output logic [LW-1:0] out_l,
  output cplx_t         out_re,
  output cplx_t         out_im
);
  cplx_t bre [2][NSC];
  cplx_t bim [2][NSC];
  logic  wsel, rsel, run;
  logic [KW-1:0] k;
  logic [LW-1:0] l_q;

  // multiply by j^q
  function automatic cplx_t rotq(input cplx_t c, input logic [1:0] q);
    cplx_t r;
    unique case (q)
      2'd0: r = c;
      2'd1: begin r.re = -c.im; r.im = c.re;  end
      2'd2: begin r.re = -c.re; r.im = -c.im; end
      default: begin r.re = c.im; r.im = -c.re; end
    endcase
    return r;
  endfunction

  logic [1:0] q;
  logic       wr_en;
  logic [KW-1:0] wk;
  always_comb begin
    q     = 2'd0 - in_m[1:0] - {in_l[0], 1'b0};
    wr_en = 1'b0;
    wk    = '0;
    if (in_m >= 8'd1 && in_m <= 8'(NSC/2)) begin
      wr_en = 1'b1; wk = KW'(in_m) + KW'(NSC/2 - 1);
    end else if (in_m > 8'(M - NSC/2)) begin
      wr_en = 1'b1; wk = KW'(in_m - 8'(M - NSC/2));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0; run <= 1'b0; k <= '0; l_q <= '0;
      out_valid <= 1'b0; out_k <= '0; out_l <= '0; out_re <= '0; out_im <= '0;
    end else begin
      if (in_valid && wr_en) begin
        bre[wsel][wk] <= rotq(in_re, q);
        bim[wsel][wk] <= rotq(in_im, q);
      end
      if (in_valid && in_m == 8'(M-1)) begin
        wsel <= ~wsel;
        rsel <= wsel;
        l_q  <= in_l;
        run  <= 1'b1;
        k    <= '0;
      end else if (run) begin
        k <= k + 1'b1;
        if (k == KW'(NSC-1)) run <= 1'b0;
      end
      out_valid <= run;
      out_k     <= k;
      out_l     <= l_q;
      out_re    <= (k == '0) ? '0 : bre[rsel][k];
      out_im    <= (k == '0) ? '0 : bim[rsel][k];
    end
  end
endmodule
