// OQAM mapper. Collects the 144 resource elements of a symbol into one half
// of a ping-pong buffer and, once sub-carrier 143 has arrived, streams the
// 256 IFFT inputs in bin order m = 0..255, one per clock. Bins 1..72 carry
// sub-carriers 72..143 (the band above DC), bins 184+k carry sub-carriers
// k = 1..71 (below DC); all other bins are zero. Each bin is split into a
// real branch Re{x}*j^(m+2l) and an imaginary branch Im{x}*j^(m+2l+1), the
// j^(2l) = (-1)^l factor following the OQAM phase of the transmitter block
// diagram. Latency: first bin 1 clock after the last element was written.
module oqam_mapper
  import fbmc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [KW-1:0] in_k,
  input  logic [LW-1:0] in_l,
  input  cplx_t         in_val,
  output logic          out_valid,
  output logic          out_first,     // bin 0 of a symbol
  output logic [7:0]    out_m,
  output logic [LW-1:0] out_l,
  output cplx_t         out_re,        // real branch
  output cplx_t         out_im         // imaginary branch
);
  cplx_t buf_q [2][NSC];
  logic  wsel, rsel, run;
  logic [8:0] m;
  logic [LW-1:0] l_q;

  function automatic cplx_t rot(input logic signed [DW-1:0] r, input logic [1:0] q);
    cplx_t c;
    unique case (q)
      2'd0: begin c.re = r;  c.im = '0; end
      2'd1: begin c.re = '0; c.im = r;  end
      2'd2: begin c.re = -r; c.im = '0; end
      default: begin c.re = '0; c.im = -r; end
    endcase
    return c;
  endfunction

  cplx_t x;
  logic [1:0] ph;
  always_comb begin
    x = '0;
    if (m >= 9'd1 && m <= 9'(NSC/2)) x = buf_q[rsel][m + NSC/2 - 1];
    else if (m > 9'(M - NSC/2) && m < 9'(M)) x = buf_q[rsel][m - M + NSC/2];
    ph = m[1:0] + {l_q[0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0; run <= 1'b0; m <= '0; l_q <= '0;
      out_valid <= 1'b0; out_first <= 1'b0; out_m <= '0; out_l <= '0;
      out_re <= '0; out_im <= '0;
    end else begin
      if (in_valid) begin
        buf_q[wsel][in_k] <= in_val;
        if (in_k == KW'(NSC-1)) begin
          wsel <= ~wsel;
          rsel <= wsel;
          l_q  <= in_l;
          run  <= 1'b1;
          m    <= '0;
        end
      end
      if (run && !(in_valid && in_k == KW'(NSC-1))) begin
        m <= m + 1'b1;
        if (m == 9'(M-1)) run <= 1'b0;
      end
      out_valid <= run;
      out_first <= run && m == '0;
      out_m     <= m[7:0];
      out_l     <= l_q;
      out_re    <= rot(x.re, ph);
      out_im    <= rot(x.im, ph + 2'd1);
    end
  end
endmodule
