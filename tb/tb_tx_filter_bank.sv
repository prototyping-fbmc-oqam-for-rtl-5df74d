// Transmit filter bank check: 10 symbols of random branch samples arrive as
// 256-sample bursts every 2048 clocks, as from the IFFTs; every output
// sample is compared with the polyphase synthesis sum
//   sum_k x_re[m,l-k]*g[M*k+m] + x_im[m,l-k]*g[M*k+m-M/2]
// computed in real arithmetic from the prototype table. Also checks the
// output rate (one sample per 8 clocks) and that the FIFOs never overflow.
module tb_tx_filter_bank;
  import fbmc_pkg::*;
  localparam int NSYMB = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_first; cplx_t in_re, in_im; logic out_valid; cplx_t out_val; logic ready, overflow;
  tx_filter_bank dut (.clk, .rst_n, .in_valid, .in_first, .in_re, .in_im, .out_valid, .out_val, .ready, .overflow);

  logic signed [15:0] g [4*M];
  int xr_re [NSYMB][M], xr_im [NSYMB][M], xi_re [NSYMB][M], xi_im [NSYMB][M];

  initial begin : watchdog
    repeat (NSYMB * 2048 + 8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gv(input int i);
    return (i >= 0 && i < 4*M) ? $itor(g[i]) : 0.0;
  endfunction

  int nout = 0, last_out = -1, cyc = 0, gaps_bad = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && out_valid) begin
    int l, m; real er, ei, dr, di;
    logic signed [15:0] gr, gi;
    l = nout / M; m = nout % M;
    er = 0; ei = 0;
    for (int k = 0; k < 8; k++) if (l - k >= 0) begin
      er += xr_re[l-k][m] * gv(M*k + m) + xi_re[l-k][m] * gv(M*k + m - M/2);
      ei += xr_im[l-k][m] * gv(M*k + m) + xi_im[l-k][m] * gv(M*k + m - M/2);
    end
    er = er / 32768.0; ei = ei / 32768.0;
    gr = out_val.re; gi = out_val.im;
    dr = $itor(gr) - er; di = $itor(gi) - ei;
    checks++;
    if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0) begin
      failures++;
      if (failures < 6) $display("FAIL sample l=%0d m=%0d got %0d %0d exp %f %f", l, m, gr, gi, er, ei);
    end
    if (last_out >= 0 && nout % M != 0 && cyc - last_out != 8) gaps_bad++;
    last_out = cyc;
    nout++;
  end

  initial begin
    $readmemh("rtl/phydyas_k4_m256.hex", g);
    for (int s = 0; s < NSYMB; s++)
      for (int m = 0; m < M; m++) begin
        xr_re[s][m] = $urandom_range(0, 8000) - 4000; xr_im[s][m] = $urandom_range(0, 8000) - 4000;
        xi_re[s][m] = $urandom_range(0, 8000) - 4000; xi_im[s][m] = $urandom_range(0, 8000) - 4000;
      end
    in_valid = 0; in_first = 0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    for (int s = 0; s < NSYMB; s++) begin
      for (int m = 0; m < M; m++) begin
        in_valid <= 1; in_first <= (m == 0);
        in_re <= '{re: 16'(xr_re[s][m]), im: 16'(xr_im[s][m])};
        in_im <= '{re: 16'(xi_re[s][m]), im: 16'(xi_im[s][m])};
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (2048 - M) @(posedge clk);
    end
    repeat (100) @(posedge clk);
    checks++; if (nout != NSYMB * M) begin failures++; $display("FAIL count %0d", nout); end
    checks++; if (gaps_bad != 0) begin failures++; $display("FAIL rate, %0d bad gaps", gaps_bad); end
    checks++; if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
