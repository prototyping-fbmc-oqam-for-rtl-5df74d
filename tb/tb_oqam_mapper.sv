// OQAM mapper check: three symbols of random grid elements (one every 8
// clocks) are mapped; the 256 nbin of each are compared with the bin map
// (nbin 1..72 <- sub-carriers 72..143, nbin 185..255 <- 1..71, others 0) and
// the branch phases Re{x}*j^(m+2l), Im{x}*j^(m+2l+1), computed with real
// numbers in the testbench. Also checks that nbin come out back to back.
module tb_oqam_mapper;
  import fbmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid; logic [7:0] in_k; logic [3:0] in_l; cplx_t in_val;
  logic out_valid, out_first; logic [7:0] out_m; logic [3:0] out_l; cplx_t out_re, out_im;
  oqam_mapper dut (.clk, .rst_n, .in_valid, .in_k, .in_l, .in_val,
                   .out_valid, .out_first, .out_m, .out_l, .out_re, .out_im);
  int ar [3][NSC], ai [3][NSC];
  int sym = 0, nbin = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int m, k, l; real xr, xi, c, s, er_re, er_im, ei_re, ei_im;
    logic signed [15:0] o [4];
    m = out_m; l = sym + 3;
    k = -1;
    if (m >= 1 && m <= 72) k = m + 71;
    else if (m > 184) k = m - 184;
    xr = (k >= 0) ? ar[sym][k] : 0; xi = (k >= 0) ? ai[sym][k] : 0;
    c = $cos(3.14159265358979 / 2.0 * (m + 2*l)); s = $sin(3.14159265358979 / 2.0 * (m + 2*l));
    er_re = xr * c; er_im = xr * s;            // Re{x} * j^(m+2l)
    ei_re = -xi * s; ei_im = xi * c;           // Im{x} * j^(m+2l+1)
    o[0] = out_re.re; o[1] = out_re.im; o[2] = out_im.re; o[3] = out_im.im;
    checks++;
    if ($itor(o[0]) - er_re > 0.5 || $itor(o[0]) - er_re < -0.5 ||
        $itor(o[1]) - er_im > 0.5 || $itor(o[1]) - er_im < -0.5 ||
        $itor(o[2]) - ei_re > 0.5 || $itor(o[2]) - ei_re < -0.5 ||
        $itor(o[3]) - ei_im > 0.5 || $itor(o[3]) - ei_im < -0.5) begin
      failures++;
      if (failures < 6) $display("FAIL sym %0d m %0d", sym, m);
    end
    checks++;
    if (int'(out_m) != nbin || out_first != (nbin == 0) || int'(out_l) != l) failures++;
    nbin++;
    if (nbin == M) begin nbin = 0; sym++; end
  end

  initial begin
    foreach (ar[s, k]) begin ar[s][k] = $urandom_range(0, 16000) - 8000; ai[s][k] = $urandom_range(0, 16000) - 8000; end
    in_valid = 0; in_k = 0; in_l = 0; in_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      for (int k = 0; k < NSC; k++) begin
        in_valid <= 1; in_k <= 8'(k); in_l <= 4'(s + 3); in_val <= '{re: 16'(ar[s][k]), im: 16'(ai[s][k])};
        @(posedge clk);
        in_valid <= 0;
        repeat (7) @(posedge clk);
      end
      repeat (900) @(posedge clk);
    end
    checks = checks + 1;
    if (sym != 3) begin
      failures = failures + 1;
      $display("FAIL symbols out %0d", sym);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
