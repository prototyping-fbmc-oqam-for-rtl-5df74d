// OQAM de-mapper check: bins of random values for three symbols go in as
// from the FFTs; the 144 sub-carriers of each symbol are compared with the
// re-index rule (k = 1..71 from bin k+184, k = 72..143 from bin k-71, k = 0
// zero) and the phase removal j^(-m-2l), computed in real arithmetic.
module tb_oqam_demapper;
  import fbmc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid; logic [7:0] in_m; logic [3:0] in_l; cplx_t in_re, in_im;
  logic out_valid; logic [7:0] out_k; logic [3:0] out_l; cplx_t out_re, out_im;
  oqam_demapper dut (.clk, .rst_n, .in_valid, .in_m, .in_l, .in_re, .in_im,
                     .out_valid, .out_k, .out_l, .out_re, .out_im);
  int yr [3][M][4];
  int sym = 0, cnt = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    int k, m, l; real c, s, e [4];
    logic signed [15:0] o [4];
    k = out_k; l = sym + 1;
    m = (k >= 72) ? k - 71 : k + 184;
    c = $cos(-3.14159265358979 / 2.0 * (m + 2*l)); s = $sin(-3.14159265358979 / 2.0 * (m + 2*l));
    if (k == 0) foreach (e[i]) e[i] = 0;
    else begin
      e[0] = yr[sym][m][0] * c - yr[sym][m][1] * s;  e[1] = yr[sym][m][0] * s + yr[sym][m][1] * c;
      e[2] = yr[sym][m][2] * c - yr[sym][m][3] * s;  e[3] = yr[sym][m][2] * s + yr[sym][m][3] * c;
    end
    o[0] = out_re.re; o[1] = out_re.im; o[2] = out_im.re; o[3] = out_im.im;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if ($itor(o[i]) - e[i] > 0.5 || $itor(o[i]) - e[i] < -0.5) begin
        failures++;
        if (failures < 6) $display("FAIL sym %0d k %0d part %0d got %0d exp %f", sym, k, i, o[i], e[i]);
      end
    end
    checks++;
    if (int'(out_k) != cnt || int'(out_l) != l) failures++;
    cnt++;
    if (cnt == NSC) begin cnt = 0; sym++; end
  end

  initial begin
    foreach (yr[s, m, p]) yr[s][m][p] = $urandom_range(0, 16000) - 8000;
    in_valid = 0; in_m = 0; in_l = 0; in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      for (int m = 0; m < M; m++) begin
        in_valid <= 1; in_m <= 8'(m); in_l <= 4'(s + 1);
        in_re <= '{re: 16'(yr[s][m][0]), im: 16'(yr[s][m][1])};
        in_im <= '{re: 16'(yr[s][m][2]), im: 16'(yr[s][m][3])};
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (400) @(posedge clk);
    end
    checks++; if (sym != 3) begin failures++; $display("FAIL symbols out %0d", sym); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
