// Receive filter bank check: random base-rate samples (one per 8 clocks)
// are analysed; each output pair is compared with
//   y_re[m] = sum_l y[t-M*l]*g[M*(7-l)+m],  y_im[m] = sum_l y[t-M*l]*g[M*(7-l)+m-M/2]
// computed in real arithmetic. A sync strobe in the middle of the run must
// give the next sample frame position SYNC_POS (checked through out_m and
// out_l) without disturbing the filter history.
module tb_rx_filter_bank;
  import fbmc_pkg::*;
  localparam int NIN = 3000, SP = 1000, SYNC_AT = 1700;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic sync, in_valid; cplx_t in_val;
  logic out_valid, out_first; logic [7:0] out_m; logic [3:0] out_l; cplx_t out_re, out_im; logic ready;
  rx_filter_bank #(.SYNC_POS(SP)) dut (.clk, .rst_n, .sync, .in_valid, .in_val,
    .out_valid, .out_first, .out_m, .out_l, .out_re, .out_im, .ready);

  logic signed [15:0] g [4*M];
  int yr [NIN], yi [NIN];
  function automatic real gv(input int i);
    return (i >= 0 && i < 4*M) ? $itor(g[i]) : 0.0;
  endfunction

  initial begin : watchdog
    repeat (NIN * 8 + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit far(input real a, input logic signed [15:0] b);
    return ($itor(b) - a > 2.0) || ($itor(b) - a < -2.0);
  endfunction

  int nout = 0;
  always @(posedge clk) if (out_valid) begin
    int t, pos, m;
    real e [4];
    logic signed [15:0] o [4];
    t = nout;
    pos = (t < SYNC_AT) ? t % (M*NSYM) : (SP + t - SYNC_AT) % (M*NSYM);
    m = pos % M;
    foreach (e[i]) e[i] = 0;
    for (int l = 0; l < 8; l++) if (t - M*l >= 0) begin
      e[0] += yr[t-M*l] * gv(M*(7-l)+m);       e[1] += yi[t-M*l] * gv(M*(7-l)+m);
      e[2] += yr[t-M*l] * gv(M*(7-l)+m-M/2);   e[3] += yi[t-M*l] * gv(M*(7-l)+m-M/2);
    end
    o[0] = out_re.re; o[1] = out_re.im; o[2] = out_im.re; o[3] = out_im.im;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (far(e[i] / 32768.0, o[i])) begin
        failures++;
        if (failures < 6) $display("FAIL t=%0d part %0d got %0d exp %f", t, i, o[i], e[i] / 32768.0);
      end
    end
    checks++;
    if (int'(out_m) != m || int'(out_l) != pos / M || out_first != (m == 0)) begin
      failures++;
      if (failures < 6) $display("FAIL t=%0d position m=%0d l=%0d exp %0d", t, out_m, out_l, pos);
    end
    nout++;
  end

  initial begin
    $readmemh("rtl/phydyas_k4_m256.hex", g);
    foreach (yr[i]) begin yr[i] = $urandom_range(0, 8000) - 4000; yi[i] = $urandom_range(0, 8000) - 4000; end
    sync = 0; in_valid = 0; in_val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    @(posedge clk);
    for (int t = 0; t < NIN; t++) begin
      in_valid <= 1; in_val <= '{re: 16'(yr[t]), im: 16'(yi[t])};
      @(posedge clk);
      in_valid <= 0;
      sync <= (t == SYNC_AT - 1);
      @(posedge clk);
      sync <= 0;
      repeat (6) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    checks++; if (nout != NIN) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
