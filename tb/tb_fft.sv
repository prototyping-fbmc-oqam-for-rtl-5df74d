// Self-checking test of the radix-2 (I)FFT: random 256-point vectors are
// transformed by a forward and an inverse instance and compared with a
// direct DFT computed in real arithmetic in the testbench (tolerance 6
// LSB). It also checks that two back-to-back symbols overlap correctly
// (one loading while the other computes), the output order, the tag and
// the latency from last input to first output.
module tb_fft;
  import fbmc_pkg::*;
  localparam int N = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  logic in_valid, in_first; cplx_t in_val; logic [3:0] in_tag;
  logic fv, ff, iv, ifst; logic [7:0] fidx, iidx; cplx_t fval, ival; logic [3:0] ftag, itag; logic fb, ib;

  fft #(.N(N), .INVERSE(1'b0), .OUT_SHIFT(3)) u_f (
    .clk, .rst_n, .in_valid, .in_first, .in_val, .in_tag,
    .out_valid(fv), .out_first(ff), .out_idx(fidx), .out_val(fval), .out_tag(ftag), .busy(fb));
  fft #(.N(N), .INVERSE(1'b1), .OUT_SHIFT(5)) u_i (
    .clk, .rst_n, .in_valid, .in_first, .in_val, .in_tag,
    .out_valid(iv), .out_first(ifst), .out_idx(iidx), .out_val(ival), .out_tag(itag), .busy(ib));

  real xr [2][N], xi [2][N];
  real er [2][2][N], ei [2][2][N];     // [inverse][symbol][bin]
  int  last_in_t, first_out_t;
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input int inv, input int s, input int b, input cplx_t v);
    real dr, di;
    logic signed [15:0] vr, vi;
    vr = v.re; vi = v.im;
    dr = $itor(vr) - er[inv][s][b];
    di = $itor(vi) - ei[inv][s][b];
    checks++;
    if (dr > 6.0 || dr < -6.0 || di > 6.0 || di < -6.0) begin
      failures++;
      if (failures < 10) $display("FAIL inv=%0d sym=%0d bin=%0d got %0d,%0d exp %f,%f",
                                  inv, s, b, vr, vi, er[inv][s][b], ei[inv][s][b]);
    end
  endtask

  int fs = 0, is_ = 0;
  always @(posedge clk) begin
    if (rst_n && fv) begin
      if (ff && fidx != 0) begin failures++; end
      if (ff && fs == 0) first_out_t = cyc;
      check_out(0, fs, fidx, fval);
      checks++; if (ftag != 4'(fs + 5)) failures++;
      if (fidx == 8'(N-1)) fs++;
    end
    if (rst_n && iv) begin
      check_out(1, is_, iidx, ival);
      if (iidx == 8'(N-1)) is_++;
    end
  end

  initial begin
    in_valid = 0; in_first = 0; in_val = '0; in_tag = '0;
    // reference values
    for (int s = 0; s < 2; s++)
      for (int n = 0; n < N; n++) begin
        xr[s][n] = $itor($signed(16'($urandom_range(0, 16000)) - 16'sd8000));
        xi[s][n] = $itor($signed(16'($urandom_range(0, 16000)) - 16'sd8000));
      end
    for (int inv = 0; inv < 2; inv++)
      for (int s = 0; s < 2; s++)
        for (int k = 0; k < N; k++) begin
          real ar, ai, ang, sc;
          ar = 0; ai = 0;
          for (int n = 0; n < N; n++) begin
            ang = 2.0 * 3.14159265358979 * (k * n % N) / N * (inv ? 1.0 : -1.0);
            ar += xr[s][n] * $cos(ang) - xi[s][n] * $sin(ang);
            ai += xr[s][n] * $sin(ang) + xi[s][n] * $cos(ang);
          end
          sc = inv ? 32.0 : 8.0;
          ar = ar / sc; ai = ai / sc;
          if (ar > 32767) ar = 32767; if (ar < -32768) ar = -32768;
          if (ai > 32767) ai = 32767; if (ai < -32768) ai = -32768;
          er[inv][s][k] = ar; ei[inv][s][k] = ai;
        end
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 0; s < 2; s++) begin
      for (int n = 0; n < N; n++) begin
        in_valid <= 1; in_first <= (n == 0); in_tag <= 4'(s + 5);
        in_val.re <= 16'($rtoi(xr[s][n])); in_val.im <= 16'($rtoi(xi[s][n]));
        @(posedge clk);
        if (s == 0 && n == N-1) last_in_t = cyc;
      end
      in_valid <= 0;
      repeat (1030) @(posedge clk);    // next symbol loads while the engine still streams out
    end
    wait (fs == 2 && is_ == 2);
    // latency: N/2*log2(N) + 2 clocks from last input to first output
    checks++;
    if (first_out_t - last_in_t != N/2*8 + 2) begin
      failures++;
      $display("FAIL latency %0d", first_out_t - last_in_t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
