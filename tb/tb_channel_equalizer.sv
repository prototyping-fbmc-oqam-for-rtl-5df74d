// Self-checking testbench for channel_equalizer.
//
// Symbols of 144 sub-carriers are fed as bursts (one element per clock),
// each element multiplied by a complex channel that changes linearly over
// the band, h_k = (0.45 + 0.002 k) + (0.30 - 0.0015 k)j.
// Reference signals (every 8th sub-carrier from k = 3, every 4th symbol from
// l = 1) carry 1.0, the other elements random QPSK values. From symbol 2 on
// the equalised output of sub-carriers k = 3..139 (the others are unused edge
// carriers with no estimate) must equal the sent value within 1 % of full scale.
// Also checked: the output follows the input by exactly DLY+1 clocks with k
// and l carried along, and est_update pulses once per reference signal
// (18 per reference symbol).
module tb_channel_equalizer;
  import fbmc_pkg::*;

  localparam int DLY = 24;
  localparam int NS  = 8;            // symbols driven

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0, out_valid, est_update;
  logic [KW-1:0] in_k = '0, out_k;
  logic [LW-1:0] in_l = '0, out_l;
  cplx_t         in_re = '0, in_im = '0, out_val;

  channel_equalizer #(.DLY(DLY)) dut (.*);

  int checks = 0, failures = 0;
  function automatic int s16(input logic [15:0] v); return int'($signed(v)); endfunction

  int sent_re [NS][NSC];
  int sent_im [NS][NSC];
  int in_cyc [$];
  int cyc = 0, n_out = 0, n_est = 0, n_lat_bad = 0, n_val_bad = 0, n_val_chk = 0;

  always @(posedge clk) begin
    cyc++;
    if (in_valid) in_cyc.push_back(cyc);
    if (est_update) n_est++;
    if (out_valid) begin
      int c0, k, l, dr, di;
      c0 = in_cyc.pop_front();
      n_out++;
      if (cyc - c0 != DLY + 1) n_lat_bad++;
      k = int'(out_k); l = int'(out_l);
      if (l >= 2 && l < NS && k >= RS_F_SHIFT && k <= RS_F_LAST) begin
        dr = s16(out_val.re) - sent_re[l][k];
        di = s16(out_val.im) - sent_im[l][k];
        n_val_chk++;
        if (dr > 82 || dr < -82 || di > 82 || di < -82) begin
          n_val_bad++;
          if (n_val_bad < 6)
            $display("k=%0d l=%0d got (%0d,%0d) sent (%0d,%0d)", k, l, s16(out_val.re),
                     s16(out_val.im), sent_re[l][k], sent_im[l][k]);
        end
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    for (int l = 0; l < NS; l++) begin
      for (int k = 0; k < NSC; k++) begin
        int dre, dim, yre, yim;
        real hre, him;
        if (is_pilot(k, l)) begin dre = UNIT; dim = 0; end
        else begin
          dre = ($urandom & 1) ? 5793 : -5793;
          dim = ($urandom & 1) ? 5793 : -5793;
        end
        sent_re[l][k] = dre; sent_im[l][k] = dim;
        hre = 0.45 + 0.002 * k; him = 0.30 - 0.0015 * k;
        yre = $rtoi(hre * dre - him * dim);
        yim = $rtoi(hre * dim + him * dre);
        @(negedge clk);
        in_valid = 1'b1; in_k = KW'(k); in_l = LW'(l);
        in_re.re = 16'(yre); in_re.im = 16'($urandom);   // unused halves get noise
        in_im.re = 16'($urandom); in_im.im = 16'(yim);
      end
      @(negedge clk) in_valid = 1'b0;
      repeat (100) @(negedge clk);
    end
    repeat (DLY + 10) @(posedge clk);
    checks++; if (n_out != NS * NSC) begin failures++; $display("FAIL outputs %0d", n_out); end
    checks++; if (n_lat_bad != 0)    begin failures++; $display("FAIL latency %0d", n_lat_bad); end
    checks++; if (n_est != 2 * 18)   begin failures++; $display("FAIL est_update %0d", n_est); end
    checks += n_val_chk; failures += n_val_bad;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
