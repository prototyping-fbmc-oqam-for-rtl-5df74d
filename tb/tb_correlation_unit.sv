// Self-checking testbench for correlation_unit.
//
// A free-running 5-bit counter drives addr as in the time synchroniser. A
// new random sample is offered at every addr == 31; part of the run feeds
// the conjugate of the reference (a matched sequence) so that large
// correlations are exercised as well. The testbench keeps its own copy of
// the 96-sample window and computes each correlation with 64-bit integer
// arithmetic; power must match bit for bit and arrive with power_valid at
// addr == 0, one value per 32 clocks.
module tb_correlation_unit;
  import fbmc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  addr = '0;
  cplx_t       in_val = '0;
  logic        power_valid;
  logic [31:0] power;

  correlation_unit dut (.*);

  int checks = 0, failures = 0;
  cplx_t ref_rom [96];
  initial $readmemh("rtl/sync_ref96.hex", ref_rom);
  function automatic longint s16(input logic [15:0] v); return longint'($signed(v)); endfunction

  longint win_re [96], win_im [96];   // win[0] newest
  longint exp_q [$];
  int n_out = 0, n_bad_rate = 0, last_out = -1, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    addr <= addr + 1'b1;
    if (power_valid) begin
      longint e;
      checks++;
      if (addr != 5'd1) n_bad_rate++;            // power_valid follows addr == 0
      if (last_out >= 0 && cyc - last_out != 32) n_bad_rate++;
      last_out = cyc;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (longint'(power) != e) begin
          failures++;
          if (failures < 6) $display("power %0d expected %0d", power, e);
        end
      end
      n_out++;
    end
    if (addr == 5'd31) begin
      // correlation over the window before this sample enters
      longint sr, si, cr, ci;
      sr = 0; si = 0;
      for (int i = 0; i < 96; i++) begin
        sr += win_re[95-i] * s16(ref_rom[i][31:16]) - win_im[95-i] * s16(ref_rom[i][15:0]);
        si += win_re[95-i] * s16(ref_rom[i][15:0]) + win_im[95-i] * s16(ref_rom[i][31:16]);
      end
      cr = sr >>> 15; ci = si >>> 15;
      cr = longint'($signed(24'(cr))); ci = longint'($signed(24'(ci)));
      exp_q.push_back(((cr * cr + ci * ci) >> 16) & 64'hFFFF_FFFF);
      for (int i = 95; i > 0; i--) begin win_re[i] = win_re[i-1]; win_im[i] = win_im[i-1]; end
      win_re[0] = s16(in_val.re); win_im[0] = s16(in_val.im);
    end
  end

  // next input sample, changed away from the sampling edge
  int nsamp = 0;
  always @(negedge clk) if (rst_n && addr == 5'd31) begin
    nsamp++;
    if (nsamp >= 200 && nsamp < 296) begin
      in_val.re = 16'(s16(ref_rom[nsamp-200].re) >>> 1);
      in_val.im = 16'(-(s16(ref_rom[nsamp-200].im) >>> 1));
    end else begin
      in_val.re = 16'($urandom_range(0, 8000) - 4000);
      in_val.im = 16'($urandom_range(0, 8000) - 4000);
    end
  end

  initial begin
    for (int i = 0; i < 96; i++) begin win_re[i] = 0; win_im[i] = 0; end
    exp_q.push_back(0);                      // first output: empty window
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (400 * 32) @(posedge clk);
    checks++; if (n_bad_rate != 0) begin failures++; $display("rate errors %0d", n_bad_rate); end
    checks++; if (n_out < 390) begin failures++; $display("only %0d outputs", n_out); end
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
