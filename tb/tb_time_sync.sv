// Self-checking testbench for time_sync.
//
// Base-rate samples arrive one every 8 clocks: low-level random noise
// (+-300) with, from sample N0 = 2003 on, the conjugated 96-value reference
// placed on every 4th sample (the pattern one of the four polyphase
// correlation units is matched to), the samples in between staying noise.
// Checked: corr_valid exactly once per input sample period (8 clocks); after
// the detector's averaging window has filled, sync strobes only inside a
// pattern, up to 8 samples after its end; the last strobe of the second
// pattern, one frame (4096 samples) later, exactly one frame after that of
// the first. The reference
// has side lobes and the detector reports the first local maximum above
// threshold, so a pattern may give more than one strobe (hold-off 256
// samples); the exact sample of the strobe is not checked here.
module tb_time_sync;
  import fbmc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, corr_valid, sync_strobe;
  cplx_t       in_val = '0;
  logic [31:0] corr_power;

  time_sync dut (.*);

  int checks = 0, failures = 0;
  cplx_t ref_rom [96];
  initial $readmemh("rtl/sync_ref96.hex", ref_rom);
  function automatic int s16(input logic [15:0] v); return int'($signed(v)); endfunction

  localparam int N0 = 2003, NSAMP = 7000, FRAME = 4096;
  int samp = -1, cyc = 0, last_cv = -1, n_cv_bad = 0, n_cv = 0;
  int strobes [$];

  always @(posedge clk) begin
    cyc++;
    if (rst_n && corr_valid) begin
      n_cv++;
      if (last_cv >= 0 && cyc - last_cv != OSR) n_cv_bad++;
      last_cv = cyc;
    end
    if (rst_n && sync_strobe) strobes.push_back(samp);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NSAMP; n++) begin
      int r, i, o;
      r = $urandom_range(0, 600) - 300; i = $urandom_range(0, 600) - 300;
      o = n - N0;
      if (o >= FRAME) o -= FRAME;
      if (o >= 0 && o < 4 * 96 && o % 4 == 0) begin
        r = s16(ref_rom[o/4][31:16]) / 2;
        i = -s16(ref_rom[o/4][15:0]) / 2;
      end
      @(negedge clk) begin in_valid = 1'b1; in_val.re = 16'(r); in_val.im = 16'(i); samp = n; end
      @(negedge clk) in_valid = 1'b0;
      repeat (6) @(negedge clk);
    end
    while (strobes.size() != 0 && strobes[0] < 1000) void'(strobes.pop_front());
    $display("strobes after warm-up: %p", strobes);
    checks++; if (n_cv_bad != 0 || n_cv < NSAMP - 10) begin
      failures++; $display("corr_valid rate errors %0d, count %0d", n_cv_bad, n_cv); end
    // every strobe must fall inside a pattern (up to 8 samples after its
    // end), and the second pattern must give the same strobes one frame later
    checks++;
    if (strobes.size() == 0 || strobes.size() % 2 != 0) begin
      failures++; $display("strobe count %0d", strobes.size());
    end else begin
      for (int j = 0; j < strobes.size(); j++) begin
        int o;
        o = strobes[j] - N0 - (j >= strobes.size() / 2 ? FRAME : 0);
        checks++;
        if (o < 0 || o > 4 * 95 + 8) begin failures++; $display("strobe at %0d", strobes[j]); end
      end
      checks++;
      if (strobes[strobes.size() - 1] - strobes[strobes.size() / 2 - 1] != FRAME) begin
        failures++; $display("last strobe of the patterns not one frame apart");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NSAMP * 8 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
