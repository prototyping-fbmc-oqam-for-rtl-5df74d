// End-to-end testbench for fbmc_top at its default parameters.
//
// The transmit baseband output is looped straight back into the receive
// input (an ideal channel, no up/down conversion), so the whole chain runs:
// payload ROM -> QAM mapper -> resource grid -> RS precoder -> OQAM mapper ->
// two IFFTs -> synthesis filter bank -> time synchronisation -> analysis
// filter bank -> two FFTs -> OQAM demapper -> channel equaliser -> payload sink.
//
// Each mechanism of the design is counted and must happen at least once:
// frame starts, RS precoding, correlation outputs, sync detections, channel
// estimate updates, equalised elements and received payload symbols.  From
// the third frame on, the sync strobe must repeat with the frame period (16
// symbols of 256 base-rate samples = 4096 samples; the first detections may
// still fall inside the filter start-up), and the transmit FIFO must never
// overflow.  The
// transmitter must deliver exactly one sample every 8 clocks once running
// (the 30.72 MHz clock against the 3.84 MHz base-rate sample stream).
// The payload is 16-QAM. Bits are compared with the transmitted payload by
// the payload sink; every frame that starts after the receiver has locked
// (from the fourth transmitted frame on) must be received without a single
// bit error, and it must carry the expected number of payload bits.
// The end-to-end latency, from the generation of element (k=0, l=0) of a
// frame to the same element leaving the equaliser, must be the same in every
// frame and equal LATENCY (29243 clocks in this design; the published
// prototype reports 32100 clocks, its pre-coder buffering one more symbol).
`timescale 1ns/1ps
module tb_fbmc_top;
  import fbmc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #16.276 clk = ~clk;

  logic        tx_valid, tx_frame_start, rs_precoded, sync_strobe, corr_valid;
  logic        est_update, eq_valid, tx_overflow;
  cplx_t       tx_sample, eq_val;
  logic [31:0] corr_power, bit_count, bit_errors, payload_symbols;
  logic [KW-1:0] eq_k;
  logic [LW-1:0] eq_l;

  fbmc_top dut (
    .clk, .rst_n, .mode(QAM16),
    .tx_valid, .tx_sample,
    .rx_valid(tx_valid), .rx_sample(tx_sample),
    .tx_frame_start, .rs_precoded, .sync_strobe, .corr_valid, .corr_power,
    .est_update, .eq_valid, .eq_k, .eq_l, .eq_val,
    .bit_count, .bit_errors, .payload_symbols, .tx_overflow);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int FRAME = NSYM * M;    // base-rate samples per frame
  localparam int CYCLES = 60000 * OSR;
  // end-to-end latency of this implementation in clocks (see README)
  localparam int LATENCY = 29243;
  // 15 payload symbols of 144 sub-carriers minus edge zeros and reference
  // signals, 4 bits each in 16-QAM
  localparam int BITS_PER_FRAME = 4 * ((NSYM - 1) * (NSC - 7) - 4 * 18);

  int n_frame = 0, n_rs = 0, n_corr = 0, n_sync = 0, n_est = 0, n_eq = 0;
  int n_ovf = 0, n_gap_bad = 0;
  int tx_idx = 0, last_sync = -1, n_period_ok = 0, n_period_bad = 0;
  int last_tx_cyc = -1, cyc = 0;
  int fr_bits = 0, fr_err = 0, n_fr_clean = 0, n_fr_dirty = 0;
  int fs_cyc [$];
  int lat_first = -1, lat_bad = 0, n_lat = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // end-to-end latency: grid element (k=0, l=0) generated until the same
    // element of the same frame leaves the equaliser
    if (tx_frame_start) fs_cyc.push_back(cyc);
    if (eq_valid && eq_k == '0 && eq_l == '0 && n_sync >= 4 && fs_cyc.size() != 0) begin
      int lat;
      // the chain delay lies between half a frame and one frame: take the
      // latest frame start at least half a frame back
      lat = -1;
      foreach (fs_cyc[j]) if (cyc - fs_cyc[j] >= FRAME * OSR / 2) lat = cyc - fs_cyc[j];
      if (lat_first < 0) lat_first = lat;
      else if (lat != lat_first) lat_bad++;
      n_lat++;
    end
    if (tx_frame_start) begin
      // bits and errors received during the last frame period
      if (n_frame >= 4) begin
        if (bit_errors == fr_err && bit_count - fr_bits == 32'(BITS_PER_FRAME)) n_fr_clean++;
        else begin
          n_fr_dirty++;
          $display("frame %0d: %0d bits, %0d errors", n_frame, bit_count - fr_bits,
                   bit_errors - fr_err);
        end
      end
      fr_bits = bit_count; fr_err = bit_errors;
      n_frame++;
    end
    if (rs_precoded)    n_rs++;
    if (corr_valid)     n_corr++;
    if (est_update)     n_est++;
    if (eq_valid)       n_eq++;
    if (tx_overflow)    n_ovf++;
    if (sync_strobe) begin
      n_sync++;
      if (last_sync >= 0 && last_sync >= 2 * FRAME) begin
        if (tx_idx - last_sync == FRAME) n_period_ok++;
        else begin n_period_bad++; $display("sync period %0d at sample %0d", tx_idx - last_sync, tx_idx); end
      end
      last_sync = tx_idx;
    end
    if (tx_valid) begin
      if (last_tx_cyc >= 0 && cyc - last_tx_cyc != OSR) n_gap_bad++;
      last_tx_cyc = cyc;
      tx_idx++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (CYCLES) @(posedge clk);
    $display("frames=%0d rs=%0d corr=%0d sync=%0d est=%0d eq=%0d payload=%0d bits=%0d errors=%0d",
             n_frame, n_rs, n_corr, n_sync, n_est, n_eq, payload_symbols, bit_count, bit_errors);
    $display("end-to-end latency %0d clocks (%0d measurements)", lat_first, n_lat);
    check(n_frame >= 10, "frame starts");
    check(n_lat >= 5 && lat_bad == 0 && lat_first == LATENCY, "constant end-to-end latency");
    check(n_rs > 0, "RS precoding happened");
    check(n_corr > 0, "correlation outputs");
    check(n_sync >= 8, "sync detections");
    check(n_period_ok >= 7 && n_period_bad == 0, "sync repeats every frame");
    check(n_est > 0, "channel estimate updates");
    check(n_eq > 0, "equalised elements");
    check(payload_symbols > 0, "payload symbols received");
    check(bit_count > 0, "payload bits compared");
    check(n_fr_clean >= 8 && n_fr_dirty == 0, "error-free frames after lock");
    check(n_ovf == 0, "no transmit FIFO overflow");
    check(tx_idx > 0 && n_gap_bad == 0, "one transmit sample every OSR clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (CYCLES + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
