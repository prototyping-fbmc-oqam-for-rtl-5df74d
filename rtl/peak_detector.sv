// Correlation peak detector with an adaptive threshold. A moving average of
// the last W correlation powers, multiplied by a constant gain 2^GAIN_SH,
// is the threshold. While the power is above it, the detector follows the
// rising correlation and reports the peak on the first sample whose power
// falls below its predecessor (so the strobe comes one sample after the
// peak). After a detection it ignores further crossings for HOLD samples.
// Window, gain, peak-following and hold-off are this design's choices; the
// moving average against power comparison follows the described detector.
module peak_detector #(
  parameter int W       = 256,
  parameter int GAIN_SH = 4,
  parameter int HOLD    = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_power,
  output logic        detect,            // one clock, one sample after the peak
  output logic [31:0] peak_power
);
  localparam int AW = $clog2(W);
  logic [31:0] hist [W];
  logic [AW-1:0] hp;
  logic [31+AW:0] sum;
  logic [31:0] prev;
  logic        armed;                    // above threshold, following the rise
  logic [$clog2(HOLD+1)-1:0] hold;
  logic [31+AW+GAIN_SH:0] thr, pw;

  always_comb begin
    thr = ((32+AW+GAIN_SH)'(sum) << GAIN_SH) >> AW;   // gain * average
    pw  = (32+AW+GAIN_SH)'(in_power);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hp <= '0; sum <= '0; prev <= '0; armed <= 1'b0; hold <= '0;
      detect <= 1'b0; peak_power <= '0;
      for (int i = 0; i < W; i++) hist[i] <= '0;
    end else begin
      detect <= 1'b0;
      if (in_valid) begin
        hist[hp] <= in_power;
        hp       <= hp + 1'b1;
        sum      <= sum - (32+AW)'(hist[hp]) + (32+AW)'(in_power);
        prev     <= in_power;
        if (hold != '0) begin
          hold  <= hold - 1'b1;
          armed <= 1'b0;
        end else if (armed && in_power < prev) begin
          detect     <= 1'b1;
          peak_power <= prev;
          armed      <= 1'b0;
          hold       <= ($clog2(HOLD+1))'(HOLD);
        end else if (pw > thr) begin
          armed <= 1'b1;
        end
      end
    end
  end
endmodule
