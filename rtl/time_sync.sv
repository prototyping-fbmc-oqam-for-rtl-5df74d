// Time synchroniser. The base-rate input (one sample per in_valid, every 8
// clocks) runs through three one-sample delays; four correlation units take
// the current and the three delayed samples, each decimated by 4 (sampled
// once per 32-clock window), so together they evaluate the correlation at
// all four phases of the base rate. A free-running 5-bit counter drives all
// units and, through its two upper bits, a multiplexer that puts the four
// results out in time order, one every 8 clocks (3.84 MHz), to the peak
// detector. sync_strobe marks the base-rate sample one after the
// correlation peak; corr_power/corr_valid expose the correlation stream.
module time_sync
  import fbmc_pkg::*;
#(
  parameter string REF_FILE = "rtl/sync_ref96.hex",
  parameter int    PD_W     = 256,
  parameter int    PD_GAIN  = 4,
  parameter int    PD_HOLD  = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_val,
  output logic        corr_valid,
  output logic [31:0] corr_power,
  output logic        sync_strobe
);
  cplx_t d [4];
  logic [4:0] cnt;
  logic [31:0] pw [4];
  logic [31:0] held [4];
  logic [3:0]  pv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < 4; i++) begin d[i] <= '0; held[i] <= '0; end
    end else begin
      cnt <= cnt + 1'b1;
      if (in_valid) begin
        d[0] <= in_val;
        for (int i = 1; i < 4; i++) d[i] <= d[i-1];
      end
      if (pv[0]) for (int i = 0; i < 4; i++) held[i] <= pw[i];
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_cu
    correlation_unit #(.REF_FILE(REF_FILE)) u_cu (
      .clk(clk), .rst_n(rst_n), .addr(cnt), .in_val(d[i]),
      .power_valid(pv[i]), .power(pw[i]));
  end

  // results become available at cnt = 1; unit 3 (oldest phase) goes first
  logic [1:0] sel;
  logic [4:0] cm;
  assign cm  = cnt - 5'd2;
  assign sel = 2'd3 - cm[4:3];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      corr_valid <= 1'b0; corr_power <= '0;
    end else begin
      corr_valid <= cm[2:0] == 3'd0;
      corr_power <= held[sel];
    end
  end

  logic [31:0] unused_peak;
  peak_detector #(.W(PD_W), .GAIN_SH(PD_GAIN), .HOLD(PD_HOLD)) u_pd (
    .clk(clk), .rst_n(rst_n), .in_valid(corr_valid), .in_power(corr_power),
    .detect(sync_strobe), .peak_power(unused_peak));
endmodule
