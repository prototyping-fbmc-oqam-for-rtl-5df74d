// FBMC/OQAM baseband transceiver: transmitter and receiver side by side.
//
// Transmitter: a symbol timer starts one symbol every M*OSR = 2048 clocks.
// The resource grid generator emits the 144 elements of the symbol (sync
// Zadoff-Chu symbol, reference signals, QAM payload, edge zeros), the
// reference signal pre-coder cancels the intrinsic interference at the
// reference positions, the OQAM mapper places the elements in IFFT bins and
// splits them into real and imaginary branches, one IFFT per branch turns
// them into time samples and the transmit filter bank produces one complex
// baseband sample every 8 clocks on tx_valid/tx_sample.
//
// Receiver: baseband samples on rx_valid/rx_sample (at most one per 8
// clocks) feed the time synchroniser and the receive filter bank; the sync
// strobe aligns the filter bank to the frame. One FFT per branch, the OQAM
// de-mapper, the channel equalizer and the payload sink follow; the sink
// counts received payload bits and bit errors against the payload ROM.
//
// The digital up/down converters and the RF front end sit outside: tx_* is
// where the up-converter would connect and rx_* where the down-converter
// would. Connecting tx_* to rx_* gives the baseband loop-back.
//
// Timing: one element or sample per 8 clocks throughout (30.72 MHz clock,
// 3.84 MHz base rate); the latency from grid generation of element (0,0) to
// its equalised output is 29243 clocks. SYNC_POS, the frame position of the
// sample after a sync strobe, is this design's value for its own chain delay.
// The block split and rates follow the described prototype; the pre-coder
// depth, reference placement, sync reference and detector constants are this
// design's own. Some sub-block outputs (the pre-coder's element kind, the
// FFT bin index, tag and busy flags, the mapper's bin index) are not needed
// here; they drive local signals that are intentionally not read.
module fbmc_top
  import fbmc_pkg::*;
#(
  parameter int SYNC_POS = 2951   // frame position given to the sample after a sync strobe
) (
  input  logic        clk,
  input  logic        rst_n,
  input  qam_e        mode,
  // transmit baseband output (to the digital up-converter)
  output logic        tx_valid,
  output cplx_t       tx_sample,
  // receive baseband input (from the digital down-converter)
  input  logic        rx_valid,
  input  cplx_t       rx_sample,
  // status
  output logic        tx_frame_start,
  output logic        rs_precoded,
  output logic        sync_strobe,
  output logic        corr_valid,
  output logic [31:0] corr_power,
  output logic        est_update,
  output logic        eq_valid,
  output logic [KW-1:0] eq_k,
  output logic [LW-1:0] eq_l,
  output cplx_t       eq_val,
  output logic [31:0] bit_count,
  output logic [31:0] bit_errors,
  output logic [31:0] payload_symbols,
  output logic        tx_overflow
);
  // ---------------- transmitter ----------------
  logic [$clog2(M*OSR)-1:0] stimer;
  logic tx_ready, sym_start;
  always_ff @(posedge clk) begin
    if (!rst_n) stimer <= '0;
    else if (tx_ready) stimer <= stimer + 1'b1;
  end
  assign sym_start = tx_ready && stimer == '0;

  logic g_v; logic [KW-1:0] g_k; logic [LW-1:0] g_l; re_kind_e g_kind; cplx_t g_val;
  resource_grid_gen u_grid (
    .clk, .rst_n, .sym_start, .mode,
    .out_valid(g_v), .out_k(g_k), .out_l(g_l), .out_kind(g_kind), .out_val(g_val),
    .frame_start(tx_frame_start));

  logic p_v; logic [KW-1:0] p_k; logic [LW-1:0] p_l; re_kind_e p_kind; cplx_t p_val;
  rs_precoder u_prec (
    .clk, .rst_n, .in_valid(g_v), .in_k(g_k), .in_l(g_l), .in_kind(g_kind), .in_val(g_val),
    .out_valid(p_v), .out_k(p_k), .out_l(p_l), .out_kind(p_kind), .out_val(p_val),
    .pilot_done(rs_precoded));

  logic o_v, o_first; logic [7:0] o_m; logic [LW-1:0] o_l; cplx_t o_re, o_im;
  oqam_mapper u_map (
    .clk, .rst_n, .in_valid(p_v), .in_k(p_k), .in_l(p_l), .in_val(p_val),
    .out_valid(o_v), .out_first(o_first), .out_m(o_m), .out_l(o_l), .out_re(o_re), .out_im(o_im));

  logic it_v [2]; logic it_first [2]; cplx_t it_val [2];
  for (genvar b = 0; b < 2; b++) begin : g_ifft
    logic [7:0] idx; logic [LW-1:0] tag; logic bsy;
    fft #(.N(M), .INVERSE(1'b1), .OUT_SHIFT(5)) u_ifft (
      .clk, .rst_n, .in_valid(o_v), .in_first(o_first), .in_val(b == 0 ? o_re : o_im),
      .in_tag(o_l), .out_valid(it_v[b]), .out_first(it_first[b]), .out_idx(idx),
      .out_val(it_val[b]), .out_tag(tag), .busy(bsy));
  end

  tx_filter_bank u_txfb (
    .clk, .rst_n, .in_valid(it_v[0]), .in_first(it_first[0]), .in_re(it_val[0]), .in_im(it_val[1]),
    .out_valid(tx_valid), .out_val(tx_sample), .ready(tx_ready), .overflow(tx_overflow));

  // ---------------- receiver ----------------
  time_sync u_sync (
    .clk, .rst_n, .in_valid(rx_valid), .in_val(rx_sample),
    .corr_valid(corr_valid), .corr_power(corr_power), .sync_strobe(sync_strobe));

  logic r_v, r_first; logic [7:0] r_m; logic [LW-1:0] r_l; cplx_t r_re, r_im; logic rx_ready;
  rx_filter_bank #(.SYNC_POS(SYNC_POS)) u_rxfb (
    .clk, .rst_n, .sync(sync_strobe), .in_valid(rx_valid), .in_val(rx_sample),
    .out_valid(r_v), .out_first(r_first), .out_m(r_m), .out_l(r_l), .out_re(r_re), .out_im(r_im),
    .ready(rx_ready));

  logic f_v [2]; logic [7:0] f_idx [2]; cplx_t f_val [2]; logic [LW-1:0] f_tag [2];
  for (genvar b = 0; b < 2; b++) begin : g_fft
    logic first; logic bsy;
    fft #(.N(M), .INVERSE(1'b0), .OUT_SHIFT(3)) u_fft (
      .clk, .rst_n, .in_valid(r_v), .in_first(r_first), .in_val(b == 0 ? r_re : r_im),
      .in_tag(r_l), .out_valid(f_v[b]), .out_first(first), .out_idx(f_idx[b]),
      .out_val(f_val[b]), .out_tag(f_tag[b]), .busy(bsy));
  end

  logic d_v; logic [KW-1:0] d_k; logic [LW-1:0] d_l; cplx_t d_re, d_im;
  oqam_demapper u_demap (
    .clk, .rst_n, .in_valid(f_v[0]), .in_m(f_idx[0]), .in_l(f_tag[0]), .in_re(f_val[0]), .in_im(f_val[1]),
    .out_valid(d_v), .out_k(d_k), .out_l(d_l), .out_re(d_re), .out_im(d_im));

  channel_equalizer u_eq (
    .clk, .rst_n, .in_valid(d_v), .in_k(d_k), .in_l(d_l), .in_re(d_re), .in_im(d_im),
    .out_valid(eq_valid), .out_k(eq_k), .out_l(eq_l), .out_val(eq_val), .est_update(est_update));

  logic [5:0] hb; logic hv;
  payload_sink u_sink (
    .clk, .rst_n, .mode, .in_valid(eq_valid), .in_k(eq_k), .in_l(eq_l), .in_val(eq_val),
    .hard_bits(hb), .hard_valid(hv), .bit_count(bit_count), .bit_errors(bit_errors),
    .symbol_count(payload_symbols));
endmodule
