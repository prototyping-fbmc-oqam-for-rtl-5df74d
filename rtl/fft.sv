// Radix-2 decimation-in-time (I)FFT, N = 256 by default, one butterfly per
// clock. Samples are written in natural order (in_first marks sample 0) into
// one of two banks at bit-reversed addresses; when a bank is full, the
// engine runs log2(N) stages of N/2 butterflies in place on it (with the
// other bank free to load the next symbol), then streams the N results in
// natural order, one per clock. Internal width is IW bits with no scaling
// inside the stages; the outputs are arithmetically shifted right by
// OUT_SHIFT and saturated to 16 bits. INVERSE selects the conjugate twiddles
// (an IFFT up to the scale factor). A TAG_W-bit tag given with the first
// input comes out with the results. Twiddles W^i = exp(-j*2*pi*i/N),
// i < N/2, Q15, are read from a table. Latency from the last input to the
// first output: N/2*log2(N) + 2 clocks. The document names this block only;
// its structure here is this design's choice.
module fft
  import fbmc_pkg::*;
#(
  parameter int    N         = 256,
  parameter bit    INVERSE   = 1'b0,
  parameter int    OUT_SHIFT = 0,
  parameter int    IW        = 26,
  parameter int    TAG_W     = 4,
  parameter string TW_FILE   = "rtl/twiddle_256.hex"
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  cplx_t            in_val,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             out_first,
  output logic [$clog2(N)-1:0] out_idx,
  output cplx_t            out_val,
  output logic [TAG_W-1:0] out_tag,
  output logic             busy
);
  localparam int LG = $clog2(N);
  typedef enum logic [1:0] {E_IDLE, E_COMP, E_OUT} eng_e;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } wide_t;

  wide_t mem [2][N];
  cplx_t tw [N/2];
  initial $readmemh(TW_FILE, tw);

  function automatic logic [LG-1:0] bitrev(input logic [LG-1:0] a);
    for (int i = 0; i < LG; i++) bitrev[i] = a[LG-1-i];
  endfunction

  // load side
  logic             lb;            // bank being loaded
  logic [LG-1:0]    lcnt;
  logic             loading;
  logic [TAG_W-1:0] ltag;
  // engine side
  eng_e             st;
  logic             eb;            // bank owned by the engine
  logic [LG-1:0]    bcnt;          // butterfly / output counter (top bit unused in COMP)
  logic [$clog2(LG+1)-1:0] stage;
  logic [TAG_W-1:0] etag;

  logic load_done;
  assign load_done = in_valid && (loading || in_first) && (in_first ? 1'b0 : lcnt == LG'(N-1));

  // butterfly addressing
  logic [LG-1:0] i0, i1, half, posm;
  logic [LG-2:0] j, twi;
  always_comb begin
    j    = bcnt[LG-2:0];
    half = LG'(1) << stage;
    posm = LG'(j) & (half - 1'b1);
    i0   = ((LG'(j) >> stage) << (stage + 1)) | posm;
    i1   = i0 | half;
    twi  = (LG-1)'(posm << (LG - 1 - stage));
  end

  wide_t a, b, t, w;
  logic signed [IW+16:0] pr, pi;
  always_comb begin
    a = mem[eb][i0];
    b = mem[eb][i1];
    w.re = IW'(tw[twi].re);
    w.im = INVERSE ? -IW'(tw[twi].im) : IW'(tw[twi].im);
    pr = (IW+17)'(b.re * w.re) - (IW+17)'(b.im * w.im);
    pi = (IW+17)'(b.re * w.im) + (IW+17)'(b.im * w.re);
    t.re = IW'((pr + (IW+17)'(16384)) >>> 15);
    t.im = IW'((pi + (IW+17)'(16384)) >>> 15);
  end

  function automatic logic signed [DW-1:0] sat_out(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] s;
    s = v >>> OUT_SHIFT;
    if (s > 32767) return 16'sd32767;
    if (s < -32768) return -16'sd32768;
    return s[DW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lb <= 1'b0; lcnt <= '0; loading <= 1'b0; ltag <= '0;
      st <= E_IDLE; eb <= 1'b0; bcnt <= '0; stage <= '0; etag <= '0;
      out_valid <= 1'b0; out_first <= 1'b0; out_idx <= '0; out_val <= '0; out_tag <= '0;
    end else begin
      // ---- load ----
      if (in_valid) begin
        if (in_first) begin
          mem[lb][bitrev('0)] <= '{re: IW'(in_val.re), im: IW'(in_val.im)};
          lcnt    <= LG'(1);
          loading <= 1'b1;
          ltag    <= in_tag;
        end else if (loading) begin
          mem[lb][bitrev(lcnt)] <= '{re: IW'(in_val.re), im: IW'(in_val.im)};
          lcnt <= lcnt + 1'b1;
          if (lcnt == LG'(N-1)) begin
            loading <= 1'b0;
            lb      <= ~lb;
          end
        end
      end
      // ---- engine ----
      out_valid <= 1'b0;
      out_first <= 1'b0;
      unique case (st)
        E_IDLE: if (load_done) begin
          st <= E_COMP; eb <= lb; bcnt <= '0; stage <= '0; etag <= ltag;
        end
        E_COMP: begin
          mem[eb][i0] <= '{re: a.re + t.re, im: a.im + t.im};
          mem[eb][i1] <= '{re: a.re - t.re, im: a.im - t.im};
          if (j == (LG-1)'(N/2-1)) begin
            bcnt <= '0;
            if (stage == ($clog2(LG+1))'(LG-1)) st <= E_OUT;
            else stage <= stage + 1'b1;
          end else begin
            bcnt <= bcnt + 1'b1;
          end
        end
        default: begin  // E_OUT
          out_valid   <= 1'b1;
          out_first   <= bcnt == '0;
          out_idx     <= bcnt;
          out_val.re  <= sat_out(mem[eb][bcnt].re);
          out_val.im  <= sat_out(mem[eb][bcnt].im);
          out_tag     <= etag;
          bcnt        <= bcnt + 1'b1;
          if (bcnt == LG'(N-1)) st <= E_IDLE;
        end
      endcase
    end
  end

  assign busy = st != E_IDLE;

  // a full bank must find the engine idle
  assert property (@(posedge clk) disable iff (!rst_n) load_done |-> st == E_IDLE);
endmodule
