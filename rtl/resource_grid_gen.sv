// Transmit resource grid generator. On each sym_start pulse it emits the 144
// resource elements of the next symbol, one per clock in sub-carrier order
// k = 0..143, together with k, the symbol index l (0..15, wrapping per frame)
// and the element kind; elements are ELEM_GAP clocks apart (default 8, one
// per base-rate sample, which leaves the pre-coder time for its 15-cycle
// accumulation). Symbol 0 of each frame carries the Zadoff-Chu
// synchronisation sequence (root 25, 62 values) in the central sub-carriers
// and mirrored in the second Nyquist zone; the other symbols carry reference
// signals (value 1.0) every 8 sub-carriers and every 4 symbols, QAM payload
// taken in order from the payload ROM, and zeros on the 7 edge sub-carriers.
// The payload ROM pointer restarts at every frame, so each frame carries the
// same bits. Latency: the first element appears 2 cycles after sym_start.
module resource_grid_gen
  import fbmc_pkg::*;
#(
  parameter string ZC_FILE  = "rtl/zc_u25.hex",
  parameter int    ELEM_GAP = OSR          // clocks per resource element
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sym_start,
  input  qam_e           mode,
  output logic           out_valid,
  output logic [KW-1:0]  out_k,
  output logic [LW-1:0]  out_l,
  output re_kind_e       out_kind,
  output cplx_t          out_val,
  output logic           frame_start       // pulses with k=0 of symbol 0
);
  cplx_t zc_rom [62];
  initial $readmemh(ZC_FILE, zc_rom);

  logic          run;
  logic [KW-1:0] k;
  logic [LW-1:0] l;
  logic [10:0]   ptr;
  logic [$clog2(ELEM_GAP+1)-1:0] gcnt;
  logic          tick;
  assign tick = run && gcnt == '0;

  // stage 1 registers
  logic          s1_valid;
  logic [KW-1:0] s1_k;
  logic [LW-1:0] s1_l;
  re_kind_e      s1_kind;
  cplx_t         s1_zc;
  logic [5:0]    rom_bits;
  cplx_t         qam_sym;

  re_kind_e kind_c;
  int       zidx;
  always_comb begin
    kind_c = re_kind(int'(k), int'(l));
    zidx   = sync_index(int'(k));
    if (zidx < 0) zidx = 0;
  end

  payload_rom #(.DEPTH(2048)) u_rom (.clk(clk), .addr(ptr), .rdata(rom_bits));
  qam_mapper u_map (.mode(mode), .bits(rom_bits), .sym(qam_sym));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; k <= '0; l <= '0; ptr <= '0; s1_valid <= 1'b0; gcnt <= '0;
      s1_k <= '0; s1_l <= '0; s1_kind <= RE_ZERO; s1_zc <= '0;
    end else begin
      s1_valid <= tick;
      if (run) gcnt <= (gcnt == ($clog2(ELEM_GAP+1))'(ELEM_GAP-1)) ? '0 : gcnt + 1'b1;
      s1_k     <= k;
      s1_l     <= l;
      s1_kind  <= kind_c;
      s1_zc    <= zc_rom[zidx];
      if (sym_start && !run) begin
        run  <= 1'b1;
        k    <= '0;
        gcnt <= '0;
        if (l == '0) ptr <= '0;
      end else if (tick) begin
        if (kind_c == RE_DATA) ptr <= ptr + 1'b1;
        if (k == KW'(NSC-1)) begin
          run <= 1'b0;
          k   <= '0;
          l   <= (l == LW'(NSYM-1)) ? '0 : l + 1'b1;
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_k <= '0; out_l <= '0; out_kind <= RE_ZERO;
      out_val <= '0; frame_start <= 1'b0;
    end else begin
      out_valid   <= s1_valid;
      out_k       <= s1_k;
      out_l       <= s1_l;
      out_kind    <= s1_kind;
      frame_start <= s1_valid && s1_k == '0 && s1_l == '0;
      unique case (s1_kind)
        RE_SYNC:  begin out_val.re <= s1_zc.re >>> 2; out_val.im <= s1_zc.im >>> 2; end
        RE_PILOT: begin out_val.re <= DW'(UNIT);      out_val.im <= '0;             end
        RE_DATA:  out_val <= qam_sym;
        default:  out_val <= '0;
      endcase
    end
  end
endmodule
