// Reference signal pre-coder. The resource grid streams through a chain of
// shift registers four symbols and three elements long (it advances only on
// in_valid). When a reference signal reaches the centre of the chain, its 15
// neighbours (sub-carriers k-1..k+1, symbols l-2..l+2) are copied into hold
// registers and a 4-bit counter walks them for 15 cycles: one complex
// element and one coefficient pair from a 15-entry LUT per cycle, with four
// real multipliers, computing nu_re*Re{a} + nu_im*Im{a}. The pre-coded value
// (reference value minus the accumulated interference) is pushed into a FIFO
// and replaces the reference signal when it leaves the chain. All other
// elements leave unchanged. Latency: 4*144+3 input elements. Coefficients
// are Q15 and model the intrinsic interference of this transceiver's own
// modulator and demodulator (file precoder_coef.hex, entry (dl+2)*3+(dk+1),
// each {nu_re.re, nu_re.im, nu_im.re, nu_im.im}; they were obtained by
// sending single elements through a floating-point model of the chain and
// dividing the response at the reference position by the direct gain).
// Elements must arrive at least 16 clocks apart whenever reference signals
// are closer than 16 elements apart; the transmitter feeds one element
// every 8 clocks and reference signals are 8 elements apart.
module rs_precoder
  import fbmc_pkg::*;
#(
  parameter string COEF_FILE = "rtl/precoder_coef.hex",
  parameter int    FIFO_D    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [KW-1:0] in_k,
  input  logic [LW-1:0] in_l,
  input  re_kind_e      in_kind,
  input  cplx_t         in_val,
  output logic          out_valid,
  output logic [KW-1:0] out_k,
  output logic [LW-1:0] out_l,
  output re_kind_e      out_kind,
  output cplx_t         out_val,
  output logic          pilot_done      // one pulse per pre-coded reference signal
);
  localparam int NTAP  = 15;
  localparam int CTR   = 2*NSC + 1;         // centre position in the chain
  localparam int DEPTH = 4*NSC + 3;

  typedef struct packed {
    logic [KW-1:0] k;
    logic [LW-1:0] l;
    re_kind_e      kind;
    cplx_t         v;
  } elem_t;

  elem_t line [DEPTH];
  logic [63:0] lut [NTAP];
  initial $readmemh(COEF_FILE, lut);

  // neighbour (dk, dl) of the centre sits at CTR - dl*NSC - dk
  function automatic int tap_pos(input int i);
    return CTR - ((i / 3) - 2) * NSC - ((i % 3) - 1);
  endfunction

  logic        shifted;
  cplx_t       hold [NTAP];
  cplx_t       pilot_v;
  logic        busy;
  logic [3:0]  cnt;
  logic signed [39:0] acc_re, acc_im;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) line[i] <= '{k: '0, l: '0, kind: RE_ZERO, v: '0};
    end else if (in_valid) begin
      line[0] <= '{k: in_k, l: in_l, kind: in_kind, v: in_val};
      for (int i = 1; i < DEPTH; i++) line[i] <= line[i-1];
    end
  end

  // MAC datapath
  logic signed [15:0] nrr, nri, nir, nii;
  logic signed [32:0] p_re, p_im;
  cplx_t              a_sel;
  always_comb begin
    a_sel = hold[cnt];
    {nrr, nri, nir, nii} = lut[cnt];
    p_re = 33'(nrr * a_sel.re) + 33'(nir * a_sel.im);
    p_im = 33'(nri * a_sel.re) + 33'(nii * a_sel.im);
  end

  // FIFO of pre-coded reference values
  cplx_t fifo [FIFO_D];
  logic [$clog2(FIFO_D):0] wp, rp;
  logic push, pop;
  cplx_t push_v;
  logic signed [39:0] fin_re, fin_im;
  always_comb begin
    fin_re = (acc_re + 40'(p_re)) >>> 15;
    fin_im = (acc_im + 40'(p_im)) >>> 15;
    push_v.re = sat16(33'(pilot_v.re) - 33'(fin_re));
    push_v.im = sat16(33'(pilot_v.im) - 33'(fin_im));
    push = busy && cnt == 4'(NTAP-1);
    pop  = in_valid && line[DEPTH-1].kind == RE_PILOT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shifted <= 1'b0; busy <= 1'b0; cnt <= '0; acc_re <= '0; acc_im <= '0;
      wp <= '0; rp <= '0; pilot_done <= 1'b0; pilot_v <= '0;
    end else begin
      shifted    <= in_valid;
      pilot_done <= push;
      if (shifted && line[CTR].kind == RE_PILOT) begin
        for (int i = 0; i < NTAP; i++) hold[i] <= line[tap_pos(i)].v;
        pilot_v <= line[CTR].v;
        busy    <= 1'b1;
        cnt     <= '0;
        acc_re  <= '0;
        acc_im  <= '0;
      end else if (busy) begin
        acc_re <= acc_re + 40'(p_re);
        acc_im <= acc_im + 40'(p_im);
        cnt    <= cnt + 1'b1;
        if (push) busy <= 1'b0;
      end
      if (push) begin
        fifo[wp[$clog2(FIFO_D)-1:0]] <= push_v;
        wp <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_k <= '0; out_l <= '0; out_kind <= RE_ZERO; out_val <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_k    <= line[DEPTH-1].k;
        out_l    <= line[DEPTH-1].l;
        out_kind <= line[DEPTH-1].kind;
        out_val  <= pop ? fifo[rp[$clog2(FIFO_D)-1:0]] : line[DEPTH-1].v;
      end
    end
  end

  // a reference signal must never leave the chain before its value is ready
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> (wp != rp));
endmodule
