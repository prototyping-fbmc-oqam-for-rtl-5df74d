// Payload recovery. Takes the equalized resource grid stream, keeps only
// payload elements (drops the sync symbol, reference signals and edge
// zeros), converts each to soft bits and then hard bits, and compares them
// with the transmitter's payload ROM, read in the same order (the pointer
// restarts at every sync symbol). Soft bits, with 1.0 = UNIT:
//   4-QAM:  s0 = Re, s1 = Im
//   16-QAM: s0, s1 as above, s2 = 2/sqrt(10) - |s0|, s3 = 2/sqrt(10) - |s1|
//   64-QAM: s0, s1 as above, s2 = 4/sqrt(42) - |s0|, s3 = 4/sqrt(42) - |s1|,
//           s4 = 2/sqrt(42) - |s2|, s5 = 2/sqrt(42) - |s3|
// and a bit is 1 where its soft value is negative. The 64-QAM thresholds
// are those of the LTE 64-QAM codebook used by the mapper. Counters are
// cumulative since reset. Latency: 2 clocks from input to counter update.
module payload_sink
  import fbmc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  qam_e          mode,
  input  logic          in_valid,
  input  logic [KW-1:0] in_k,
  input  logic [LW-1:0] in_l,
  input  cplx_t         in_val,
  output logic [5:0]    hard_bits,
  output logic          hard_valid,
  output logic [31:0]   bit_count,
  output logic [31:0]   bit_errors,
  output logic [31:0]   symbol_count      // payload elements received
);
  logic [10:0] ptr;
  logic [5:0]  ref_bits;
  payload_rom #(.DEPTH(2048)) u_rom (.clk(clk), .addr(ptr), .rdata(ref_bits));

  function automatic logic signed [17:0] absv(input logic signed [17:0] v);
    return v < 0 ? -v : v;
  endfunction

  logic signed [17:0] s [6];
  logic [5:0] hb, mask;
  logic       is_data;
  always_comb begin
    is_data = re_kind(int'(in_k), int'(in_l)) == RE_DATA;
    s[0] = 18'(in_val.re);
    s[1] = 18'(in_val.im);
    s[2] = '0; s[3] = '0; s[4] = '0; s[5] = '0;
    unique case (mode)
      QAM4:  mask = 6'b000011;
      QAM16: begin
        mask = 6'b001111;
        s[2] = 18'sd5181 - absv(s[0]);            // 2/sqrt(10)
        s[3] = 18'sd5181 - absv(s[1]);
      end
      default: begin
        mask = 6'b111111;
        s[2] = 18'sd5056 - absv(s[0]);            // 4/sqrt(42)
        s[3] = 18'sd5056 - absv(s[1]);
        s[4] = 18'sd2528 - absv(s[2]);            // 2/sqrt(42)
        s[5] = 18'sd2528 - absv(s[3]);
      end
    endcase
    for (int i = 0; i < 6; i++) hb[i] = s[i] < 0;
    hb = hb & mask;
  end

  logic [5:0] mask_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0; hard_bits <= '0; hard_valid <= 1'b0; mask_q <= '0;
      bit_count <= '0; bit_errors <= '0; symbol_count <= '0;
    end else begin
      hard_valid <= in_valid && is_data;
      if (in_valid && in_l == '0) ptr <= '0;
      if (in_valid && is_data) begin
        hard_bits <= hb;
        mask_q    <= mask;
        ptr       <= ptr + 1'b1;
      end
      if (hard_valid) begin
        symbol_count <= symbol_count + 1;
        bit_count    <= bit_count + 32'($countones(mask_q));
        bit_errors   <= bit_errors + 32'($countones((hard_bits ^ ref_bits) & mask_q));
      end
    end
  end
endmodule
