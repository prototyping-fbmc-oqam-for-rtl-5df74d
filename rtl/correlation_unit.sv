// Correlation unit of the time synchroniser. Holds the last 96 decimated
// input samples in an addressable shift register split into three segments
// of 32. A shared 5-bit counter (addr) selects, in each cycle, one sample of
// every segment and the matching coefficient of three 32-entry LUTs (the
// three thirds of the 96-sample reference, already conjugated); three complex
// multipliers and an adder feed a 32-cycle accumulator. At addr = 31 the
// window is complete: a new sample is shifted in, and on the next clock the
// squared magnitude of the correlation is presented on power with
// power_valid high. One correlation value per 32 clocks, i.e. at 960 kHz.
// Scaling: the complex sum is shifted right by 15 before squaring and the
// power is the upper 32 bits of a 48-bit square (this scaling is this
// design's choice).
module correlation_unit
  import fbmc_pkg::*;
#(
  parameter string REF_FILE = "rtl/sync_ref96.hex"
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  addr,
  input  cplx_t       in_val,         // sampled at addr == 31
  output logic        power_valid,
  output logic [31:0] power
);
  localparam int SEG = 32;
  cplx_t ref_rom [3*SEG];
  initial $readmemh(REF_FILE, ref_rom);

  cplx_t sr [3*SEG];                  // sr[0] newest
  logic signed [39:0] acc_re, acc_im;

  // reference index i = 32*j + addr multiplies sample sr[95 - i]
  logic signed [34:0] pr, pi;
  always_comb begin
    pr = '0; pi = '0;
    for (int j = 0; j < 3; j++) begin
      pr += 35'(sr[3*SEG-1-(SEG*j+int'(addr))].re * ref_rom[SEG*j+int'(addr)].re)
          - 35'(sr[3*SEG-1-(SEG*j+int'(addr))].im * ref_rom[SEG*j+int'(addr)].im);
      pi += 35'(sr[3*SEG-1-(SEG*j+int'(addr))].re * ref_rom[SEG*j+int'(addr)].im)
          + 35'(sr[3*SEG-1-(SEG*j+int'(addr))].im * ref_rom[SEG*j+int'(addr)].re);
    end
  end

  logic signed [39:0] tot_re, tot_im;
  logic signed [23:0] c_re, c_im;
  assign tot_re = acc_re + 40'(pr);
  assign tot_im = acc_im + 40'(pi);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_re <= '0; acc_im <= '0; c_re <= '0; c_im <= '0; power_valid <= 1'b0; power <= '0;
      for (int i = 0; i < 3*SEG; i++) sr[i] <= '0;
    end else begin
      power_valid <= 1'b0;
      if (addr == 5'd31) begin
        c_re   <= 24'(tot_re >>> 15);
        c_im   <= 24'(tot_im >>> 15);
        acc_re <= '0;
        acc_im <= '0;
        sr[0]  <= in_val;
        for (int i = 1; i < 3*SEG; i++) sr[i] <= sr[i-1];
      end else begin
        acc_re <= tot_re;
        acc_im <= tot_im;
      end
      if (addr == 5'd0) begin
        power_valid <= 1'b1;
        power       <= 32'((48'(c_re * c_re) + 48'(c_im * c_im)) >> 16);
      end
    end
  end
endmodule
