// Bit-to-symbol mapper with the LTE codebooks for 4-, 16- and 64-QAM.
// bits[0] is the first bit of the group: even bits choose the in-phase
// value and odd bits the quadrature value. 4-QAM: +-1/sqrt(2); 16-QAM:
// (1-2b0)(1+2b2)/sqrt(10); 64-QAM: (1-2b0)(4-(1-2b2)(2-(1-2b4)))/sqrt(42),
// and likewise for the quadrature part with b1, b3, b5. Outputs are scaled
// so that 1.0 = UNIT (8192). Purely combinational.
module qam_mapper
  import fbmc_pkg::*;
(
  input  qam_e       mode,
  input  logic [5:0] bits,
  output cplx_t      sym
);
  function automatic logic signed [DW-1:0] level(input qam_e md, input logic b0,
                                                 input logic b2, input logic b4);
    logic signed [DW-1:0] mag;
    unique case (md)
      QAM4:    mag = 16'sd5793;                          // UNIT/sqrt(2)
      QAM16:   mag = b2 ? 16'sd7772 : 16'sd2591;         // 3, 1 x UNIT/sqrt(10)
      default: unique case ({b2, b4})                    // UNIT/sqrt(42) x
                 2'b00:   mag = 16'sd3792;               // 3
                 2'b01:   mag = 16'sd1264;               // 1
                 2'b10:   mag = 16'sd6320;               // 5
                 default: mag = 16'sd8848;               // 7
               endcase
    endcase
    return b0 ? -mag : mag;
  endfunction

  always_comb begin
    sym.re = level(mode, bits[0], bits[2], bits[4]);
    sym.im = level(mode, bits[1], bits[3], bits[5]);
  end
endmodule
