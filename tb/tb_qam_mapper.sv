// Exhaustive check of the LTE 4/16/64-QAM mapper: every bit pattern of every
// mode against the codebook levels computed in real arithmetic.
module tb_qam_mapper;
  import fbmc_pkg::*;
  int checks = 0, failures = 0;
  qam_e mode; logic [5:0] bits; cplx_t sym;
  qam_mapper dut (.mode, .bits, .sym);

  function automatic real lvl(input int md, input logic b0, input logic b2, input logic b4);
    real a;
    if (md == 2) a = 1.0 / $sqrt(2.0);
    else if (md == 4) a = (1.0 + 2.0 * b2) / $sqrt(10.0);
    else a = (4.0 - (1.0 - 2.0 * b2) * (2.0 - (1.0 - 2.0 * b4))) / $sqrt(42.0);
    return (b0 ? -a : a) * 8192.0;
  endfunction

  initial begin
    qam_e modes [3] = '{QAM4, QAM16, QAM64};
    for (int mi = 0; mi < 3; mi++)
      for (int v = 0; v < 64; v++) begin
        real er, ei, dr, di;
        logic signed [15:0] gr, gi;
        mode = modes[mi]; bits = 6'(v);
        #1;
        gr = sym.re; gi = sym.im;
        er = lvl(int'(mode), bits[0], bits[2], bits[4]);
        ei = lvl(int'(mode), bits[1], bits[3], bits[5]);
        dr = $itor(gr) - er; di = $itor(gi) - ei;
        checks++;
        if (dr > 1.0 || dr < -1.0 || di > 1.0 || di < -1.0) begin
          failures++;
          if (failures < 6) $display("FAIL mode %0d bits %b got %0d %0d exp %f %f", mode, bits, gr, gi, er, ei);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
