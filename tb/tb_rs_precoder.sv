// Self-checking testbench for rs_precoder.
//
// Eight symbols of 144 elements are streamed in sub-carrier order, one
// element every 8 clocks, with the element kinds of the frame layout
// (sync symbol, edge zeros, reference signals 1.0 at k = 3 mod 8 in symbols
// l = 1 mod 4, random 16-QAM payload), followed by zeros to flush the chain.
// The expected output is computed here from the coefficient table: every
// element leaves 4*144+3 elements after it entered; a reference signal at
// (k, l) leaves as
//   1.0 - floor( sum over dl = -2..2, dk = -1..1 of
//                (nu_re[dl,dk]*Re{a} + nu_im[dl,dk]*Im{a}) / 2^15 )
// with a the element at (k+dk, l+dl), and every other element unchanged.
// Also checked: one pilot_done pulse per reference signal.
module tb_rs_precoder;
  import fbmc_pkg::*;

  localparam int NS    = 8;
  localparam int DELAY = 4 * NSC + 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0, out_valid, pilot_done;
  logic [KW-1:0] in_k = '0, out_k;
  logic [LW-1:0] in_l = '0, out_l;
  re_kind_e      in_kind = RE_ZERO, out_kind;
  cplx_t         in_val = '0, out_val;

  rs_precoder dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] coef [15];
  initial $readmemh("rtl/precoder_coef.hex", coef);
  function automatic longint s16(input logic [15:0] v); return longint'($signed(v)); endfunction

  // stream of input elements; index n = l*NSC + k
  localparam int NTOT = NS * NSC + DELAY + 8;
  int g_re [NTOT], g_im [NTOT], g_kind [NTOT];
  int n_in = 0, n_out = 0, n_pd = 0, n_pil = 0;

  always @(posedge clk) begin
    if (pilot_done) n_pd++;
    if (out_valid) begin
      int src;
      longint er, ei;
      src = n_out - DELAY;
      er = 0; ei = 0;
      if (src >= 0) begin
        er = g_re[src]; ei = g_im[src];
        if (g_kind[src] == RE_PILOT) begin
          longint ar, ai;
          ar = 0; ai = 0;
          n_pil++;
          for (int i = 0; i < 15; i++) begin
            int dl, dk, nb;
            dl = i / 3 - 2; dk = i % 3 - 1; nb = src + dl * NSC + dk;
            if (i == 7) continue;
            ar += s16(coef[i][63:48]) * g_re[nb] + s16(coef[i][31:16]) * g_im[nb];
            ai += s16(coef[i][47:32]) * g_re[nb] + s16(coef[i][15:0]) * g_im[nb];
          end
          er = g_re[src] - (ar >>> 15);
          ei = g_im[src] - (ai >>> 15);
        end
      end
      if (src >= 0) begin
        checks++;
        if (s16(out_val[31:16]) != er || s16(out_val[15:0]) != ei ||
            int'(out_kind) != g_kind[src]) begin
          failures++;
          if (failures < 6) $display("element %0d: got (%0d,%0d) expected (%0d,%0d)", src,
                                     s16(out_val[31:16]), s16(out_val[15:0]), er, ei);
        end
      end
      n_out++;
    end
  end

  initial begin
    for (int n = 0; n < NTOT; n++) begin
      int k, l;
      k = n % NSC; l = n / NSC;
      g_re[n] = 0; g_im[n] = 0; g_kind[n] = RE_ZERO;
      if (l < NS) begin
        g_kind[n] = re_kind(k, l % NSYM);
        case (g_kind[n])
          RE_PILOT: g_re[n] = UNIT;
          RE_DATA, RE_SYNC: begin
            g_re[n] = ($urandom & 1) ? 2591 : -7772;
            g_im[n] = ($urandom & 1) ? -2591 : 7772;
          end
          default: ;
        endcase
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NTOT; n++) begin
      @(negedge clk);
      in_valid = 1'b1; in_k = KW'(n % NSC); in_l = LW'((n / NSC) % NSYM);
      in_kind = re_kind_e'(g_kind[n]);
      in_val.re = 16'(g_re[n]); in_val.im = 16'(g_im[n]);
      @(negedge clk) in_valid = 1'b0;
      repeat (6) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++; if (n_pil != 2 * 18 || n_pd != 2 * 18) begin
      failures++; $display("pilots out %0d, pilot_done %0d", n_pil, n_pd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NTOT * 8 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
