// Self-checking testbench for resource_grid_gen.
//
// sym_start is pulsed every 1300 clocks for 18 symbols (one frame and two
// symbols of the next) in 16-QAM. Each element is checked against rules
// written out here independently of the generator's package functions:
//   symbol 0: ZC value d[n]/4 on k = n + 41 (n = 0..61), on k = 40 - n
//             (n = 0..30) and on k = 165 - n (n = 31..61), zero elsewhere;
//   other symbols: zero for k < 3 and k > 139, 1.0 (8192) on k = 3 mod 8
//             in symbols l = 1 mod 4, payload otherwise, taken in order from
//             the payload ROM (restarting with each frame) and mapped with
//             the LTE 16-QAM levels.
// Also checked: 144 elements per symbol, 8 clocks apart, the first one valid
// 2 clocks after the edge that samples sym_start, k and l counting, and frame_start on k = 0 of l = 0.
module tb_resource_grid_gen;
  import fbmc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          sym_start = 1'b0, out_valid, frame_start;
  logic [KW-1:0] out_k;
  logic [LW-1:0] out_l;
  re_kind_e      out_kind;
  cplx_t         out_val;

  resource_grid_gen dut (.clk, .rst_n, .sym_start, .mode(QAM16), .out_valid, .out_k,
                         .out_l, .out_kind, .out_val, .frame_start);

  int checks = 0, failures = 0;
  cplx_t zc [62];
  initial $readmemh("rtl/zc_u25.hex", zc);
  logic [10:0] ra = '0;
  logic [5:0]  rbits, rom_copy [2048];
  payload_rom u_ref (.clk(clk), .addr(ra), .rdata(rbits));

  function automatic int s16(input logic [15:0] v); return int'($signed(v)); endfunction
  function automatic int lvl16(input logic b0, input logic b2);
    int m; m = b2 ? 7772 : 2591; return b0 ? -m : m;   // (1-2b0)(1+2b2)/sqrt(10)
  endfunction

  int cyc = 0, start_cyc = 0, last_cyc = 0, n_el = 0, exp_k = 0, exp_l = 0, ptr = 0;
  int n_gap_bad = 0, n_val_bad = 0, n_fs = 0, n_fs_bad = 0;
  bit ready = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (sym_start) start_cyc = cyc;
    if (frame_start) begin n_fs++; if (!(out_valid && out_k == 0 && out_l == 0)) n_fs_bad++; end
    if (out_valid && ready) begin
      int er, ei, n, kind;                      // kind: 0 zero 1 sync 2 pilot 3 data
      int k, l;
      k = int'(out_k); l = int'(out_l);
      if (k == 0 && cyc - start_cyc != 3) n_gap_bad++;   // seen at the 3rd edge
      if (k != 0 && cyc - last_cyc != OSR) n_gap_bad++;
      last_cyc = cyc;
      if (k != exp_k || l != exp_l) n_val_bad++;
      er = 0; ei = 0; kind = 0; n = -1;
      if (l == 0) begin
        if (k >= 41 && k <= 102) n = k - 41;
        else if (k >= 10 && k <= 40) n = 40 - k;
        else if (k >= 104 && k <= 134) n = 165 - k;
        if (n >= 0) begin kind = 1; er = s16(zc[n][31:16]) >>> 2; ei = s16(zc[n][15:0]) >>> 2; end
        ptr = 0;
      end else if (k >= 3 && k <= 139) begin
        if (l % 4 == 1 && k % 8 == 3) begin kind = 2; er = 8192; end
        else begin
          kind = 3;
          er = lvl16(rom_copy[ptr][0], rom_copy[ptr][2]);
          ei = lvl16(rom_copy[ptr][1], rom_copy[ptr][3]);
          ptr++;
        end
      end
      checks++;
      if (int'(out_kind) != kind || s16(out_val[31:16]) != er || s16(out_val[15:0]) != ei) begin
        failures++;
        if (failures < 6) $display("k=%0d l=%0d kind %0d/%0d val (%0d,%0d) exp (%0d,%0d)", k, l,
                                   out_kind, kind, s16(out_val[31:16]), s16(out_val[15:0]), er, ei);
      end
      n_el++;
      exp_k = (k == NSC - 1) ? 0 : k + 1;
      if (k == NSC - 1) exp_l = (l + 1) % NSYM;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk) ra = 11'(a);
      @(negedge clk) rom_copy[a] = rbits;
    end
    ready = 1'b1;
    for (int s = 0; s < NSYM + 2; s++) begin
      @(negedge clk) sym_start = 1'b1;
      @(negedge clk) sym_start = 1'b0;
      repeat (1300) @(negedge clk);
    end
    checks++; if (n_el != (NSYM + 2) * NSC) begin failures++; $display("elements %0d", n_el); end
    checks++; if (n_gap_bad != 0 || n_val_bad != 0) begin
      failures++; $display("timing %0d index %0d", n_gap_bad, n_val_bad); end
    checks++; if (n_fs != 2 || n_fs_bad != 0) begin failures++; $display("frame_start %0d", n_fs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
