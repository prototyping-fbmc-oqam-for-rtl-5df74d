// Self-checking testbench for payload_sink.
//
// Two frames of 16 symbols x 144 sub-carriers are fed, one element per
// clock, in 64-QAM and then in 16-QAM (the sink restarts its reference
// pointer at every symbol 0). Payload elements carry the QAM symbol of the
// next payload ROM word plus noise of up to +-500 (below half the 64-QAM
// level spacing of 1264); reference signals, the sync symbol and edge
// carriers carry unrelated values and must be skipped. In the second frame
// the in-phase sign of 10 elements is inverted, which must give exactly 10
// bit errors. Checked: symbol, bit and error counters and the hard decisions.
module tb_payload_sink;
  import fbmc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  qam_e          mode = QAM64;
  logic          in_valid = 1'b0, hard_valid;
  logic [KW-1:0] in_k = '0;
  logic [LW-1:0] in_l = '0;
  cplx_t         in_val = '0;
  logic [5:0]    hard_bits;
  logic [31:0]   bit_count, bit_errors, symbol_count;

  payload_sink dut (.*);

  // reference payload words and symbols
  logic [10:0] ra = '0;
  logic [5:0]  rbits, wbits;
  logic [5:0]  rom_copy [2048];
  cplx_t       rsym;
  payload_rom u_ref (.clk(clk), .addr(ra), .rdata(rbits));
  qam_mapper  u_map (.mode(mode), .bits(wbits), .sym(rsym));

  int checks = 0, failures = 0;
  logic [5:0] exp_bits [$];
  int n_hard = 0;

  always @(posedge clk) if (rst_n && hard_valid) begin
    logic [5:0] e, msk;
    e = exp_bits.pop_front();
    msk = (mode == QAM64) ? 6'h3F : 6'h0F;
    checks++;
    if ((hard_bits & msk) != (e & msk)) begin
      failures++;
      if (failures < 6) $display("hard bits %b expected %b", hard_bits, e);
    end
    n_hard++;
  end

  task automatic run_frame(input qam_e md, input int n_flip);
    int flipped = 0, p = 0;
    mode = md;
    for (int l = 0; l < NSYM; l++)
      for (int k = 0; k < NSC; k++) begin
        @(negedge clk);
        in_valid = 1'b1; in_k = KW'(k); in_l = LW'(l);
        if (re_kind(k, l) == RE_DATA) begin
          logic [5:0] b;
          wbits = rom_copy[p]; p++;
          #1;
          b = wbits;
          in_val.re = 16'(int'(rsym.re) + $urandom_range(0, 1000) - 500);
          in_val.im = 16'(int'(rsym.im) + $urandom_range(0, 1000) - 500);
          if (flipped < n_flip && k == 50) begin
            in_val.re = -in_val.re; b[0] = ~b[0]; flipped++;
          end
          exp_bits.push_back(b);
        end else begin
          in_val.re = 16'($urandom); in_val.im = 16'($urandom);
        end
      end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  localparam int NDATA = (NSYM - 1) * (NSC - 7) - 4 * 18;   // payload elements per frame

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // copy of the payload, read through the ROM's synchronous port
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk) ra = 11'(a);
      @(negedge clk) rom_copy[a] = rbits;
    end
    run_frame(QAM64, 0);
    checks++; if (symbol_count != NDATA || bit_count != 6 * NDATA || bit_errors != 0) begin
      failures++; $display("frame 1: %0d %0d %0d", symbol_count, bit_count, bit_errors); end
    run_frame(QAM16, 10);
    checks++; if (symbol_count != 2 * NDATA || bit_count != 10 * NDATA || bit_errors != 10) begin
      failures++; $display("frame 2: %0d %0d %0d", symbol_count, bit_count, bit_errors); end
    checks++; if (n_hard != 2 * NDATA) begin failures++; $display("hard_valid %0d", n_hard); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
