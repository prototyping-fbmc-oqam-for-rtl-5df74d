// Checks every word of the payload ROM against an LFSR sequence generated
// in the testbench, and the one-cycle read latency.
module tb_payload_rom;
  logic clk = 1'b0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic [10:0] addr;
  logic [5:0]  rdata;
  logic [5:0]  expw [2048];

  payload_rom #(.DEPTH(2048)) dut (.clk, .addr, .rdata);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] s;
    int ones;
    s = 16'hACE1;
    for (int i = 0; i < 2048; i++)
      for (int b = 0; b < 6; b++) begin
        expw[i][b] = s[0];
        s = {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
      end
    ones = 0;
    for (int i = 0; i < 2048; i++) begin
      addr <= 11'(i);
      @(negedge clk);
      checks++;
      if (rdata !== expw[i]) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d got %h exp %h", i, rdata, expw[i]);
      end
      ones += $countones(rdata);
    end
    // the data should look random: roughly half ones
    checks++;
    if (ones < 5500 || ones > 6800) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
