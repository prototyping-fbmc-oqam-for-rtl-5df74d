// Self-checking testbench for peak_detector.
//
// Powers arrive one every 8 clocks: a noise floor of 100..200, and three
// pulses 1000, 5000, 9000, 7000, 2000 at samples 600, 700 and 1100. The
// threshold (16 x the average of the last 256 powers) is far below the
// pulses once the window has filled. Checked: exactly one detection per
// pulse that lies outside the 256-sample hold-off (the pulse at 700 falls
// inside the hold-off of the one at 600 and must be ignored), each one
// clock after the first sample below the peak, with peak_power = 9000.
module tb_peak_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, detect;
  logic [31:0] in_power = '0, peak_power;

  peak_detector dut (.*);

  int checks = 0, failures = 0;
  int pulse [5] = '{1000, 5000, 9000, 7000, 2000};
  int samp = -1, n_det = 0, cyc = 0, in_cyc = 0;
  int det_samp [$];

  always @(posedge clk) begin
    cyc++;
    if (in_valid) in_cyc = cyc;
    if (detect) begin
      n_det++;
      det_samp.push_back(samp);
      if (samp >= 300) checks++;
      if (samp >= 300 && (peak_power != 32'd9000 || cyc != in_cyc + 1)) begin
        failures++;
        $display("detect at sample %0d peak %0d delay %0d", samp, peak_power, cyc - in_cyc);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      int p;
      p = $urandom_range(100, 200);
      if (n >= 600 && n < 605)   p = pulse[n - 600];
      if (n >= 700 && n < 705)   p = pulse[n - 700];
      if (n >= 1100 && n < 1105) p = pulse[n - 1100];
      @(negedge clk) begin in_valid = 1'b1; in_power = 32'(p); samp = n; end
      @(negedge clk) in_valid = 1'b0;
      repeat (6) @(negedge clk);
    end
    // detections before the averaging window has filled are not counted
    while (det_samp.size() != 0 && det_samp[0] < 300) begin
      void'(det_samp.pop_front()); n_det--;
    end
    checks++;
    if (det_samp.size() != 2 || det_samp[0] != 603 || det_samp[1] != 1103) begin
      failures++;
      $display("detections: %p", det_samp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
