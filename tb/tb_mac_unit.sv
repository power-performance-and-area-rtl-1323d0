// tb_mac_unit: checks one MAC lane against an integer reference.
//
// Runs 300 dot products of 128 random terms (with enable gaps), some scaled
// to saturate in both directions. After each last term the result must be
// (sum >>> 7) clamped to the 12-bit range, appear one cycle after the last
// term and hold until the next one.
module tb_mac_unit;
  import dnn_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  neuron_t neuron = '0, result;
  weight_t weight = '0;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  mac_unit #(.ACC_W(28), .FRAC(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int d = 0; d < 300; d++) begin
      longint acc, s;
      int exp, bias;
      neuron_t prev;
      acc = 0;
      prev = result;
      bias = (d % 3 == 1) ? 1 : (d % 3 == 2) ? -1 : 0;
      for (int t = 0; t < 128; t++) begin
        while ($urandom % 5 == 0) begin
          en = 0; @(posedge clk); #1;
        end
        en = 1; first = (t == 0); last = (t == 127);
        neuron = neuron_t'($urandom);
        weight = weight_t'($urandom);
        if (bias != 0) begin
          neuron = bias > 0 ? 12'sd2000 : -12'sd2000;
          weight = weight_t'($urandom % 100);
        end
        acc += longint'(neuron) * longint'(weight);
        @(posedge clk); #1;
        if (t < 127) begin
          checks++;
          if (result != prev) begin failures++; $display("result changed mid dot product"); end
        end
      end
      en = 0; first = 0; last = 0;
      s = acc >>> 7;
      exp = (s > 2047) ? 2047 : (s < -2048) ? -2048 : int'(s);
      if (exp == 2047) sat_hi++;
      if (exp == -2048) sat_lo++;
      checks++;
      if (int'(result) != exp) begin failures++; $display("dot %0d: got %0d expected %0d", d, result, exp); end
      repeat (2) @(posedge clk); #1;
      checks++;
      if (int'(result) != exp) begin failures++; $display("result not held"); end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
