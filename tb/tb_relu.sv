// tb_relu: exhaustive check of the activation unit.
//
// All 4096 input values with and without bypass: max(d, 0) normally, d
// unchanged with bypass.
module tb_relu;
  import dnn_pkg::*;

  neuron_t d, q;
  logic bypass;
  logic clk = 0;
  int checks = 0, failures = 0;

  relu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int v = -2048; v < 2048; v++) begin
        int exp;
        d = neuron_t'(v); bypass = b[0];
        @(posedge clk);
        exp = (b == 1 || v > 0) ? v : 0;
        checks++;
        if (int'(q) != exp) begin failures++; $display("d=%0d bypass=%0d q=%0d", v, b, q); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
