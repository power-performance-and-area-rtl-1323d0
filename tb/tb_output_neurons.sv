// tb_output_neurons: checks the output demux and output neurons register.
//
// Full size. Writes random values to random indices (with idle cycles in
// between, where nothing may change) and compares the whole register with a
// reference array after every cycle.
module tb_output_neurons;
  import dnn_pkg::*;
  localparam int N = 1024;

  logic clk = 0, rst_n = 0, we = 0;
  logic [9:0] idx = '0;
  neuron_t d = '0;
  neuron_t q [N];
  neuron_t ref_q [N];
  int checks = 0, failures = 0;

  output_neurons #(.N_NEURONS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_q[i]) ref_q[i] = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      we  = ($urandom % 4 != 0);
      idx = 10'($urandom);
      d   = neuron_t'($urandom);
      @(posedge clk); #1;
      if (we) ref_q[idx] = d;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] != ref_q[i]) begin failures++; $display("q[%0d]=%0d expected %0d", i, q[i], ref_q[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
