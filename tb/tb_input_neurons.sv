// tb_input_neurons: checks the input mux and the input neurons register.
//
// Small size (24 neurons, 10-value window). Loads a random window and checks
// the zero padding, loads random feedback values, checks that the register
// holds without a strobe and that load_win wins over load_fb.
module tb_input_neurons;
  import dnn_pkg::*;
  localparam int N = 24, W = 10;

  logic clk = 0, rst_n = 0, load_win = 0, load_fb = 0;
  neuron_t win [W];
  neuron_t fb  [N];
  neuron_t q   [N];
  int checks = 0, failures = 0;

  input_neurons #(.N_NEURONS(N), .N_WIN(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomize_inputs();
    foreach (win[i]) win[i] = neuron_t'($urandom);
    foreach (fb[i])  fb[i]  = neuron_t'($urandom);
  endtask

  task automatic expect_win();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] != ((i < W) ? win[i] : '0)) begin failures++; $display("win q[%0d]=%0d", i, q[i]); end
    end
  endtask

  task automatic expect_fb();
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] != fb[i]) begin failures++; $display("fb q[%0d]=%0d", i, q[i]); end
    end
  endtask

  initial begin
    randomize_inputs();
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      randomize_inputs();
      load_win = 1; @(posedge clk); #1 load_win = 0;
      expect_win();
      // hold: inputs change, no strobe
      for (int i = 0; i < W; i++) ;
      begin
        neuron_t keep [N];
        keep = q;
        foreach (fb[i]) fb[i] = neuron_t'($urandom);
        @(posedge clk); #1;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (q[i] != keep[i]) begin failures++; $display("q changed without load"); end
        end
      end
      randomize_inputs();
      load_fb = 1; @(posedge clk); #1 load_fb = 0;
      expect_fb();
      randomize_inputs();
      load_fb = 1; load_win = 1; @(posedge clk); #1 load_fb = 0; load_win = 0;
      expect_win();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
