// tb_input_shift_reg: checks the sliding feature window and its handshake.
//
// Default size (40 features x 11 frames). Streams 14 frames of random
// features with random gaps, keeps its own copy of every accepted value and,
// each time frame_pending rises, compares the whole window with the last
// 440 values sent (zeros before the first). Checks that in_ready is low
// while a frame is pending, that nothing shifts then, and that take clears
// the flag.
module tb_input_shift_reg;
  import dnn_pkg::*;
  localparam int N_FEAT = 40, N_FRAMES = 11, N_WIN = N_FEAT * N_FRAMES;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, frame_pending, take = 0;
  neuron_t in_data = '0;
  neuron_t window [N_WIN];
  int checks = 0, failures = 0;
  int sent[$];

  input_shift_reg #(.N_FEAT(N_FEAT), .N_FRAMES(N_FRAMES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_window();
    int bad = 0;
    for (int i = 0; i < N_WIN; i++) begin
      int k, exp;
      k   = sent.size() - N_WIN + i;
      exp = (k >= 0) ? sent[k] : 0;
      checks++;
      if (int'(window[i]) != exp) begin
        failures++;
        if (bad++ < 3) $display("window[%0d]=%0d expected %0d", i, window[i], exp);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int f = 0; f < 14; f++) begin
      for (int j = 0; j < N_FEAT; j++) begin
        while ($urandom % 3 == 0) begin @(posedge clk); #1; end
        in_valid = 1;
        in_data  = neuron_t'($urandom);
        @(posedge clk);
        checks++;
        if (!in_ready) begin failures++; $display("in_ready low mid-frame"); end
        sent.push_back(int'(in_data));
        #1 in_valid = 0;
      end
      checks++;
      if (!frame_pending) begin failures++; $display("frame_pending not set"); end
      check_window();
      // offer a feature while pending: must be refused and not shift
      in_valid = 1; in_data = 12'sd123;
      repeat (3) begin
        @(posedge clk);
        checks++;
        if (in_ready) begin failures++; $display("in_ready high while pending"); end
      end
      #1 in_valid = 0;
      check_window();
      take = 1; @(posedge clk); #1 take = 0;
      checks++;
      if (frame_pending) begin failures++; $display("take did not clear frame_pending"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
