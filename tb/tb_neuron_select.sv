// tb_neuron_select: checks both CGS neuron-select configurations.
//
// Instantiates the CGS-16 unit (eight 64:1 multiplexers of 16 neurons) and
// the CGS-64 unit (two 16:1 multiplexers of 64 neurons) at full size. For
// random neuron vectors and random select fields, every selected neuron must
// equal input neuron BLOCK*sel[m] + j for multiplexer m, lane j.
module tb_neuron_select;
  import dnn_pkg::*;
  localparam int N = 1024, S = 128;

  neuron_t neurons [N];
  neuron_t sel16_out [S];
  neuron_t sel64_out [S];
  logic [8*6-1:0] sel16;
  logic [2*4-1:0] sel64;
  int checks = 0, failures = 0;
  logic clk = 0;

  neuron_select #(.N_NEURONS(N), .N_SEL(S), .BLOCK(16)) dut16 (.neurons, .sel(sel16), .selected(sel16_out));
  neuron_select #(.N_NEURONS(N), .N_SEL(S), .BLOCK(64)) dut64 (.neurons, .sel(sel64), .selected(sel64_out));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      foreach (neurons[i]) neurons[i] = neuron_t'($urandom);
      sel16 = {$urandom, $urandom};
      sel64 = 8'($urandom);
      @(posedge clk);
      for (int m = 0; m < 8; m++)
        for (int j = 0; j < 16; j++) begin
          int b;
          b = int'(sel16[m*6 +: 6]);
          checks++;
          if (sel16_out[m*16 + j] != neurons[b*16 + j]) begin
            failures++;
            $display("CGS-16 mux %0d lane %0d wrong", m, j);
          end
        end
      for (int m = 0; m < 2; m++)
        for (int j = 0; j < 64; j++) begin
          int b;
          b = int'(sel64[m*4 +: 4]);
          checks++;
          if (sel64_out[m*64 + j] != neurons[b*64 + j]) begin
            failures++;
            $display("CGS-64 mux %0d lane %0d wrong", m, j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
