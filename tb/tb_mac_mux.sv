// tb_mac_mux: checks the rotating 128-to-16 MAC multiplexer.
//
// For every group and rotation, MAC lane k must receive selected neuron
// 16*group + (rot + k) mod 16. Also checks that across the 16 rotations of a
// group each lane sees every neuron of the group exactly once.
module tb_mac_mux;
  import dnn_pkg::*;
  localparam int S = 128, M = 16;

  neuron_t selected [S];
  neuron_t lanes [M];
  logic [2:0] group;
  logic [3:0] rot;
  logic clk = 0;
  int checks = 0, failures = 0;

  mac_mux #(.N_SEL(S), .N_MAC(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // distinct values so that a lane's source can be identified
    foreach (selected[i]) selected[i] = neuron_t'(i * 7 + 3);
    for (int g = 0; g < S / M; g++) begin
      int seen [M][S];
      foreach (seen[a, b]) seen[a][b] = 0;
      for (int r = 0; r < M; r++) begin
        group = 3'(g); rot = 4'(r);
        @(posedge clk);
        for (int k = 0; k < M; k++) begin
          checks++;
          if (lanes[k] != selected[g*M + (r + k) % M]) begin
            failures++;
            $display("group %0d rot %0d lane %0d wrong", g, r, k);
          end
          for (int i = 0; i < S; i++) if (lanes[k] == selected[i]) seen[k][i]++;
        end
      end
      for (int k = 0; k < M; k++)
        for (int i = g*M; i < g*M + M; i++) begin
          checks++;
          if (seen[k][i] != 1) begin failures++; $display("lane %0d saw neuron %0d %0d times", k, i, seen[k][i]); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
