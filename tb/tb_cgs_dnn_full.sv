// tb_cgs_dnn_full: cgs_dnn_top with every parameter at its default.
//
// The CGS-16 network at full size: 440 inputs, four 1024-neuron hidden
// layers, 1947 output states, 6 banks of 8192 weight rows. dnn_env loads
// all 49,152 weight rows, classifies three frames (rewriting the first
// layer's weights during the second) and checks all scores and the
// 49,247-cycle frame latency.
module tb_cgs_dnn_full;
  logic clk, rst_n, feat_valid, feat_ready, coef_we, wmem_we, busy, frame_done, score_valid;
  logic signed [11:0] feat_data, score_data;
  logic [8:0]   coef_addr;
  logic [47:0]  coef_wdata;
  logic [15:0]  wmem_addr;
  logic [127:0] wmem_wdata;
  logic [10:0]  score_idx;

  cgs_dnn_top dut (.*);

  dnn_env #(.FRAMES(3), .WATCHDOG(400_000)) env (
    .*,
    .take_obs      (dut.u_fsm.take),
    .load_fb_obs   (dut.u_fsm.load_fb),
    .relu_clamp_obs(dut.on_we && dut.drain_val < 0),
    .layer_obs     (dut.u_fsm.layer)
  );
endmodule
