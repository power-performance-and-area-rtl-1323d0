// tb_cgs_dnn_cgs64: the CGS-64 network (64 x 64 weight blocks) at full size.
//
// Same sizes as the default design except BLOCK = 64: the neuron select
// unit becomes two 16:1 multiplexers of 64-neuron groups and the
// coefficient entries shrink to 8 bits. dnn_env classifies three frames
// and checks every score and the frame latency.
module tb_cgs_dnn_cgs64;
  logic clk, rst_n, feat_valid, feat_ready, coef_we, wmem_we, busy, frame_done, score_valid;
  logic signed [11:0] feat_data, score_data;
  logic [6:0]   coef_addr;
  logic [7:0]   coef_wdata;
  logic [15:0]  wmem_addr;
  logic [127:0] wmem_wdata;
  logic [10:0]  score_idx;

  cgs_dnn_top #(.BLOCK(64)) dut (.*);

  dnn_env #(.BLOCK(64), .FRAMES(3), .WATCHDOG(400_000)) env (
    .*,
    .take_obs      (dut.u_fsm.take),
    .load_fb_obs   (dut.u_fsm.load_fb),
    .relu_clamp_obs(dut.on_we && dut.drain_val < 0),
    .layer_obs     (dut.u_fsm.layer)
  );

  // backstop in case the environment's own watchdog never runs
  initial begin
    #100ms;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
