// tb_cgs_dnn_top: end-to-end test of cgs_dnn_top at a reduced size.
//
// 256-neuron layers with 32 selected neurons (12.5 %) in blocks of 16,
// 16 MAC lanes, 8 features x 11 frames, four hidden layers and 200 output
// states in 512 padded rows: the same structure as the full network at a
// quarter of its width. dnn_env drives three frames, a weight update during
// the second, and checks every score and the frame latency.
module tb_cgs_dnn_top;
  localparam int BLOCK = 16, N_NEURONS = 256, N_SEL = 32, N_MAC = 16;
  localparam int N_FEAT = 8, N_FRAMES = 11, N_HIDDEN = 4;
  localparam int N_OUT = 200, N_OUT_ROWS = 512;
  localparam int ADDR_W  = $clog2((N_NEURONS / N_MAC) * N_SEL) + $clog2(N_HIDDEN + N_OUT_ROWS / N_NEURONS);
  localparam int ENTRY_W = (N_SEL / BLOCK) * $clog2(N_NEURONS / BLOCK);
  localparam int EADDR_W = $clog2((N_HIDDEN * N_NEURONS + N_OUT_ROWS) / BLOCK);

  logic clk, rst_n, feat_valid, feat_ready, coef_we, wmem_we, busy, frame_done, score_valid;
  logic signed [11:0] feat_data, score_data;
  logic [EADDR_W-1:0] coef_addr;
  logic [ENTRY_W-1:0] coef_wdata;
  logic [ADDR_W-1:0]  wmem_addr;
  logic [N_MAC*8-1:0] wmem_wdata;
  logic [$clog2(N_OUT_ROWS)-1:0] score_idx;

  cgs_dnn_top #(
    .BLOCK(BLOCK), .N_NEURONS(N_NEURONS), .N_SEL(N_SEL), .N_MAC(N_MAC),
    .N_FEAT(N_FEAT), .N_FRAMES(N_FRAMES), .N_HIDDEN(N_HIDDEN),
    .N_OUT(N_OUT), .N_OUT_ROWS(N_OUT_ROWS)
  ) dut (.*);

  dnn_env #(
    .BLOCK(BLOCK), .N_NEURONS(N_NEURONS), .N_SEL(N_SEL), .N_MAC(N_MAC),
    .N_FEAT(N_FEAT), .N_FRAMES(N_FRAMES), .N_HIDDEN(N_HIDDEN),
    .N_OUT(N_OUT), .N_OUT_ROWS(N_OUT_ROWS), .FRAMES(3), .WATCHDOG(200_000)
  ) env (
    .*,
    .take_obs      (dut.u_fsm.take),
    .load_fb_obs   (dut.u_fsm.load_fb),
    .relu_clamp_obs(dut.on_we && dut.drain_val < 0),
    .layer_obs     (dut.u_fsm.layer)
  );
endmodule
