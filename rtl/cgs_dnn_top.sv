// cgs_dnn_top: on-chip DNN acoustic model with coarse-grain sparse weights.
//
// The network maps an 11-frame window of 40 fMLLR features (440 inputs)
// through four hidden layers of 1024 ReLU neurons to 1947 HMM-state scores.
// Every weight matrix is cut into BLOCK x BLOCK blocks of which only 12.5 %
// are kept, the same number (128/BLOCK) in every block row, so each output
// neuron depends on exactly 128 input neurons and all compressed weights
// (6 Mb) fit in six on-chip SRAM banks. BLOCK = 16 is the CGS-16 network,
// BLOCK = 64 the CGS-64 network.
//
// Datapath, as in the block diagram: input shift register -> input mux ->
// input neurons (1024) -> neuron select (1024 -> 128) -> mac mux
// (128 -> 16) -> 16 MAC lanes, fed with 16 weights per cycle from the
// weight SRAM -> ReLU -> output demux -> output neurons (1024), which feed
// back into the input neurons for the next layer. dnn_fsm sequences it and
// holds the sparsity coefficients. The output-layer scores leave through
// the score_* stream for an HMM decoder outside this design.
//
// Interfaces (all synchronous to clk, active-low synchronous reset):
//   feat_*   valid/ready stream of signed 12-bit features, 40 per frame.
//            After each complete frame the window is classified once.
//   coef_*   write port of the coefficient register file: entry
//            (layer*1024 + output row)/BLOCK holds the block-column index
//            of each kept block of that block row, field m in bits
//            [m*SEL_W +: SEL_W].
//   wmem_*   write port of the weight SRAM, usable at any time, also while
//            a frame is computed. Row layer*8192 + p*128 + t holds, in lane
//            k, the weight from selected input s = 16*(t/16) + ((t%16)+k)%16
//            to output neuron 16p + k of that layer; selected input s is
//            input neuron BLOCK*sel[s/BLOCK] + s%BLOCK.
//   score_*  one output-layer score per cycle while valid, index 0..1946.
//   frame_done pulses once per frame after the last score.
// Timing with the defaults: 49,152 weight rows per frame, one per cycle,
// plus 19 cycles per layer for draining and layer switching.
//
// The layer sizes, 16 MAC lanes, 128 selected neurons, 8-bit weights, six
// banks of 8192 x 128 bits and the coefficient-driven neuron selection
// follow the architecture. The port protocols, the fixed-point format, the
// schedule inside a layer and the score stream are this design's own.
module cgs_dnn_top
  import dnn_pkg::*;
#(
  parameter int BLOCK      = 16,
  parameter int N_NEURONS  = 1024,
  parameter int N_SEL      = 128,
  parameter int N_MAC      = 16,
  parameter int N_FEAT     = 40,
  parameter int N_FRAMES   = 11,
  parameter int N_HIDDEN   = 4,
  parameter int N_OUT      = 1947,
  parameter int N_OUT_ROWS = 2048,
  parameter int ACC_W      = 28,
  parameter int FRAC       = 7,
  localparam int ROWS_HID  = (N_NEURONS / N_MAC) * N_SEL,
  localparam int N_BANKS   = N_HIDDEN + N_OUT_ROWS / N_NEURONS,
  localparam int ADDR_W    = $clog2(ROWS_HID) + $clog2(N_BANKS),
  localparam int ROW_BITS  = N_MAC * WEIGHT_W,
  localparam int SEL_W     = $clog2(N_NEURONS / BLOCK),
  localparam int ENTRY_W   = (N_SEL / BLOCK) * SEL_W,
  localparam int EADDR_W   = $clog2((N_HIDDEN * N_NEURONS + N_OUT_ROWS) / BLOCK),
  localparam int SIDX_W    = $clog2(N_OUT_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               feat_valid,
  input  neuron_t            feat_data,
  output logic               feat_ready,
  input  logic               coef_we,
  input  logic [EADDR_W-1:0] coef_addr,
  input  logic [ENTRY_W-1:0] coef_wdata,
  input  logic               wmem_we,
  input  logic [ADDR_W-1:0]  wmem_addr,
  input  logic [ROW_BITS-1:0] wmem_wdata,
  output logic               busy,
  output logic               frame_done,
  output logic               score_valid,
  output logic [SIDX_W-1:0]  score_idx,
  output neuron_t            score_data
);

  localparam int N_WIN = N_FEAT * N_FRAMES;
  localparam int ROT_W = $clog2(N_MAC);
  localparam int GRP_W = $clog2(N_SEL) - ROT_W;
  localparam int IDX_W = $clog2(N_NEURONS);

  // control
  logic                   frame_pending, take, load_win, load_fb;
  logic                   sram_re;
  logic [ADDR_W-1:0]      sram_raddr;
  logic [ENTRY_W-1:0]     ns_sel;
  logic [GRP_W-1:0]       mm_group;
  logic [ROT_W-1:0]       mm_rot, drain_k;
  logic                   mac_en, mac_first, mac_last;
  logic                   relu_bypass, on_we;
  logic [IDX_W-1:0]       on_idx;

  // data
  neuron_t                window   [N_WIN];
  neuron_t                in_q     [N_NEURONS];
  neuron_t                out_q    [N_NEURONS];
  neuron_t                selected [N_SEL];
  neuron_t                lanes    [N_MAC];
  neuron_t                mac_res  [N_MAC];
  logic [ROW_BITS-1:0]    wrow;
  neuron_t                drain_val, act;

  input_shift_reg #(.N_FEAT(N_FEAT), .N_FRAMES(N_FRAMES)) u_shift (
    .clk, .rst_n,
    .in_valid     (feat_valid),
    .in_data      (feat_data),
    .in_ready     (feat_ready),
    .frame_pending(frame_pending),
    .take         (take),
    .window       (window)
  );

  input_neurons #(.N_NEURONS(N_NEURONS), .N_WIN(N_WIN)) u_in (
    .clk, .rst_n,
    .load_win(load_win),
    .load_fb (load_fb),
    .win     (window),
    .fb      (out_q),
    .q       (in_q)
  );

  neuron_select #(.N_NEURONS(N_NEURONS), .N_SEL(N_SEL), .BLOCK(BLOCK)) u_nsel (
    .neurons (in_q),
    .sel     (ns_sel),
    .selected(selected)
  );

  mac_mux #(.N_SEL(N_SEL), .N_MAC(N_MAC)) u_mmux (
    .selected(selected),
    .group   (mm_group),
    .rot     (mm_rot),
    .lanes   (lanes)
  );

  weight_memory #(.N_BANKS(N_BANKS), .ROWS(ROWS_HID), .WIDTH(ROW_BITS)) u_wmem (
    .clk,
    .re   (sram_re),
    .raddr(sram_raddr),
    .rdata(wrow),
    .we   (wmem_we),
    .waddr(wmem_addr),
    .wdata(wmem_wdata)
  );

  for (genvar k = 0; k < N_MAC; k++) begin : g_mac
    mac_unit #(.ACC_W(ACC_W), .FRAC(FRAC)) u_mac (
      .clk, .rst_n,
      .en    (mac_en),
      .first (mac_first),
      .last  (mac_last),
      .neuron(lanes[k]),
      .weight(weight_t'(wrow[k*WEIGHT_W +: WEIGHT_W])),
      .result(mac_res[k])
    );
  end

  assign drain_val = mac_res[drain_k];

  relu u_relu (
    .d     (drain_val),
    .bypass(relu_bypass),
    .q     (act)
  );

  output_neurons #(.N_NEURONS(N_NEURONS)) u_out (
    .clk, .rst_n,
    .we (on_we),
    .idx(on_idx),
    .d  (act),
    .q  (out_q)
  );

  dnn_fsm #(
    .N_NEURONS(N_NEURONS), .N_SEL(N_SEL), .N_MAC(N_MAC), .BLOCK(BLOCK),
    .N_HIDDEN(N_HIDDEN), .N_OUT(N_OUT), .N_OUT_ROWS(N_OUT_ROWS)
  ) u_fsm (
    .clk, .rst_n,
    .coef_we      (coef_we),
    .coef_waddr   (coef_addr),
    .coef_wdata   (coef_wdata),
    .frame_pending(frame_pending),
    .take         (take),
    .load_win     (load_win),
    .load_fb      (load_fb),
    .sram_re      (sram_re),
    .sram_raddr   (sram_raddr),
    .ns_sel       (ns_sel),
    .mm_group     (mm_group),
    .mm_rot       (mm_rot),
    .mac_en       (mac_en),
    .mac_first    (mac_first),
    .mac_last     (mac_last),
    .drain_k      (drain_k),
    .relu_bypass  (relu_bypass),
    .on_we        (on_we),
    .on_idx       (on_idx),
    .score_valid  (score_valid),
    .score_idx    (score_idx),
    .busy         (busy),
    .frame_done   (frame_done)
  );

  assign score_data = act;

endmodule
