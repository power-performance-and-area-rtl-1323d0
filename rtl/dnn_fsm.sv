// dnn_fsm: layer-by-layer controller of the CGS-sparse DNN.
//
// The network is computed one layer at a time on N_MAC parallel MAC lanes.
// A layer is split into passes of N_MAC output neurons; a pass takes N_SEL
// cycles, one weight SRAM row per cycle, and in cycle t MAC k multiplies
// selected neuron g*N_MAC + (r+k) mod N_MAC (g = t / N_MAC, r = t mod N_MAC)
// by lane k of the row. With the defaults a hidden layer is 64 passes, that
// is 8192 rows or exactly one SRAM bank, and the output layer (1947 states
// padded to N_OUT_ROWS = 2048) is 128 passes in two banks. Because layers
// are stored one after the other, the weight row is a single counter that
// runs from 0 to 49151 over a frame, and the output row of a pass, which
// also indexes the coefficient register file, is (row / N_SEL) * N_MAC.
//
// Pipeline: cycle 0 issues the SRAM read and reads the coefficient entry of
// the pass; cycle 1 has the weight row, drives neuron select and mac mux
// from the registered entry, and the MACs accumulate. At the last term of
// a pass the MACs capture their results, which are drained during the next
// N_MAC cycles, one per cycle, through ReLU (bypassed for the output layer)
// either into the output neurons or out as scores. After the last pass of
// a hidden layer the controller waits for the drain, copies the output
// neurons into the input neurons (one cycle) and continues with the next
// layer. A new frame starts when the input shift register reports one;
// the window is copied into the input neurons in the same cycle.
//
// Row order inside a pass (the contents each SRAM row must have) and the
// whole schedule are this design's own; the architecture gives the layer-
// at-a-time operation, 16 MAC lanes, 128 selected neurons, the six banks
// and the coefficient register file that this controller owns.
module dnn_fsm #(
  parameter int N_NEURONS  = 1024,
  parameter int N_SEL      = 128,
  parameter int N_MAC      = 16,
  parameter int BLOCK      = 16,
  parameter int N_HIDDEN   = 4,
  parameter int N_OUT      = 1947,
  parameter int N_OUT_ROWS = 2048,
  localparam int ROWS_HID  = (N_NEURONS / N_MAC) * N_SEL,
  localparam int N_BANKS   = N_HIDDEN + N_OUT_ROWS / N_NEURONS,
  localparam int ROWS_TOT  = N_BANKS * ROWS_HID,
  localparam int ADDR_W    = $clog2(ROWS_HID) + $clog2(N_BANKS),
  localparam int N_MUX     = N_SEL / BLOCK,
  localparam int SEL_W     = $clog2(N_NEURONS / BLOCK),
  localparam int ENTRIES   = (N_HIDDEN * N_NEURONS + N_OUT_ROWS) / BLOCK,
  localparam int EADDR_W   = $clog2(ENTRIES),
  localparam int T_W       = $clog2(N_SEL),
  localparam int ROT_W     = $clog2(N_MAC),
  localparam int GRP_W     = T_W - ROT_W,
  localparam int OROW_W    = $clog2(N_HIDDEN * N_NEURONS + N_OUT_ROWS),
  localparam int IDX_W     = $clog2(N_NEURONS),
  localparam int SIDX_W    = $clog2(N_OUT_ROWS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // coefficient register file load port
  input  logic                   coef_we,
  input  logic [EADDR_W-1:0]     coef_waddr,
  input  logic [N_MUX*SEL_W-1:0] coef_wdata,
  // input shift register
  input  logic                   frame_pending,
  output logic                   take,
  // input neurons
  output logic                   load_win,
  output logic                   load_fb,
  // weight SRAM read port
  output logic                   sram_re,
  output logic [ADDR_W-1:0]      sram_raddr,
  // neuron select, mac mux, MAC lanes
  output logic [N_MUX*SEL_W-1:0] ns_sel,
  output logic [GRP_W-1:0]       mm_group,
  output logic [ROT_W-1:0]       mm_rot,
  output logic                   mac_en,
  output logic                   mac_first,
  output logic                   mac_last,
  // drain: MAC result select, ReLU, output demux, score stream
  output logic [ROT_W-1:0]       drain_k,
  output logic                   relu_bypass,
  output logic                   on_we,
  output logic [IDX_W-1:0]       on_idx,
  output logic                   score_valid,
  output logic [SIDX_W-1:0]      score_idx,
  // status
  output logic                   busy,
  output logic                   frame_done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT, S_SWAP} state_e;

  state_e                 state;
  logic [ADDR_W-1:0]      row;
  logic [$clog2(N_HIDDEN+1)-1:0] layer;
  logic [ADDR_W-1:0]      layer_last;
  logic                   out_layer;
  logic [T_W-1:0]         t;
  logic [OROW_W-1:0]      out_row;
  logic [N_MUX*SEL_W-1:0] coef_rdata;

  // stage-1 pipeline registers (aligned with the SRAM read data)
  logic                   s1_valid, s1_first, s1_last, s1_out;
  logic [N_MUX*SEL_W-1:0] s1_sel;
  logic [T_W-1:0]         s1_t;
  logic [OROW_W-1:0]      s1_row;

  // drain
  logic                   drain_active, drain_out;
  logic [OROW_W-1:0]      drain_row;
  logic [OROW_W-1:0]      drain_abs;

  coef_regfile #(
    .N_NEURONS(N_NEURONS), .N_SEL(N_SEL), .BLOCK(BLOCK),
    .N_HIDDEN(N_HIDDEN), .N_OUT_ROWS(N_OUT_ROWS)
  ) u_coef (
    .clk  (clk),
    .we   (coef_we),
    .waddr(coef_waddr),
    .wdata(coef_wdata),
    .raddr(EADDR_W'(out_row / OROW_W'(BLOCK))),
    .rdata(coef_rdata)
  );

  assign out_layer  = (int'(layer) == N_HIDDEN);
  assign layer_last = out_layer ? ADDR_W'(ROWS_TOT - 1)
                                : ADDR_W'((int'(layer) + 1) * ROWS_HID - 1);
  assign t          = row[T_W-1:0];
  assign out_row    = OROW_W'((row >> T_W) * ADDR_W'(N_MAC));

  assign take       = (state == S_IDLE) && frame_pending;
  assign load_win   = take;
  assign load_fb    = (state == S_SWAP);
  assign sram_re    = (state == S_RUN);
  assign sram_raddr = row;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      layer      <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: if (frame_pending) begin
          row   <= '0;
          layer <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          row <= row + 1'b1;
          if (row == layer_last) state <= S_WAIT;
        end
        S_WAIT: if (!s1_valid && !drain_active) begin
          if (out_layer) begin
            frame_done <= 1'b1;
            state      <= S_IDLE;
          end else begin
            state <= S_SWAP;
          end
        end
        S_SWAP: begin
          layer <= layer + 1'b1;
          state <= S_RUN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // stage 1
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_out   <= 1'b0;
      s1_sel   <= '0;
      s1_t     <= '0;
      s1_row   <= '0;
    end else begin
      s1_valid <= (state == S_RUN);
      s1_first <= (t == '0);
      s1_last  <= (t == T_W'(N_SEL - 1));
      s1_out   <= out_layer;
      s1_sel   <= coef_rdata;
      s1_t     <= t;
      s1_row   <= out_row;
    end
  end

  assign ns_sel    = s1_sel;
  assign mm_group  = s1_t[T_W-1:ROT_W];
  assign mm_rot    = s1_t[ROT_W-1:0];
  assign mac_en    = s1_valid;
  assign mac_first = s1_first;
  assign mac_last  = s1_last;

  // drain of the MAC results, one lane per cycle
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drain_active <= 1'b0;
      drain_out    <= 1'b0;
      drain_row    <= '0;
      drain_k      <= '0;
    end else if (s1_valid && s1_last) begin
      drain_active <= 1'b1;
      drain_out    <= s1_out;
      drain_row    <= s1_row;
      drain_k      <= '0;
    end else if (drain_active) begin
      drain_k <= drain_k + 1'b1;
      if (drain_k == ROT_W'(N_MAC - 1)) drain_active <= 1'b0;
    end
  end

  assign drain_abs   = drain_row + OROW_W'(drain_k);
  assign relu_bypass = drain_out;
  assign on_we       = drain_active && !drain_out;
  assign on_idx      = drain_abs[IDX_W-1:0];
  assign score_idx   = SIDX_W'(drain_abs - OROW_W'(N_HIDDEN * N_NEURONS));
  assign score_valid = drain_active && drain_out && (score_idx < SIDX_W'(N_OUT));

  // size rules of the schedule, checked at elaboration
  if (N_SEL < N_MAC || N_SEL % N_MAC != 0 || N_SEL % BLOCK != 0) begin : g_bad_sel
    $error("dnn_fsm: N_SEL must be a multiple of N_MAC and of BLOCK");
  end
  if (N_OUT_ROWS % N_NEURONS != 0 || N_OUT > N_OUT_ROWS) begin : g_bad_out
    $error("dnn_fsm: the output layer must fill whole banks");
  end

  // a pass may only end after the previous drain has finished
  ap_drain_free: assert property (@(posedge clk) disable iff (!rst_n)
    (s1_valid && s1_last) |-> (!drain_active || drain_k == ROT_W'(N_MAC - 1)));

endmodule
