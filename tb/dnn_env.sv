// dnn_env: stimulus, reference model and checks for cgs_dnn_top.
//
// Used by the end-to-end testbenches, which instantiate the design and
// this environment side by side. The environment
//   1. loads the coefficient register file: block row r of layer l keeps
//      the block columns (base + m*N_BLK/N_MUX) mod N_BLK, base hashed;
//   2. loads every weight row; weight (layer, output o, input i) is a hash
//      of its coordinates, placed in the row and lane where the design's
//      schedule expects it;
//   3. streams FRAMES frames of hashed features with random gaps, pushing
//      ahead so that the input backpressure is exercised;
//   4. while frame 1 runs its second layer, rewrites all of layer 0's
//      weights with a new hash seed (the weight-update phase of
//      pseudo-training), so frames from 2 on must use the new weights;
//   5. compares every streamed score with a plain dense-style reference
//      that sums weight * input over the kept blocks, independent of the
//      design's row ordering, and checks the frame latency
//      ROWS_TOT + (N_HIDDEN+1)*(N_MAC+3) cycles from window take to
//      frame_done.
// Mechanisms counted (each must occur): input backpressure, layer
// feedback loads, ReLU clamping, weight writes during computation, ReLU
// bypass on the output layer (negative scores).
module dnn_env #(
  parameter int BLOCK      = 16,
  parameter int N_NEURONS  = 1024,
  parameter int N_SEL      = 128,
  parameter int N_MAC      = 16,
  parameter int N_FEAT     = 40,
  parameter int N_FRAMES   = 11,
  parameter int N_HIDDEN   = 4,
  parameter int N_OUT      = 1947,
  parameter int N_OUT_ROWS = 2048,
  parameter int FRAC       = 7,
  parameter int FRAMES     = 3,
  parameter int WATCHDOG   = 2_000_000,
  localparam int ROWS_HID  = (N_NEURONS / N_MAC) * N_SEL,
  localparam int N_BANKS   = N_HIDDEN + N_OUT_ROWS / N_NEURONS,
  localparam int ROWS_TOT  = N_BANKS * ROWS_HID,
  localparam int ADDR_W    = $clog2(ROWS_HID) + $clog2(N_BANKS),
  localparam int ROW_BITS  = N_MAC * 8,
  localparam int N_BLK     = N_NEURONS / BLOCK,
  localparam int N_MUX     = N_SEL / BLOCK,
  localparam int SEL_W     = $clog2(N_BLK),
  localparam int ENTRIES   = (N_HIDDEN * N_NEURONS + N_OUT_ROWS) / BLOCK,
  localparam int ENTRY_W   = N_MUX * SEL_W,
  localparam int EADDR_W   = $clog2(ENTRIES),
  localparam int SIDX_W    = $clog2(N_OUT_ROWS),
  localparam int N_WIN     = N_FEAT * N_FRAMES
) (
  output logic                clk,
  output logic                rst_n,
  output logic                feat_valid,
  output logic signed [11:0]  feat_data,
  input  logic                feat_ready,
  output logic                coef_we,
  output logic [EADDR_W-1:0]  coef_addr,
  output logic [ENTRY_W-1:0]  coef_wdata,
  output logic                wmem_we,
  output logic [ADDR_W-1:0]   wmem_addr,
  output logic [ROW_BITS-1:0] wmem_wdata,
  input  logic                busy,
  input  logic                frame_done,
  input  logic                score_valid,
  input  logic [SIDX_W-1:0]   score_idx,
  input  logic signed [11:0]  score_data,
  // internal observation points
  input  logic                take_obs,
  input  logic                load_fb_obs,
  input  logic                relu_clamp_obs,
  input  logic [2:0]          layer_obs
);

  int checks = 0, failures = 0;
  longint cyc = 0;

  // ---------------------------------------------------------------- model
  function automatic int unsigned mix(int unsigned a);
    a ^= a >> 16; a *= 32'h7feb352d;
    a ^= a >> 15; a *= 32'h846ca68b;
    a ^= a >> 16;
    return a;
  endfunction

  function automatic int wgt(int l, int o, int i, int seed);
    int unsigned h;
    h = mix(l * 32'h9E3779B1 ^ o * 32'h85EBCA77 ^ i * 32'hC2B2AE3D ^ (seed + 1) * 32'h27D4EB2F);
    return int'(h % 48) - 24;
  endfunction

  function automatic int col(int entry, int m);
    int base;
    base = int'(mix(entry * 32'h165667B1 + 7) % N_BLK);
    return (base + m * (N_BLK / N_MUX)) % N_BLK;
  endfunction

  function automatic int feat_val(int n);
    return int'(mix(n * 32'h2545F491 + 3) % 2001) - 1000;
  endfunction

  function automatic int sat12(longint v);
    longint s;
    s = v >>> FRAC;
    if (s > 2047) return 2047;
    if (s < -2048) return -2048;
    return int'(s);
  endfunction

  int feats[$];
  int l0_seed = 0;       // seed of the layer-0 weights currently in SRAM
  int frame_seed[FRAMES];

  // reference scores of frame f
  task automatic ref_frame(input int f, output int sc[]);
    int x[], y[];
    int n_out, seed;
    x = new[N_NEURONS];
    for (int i = 0; i < N_NEURONS; i++) begin
      int k;
      k = (f + 1) * N_FEAT - N_WIN + i;
      x[i] = (i < N_WIN && k >= 0) ? feats[k] : 0;
    end
    for (int l = 0; l <= N_HIDDEN; l++) begin
      n_out = (l < N_HIDDEN) ? N_NEURONS : N_OUT_ROWS;
      seed  = (l == 0) ? frame_seed[f] : 0;
      y = new[n_out];
      for (int o = 0; o < n_out; o++) begin
        longint acc;
        int e;
        acc = 0;
        e = (l * N_NEURONS + o) / BLOCK;
        for (int m = 0; m < N_MUX; m++)
          for (int j = 0; j < BLOCK; j++) begin
            int i;
            i = col(e, m) * BLOCK + j;
            acc += longint'(wgt(l, o, i, seed)) * x[i];
          end
        y[o] = sat12(acc);
        if (l < N_HIDDEN && y[o] < 0) y[o] = 0;
      end
      x = y;
    end
    sc = x;
  endtask

  // ---------------------------------------------------------------- clock
  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------- load and stimulus
  task automatic write_row(input int l, input int p, input int t, input int seed);
    logic [ROW_BITS-1:0] r;
    int e, o, s, i;
    for (int k = 0; k < N_MAC; k++) begin
      o = p * N_MAC + k;
      e = (l * N_NEURONS + o) / BLOCK;
      s = N_MAC * (t / N_MAC) + ((t % N_MAC) + k) % N_MAC;
      i = col(e, s / BLOCK) * BLOCK + s % BLOCK;
      r[k*8 +: 8] = 8'(wgt(l, o, i, seed));
    end
    wmem_we    = 1'b1;
    wmem_addr  = ADDR_W'(l * ROWS_HID + p * N_SEL + t);
    wmem_wdata = r;
    @(posedge clk); #1;
    wmem_we = 1'b0;
  endtask

  int bp_cycles = 0, fb_loads = 0, relu_clamps = 0, busy_writes = 0, neg_scores = 0;
  bit  loaded = 0, rewrite_done = 0;
  longint rewrite_end = 0;

  initial begin
    rst_n = 1'b0; feat_valid = 1'b0; feat_data = '0;
    coef_we = 1'b0; coef_addr = '0; coef_wdata = '0;
    wmem_we = 1'b0; wmem_addr = '0; wmem_wdata = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int e = 0; e < ENTRIES; e++) begin
      logic [ENTRY_W-1:0] w;
      for (int m = 0; m < N_MUX; m++) w[m*SEL_W +: SEL_W] = SEL_W'(col(e, m));
      coef_we = 1'b1; coef_addr = EADDR_W'(e); coef_wdata = w;
      @(posedge clk); #1;
    end
    coef_we = 1'b0;
    for (int l = 0; l <= N_HIDDEN; l++)
      for (int p = 0; p < ((l < N_HIDDEN) ? N_NEURONS : N_OUT_ROWS) / N_MAC; p++)
        for (int t = 0; t < N_SEL; t++) write_row(l, p, t, 0);
    loaded = 1;
    // pseudo-training weight update of layer 0 while frame 1 is in layer 1
    wait (frames_started == 2 && layer_obs == 3'd1);
    @(posedge clk); #1;
    for (int p = 0; p < N_NEURONS / N_MAC; p++)
      for (int t = 0; t < N_SEL; t++) begin
        if (busy) busy_writes++;
        write_row(0, p, t, 1);
      end
    l0_seed = 1;
    rewrite_done = 1;
    rewrite_end = cyc;
  end

  initial begin
    wait (loaded);
    @(posedge clk); #1;
    for (int n = 0; n < FRAMES * N_FEAT; n++) begin
      while ($urandom % 4 == 0) begin @(posedge clk); #1; end
      feat_valid = 1'b1;
      feat_data  = 12'(feat_val(n));
      feats.push_back(feat_val(n));
      forever begin
        @(posedge clk);
        if (feat_ready) break;
        bp_cycles++;
      end
      #1;
      feat_valid = 1'b0;
    end
  end

  // ------------------------------------------------------------- checking
  int     frames_started = 0, frames_done = 0;
  longint t_take;
  int     got[], seen[];

  always @(posedge clk) if (rst_n) begin
    if (load_fb_obs) fb_loads++;
    if (relu_clamp_obs) relu_clamps++;
    if (score_valid) begin
      checks++;
      if (int'(score_idx) >= N_OUT) begin
        failures++;
        $display("score index %0d out of range", score_idx);
      end else begin
        got[score_idx] = int'(score_data);
        seen[score_idx]++;
        if (score_data < 0) neg_scores++;
      end
    end
    if (frame_done) begin
      int sc[];
      int bad;
      ref_frame(frames_done, sc);
      bad = 0;
      for (int o = 0; o < N_OUT; o++) begin
        checks++;
        if (seen[o] != 1 || got[o] != sc[o]) begin
          failures++;
          if (bad++ < 5)
            $display("frame %0d score %0d: got %0d (seen %0d) expected %0d",
                     frames_done, o, got[o], seen[o], sc[o]);
        end
      end
      checks++;
      if (cyc - t_take != longint'(ROWS_TOT + (N_HIDDEN + 1) * (N_MAC + 3))) begin
        failures++;
        $display("frame %0d latency %0d, expected %0d", frames_done, cyc - t_take,
                 ROWS_TOT + (N_HIDDEN + 1) * (N_MAC + 3));
      end
      $display("frame %0d done: latency %0d cycles, %0d mismatches", frames_done, cyc - t_take, bad);
      frames_done++;
      if (frames_done == FRAMES) finish_run();
    end
    // a frame may start in the cycle the previous one reports done
    if (take_obs) begin
      frame_seed[frames_started] = l0_seed;
      if (frames_started >= 2) begin
        checks++;
        if (!rewrite_done) begin
          failures++;
          $display("frame %0d started before the weight update finished", frames_started);
        end
      end
      frames_started++;
      t_take = cyc;
      got  = new[N_OUT];
      seen = new[N_OUT];
    end
  end

  task automatic mech(input string name, input int n);
    checks++;
    $display("mechanism %-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", name);
    end
  endtask

  task automatic finish_run();
    checks++;
    if (fb_loads != FRAMES * N_HIDDEN) begin
      failures++;
      $display("feedback loads %0d, expected %0d", fb_loads, FRAMES * N_HIDDEN);
    end
    mech("input backpressure cycles", bp_cycles);
    mech("layer feedback loads", fb_loads);
    mech("ReLU clamps", relu_clamps);
    mech("weight writes while busy", busy_writes);
    mech("negative output scores", neg_scores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
