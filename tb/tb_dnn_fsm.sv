// tb_dnn_fsm: checks the controller's schedule on its own.
//
// Reduced size: 64-neuron layers, 32 selected neurons, 16 MAC lanes,
// blocks of 16, four hidden layers, 100 outputs in 128 padded rows. The
// coefficient file is loaded with random entries. For two frames the test
// follows every cycle and checks: the window is taken once per frame; the
// weight rows are read in order 0..ROWS_TOT-1, one per cycle; one cycle
// later the MAC controls (enable, first, last, group, rotation) and the
// neuron-select field (the coefficient entry of the pass) match that row;
// every hidden-layer output index is written exactly once per layer, each
// layer ends with exactly one feedback load before the next layer's first
// read; every output score index below N_OUT is sent exactly once with the
// ReLU bypassed; and frame_done comes ROWS_TOT + 5*(N_MAC+3) cycles after
// the take.
module tb_dnn_fsm;
  localparam int N = 64, S = 32, M = 16, B = 16, H = 4, NO = 100, NOR = 128;
  localparam int ROWS_HID = (N / M) * S, NBANK = H + NOR / N, ROWS_TOT = NBANK * ROWS_HID;
  localparam int AW = $clog2(ROWS_HID) + $clog2(NBANK);
  localparam int SELW = $clog2(N / B), EW = (S / B) * SELW;
  localparam int ENT = (H * N + NOR) / B, EAW = $clog2(ENT);

  logic clk = 0, rst_n = 0, coef_we = 0, frame_pending = 0;
  logic [EAW-1:0] coef_waddr = '0;
  logic [EW-1:0]  coef_wdata = '0;
  logic take, load_win, load_fb, sram_re, mac_en, mac_first, mac_last;
  logic relu_bypass, on_we, score_valid, busy, frame_done;
  logic [AW-1:0] sram_raddr;
  logic [EW-1:0] ns_sel;
  logic [0:0] mm_group;
  logic [3:0] mm_rot, drain_k;
  logic [5:0] on_idx;
  logic [6:0] score_idx;

  logic [EW-1:0] coef [ENT];
  int checks = 0, failures = 0;

  dnn_fsm #(.N_NEURONS(N), .N_SEL(S), .N_MAC(M), .BLOCK(B), .N_HIDDEN(H),
            .N_OUT(NO), .N_OUT_ROWS(NOR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("%0t: %s", $time, msg);
  endtask

  // cycle-by-cycle monitor
  int  next_row = 0, prev_row = -1, layer_writes[H][N], score_seen[NO];
  int  fb_loads = 0, takes = 0, frames = 0, expected_layer = 0;
  longint cyc = 0, t_take = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (take) begin
      checks++;
      if (!load_win) fail("take without load_win");
      takes++; t_take = cyc; next_row = 0; fb_loads = 0;
      foreach (layer_writes[a, b]) layer_writes[a][b] = 0;
      foreach (score_seen[a]) score_seen[a] = 0;
    end
    // stage-1 controls for the row read in the previous cycle
    checks++;
    if (mac_en != (prev_row >= 0)) fail("mac_en wrong");
    if (prev_row >= 0) begin
      int t, e;
      t = prev_row % S;
      e = ((prev_row / S) * M) / B;
      checks++;
      if (mac_first != (t == 0) || mac_last != (t == S - 1) ||
          int'(mm_group) != t / M || int'(mm_rot) != t % M)
        fail($sformatf("MAC controls wrong for row %0d", prev_row));
      checks++;
      if (ns_sel != coef[e]) fail($sformatf("neuron-select field wrong for row %0d", prev_row));
    end
    prev_row = -1;
    if (sram_re) begin
      checks++;
      if (int'(sram_raddr) != next_row) fail($sformatf("read row %0d, expected %0d", sram_raddr, next_row));
      // a layer's first row is read only after all feedback loads before it
      if (next_row % ROWS_HID == 0 && next_row < H * ROWS_HID + 1) begin
        checks++;
        if (fb_loads != next_row / ROWS_HID) fail("layer started before feedback load");
      end
      prev_row = int'(sram_raddr);
      next_row++;
    end
    if (on_we) begin
      int l;
      l = fb_loads;
      checks++;
      if (relu_bypass) fail("ReLU bypassed on a hidden layer");
      if (l < H) layer_writes[l][on_idx]++;
    end
    if (load_fb) begin
      checks++;
      for (int i = 0; i < N; i++) if (layer_writes[fb_loads][i] != 1) begin
        fail($sformatf("layer %0d index %0d written %0d times before feedback", fb_loads, i, layer_writes[fb_loads][i]));
        break;
      end
      fb_loads++;
    end
    if (score_valid) begin
      checks++;
      if (!relu_bypass) fail("ReLU not bypassed on the output layer");
      if (int'(score_idx) >= NO) fail("score index out of range");
      else score_seen[score_idx]++;
    end
    if (frame_done) begin
      checks++;
      if (cyc - t_take != longint'(ROWS_TOT + (H + 1) * (M + 3)))
        fail($sformatf("latency %0d", cyc - t_take));
      checks++;
      if (next_row != ROWS_TOT || fb_loads != H) fail("frame incomplete");
      for (int i = 0; i < NO; i++) begin
        checks++;
        if (score_seen[i] != 1) fail($sformatf("score %0d seen %0d times", i, score_seen[i]));
      end
      frames++;
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int e = 0; e < ENT; e++) begin
      coef[e] = EW'($urandom);
      coef_we = 1; coef_waddr = EAW'(e); coef_wdata = coef[e];
      @(posedge clk); #1;
    end
    coef_we = 0;
    repeat (5) @(posedge clk); #1;
    checks++;
    if (busy) fail("busy without a frame");
    for (int f = 0; f < 2; f++) begin
      frame_pending = 1;
      forever begin
        @(posedge clk);
        if (take) break;
      end
      #1 frame_pending = 0;
      checks++;
      if (!busy) fail("not busy after take");
      while (frames == f) begin @(posedge clk); #1; end
    end
    checks++;
    if (takes != 2) fail("wrong number of takes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
