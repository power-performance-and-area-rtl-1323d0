// input_shift_reg: sliding context window of acoustic feature frames.
//
// The classifier looks at N_FRAMES consecutive frames of N_FEAT features
// (11 x 40 = 440 values: five past frames, the current one and five future
// ones). Features arrive one 12-bit word at a time. Every accepted word
// shifts the whole window down by one position and enters at the top, so
// window[0] is the oldest feature and window[N_WIN-1] the newest. After
// N_FEAT words a complete new frame has entered and frame_pending rises;
// the window then holds the next context to classify.
//
// Interface: valid/ready on the input side. in_ready is low while a
// complete frame is pending, so the window cannot move before the
// controller has copied it (take, one cycle). take clears frame_pending.
//
// The window size follows the network definition; the handshake, the
// ordering inside the window and the zero reset state are this design's
// own choices.
module input_shift_reg
  import dnn_pkg::*;
#(
  parameter int N_FEAT   = 40,
  parameter int N_FRAMES = 11,
  localparam int N_WIN   = N_FEAT * N_FRAMES
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  neuron_t in_data,
  output logic    in_ready,
  output logic    frame_pending,
  input  logic    take,
  output neuron_t window [N_WIN]
);

  localparam int CNT_W = $clog2(N_FEAT + 1);

  logic [CNT_W-1:0] feat_cnt;
  logic             accept;

  assign in_ready = !frame_pending;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      feat_cnt      <= '0;
      frame_pending <= 1'b0;
      for (int i = 0; i < N_WIN; i++) window[i] <= '0;
    end else begin
      if (accept) begin
        for (int i = 0; i < N_WIN - 1; i++) window[i] <= window[i+1];
        window[N_WIN-1] <= in_data;
        if (feat_cnt == CNT_W'(N_FEAT - 1)) begin
          feat_cnt      <= '0;
          frame_pending <= 1'b1;
        end else begin
          feat_cnt <= feat_cnt + 1'b1;
        end
      end else if (take) begin
        frame_pending <= 1'b0;
      end
    end
  end

endmodule
