// pixel_feeder -- puts the video stream on the head of the node chain.
//
// Pixels from an image scanner, or from the refresh stream of a raster
// display, arrive in ordinary scanning order. The feeder turns them into
// chain words: a head tag in front of every image row (on vid_line_start,
// which the source gives once per row, during blanking and before the
// row's first pixel), then the pixels as level-0 data words. Slots with
// nothing to send are idle, or carry host control bytes: a control byte
// offered on host_valid/host_data is sent as a TK_CTRL word in any slot
// that carries no video, and host_ready says it was taken that cycle.
// host_prog marks the byte as part of a processor program (control level
// CTRL_PROG) rather than of a node configuration record (CTRL_CFG).
//
// Timing: one chain word per clock, registered; a video pixel appears on
// chain_out one clock after it is presented. The pixel rate is the chain
// rate. The head tag follows the original design; sharing the free slots with
// host control bytes is this design's choice (the original design leaves host
// interfacing open).
module pixel_feeder
  import sintulf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vid_line_start,
  input  logic              vid_valid,
  input  logic [DATA_W-1:0] vid_data,
  input  logic              host_valid,
  input  logic [DATA_W-1:0] host_data,
  input  logic              host_prog,
  output logic              host_ready,
  output chain_word_t       chain_out
);

  assign host_ready = !vid_line_start && !vid_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_out <= IDLE_WORD;
    end else if (vid_line_start) begin
      chain_out <= '{kind: TK_HEAD, level: '0, data: '0};
    end else if (vid_valid) begin
      chain_out <= '{kind: TK_DATA, level: '0, data: vid_data};
    end else if (host_valid) begin
      chain_out <= '{kind: TK_CTRL, level: host_prog ? CTRL_PROG : CTRL_CFG,
                     data: host_data};
    end else begin
      chain_out <= IDLE_WORD;
    end
  end

  // The head tag needs a slot of its own.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(vid_line_start && vid_valid));

endmodule
