// sintulf_top -- the node chain pipeline: feeder, boards, result tap.
//
// Video pixels enter through the pixel feeder, which puts a head tag in
// front of every row, and travel down a chain of N_BOARDS boards of
// NODES_PER_BOARD subsystems each. The chain is a shift register moving
// one byte-wide word per clock. The subsystems pick the pixels of their
// windows, and exchange the slots that are no longer needed for their
// results; a group of subsystems configured for the same input level
// forms one stage (chain unit) of a processing pipeline, and consecutive
// groups form consecutive stages. The result tap at the end delivers the
// data of one selected level as a stream.
//
// Fault tolerance: each board's input multiplexer can take the chain from
// the board two positions back (bypass_sel[b] = 1 cuts board b-1 out),
// and out_bypass takes the chain output from the last board but one,
// cutting the last board out. For board 0 both inputs are the feeder, and
// for board 1 the skip input is the feeder.
//
// Configuration records and processor programs come from the host as
// control bytes through the feeder's free slots (host_prog marks program
// bytes); each subsystem's program memory is loaded from the chain, and the host computer and the processors are not part
// of this design, so the processors' side of every subsystem is brought
// out as packed arrays indexed by chain position (0 = nearest the
// feeder). Chain latency from vid_* to chain_out is
// 1 + N_BOARDS*NODES_PER_BOARD clocks (fewer for bypassed boards), plus
// one clock to the tap outputs.
//
// Sizes (boards, subsystems per board, window width, ring rows, program
// memory) are not given by the original design and are this design's
// defaults.
module sintulf_top
  import sintulf_pkg::*;
#(
  parameter int unsigned N_BOARDS        = 4,
  parameter int unsigned NODES_PER_BOARD = 8,
  parameter int unsigned WIN_MAX         = 64,
  parameter int unsigned RING_ROWS       = 4,
  parameter int unsigned PROG_MAX        = 256,
  parameter int unsigned COL_W           = 12,
  localparam int unsigned N_SUB = N_BOARDS * NODES_PER_BOARD,
  localparam int unsigned CW    = $clog2(WIN_MAX),
  localparam int unsigned RW    = $clog2(RING_ROWS),
  localparam int unsigned PW    = $clog2(PROG_MAX)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // video source
  input  logic                          vid_line_start,
  input  logic                          vid_valid,
  input  logic [DATA_W-1:0]             vid_data,
  // host control bytes
  input  logic                          host_valid,
  input  logic [DATA_W-1:0]             host_data,
  input  logic                          host_prog,
  output logic                          host_ready,
  // board bypass control
  input  logic [N_BOARDS-1:0]           bypass_sel,
  input  logic                          out_bypass,
  // chain output and result tap
  output chain_word_t                   chain_out,
  input  logic [LEVEL_W-1:0]            tap_level,
  output logic                          tap_row_start,
  output logic                          tap_valid,
  output logic [DATA_W-1:0]             tap_data,
  output logic [COL_W-1:0]              tap_col,
  // processor side of every subsystem
  output logic [N_SUB-1:0]              proc_row_ready,
  output logic [N_SUB-1:0][RW:0]        proc_rows_avail,
  input  logic [N_SUB-1:0][RW-1:0]      proc_rd_row,
  input  logic [N_SUB-1:0][CW-1:0]      proc_rd_col,
  output logic [N_SUB-1:0][DATA_W-1:0]  proc_rd_data,
  input  logic [N_SUB-1:0]              proc_res_wr_en,
  input  logic [N_SUB-1:0][CW-1:0]      proc_res_wr_addr,
  input  logic [N_SUB-1:0][DATA_W-1:0]  proc_res_wr_data,
  input  logic [N_SUB-1:0]              proc_res_commit,
  input  logic [N_SUB-1:0][CW:0]        proc_res_count,
  output logic [N_SUB-1:0]              proc_res_ready,
  output logic [N_SUB-1:0]              proc_cfg_loaded,
  output node_cfg_t [N_SUB-1:0]         proc_cfg,
  output logic [N_SUB-1:0]              proc_prog_loaded,
  output logic [N_SUB-1:0][PW:0]        proc_prog_len,
  input  logic [N_SUB-1:0][PW-1:0]      proc_pm_addr,
  output logic [N_SUB-1:0][DATA_W-1:0]  proc_pm_data
);

  chain_word_t feed;
  chain_word_t board_out [N_BOARDS];

  pixel_feeder u_feeder (
    .clk, .rst_n,
    .vid_line_start, .vid_valid, .vid_data,
    .host_valid, .host_data, .host_prog, .host_ready,
    .chain_out (feed)
  );

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    chain_word_t in_prev, in_skip;
    if (b == 0) begin : g_first
      assign in_prev = feed;
      assign in_skip = feed;
    end else if (b == 1) begin : g_second
      assign in_prev = board_out[0];
      assign in_skip = feed;
    end else begin : g_rest
      assign in_prev = board_out[b-1];
      assign in_skip = board_out[b-2];
    end

    chain_board #(
      .NODES(NODES_PER_BOARD), .WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS),
      .PROG_MAX(PROG_MAX)
    ) u_board (
      .clk, .rst_n,
      .chain_in_prev   (in_prev),
      .chain_in_skip   (in_skip),
      .bypass_sel      (bypass_sel[b]),
      .chain_out       (board_out[b]),
      .proc_row_ready  (proc_row_ready  [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_rows_avail (proc_rows_avail [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_rd_row     (proc_rd_row     [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_rd_col     (proc_rd_col     [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_rd_data    (proc_rd_data    [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_res_wr_en  (proc_res_wr_en  [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_res_wr_addr(proc_res_wr_addr[b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_res_wr_data(proc_res_wr_data[b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_res_commit (proc_res_commit [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_res_count  (proc_res_count  [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_res_ready  (proc_res_ready  [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_cfg_loaded (proc_cfg_loaded [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_cfg        (proc_cfg        [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_prog_loaded(proc_prog_loaded[b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_prog_len   (proc_prog_len   [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_pm_addr    (proc_pm_addr    [b*NODES_PER_BOARD +: NODES_PER_BOARD]),
      .proc_pm_data    (proc_pm_data    [b*NODES_PER_BOARD +: NODES_PER_BOARD])
    );
  end

  if (N_BOARDS > 1) begin : g_out_mux
    assign chain_out = out_bypass ? board_out[N_BOARDS-2] : board_out[N_BOARDS-1];
  end else begin : g_out_single
    assign chain_out = out_bypass ? feed : board_out[0];
  end

  result_tap #(.COL_W(COL_W)) u_tap (
    .clk, .rst_n,
    .chain_in  (chain_out),
    .sel_level (tap_level),
    .row_start (tap_row_start),
    .valid     (tap_valid),
    .data      (tap_data),
    .col       (tap_col)
  );

endmodule
