// chain_board -- a circuit board carrying a run of subsystems.
//
// The subsystems on a board are chained in series. At the board's input a
// multiplexer chooses between the output of the previous board
// (chain_in_prev) and the output of the board before that
// (chain_in_skip). Setting bypass_sel thus cuts the previous board out of
// the chain, so a board with a fatal fault in its chain path can be
// bypassed under program control while the rest of the system keeps
// running. The multiplexer is combinational; every subsystem registers
// the chain, so a board adds NODES clocks of latency.
//
// Processor-side ports of the subsystems are brought out as packed arrays
// indexed by position on the board (0 = nearest the input).
//
// The bypass multiplexer at each board input follows the original design's
// figure of a bypassed board; NODES = 8 per board is this design's choice.
module chain_board
  import sintulf_pkg::*;
#(
  parameter int unsigned NODES     = 8,
  parameter int unsigned WIN_MAX   = 64,
  parameter int unsigned RING_ROWS = 4,
  parameter int unsigned PROG_MAX  = 256,
  localparam int unsigned CW = $clog2(WIN_MAX),
  localparam int unsigned RW = $clog2(RING_ROWS),
  localparam int unsigned PW = $clog2(PROG_MAX)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  chain_word_t                   chain_in_prev,
  input  chain_word_t                   chain_in_skip,
  input  logic                          bypass_sel,
  output chain_word_t                   chain_out,
  // processor side, one entry per subsystem
  output logic [NODES-1:0]              proc_row_ready,
  output logic [NODES-1:0][RW:0]        proc_rows_avail,
  input  logic [NODES-1:0][RW-1:0]      proc_rd_row,
  input  logic [NODES-1:0][CW-1:0]      proc_rd_col,
  output logic [NODES-1:0][DATA_W-1:0]  proc_rd_data,
  input  logic [NODES-1:0]              proc_res_wr_en,
  input  logic [NODES-1:0][CW-1:0]      proc_res_wr_addr,
  input  logic [NODES-1:0][DATA_W-1:0]  proc_res_wr_data,
  input  logic [NODES-1:0]              proc_res_commit,
  input  logic [NODES-1:0][CW:0]        proc_res_count,
  output logic [NODES-1:0]              proc_res_ready,
  output logic [NODES-1:0]              proc_cfg_loaded,
  output node_cfg_t [NODES-1:0]         proc_cfg,
  output logic [NODES-1:0]              proc_prog_loaded,
  output logic [NODES-1:0][PW:0]        proc_prog_len,
  input  logic [NODES-1:0][PW-1:0]      proc_pm_addr,
  output logic [NODES-1:0][DATA_W-1:0]  proc_pm_data
);

  chain_word_t link [NODES+1];

  assign link[0]   = bypass_sel ? chain_in_skip : chain_in_prev;
  assign chain_out = link[NODES];

  for (genvar i = 0; i < NODES; i++) begin : g_sub
    subsystem #(.WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS), .PROG_MAX(PROG_MAX)) u_sub (
      .clk, .rst_n,
      .chain_in        (link[i]),
      .chain_out       (link[i+1]),
      .proc_row_ready  (proc_row_ready[i]),
      .proc_rows_avail (proc_rows_avail[i]),
      .proc_rd_row     (proc_rd_row[i]),
      .proc_rd_col     (proc_rd_col[i]),
      .proc_rd_data    (proc_rd_data[i]),
      .proc_res_wr_en  (proc_res_wr_en[i]),
      .proc_res_wr_addr(proc_res_wr_addr[i]),
      .proc_res_wr_data(proc_res_wr_data[i]),
      .proc_res_commit (proc_res_commit[i]),
      .proc_res_count  (proc_res_count[i]),
      .proc_res_ready  (proc_res_ready[i]),
      .proc_cfg_loaded (proc_cfg_loaded[i]),
      .proc_cfg        (proc_cfg[i]),
      .proc_prog_loaded(proc_prog_loaded[i]),
      .proc_prog_len   (proc_prog_len[i]),
      .proc_pm_addr    (proc_pm_addr[i]),
      .proc_pm_data    (proc_pm_data[i])
    );
  end

endmodule
