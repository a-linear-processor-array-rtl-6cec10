// subsystem -- one building block of the chain, less its processor.
//
// A subsystem is a processor with its communication node; the original
// design puts the pair on one chip. This module holds the node
// (node_ctrl), the window ring buffer the node fills, the result buffer
// the node empties and the processor's program memory, which the node
// loads from the chain. The processor itself is outside: its side of the
// three memories, the row-ready pulse and the loaded configuration are
// brought out as ports, so any processor (or a model of one) can be
// attached.
//
// Chain: chain_in -> chain_out, one clock of latency.
// Processor timing: proc_row_ready pulses for one clock at the head tag
// that completes a picked row. The processor then reads rows through
// proc_rd_row (0 = newest complete row) / proc_rd_col / proc_rd_data, may
// check proc_rows_avail, writes results with proc_res_wr_* and pulses
// proc_res_commit with their number before the next head tag; they are
// placed on the chain during the row after that head tag.
// proc_prog_loaded rises once the node has copied its program;
// proc_pm_addr -> proc_pm_data reads it, proc_prog_len is its length.
module subsystem
  import sintulf_pkg::*;
#(
  parameter int unsigned WIN_MAX   = 64,
  parameter int unsigned RING_ROWS = 4,
  parameter int unsigned PROG_MAX  = 256,
  localparam int unsigned CW = $clog2(WIN_MAX),
  localparam int unsigned RW = $clog2(RING_ROWS),
  localparam int unsigned PW = $clog2(PROG_MAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  chain_word_t       chain_in,
  output chain_word_t       chain_out,
  // processor side
  output logic              proc_row_ready,
  output logic [RW:0]       proc_rows_avail,
  input  logic [RW-1:0]     proc_rd_row,
  input  logic [CW-1:0]     proc_rd_col,
  output logic [DATA_W-1:0] proc_rd_data,
  input  logic              proc_res_wr_en,
  input  logic [CW-1:0]     proc_res_wr_addr,
  input  logic [DATA_W-1:0] proc_res_wr_data,
  input  logic              proc_res_commit,
  input  logic [CW:0]       proc_res_count,
  output logic              proc_res_ready,
  output logic              proc_cfg_loaded,
  output node_cfg_t         proc_cfg,
  output logic              proc_prog_loaded,
  output logic [PW:0]       proc_prog_len,
  input  logic [PW-1:0]     proc_pm_addr,
  output logic [DATA_W-1:0] proc_pm_data
);

  logic              ring_wr_en;
  logic [CW-1:0]     ring_wr_col;
  logic [DATA_W-1:0] ring_wr_data;
  logic              row_advance;
  logic              swap;
  logic [CW-1:0]     res_rd_addr;
  logic [DATA_W-1:0] res_rd_data;
  logic [CW:0]       res_rd_count;
  logic              pm_wr_en;
  logic [PW-1:0]     pm_wr_addr;
  logic [DATA_W-1:0] pm_wr_data;

  node_ctrl #(.WIN_MAX(WIN_MAX), .PROG_MAX(PROG_MAX)) u_node (
    .clk, .rst_n,
    .chain_in, .chain_out,
    .ring_wr_en, .ring_wr_col, .ring_wr_data, .row_advance,
    .swap, .res_rd_addr, .res_rd_data, .res_rd_count,
    .pm_wr_en, .pm_wr_addr, .pm_wr_data,
    .prog_loaded (proc_prog_loaded),
    .prog_len    (proc_prog_len),
    .cfg_loaded (proc_cfg_loaded),
    .cfg        (proc_cfg)
  );

  window_ring #(.DATA_W(DATA_W), .WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS)) u_ring (
    .clk, .rst_n,
    .wr_en      (ring_wr_en),
    .wr_col     (ring_wr_col),
    .wr_data    (ring_wr_data),
    .row_advance(row_advance),
    .rd_row     (proc_rd_row),
    .rd_col     (proc_rd_col),
    .rd_data    (proc_rd_data),
    .rows_avail (proc_rows_avail)
  );

  result_buffer #(.DATA_W(DATA_W), .RES_MAX(WIN_MAX)) u_res (
    .clk, .rst_n,
    .wr_en       (proc_res_wr_en),
    .wr_addr     (proc_res_wr_addr),
    .wr_data     (proc_res_wr_data),
    .commit      (proc_res_commit),
    .commit_count(proc_res_count),
    .wr_ready    (proc_res_ready),
    .swap        (swap),
    .rd_addr     (res_rd_addr),
    .rd_data     (res_rd_data),
    .rd_count    (res_rd_count)
  );

  program_memory #(.DATA_W(DATA_W), .PROG_MAX(PROG_MAX)) u_pm (
    .clk,
    .wr_en   (pm_wr_en),
    .wr_addr (pm_wr_addr),
    .wr_data (pm_wr_data),
    .rd_addr (proc_pm_addr),
    .rd_data (proc_pm_data)
  );

  assign proc_row_ready = row_advance;

endmodule
