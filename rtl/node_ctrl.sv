// node_ctrl -- the communication node of one subsystem.
//
// The node is one stage of the chain shift register: every clock it takes
// a chain word from its upstream neighbour and registers a word for its
// downstream neighbour. While a word passes, the node may
//   * pick it: a data word of the node's input level that falls in the
//     node's window is written into the window ring buffer;
//   * exchange it: the first `xchg` window words (the part of the window
//     no downstream node needs) are replaced by the node's results for an
//     earlier row, raised one level. When fewer results than `xchg` were
//     produced (data reduction), the remaining exchanged slots become
//     idle slots;
//   * consume it: control bytes are taken by a node that is not yet
//     configured and replaced by idle slots.
//
// Window selection. After each head tag the node counts the data words of
// its input level. It bypasses `skip` of them and picks the next `width`.
// Words that an upstream node of the same stage has already exchanged
// carry the next level and are not counted, so with skip = 0 every node of
// a stage takes the first window still unclaimed: its window starts where
// the previous node's exchanged part ended, and the last `width - xchg`
// words (the overlap) stay in the stream for the next node. All nodes of
// a stage can thus be given identical parameters, independent of the
// image width and of their position in the chain. A non-zero skip gives
// plain counting from the head tag.
//
// Configuration. After reset the node is unconfigured and passes every
// word. The first CFG_BYTES control words that reach it form its record:
//   byte 0: bit 7 active, bit 6 load program, bits 1:0 input level
//   byte 1: skip      byte 2: width      byte 3: xchg
// and are replaced by idle slots, so the next record is left for the next
// unconfigured node: records are handed out in chain order without any
// node address. A node loaded with active = 0 is a passive spare.
//
// Program loading. A node whose record has the load-program bit copies
// the next program that passes: program bytes are control words of level
// CTRL_PROG, written to consecutive program memory addresses from 0 and
// passed on unchanged, so every waiting node takes the same copy and a
// program common to a whole stage is sent once. The program ends at the
// next configuration byte or head tag after at least one program byte;
// prog_loaded is then set and prog_len holds its length. Idle slots and
// data words in between are ignored.
//
// Row timing. At each head tag the node pulses `swap` (the result buffer
// presents the results committed during the last row) and, if it picked
// words since the previous head tag, `row_advance` (the row just picked
// is complete in the ring buffer, and the processor may start on it).
// Latency through the node is one clock.
//
// Picking, exchange, head tags, idle slots, loading over the chain and
// sending a common program once follow the original SINTULF design. That
// design replaced counting from the head tag by a principle it does not
// spell out; the level-based claiming above is this design's reading of
// it. The record layout and program framing are this design's.
module node_ctrl
  import sintulf_pkg::*;
#(
  parameter int unsigned WIN_MAX  = 64,
  parameter int unsigned PROG_MAX = 256,
  localparam int unsigned CW = $clog2(WIN_MAX),
  localparam int unsigned PW = $clog2(PROG_MAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  chain_word_t       chain_in,
  output chain_word_t       chain_out,
  // window ring buffer
  output logic              ring_wr_en,
  output logic [CW-1:0]     ring_wr_col,
  output logic [DATA_W-1:0] ring_wr_data,
  output logic              row_advance,
  // result buffer
  output logic              swap,
  output logic [CW-1:0]     res_rd_addr,
  input  logic [DATA_W-1:0] res_rd_data,
  input  logic [CW:0]       res_rd_count,
  // program memory
  output logic              pm_wr_en,
  output logic [PW-1:0]     pm_wr_addr,
  output logic [DATA_W-1:0] pm_wr_data,
  output logic              prog_loaded,
  output logic [PW:0]       prog_len,
  // status
  output logic              cfg_loaded,
  output node_cfg_t         cfg
);

  localparam int unsigned CNT_W = 9;

  logic [1:0]       cfg_idx;
  logic [CNT_W-1:0] cnt;
  logic             row_picked;

  logic             is_head, match, in_win, in_xchg, take_cfg;
  logic             is_prog, prog_wait, prog_end;
  logic [CNT_W-1:0] col;
  chain_word_t      nxt;

  always_comb begin
    is_head  = (chain_in.kind == TK_HEAD);
    take_cfg = !cfg_loaded && (chain_in.kind == TK_CTRL) && (chain_in.level == CTRL_CFG);
    is_prog  = (chain_in.kind == TK_CTRL) && (chain_in.level == CTRL_PROG);
    prog_wait = cfg_loaded && cfg.load_prog && !prog_loaded;
    prog_end  = prog_wait && (prog_len != '0) && (is_head ||
                ((chain_in.kind == TK_CTRL) && (chain_in.level == CTRL_CFG)));
    match    = cfg_loaded && cfg.active && (chain_in.kind == TK_DATA)
               && (chain_in.level == cfg.in_level);
    col      = cnt - CNT_W'(cfg.skip);
    in_win   = match && (cnt >= CNT_W'(cfg.skip)) && (col < CNT_W'(cfg.width));
    in_xchg  = in_win && (col < CNT_W'(cfg.xchg));
  end

  assign ring_wr_en   = in_win && (col < CNT_W'(WIN_MAX));
  assign ring_wr_col  = CW'(col);
  assign ring_wr_data = chain_in.data;
  assign res_rd_addr  = CW'(col);
  assign row_advance  = is_head && row_picked;
  assign swap         = is_head && cfg_loaded && cfg.active;
  assign pm_wr_en     = prog_wait && is_prog && (prog_len < (PW+1)'(PROG_MAX));
  assign pm_wr_addr   = PW'(prog_len);
  assign pm_wr_data   = chain_in.data;

  // Word sent downstream: passed, consumed, exchanged or freed.
  always_comb begin
    nxt = chain_in;
    if (take_cfg) begin
      nxt = IDLE_WORD;
    end else if (in_xchg) begin
      if ((CW+1)'(col) < res_rd_count) begin
        nxt.kind  = TK_DATA;
        nxt.level = cfg.in_level + 1'b1;
        nxt.data  = res_rd_data;
      end else begin
        nxt = IDLE_WORD;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_out  <= IDLE_WORD;
      cfg        <= '0;
      cfg_loaded <= 1'b0;
      cfg_idx    <= '0;
      prog_loaded <= 1'b0;
      prog_len   <= '0;
      cnt        <= '0;
      row_picked <= 1'b0;
    end else begin
      chain_out <= nxt;
      if (take_cfg) begin
        unique case (cfg_idx)
          2'd0: begin
            cfg.active    <= chain_in.data[7];
            cfg.load_prog <= chain_in.data[6];
            cfg.in_level  <= chain_in.data[LEVEL_W-1:0];
          end
          2'd1: cfg.skip  <= chain_in.data;
          2'd2: cfg.width <= chain_in.data;
          default: cfg.xchg <= chain_in.data;
        endcase
        if (cfg_idx == 2'(CFG_BYTES - 1)) cfg_loaded <= 1'b1;
        cfg_idx <= cfg_idx + 1'b1;
      end
      if (pm_wr_en) prog_len <= prog_len + 1'b1;
      if (prog_end) prog_loaded <= 1'b1;
      if (is_head) begin
        cnt        <= '0;
        row_picked <= 1'b0;
      end else if (match && cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
      if (in_win) row_picked <= 1'b1;
    end
  end

  // The exchanged part lies inside the window.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cfg_loaded && cfg.active |-> cfg.xchg <= cfg.width);

endmodule
