// tb_chain_board -- a board of three subsystems, with its bypass multiplexer.
//
// Three subsystems with processor models form one transform stage (3x3
// maximum, window 8, exchange 6, identical records), and a single copy of
// their common program is sent after the records. The image enters on
// the normal input while the skip input carries other traffic; halfway
// through, the bypass multiplexer is switched so that the same image
// arrives on the skip input while the normal input carries junk, as when
// the board before is cut out. Every output word is predicted NODES clocks
// after its input: head tags, maxima of image rows R-4..R-2 in the
// exchanged slots (each node covering its own six columns), and the two
// overlap pixels of the last window passed on unchanged.
module tb_chain_board;
  import sintulf_pkg::*;
  localparam int unsigned NODES = 3, WIN_MAX = 16, RING_ROWS = 4;
  localparam int unsigned CW = $clog2(WIN_MAX), RW = $clog2(RING_ROWS);
  localparam int XCHG = 6, WIN = 8, IMG_W = NODES * XCHG + 2, IMG_H = 10, BLANK = 60;

  logic clk = 0, rst_n = 0;
  chain_word_t chain_in_prev = IDLE_WORD, chain_in_skip = IDLE_WORD, chain_out;
  logic bypass_sel = 0;
  logic [NODES-1:0] proc_row_ready, proc_res_wr_en, proc_res_commit, proc_res_ready, proc_cfg_loaded;
  logic [NODES-1:0][RW:0] proc_rows_avail;
  logic [NODES-1:0][RW-1:0] proc_rd_row;
  logic [NODES-1:0][CW-1:0] proc_rd_col, proc_res_wr_addr;
  logic [NODES-1:0][7:0] proc_rd_data, proc_res_wr_data;
  logic [NODES-1:0][CW:0] proc_res_count;
  node_cfg_t [NODES-1:0] proc_cfg;
  logic [NODES-1:0] proc_prog_loaded;
  logic [NODES-1:0][8:0] proc_prog_len;
  logic [NODES-1:0][7:0] proc_pm_addr, proc_pm_data;
  int busy [NODES];
  int checks = 0, failures = 0;

  chain_board #(.NODES(NODES), .WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS)) dut (.*);

  for (genvar i = 0; i < NODES; i++) begin : g_proc
    proc_model #(.WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS)) u_proc (
      .clk, .prog_loaded(proc_prog_loaded[i]), .pm_addr(proc_pm_addr[i]), .pm_data(proc_pm_data[i]),
      .row_ready(proc_row_ready[i]), .rows_avail(proc_rows_avail[i]),
      .rd_row(proc_rd_row[i]), .rd_col(proc_rd_col[i]), .rd_data(proc_rd_data[i]),
      .res_wr_en(proc_res_wr_en[i]), .res_wr_addr(proc_res_wr_addr[i]),
      .res_wr_data(proc_res_wr_data[i]), .res_commit(proc_res_commit[i]),
      .res_count(proc_res_count[i]), .res_ready(proc_res_ready[i]),
      .cfg(proc_cfg[i]), .busy_cycles(busy[i])
    );
  end

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] img(int r, int c);
    return 8'((r * 91 + c * 23 + (r ^ c) * 7) % 253);
  endfunction

  function automatic logic [7:0] max3(int r0, int c0);
    logic [7:0] m = 0;
    for (int r = r0; r < r0 + 3; r++)
      for (int c = c0; c < c0 + 3; c++)
        if (img(r, c) > m) m = img(r, c);
    return m;
  endfunction

  // expected outputs, compared NODES clocks after their inputs
  chain_word_t expq [$];
  int n_results = 0, n_bypassed_rows = 0;


  task automatic send(chain_word_t w, chain_word_t e);
    chain_word_t junk;
    junk = '{kind: TK_DATA, level: '0, data: 8'($urandom)};
    if (bypass_sel) begin chain_in_skip = w; chain_in_prev = junk; end
    else            begin chain_in_prev = w; chain_in_skip = junk; end
    expq.push_back(e);
    @(negedge clk);
    // after this edge the output holds the word sent NODES-1 sends ago
    if (expq.size() >= NODES) begin
      chain_word_t x;
      x = expq.pop_front();
      check(chain_out == x, $sformatf("out %p, expected %p", chain_out, x));
      if (x.kind == TK_DATA && x.level == 1) n_results++;
    end
  endtask

  initial begin
    logic [7:0] rec [4];
    rec = '{8'hC0, 8'd0, 8'(WIN), 8'(XCHG)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NODES; n++)
      for (int i = 0; i < 4; i++) send('{kind: TK_CTRL, level: '0, data: rec[i]}, IDLE_WORD);
    // one copy of the common program serves all three nodes
    for (int i = 0; i < 2; i++)
      send('{kind: TK_CTRL, level: CTRL_PROG, data: 8'(i * 4)},
           '{kind: TK_CTRL, level: CTRL_PROG, data: 8'(i * 4)});
    for (int r = 0; r < IMG_H; r++) begin
      if (r == IMG_H / 2) bypass_sel = 1;
      if (bypass_sel) n_bypassed_rows++;
      send('{kind: TK_HEAD, level: '0, data: '0}, '{kind: TK_HEAD, level: '0, data: '0});
      for (int c = 0; c < IMG_W; c++) begin
        chain_word_t w, e;
        w = '{kind: TK_DATA, level: '0, data: img(r, c)};
        if (c >= NODES * XCHG) e = w;
        else if (r >= 4)       e = '{kind: TK_DATA, level: 2'd1, data: max3(r - 4, c)};
        else                   e = IDLE_WORD;
        send(w, e);
      end
      for (int b = 0; b < BLANK; b++) send(IDLE_WORD, IDLE_WORD);
    end
    check(&proc_cfg_loaded, "all nodes configured");
    check(&proc_prog_loaded, "all nodes took the common program");
    check(n_results == (IMG_H - 4) * NODES * XCHG,
          $sformatf("%0d results, expected %0d", n_results, (IMG_H - 4) * NODES * XCHG));
    check(n_bypassed_rows > 0, "bypass exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
