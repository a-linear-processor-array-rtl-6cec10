// tb_two_transforms -- two neighbourhood transforms in one chain.
//
// A reduced chain (2 boards of 5 subsystems) runs two 3x3-maximum stages
// in sequence: 5 subsystems on the supply pixels (window 16, exchange 14)
// and 4 on their results (window 19, exchange 17); the last subsystem is
// left unconfigured. The image is 72 pixels wide. Two chained 3x3 maxima
// equal one 5x5 maximum, so output row R, column c must be the maximum of
// image rows R-8..R-4 and columns c..c+4. The result centred on image row
// R-6 thus appears in row R: the delay is the sum of the two stages' own
// delays of 3 rows each. Every level-2 word at the tap is compared with
// that reference, and the first row with results must be row 8.
module tb_two_transforms;
  import sintulf_pkg::*;
  localparam int unsigned N_BOARDS = 2, NPB = 5, N_SUB = N_BOARDS * NPB;
  localparam int unsigned WIN_MAX = 32, RING_ROWS = 4, PROG_MAX = 16;
  localparam int unsigned CW = $clog2(WIN_MAX), RW = $clog2(RING_ROWS), PW = $clog2(PROG_MAX);
  localparam int S1 = 5, X1 = 14, W1 = 16, S2 = 4, X2 = 17, W2 = 19;
  localparam int IMG_W = S1 * X1 + 2, IMG_H = 14, BLANK = 130, ROW_T = IMG_W + 1 + BLANK;

  logic clk = 0, rst_n = 0;
  logic vid_line_start = 0, vid_valid = 0, host_valid = 0, host_prog = 0, host_ready, out_bypass = 0;
  logic [7:0] vid_data = '0, host_data = '0;
  logic [N_BOARDS-1:0] bypass_sel = '0;
  chain_word_t chain_out;
  logic [LEVEL_W-1:0] tap_level = 2'd2;
  logic tap_row_start, tap_valid;
  logic [7:0] tap_data;
  logic [11:0] tap_col;
  logic [N_SUB-1:0] proc_row_ready, proc_res_wr_en, proc_res_commit, proc_res_ready, proc_cfg_loaded;
  logic [N_SUB-1:0][RW:0] proc_rows_avail;
  logic [N_SUB-1:0][RW-1:0] proc_rd_row;
  logic [N_SUB-1:0][CW-1:0] proc_rd_col, proc_res_wr_addr;
  logic [N_SUB-1:0][7:0] proc_rd_data, proc_res_wr_data;
  logic [N_SUB-1:0][CW:0] proc_res_count;
  node_cfg_t [N_SUB-1:0] proc_cfg;
  logic [N_SUB-1:0] proc_prog_loaded;
  logic [N_SUB-1:0][PW:0] proc_prog_len;
  logic [N_SUB-1:0][PW-1:0] proc_pm_addr;
  logic [N_SUB-1:0][7:0] proc_pm_data;
  int busy [N_SUB];
  int checks = 0, failures = 0;

  sintulf_top #(.N_BOARDS(N_BOARDS), .NODES_PER_BOARD(NPB), .WIN_MAX(WIN_MAX),
                .RING_ROWS(RING_ROWS), .PROG_MAX(PROG_MAX)) dut (.*);

  for (genvar i = 0; i < N_SUB; i++) begin : g_proc
    proc_model #(.WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS), .PROG_MAX(PROG_MAX)) u_proc (
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
    return 8'((r * 41 + c * 67 + ((r + 3) * (c + 1) % 23) * 9) % 256);
  endfunction

  function automatic logic [7:0] max5(int r0, int c0);
    logic [7:0] m = 0;
    for (int r = r0; r < r0 + 5; r++)
      for (int c = c0; c < c0 + 5; c++)
        if (img(r, c) > m) m = img(r, c);
    return m;
  endfunction

  int tap_row = -1, row_vals = 0, first_row = -1, n_ok = 0, max_busy = 0;

  always @(negedge clk) if (rst_n) begin
    if (tap_row_start) begin
      if (tap_row >= 8 && tap_row < IMG_H)
        check(row_vals == S2 * X2, $sformatf("row %0d: %0d results", tap_row, row_vals));
      tap_row++;
      row_vals = 0;
    end
    if (tap_valid) begin
      logic [7:0] e;
      e = max5(tap_row - 8, int'(tap_col));
      check(tap_row >= 8 && tap_data == e,
            $sformatf("row %0d col %0d = %h, expected %h", tap_row, tap_col, tap_data, e));
      if (tap_data == e) n_ok++;
      if (first_row < 0) first_row = tap_row;
      row_vals++;
    end
    for (int i = 0; i < N_SUB; i++) if (busy[i] > max_busy) max_busy = busy[i];
  end

  logic [7:0] hb [$];
  logic       hp [$];

  initial begin
    for (int n = 0; n < S1; n++) begin
      hb.push_back(8'hC0); hb.push_back(0); hb.push_back(8'(W1)); hb.push_back(8'(X1));
      repeat (4) hp.push_back(0);
    end
    hb.push_back(8'h00); hp.push_back(1);          // program: 3x3 maximum
    for (int n = 0; n < S2; n++) begin
      hb.push_back(8'hC1); hb.push_back(0); hb.push_back(8'(W2)); hb.push_back(8'(X2));
      repeat (4) hp.push_back(0);
    end
    hb.push_back(8'h00); hp.push_back(1);          // same program, second stage
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (hb.size() > 0) begin
      host_valid = 1; host_data = hb[0]; host_prog = hp[0];
      @(negedge clk);
      void'(hb.pop_front()); void'(hp.pop_front());
    end
    host_valid = 0; host_prog = 0;
    repeat (N_SUB + 4) @(negedge clk);
    for (int r = 0; r < IMG_H; r++) begin
      vid_line_start = 1; @(negedge clk); vid_line_start = 0;
      for (int c = 0; c < IMG_W; c++) begin
        vid_valid = 1; vid_data = img(r, c); @(negedge clk);
      end
      vid_valid = 0;
      repeat (BLANK) @(negedge clk);
    end
    vid_line_start = 1; @(negedge clk); vid_line_start = 0;
    repeat (N_SUB + 8) @(negedge clk);
    $display("results checked %0d, first result row %0d, max processor time %0d of %0d",
             n_ok, first_row, max_busy, ROW_T);
    check(proc_cfg_loaded == N_SUB'((1 << (S1 + S2)) - 1), "records allocated in chain order");
    check(first_row == 8, $sformatf("first result row %0d, expected 8", first_row));
    check(n_ok == (IMG_H - 8) * S2 * X2, "every result of the two stages correct");
    check(max_busy < ROW_T, "processors kept up with the row rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * ROW_T + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
