// tb_sintulf_top -- end-to-end run of the whole chain at its default size.
//
// The top is built with its default parameters: 4 boards of 8 subsystems.
// Board 1 is cut out by the bypass multiplexer of board 2, as for a board
// with a fault in its chain path, leaving 24 subsystems in the chain.
// The host sends 23 configuration records through the feeder:
//   11 records: stage 1, level 0 in, window 18, exchange 16 (3x3 maximum)
//    1 record : a passive spare
//   11 records: stage 2, level 1 in, window 16, exchange 16 (data
//               reduction: one count of pixels >= 128 per window)
// and the last subsystem is left unconfigured. Each stage's records ask
// for a program, and one copy of each stage's program follows its records:
// program A (first byte even: 3x3 maximum) and program B (first byte
// odd: counting). Each processor model runs what its program selects.
// The image is 178 pixels wide, sent at one pixel per clock with a head
// tag and 30 clocks of blanking per row.
//
// Checked: the level-2 results at the tap, row by row, against a
// reference computed here from the image (first results in row 6, i.e. a
// delay of two neighbourhood stages); that stage 2 consumes every stage-1
// result; that the two overlap pixels of the last stage-1 window leave the
// chain each row; that data reduction leaves idle slots; which subsystems
// were configured; that spare and unconfigured subsystems never picked a
// row; and that every processor finished within a row period.
// Finally the last board is cut out by the output multiplexer and the tap
// is switched to level 0: two more rows are sent and the tap must deliver
// exactly the two overlap pixels of each row, taken from board 2.
// Each mechanism is counted and a failure is counted for one never seen.
module tb_sintulf_top;
  import sintulf_pkg::*;
  localparam int unsigned N_BOARDS = 4, NPB = 8, N_SUB = N_BOARDS * NPB;
  localparam int unsigned WIN_MAX = 64, RING_ROWS = 4;
  localparam int unsigned CW = $clog2(WIN_MAX), RW = $clog2(RING_ROWS);
  localparam int S1 = 11, S2 = 11, X1 = 16, W1 = 18, W2 = 16;
  localparam int IMG_W = S1 * X1 + 2, IMG_H = 14, BLANK = 30, ROW_T = IMG_W + 1 + BLANK;
  localparam int THRESH = 128, PROG_A_LEN = 5, PROG_B_LEN = 3;

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
  logic [N_SUB-1:0][8:0] proc_prog_len;
  logic [N_SUB-1:0][7:0] proc_pm_addr, proc_pm_data;
  int busy [N_SUB];
  int checks = 0, failures = 0;

  sintulf_top dut (.*);

  for (genvar i = 0; i < N_SUB; i++) begin : g_proc
    proc_model #(.WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS), .THRESH(THRESH)) u_proc (
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
    return 8'((r * 59 + c * 37 + ((r * c) % 17) * 11) % 256);
  endfunction

  function automatic logic [7:0] max3(int r0, int c0);
    logic [7:0] m = 0;
    for (int r = r0; r < r0 + 3; r++)
      for (int c = c0; c < c0 + 3; c++)
        if (img(r, c) > m) m = img(r, c);
    return m;
  endfunction

  // expected level-2 result k of output row R (R >= 6)
  function automatic int expect_l2(int row, int k);
    int n = 0;
    for (int c = k * W2; c < (k + 1) * W2; c++)
      if (max3(row - 6, c) >= THRESH) n++;
    return n;
  endfunction

  // chain position of each subsystem after board 1 is bypassed
  function automatic bit in_chain(int i);
    return (i / NPB) != 1;
  endfunction

  // ---- monitors -------------------------------------------------------
  int tap_row = -1, row_vals = 0;
  int n_heads = 0, n_l0 = 0, n_l1 = 0, n_l2 = 0, n_idle_in_row = 0;
  int n_results_ok = 0, n_rows_with_results = 0, first_result_row = -1;
  int picks [N_SUB];
  int max_busy = 0;
  logic in_row = 0;
  logic l0_phase = 0;
  int n_out_bypass = 0, n_l0_tap = 0, n_prog = 0;

  // while the last board is cut out the chain output is board 2's output
  always @(negedge clk) if (rst_n && out_bypass) begin
    n_out_bypass++;
    check(chain_out == dut.g_board[2].u_board.chain_out, "output bypass selects board 2");
  end

  // level-0 words at the tap after the level switch: overlap pixels
  always @(negedge clk) if (rst_n && l0_phase && tap_valid) begin
    int c;
    c = IMG_W - 2 + int'(tap_col);
    check(int'(tap_col) < 2 && tap_data == img(tap_row, c),
          $sformatf("row %0d overlap pixel %0d = %h", tap_row, tap_col, tap_data));
    n_l0_tap++;
  end

  always @(negedge clk) if (rst_n) begin
    if (tap_row_start) begin
      if (tap_row >= 6 && tap_row < IMG_H && !out_bypass)
        check(row_vals == S2, $sformatf("row %0d: %0d level-2 results, expected %0d",
                                        tap_row, row_vals, S2));
      else if (tap_row >= 0 && tap_row < 6)
        check(row_vals == 0, $sformatf("row %0d: results before the pipeline filled", tap_row));
      tap_row++;
      row_vals = 0;
    end
    if (tap_valid && !out_bypass) begin
      int e;
      e = (int'(tap_col) < S2 && tap_row >= 6) ? expect_l2(tap_row, int'(tap_col)) : -1;
      check(int'(tap_data) == e, $sformatf("row %0d result %0d = %0d, expected %0d",
                                           tap_row, tap_col, tap_data, e));
      if (int'(tap_data) == e) n_results_ok++;
      if (row_vals == 0) n_rows_with_results++;
      if (first_result_row < 0) first_result_row = tap_row;
      row_vals++;
    end
    // raw chain output
    if (chain_out.kind == TK_HEAD) begin n_heads++; in_row = 1; end
    if (chain_out.kind == TK_DATA) begin
      unique case (chain_out.level)
        2'd0: n_l0++;
        2'd1: if (!out_bypass) n_l1++;
        2'd2: n_l2++;
        default: ;
      endcase
    end
    if (chain_out.kind == TK_IDLE && in_row && n_heads > 6) n_idle_in_row++;
    for (int i = 0; i < N_SUB; i++) begin
      if (proc_row_ready[i]) picks[i]++;
      if (busy[i] > max_busy) max_busy = busy[i];
    end
  end

  // ---- stimulus -------------------------------------------------------
  logic [7:0] cfg_bytes [$];
  logic       cfg_prog [$];

  task automatic host_byte(logic [7:0] b, logic prog);
    cfg_bytes.push_back(b);
    cfg_prog.push_back(prog);
  endtask

  initial begin
    for (int i = 0; i < N_SUB; i++) picks[i] = 0;
    // records: byte 0 (active, load program, input level), skip, width,
    // exchange; each stage's program follows its records and is sent once
    for (int n = 0; n < S1; n++) begin
      host_byte(8'hC0, 0); host_byte(8'd0, 0); host_byte(8'(W1), 0); host_byte(8'(X1), 0);
    end
    host_byte(8'h00, 0); host_byte(8'd0, 0); host_byte(8'd0, 0); host_byte(8'd0, 0);
    for (int i = 0; i < PROG_A_LEN; i++) host_byte(8'(i * 2), 1);        // program A: byte 0 even
    for (int n = 0; n < S2; n++) begin
      host_byte(8'hC1, 0); host_byte(8'd0, 0); host_byte(8'(W2), 0); host_byte(8'(W2), 0);
    end
    for (int i = 0; i < PROG_B_LEN; i++) host_byte(8'(i * 2 + 1), 1);    // program B: byte 0 odd

    bypass_sel[2] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // host bytes go into free slots
    while (cfg_bytes.size() > 0) begin
      host_valid = 1; host_data = cfg_bytes[0]; host_prog = cfg_prog[0];
      #1;
      if (host_ready) begin
        void'(cfg_bytes.pop_front());
        void'(cfg_prog.pop_front());
      end
      @(negedge clk);
    end
    host_valid = 0;
    host_prog  = 0;
    repeat (N_SUB + 4) @(negedge clk);
    for (int i = 0; i < N_SUB; i++) begin
      int pos;
      // chain order position among the 24 subsystems that remain; board 1
      // still sees the chain, but its output is discarded
      pos = (i < NPB) ? i : i - NPB;
      if (in_chain(i)) check(proc_cfg_loaded[i] == (in_chain(i) && pos < S1 + 1 + S2),
            $sformatf("subsystem %0d configured = %0d", i, proc_cfg_loaded[i]));
    end
    // video
    for (int r = 0; r < IMG_H; r++) begin
      vid_line_start = 1; @(negedge clk); vid_line_start = 0;
      for (int c = 0; c < IMG_W; c++) begin
        vid_valid = 1; vid_data = img(r, c); @(negedge clk);
      end
      vid_valid = 0;
      repeat (BLANK) @(negedge clk);
    end
    for (int i = 0; i < N_SUB; i++) begin
      int pos;
      pos = (i < NPB) ? i : i - NPB;
      if (!in_chain(i)) continue;
      if (pos < S1)
        check(proc_prog_loaded[i] && proc_prog_len[i] == PROG_A_LEN,
              $sformatf("subsystem %0d: program A loaded", i));
      else if (pos > S1 && pos < S1 + 1 + S2)
        check(proc_prog_loaded[i] && proc_prog_len[i] == PROG_B_LEN,
              $sformatf("subsystem %0d: program B loaded", i));
      else
        check(!proc_prog_loaded[i], $sformatf("subsystem %0d: no program", i));
      if (proc_prog_loaded[i]) n_prog++;
    end
    // one more head tag closes the last row
    vid_line_start = 1; @(negedge clk); vid_line_start = 0;
    repeat (N_SUB + 8) @(negedge clk);

    // ---- output bypass and tap level switch ----
    // Cut the last board out and read the supply pixels left in the chain:
    // after board 2, each row still holds the two overlap pixels of the
    // last stage-1 window (image columns IMG_W-2 and IMG_W-1).
    out_bypass = 1;
    tap_level  = 2'd0;
    repeat (N_SUB) @(negedge clk);
    l0_phase = 1;
    for (int r = IMG_H; r < IMG_H + 2; r++) begin
      for (int c = 0; c < IMG_W; c++) begin
        vid_valid = 1; vid_data = img(r, c); @(negedge clk);
      end
      vid_valid = 0;
      repeat (BLANK) @(negedge clk);
      vid_line_start = 1; @(negedge clk); vid_line_start = 0;
    end
    repeat (N_SUB + 8) @(negedge clk);
    l0_phase = 0;

    // ---- mechanism counts ----
    $display("head tags %0d, level-0 words out %0d, level-1 out %0d, level-2 out %0d, idle slots in rows %0d",
             n_heads, n_l0, n_l1, n_l2, n_idle_in_row);
    $display("results checked %0d, first result row %0d, max processor time %0d of %0d cycles",
             n_results_ok, first_result_row, max_busy, ROW_T);
    $display("output bypass cycles %0d, overlap pixels read at level 0 %0d", n_out_bypass, n_l0_tap);
    check(n_heads == IMG_H + 3, "head tags passed the whole chain");
    check(n_out_bypass > 0, "output bypass used");
    check(n_prog == S1 + S2, $sformatf("%0d programs loaded from two broadcasts", n_prog));
    check(n_l0_tap == 4, $sformatf("%0d overlap pixels at the tap after the level switch, expected 4", n_l0_tap));
    check(first_result_row == 6, $sformatf("first level-2 row %0d, expected 6", first_result_row));
    // rows 6..IMG_H-1 carry level-2 results; the last ones would need
    // slots in rows that are not sent
    check(n_rows_with_results == IMG_H - 6, "level-2 results in every row once the pipeline filled");
    check(n_results_ok == (IMG_H - 6) * S2, "exchange: all level-2 results correct");
    check(n_l0 == 2 * (IMG_H + 2), $sformatf("overlap: %0d leftover supply pixels, expected %0d", n_l0, 2 * (IMG_H + 2)));
    check(n_l1 == 0, "every stage-1 result consumed by stage 2");
    check(n_idle_in_row > 0, "data reduction freed slots");
    check(max_busy > 0 && max_busy < ROW_T, "processors kept up with the row rate");
    for (int i = 0; i < N_SUB; i++) begin
      int pos;
      bit active;
      pos = (i < NPB) ? i : i - NPB;
      active = in_chain(i) && (pos < S1 || (pos > S1 && pos < S1 + 1 + S2));
      // stage 1 picks every image row, stage 2 every row holding stage-1 results
      if (!in_chain(i)) continue;
      if (active) check(picks[i] == ((pos < S1) ? IMG_H + 2 : IMG_H - 2),
                        $sformatf("subsystem %0d picked %0d rows", i, picks[i]));
      else        check(picks[i] == 0, $sformatf("idle subsystem %0d picked %0d rows", i, picks[i]));
    end
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
