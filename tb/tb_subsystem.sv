// tb_subsystem -- one subsystem with a processor model doing a 3x3 maximum.
//
// A configuration record (skip 0, window 10, exchange 8, load program)
// and a 3-byte program are sent over the chain, then an image of 12-pixel
// rows. The processor model computes the
// 3x3 grey-level maximum of the window. The test predicts every output
// word: a head tag; in the first 8 slots of row R the maxima of image rows
// R-4..R-2 (idle slots while the pipeline fills, R < 4); then the two
// overlap pixels, passed on unchanged. It also checks that the processor's
// work fits in one row period.
module tb_subsystem;
  import sintulf_pkg::*;
  localparam int unsigned WIN_MAX = 16, RING_ROWS = 4;
  localparam int unsigned CW = $clog2(WIN_MAX), RW = $clog2(RING_ROWS);
  localparam int IMG_W = 12, IMG_H = 9, WIN = 10, XCHG = 8, BLANK = 90;

  logic clk = 0, rst_n = 0;
  chain_word_t chain_in = IDLE_WORD, chain_out;
  logic proc_row_ready, proc_res_wr_en, proc_res_commit, proc_res_ready, proc_cfg_loaded;
  logic [RW:0] proc_rows_avail;
  logic [RW-1:0] proc_rd_row;
  logic [CW-1:0] proc_rd_col, proc_res_wr_addr;
  logic [7:0] proc_rd_data, proc_res_wr_data;
  logic [CW:0] proc_res_count;
  node_cfg_t proc_cfg;
  logic proc_prog_loaded;
  logic [8:0] proc_prog_len;
  logic [7:0] proc_pm_addr, proc_pm_data;
  int busy;
  int checks = 0, failures = 0;

  subsystem #(.WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS)) dut (.*);

  proc_model #(.WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS)) u_proc (
    .clk, .prog_loaded(proc_prog_loaded), .pm_addr(proc_pm_addr), .pm_data(proc_pm_data),
    .row_ready(proc_row_ready), .rows_avail(proc_rows_avail),
    .rd_row(proc_rd_row), .rd_col(proc_rd_col), .rd_data(proc_rd_data),
    .res_wr_en(proc_res_wr_en), .res_wr_addr(proc_res_wr_addr),
    .res_wr_data(proc_res_wr_data), .res_commit(proc_res_commit),
    .res_count(proc_res_count), .res_ready(proc_res_ready),
    .cfg(proc_cfg), .busy_cycles(busy)
  );

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] img(int r, int c);
    return 8'((r * 73 + c * 29 + (r * c) * 5) % 251);
  endfunction

  function automatic logic [7:0] max3(int r0, int c0);
    logic [7:0] m = 0;
    for (int r = r0; r < r0 + 3; r++)
      for (int c = c0; c < c0 + 3; c++)
        if (img(r, c) > m) m = img(r, c);
    return m;
  endfunction

  task automatic send(chain_word_t w, chain_word_t e);
    chain_in = w;
    @(negedge clk);
    check(chain_out == e, $sformatf("out %p, expected %p", chain_out, e));
  endtask

  int n_results = 0, n_overlap = 0, n_idle = 0;

  initial begin
    logic [7:0] rec [4];
    rec = '{8'hC0, 8'd0, 8'(WIN), 8'(XCHG)};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) send('{kind: TK_CTRL, level: '0, data: rec[i]}, IDLE_WORD);
    check(proc_cfg_loaded, "configured");
    // program: first byte 0 selects the 3x3 maximum; bytes pass on unchanged
    for (int i = 0; i < 3; i++)
      send('{kind: TK_CTRL, level: CTRL_PROG, data: 8'(i * 2)},
           '{kind: TK_CTRL, level: CTRL_PROG, data: 8'(i * 2)});
    check(!proc_prog_loaded, "program not complete before its end");
    for (int r = 0; r <= IMG_H; r++) begin
      send('{kind: TK_HEAD, level: '0, data: '0}, '{kind: TK_HEAD, level: '0, data: '0});
      for (int c = 0; c < IMG_W; c++) begin
        chain_word_t w, e;
        w = '{kind: TK_DATA, level: '0, data: img(r, c)};
        if (c >= XCHG) begin
          e = w; n_overlap++;
        end else if (r >= 4) begin
          e = '{kind: TK_DATA, level: 2'd1, data: max3(r - 4, c)}; n_results++;
        end else begin
          e = IDLE_WORD; n_idle++;
        end
        send(w, e);
      end
      if (r == 0) check(proc_prog_loaded && proc_prog_len == 3, "program of 3 bytes loaded");
      for (int b = 0; b < BLANK; b++) send(IDLE_WORD, IDLE_WORD);
      if (r >= 4) check(busy > 0 && busy < BLANK + IMG_W,
                        $sformatf("processor time %0d cycles within row period", busy));
    end
    check(n_results == (IMG_H + 1 - 4) * XCHG && n_overlap > 0 && n_idle > 0, "all slot kinds seen");
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
