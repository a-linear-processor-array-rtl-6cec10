// tb_result_tap -- self-checking test of the result tap.
//
// Feeds rows that mix words of several levels with idle slots and checks
// that only the selected level comes out, packed and numbered from the
// head tag, one clock later; then switches the selected level.
module tb_result_tap;
  import sintulf_pkg::*;

  logic clk = 0, rst_n = 0;
  chain_word_t chain_in = IDLE_WORD;
  logic [LEVEL_W-1:0] sel_level = 2'd1;
  logic row_start, valid;
  logic [7:0] data;
  logic [11:0] col;
  int checks = 0, failures = 0;

  result_tap #(.COL_W(12)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int next_col;
  task automatic send(chain_word_t w);
    logic sel;
    chain_in = w;
    sel = (w.kind == TK_DATA && w.level == sel_level);
    @(negedge clk);
    check(row_start == (w.kind == TK_HEAD), "row_start");
    check(valid == sel, $sformatf("valid for %p", w));
    if (w.kind == TK_HEAD) next_col = 0;
    if (sel) begin
      check(data == w.data && int'(col) == next_col,
            $sformatf("data %h col %0d, expected %h col %0d", data, col, w.data, next_col));
      next_col++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    next_col = 0;
    for (int lv = 1; lv <= 2; lv++) begin
      sel_level = LEVEL_W'(lv);
      for (int r = 0; r < 3; r++) begin
        send('{kind: TK_HEAD, level: '0, data: '0});
        for (int i = 0; i < 30; i++) begin
          chain_word_t w;
          w.kind  = ((i + r) % 4 == 3) ? TK_IDLE : TK_DATA;
          w.level = LEVEL_W'((i * 5 + r) % 3);
          w.data  = 8'(i * 3 + r);
          if (w.kind == TK_IDLE) w = IDLE_WORD;
          send(w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
