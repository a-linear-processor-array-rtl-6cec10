// tb_node_ctrl -- self-checking test of the communication node.
//
// The test loads a configuration record over the chain, then sends rows
// mixing supply pixels, words of another level and idle slots. For every
// word it predicts, from its own count of matching words since the head
// tag, whether the node must pick it (ring write and column), exchange it
// for a result or an idle slot, or pass it, and compares the node's
// registered output one clock later. It also checks that a second record
// passes a configured node untouched, that a program following the record
// is copied into program memory and passed on, and the swap and
// row_advance pulses at head tags.
module tb_node_ctrl;
  import sintulf_pkg::*;
  localparam int unsigned WIN_MAX = 16, CW = $clog2(WIN_MAX);

  logic clk = 0, rst_n = 0;
  chain_word_t chain_in = IDLE_WORD, chain_out;
  logic ring_wr_en, row_advance, swap, cfg_loaded;
  logic [CW-1:0] ring_wr_col, res_rd_addr;
  logic [7:0] ring_wr_data, res_rd_data;
  logic [CW:0] res_rd_count = '0;
  node_cfg_t cfg;
  logic pm_wr_en, prog_loaded;
  logic [7:0] pm_wr_addr, pm_wr_data;
  logic [8:0] prog_len;
  int n_pm = 0;
  int checks = 0, failures = 0;
  int n_pick = 0, n_xchg = 0, n_free = 0, n_pass = 0;

  node_ctrl #(.WIN_MAX(WIN_MAX)) dut (.*);

  // stand-in for the result buffer: result i is 0xC0 + i
  assign res_rd_data = 8'hC0 + 8'(res_rd_addr);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Present one word, check the combinational side, clock, check output.
  task automatic send(chain_word_t w, chain_word_t exp_out, logic exp_pick,
                      int exp_col, logic exp_head_adv);
    chain_in = w;
    #1;
    check(ring_wr_en == exp_pick, $sformatf("pick flag for word %p", w));
    if (exp_pick) begin
      check(int'(ring_wr_col) == exp_col && ring_wr_data == w.data,
            $sformatf("pick column %0d, expected %0d", ring_wr_col, exp_col));
    end
    if (w.kind == TK_HEAD) check(row_advance == exp_head_adv, "row_advance at head tag");
    @(negedge clk);
    check(chain_out == exp_out, $sformatf("out %p, expected %p", chain_out, exp_out));
  endtask

  function automatic chain_word_t mk(tok_kind_e k, int lvl, int d);
    chain_word_t w;
    w.kind = k; w.level = LEVEL_W'(lvl); w.data = 8'(d);
    return w;
  endfunction

  // Expected behaviour for one row of a configured node.
  int skip_c = 2, width_c = 6, xchg_c = 4, nres;
  task automatic row(int nwords, int seed, int results);
    int cnt;
    logic picked;
    res_rd_count = (CW+1)'(results);
    send(mk(TK_HEAD, 0, 0), mk(TK_HEAD, 0, 0), 0, 0, 1'b1);
    cnt = 0;
    for (int i = 0; i < nwords; i++) begin
      chain_word_t w, e;
      int c;
      logic pk;
      unique case ((i * 7 + seed) % 5)
        0: w = mk(TK_DATA, 1, 8'h50 + i);   // another level: pass, not counted
        1: w = mk(TK_IDLE, 0, 0);           // idle slot: pass, not counted
        default: w = mk(TK_DATA, 0, 8'h10 + i);
      endcase
      e  = w;
      pk = 0;
      c  = 0;
      if (w.kind == TK_DATA && w.level == 0) begin
        c = cnt - skip_c;
        if (cnt >= skip_c && c < width_c) begin
          pk = 1; n_pick++;
          if (c < xchg_c) begin
            if (c < results) begin e = mk(TK_DATA, 1, 8'hC0 + c); n_xchg++; end
            else begin e = IDLE_WORD; n_free++; end
          end
        end else n_pass++;
        cnt++;
      end
      send(w, e, pk, c, 0);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // before configuration everything but control bytes passes
    send(mk(TK_HEAD, 0, 0), mk(TK_HEAD, 0, 0), 0, 0, 0);
    send(mk(TK_DATA, 0, 33), mk(TK_DATA, 0, 33), 0, 0, 0);
    check(!cfg_loaded, "unconfigured after reset");
    // record taken by this node: replaced by idle slots
    send(mk(TK_CTRL, 0, 8'hC0), IDLE_WORD, 0, 0, 0);
    send(mk(TK_CTRL, 0, skip_c), IDLE_WORD, 0, 0, 0);
    send(mk(TK_DATA, 0, 34), mk(TK_DATA, 0, 34), 0, 0, 0);
    send(mk(TK_CTRL, 0, width_c), IDLE_WORD, 0, 0, 0);
    check(!cfg_loaded, "not loaded before last byte");
    send(mk(TK_CTRL, 0, xchg_c), IDLE_WORD, 0, 0, 0);
    check(cfg_loaded && cfg.active && cfg.load_prog && cfg.in_level == 0 && cfg.skip == 8'(skip_c)
          && cfg.width == 8'(width_c) && cfg.xchg == 8'(xchg_c), "record loaded");
    // a program: copied to program memory and passed on; idle slots and
    // data words in between are ignored
    for (int i = 0; i < 5; i++) begin
      chain_in = mk(TK_CTRL, CTRL_PROG, 8'h60 + i);
      #1;
      check(pm_wr_en && int'(pm_wr_addr) == i && pm_wr_data == 8'(8'h60 + i),
            $sformatf("program byte %0d written", i));
      n_pm++;
      @(negedge clk);
      check(chain_out == mk(TK_CTRL, CTRL_PROG, 8'h60 + i), "program byte passed on");
      if (i == 2) begin
        send(IDLE_WORD, IDLE_WORD, 0, 0, 0);
        send(mk(TK_DATA, 0, 7), mk(TK_DATA, 0, 7), 0, 0, 0);
      end
    end
    check(!prog_loaded && prog_len == 5, "program still open");
    // a second record passes on to the next node and closes the program
    for (int i = 0; i < 4; i++)
      send(mk(TK_CTRL, 0, 8'h81 + i), mk(TK_CTRL, 0, 8'h81 + i), 0, 0, 0);
    check(prog_loaded && prog_len == 5, "program of 5 bytes loaded");
    // a later program is not copied
    chain_in = mk(TK_CTRL, CTRL_PROG, 8'h99);
    #1;
    check(!pm_wr_en, "no copy once loaded");
    @(negedge clk);
    check(chain_out == mk(TK_CTRL, CTRL_PROG, 8'h99), "later program passed on");
    // first head tag after loading: nothing picked yet, so no row_advance
    res_rd_count = 0;
    send(mk(TK_HEAD, 0, 0), mk(TK_HEAD, 0, 0), 0, 0, 1'b0);
    check(1, "head");
    for (int i = 0; i < 14; i++) begin
      chain_word_t w;
      int c;
      w = mk(TK_DATA, 0, 8'h20 + i);
      c = i - skip_c;
      send(w, (c >= 0 && c < xchg_c) ? IDLE_WORD : w, (c >= 0 && c < width_c), c, 0);
    end
    // rows with results: full, partial (data reduction), none
    row(20, 0, 4);
    row(20, 3, 1);
    row(22, 1, 0);
    row(18, 2, 4);
    // a row with no matching words gives no row_advance at the next head
    res_rd_count = 0;
    send(mk(TK_HEAD, 0, 0), mk(TK_HEAD, 0, 0), 0, 0, 1'b1);
    send(mk(TK_DATA, 2, 1), mk(TK_DATA, 2, 1), 0, 0, 0);
    send(mk(TK_HEAD, 0, 0), mk(TK_HEAD, 0, 0), 0, 0, 1'b0);
    check(n_pick > 0 && n_xchg > 0 && n_free > 0 && n_pass > 0,
          $sformatf("mechanisms seen: pick %0d xchg %0d free %0d pass %0d",
                    n_pick, n_xchg, n_free, n_pass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // swap must pulse exactly at head tags once configured
  always @(negedge clk) if (rst_n) begin
    if (swap != (chain_in.kind == TK_HEAD && cfg_loaded && cfg.active)) begin
      checks++; failures++; $display("FAIL: swap pulse");
    end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
