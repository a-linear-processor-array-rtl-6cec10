// tb_result_buffer -- self-checking test of the processor/node double buffer.
//
// Checks that committed results appear at the node side only after the
// next swap, with the committed count; that a swap with nothing committed
// gives count 0; that writes are refused (wr_ready low) between commit and
// swap; and that the bank being read is not disturbed by the processor
// filling the other bank.
module tb_result_buffer;
  localparam int unsigned RES_MAX = 16, AW = $clog2(RES_MAX);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, commit = 0, swap = 0, wr_ready;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic [AW:0] commit_count = '0, rd_count;
  int checks = 0, failures = 0;

  result_buffer #(.DATA_W(8), .RES_MAX(RES_MAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic fill(int tag, int n);
    for (int i = 0; i < n; i++) begin
      wr_en = 1; wr_addr = AW'(i); wr_data = 8'(tag * 16 + i);
      @(negedge clk);
    end
    wr_en = 0;
    commit = 1; commit_count = (AW+1)'(n);
    @(negedge clk);
    commit = 0; commit_count = '0;
  endtask

  task automatic do_swap();
    swap = 1; @(negedge clk); swap = 0;
  endtask

  task automatic expect_bank(int tag, int n);
    check(int'(rd_count) == n, $sformatf("rd_count %0d, expected %0d", rd_count, n));
    for (int i = 0; i < n; i++) begin
      rd_addr = AW'(i); #1;
      check(rd_data == 8'(tag * 16 + i), $sformatf("tag %0d word %0d = %h", tag, i, rd_data));
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(rd_count == 0 && wr_ready, "idle after reset");
    fill(1, 5);
    check(!wr_ready, "wr_ready low after commit");
    check(rd_count == 0, "results not visible before swap");
    // a write between commit and swap is refused
    wr_en = 1; wr_addr = 0; wr_data = 8'hEE; @(negedge clk); wr_en = 0;
    do_swap();
    check(wr_ready, "wr_ready back after swap");
    expect_bank(1, 5);
    // fill the other bank while bank 1 is being read
    fill(2, 7);
    expect_bank(1, 5);
    do_swap();
    expect_bank(2, 7);
    // swap with nothing committed
    do_swap();
    check(rd_count == 0, "empty row after swap without commit");
    fill(3, 16);
    do_swap();
    expect_bank(3, 16);
    // commit in the same cycle as the swap is taken at once
    for (int i = 0; i < 3; i++) begin
      wr_en = 1; wr_addr = AW'(i); wr_data = 8'(4 * 16 + i);
      @(negedge clk);
    end
    wr_en = 0;
    commit = 1; commit_count = 3; swap = 1;
    @(negedge clk);
    commit = 0; commit_count = '0; swap = 0;
    expect_bank(4, 3);
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
