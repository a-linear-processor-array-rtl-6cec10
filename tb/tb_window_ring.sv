// tb_window_ring -- self-checking test of the window ring buffer.
//
// Writes rows of known, row-dependent data, advancing the ring after each,
// and checks after every row that all rows still held read back by age
// (0 = newest) with the right contents, that the oldest is overwritten
// once the ring wraps, and that rows_avail saturates at RING_ROWS-1.
module tb_window_ring;
  localparam int unsigned WIN_MAX = 16, RING_ROWS = 4;
  localparam int unsigned CW = $clog2(WIN_MAX), RW = $clog2(RING_ROWS);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, row_advance = 0;
  logic [CW-1:0] wr_col = '0, rd_col = '0;
  logic [7:0] wr_data = '0, rd_data;
  logic [RW-1:0] rd_row = '0;
  logic [RW:0] rows_avail;
  int checks = 0, failures = 0;

  window_ring #(.DATA_W(8), .WIN_MAX(WIN_MAX), .RING_ROWS(RING_ROWS)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] pix(int row, int col);
    return 8'((row * 37 + col * 11 + 5) & 8'hff);
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(rows_avail == 0, "rows_avail after reset");
    for (int r = 0; r < 9; r++) begin
      for (int c = 0; c < WIN_MAX; c++) begin
        wr_en = 1; wr_col = CW'(c); wr_data = pix(r, c);
        @(negedge clk);
      end
      wr_en = 0;
      row_advance = 1;
      @(negedge clk);
      row_advance = 0;
      check(int'(rows_avail) == ((r + 1 < RING_ROWS - 1) ? r + 1 : RING_ROWS - 1),
            $sformatf("rows_avail %0d after row %0d", rows_avail, r));
      // every complete row still held
      for (int age = 0; age < RING_ROWS - 1 && age <= r; age++)
        for (int c = 0; c < WIN_MAX; c += 3) begin
          rd_row = RW'(age); rd_col = CW'(c);
          #1;
          check(rd_data == pix(r - age, c),
                $sformatf("row %0d age %0d col %0d: %h", r, age, c, rd_data));
        end
      @(negedge clk);
    end
    // partial write of a row in transit leaves held rows intact
    @(negedge clk);
    wr_en = 1; wr_col = 0; wr_data = 8'hAA; @(negedge clk); wr_en = 0;
    rd_row = RW'(RING_ROWS - 2); rd_col = 0; #1;
    check(rd_data == pix(8 - (RING_ROWS - 2), 0), "oldest row survives write of row in transit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
