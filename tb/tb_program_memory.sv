// tb_program_memory -- self-checking test of the program memory.
//
// Writes a full memory of address-dependent bytes, then reads every
// address back and compares, then overwrites a few addresses and checks
// that only those changed.
module tb_program_memory;
  localparam int unsigned PROG_MAX = 64, PW = $clog2(PROG_MAX);

  logic clk = 0, wr_en = 0;
  logic [PW-1:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  program_memory #(.DATA_W(8), .PROG_MAX(PROG_MAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] val(int a, int pass);
    return 8'(a * 13 + 7 + pass * 101);
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < PROG_MAX; a++) begin
      wr_en = 1; wr_addr = PW'(a); wr_data = val(a, 0); @(negedge clk);
    end
    wr_en = 0;
    for (int a = 0; a < PROG_MAX; a++) begin
      rd_addr = PW'(a); #1;
      check(rd_data == val(a, 0), $sformatf("addr %0d = %h", a, rd_data));
    end
    @(negedge clk);
    for (int a = 3; a < PROG_MAX; a += 7) begin
      wr_en = 1; wr_addr = PW'(a); wr_data = val(a, 1); @(negedge clk);
    end
    wr_en = 0;
    for (int a = 0; a < PROG_MAX; a++) begin
      rd_addr = PW'(a); #1;
      check(rd_data == val(a, (a % 7 == 3) ? 1 : 0), $sformatf("after rewrite addr %0d = %h", a, rd_data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
