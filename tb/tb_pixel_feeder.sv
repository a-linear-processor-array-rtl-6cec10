// tb_pixel_feeder -- self-checking test of the pixel feeder.
//
// Sends rows of video with blanking between them and host control bytes
// offered all the time. Checks that each row starts with a head tag, that
// pixels come out in order as level-0 data one clock after they are given,
// that host bytes are sent only in free slots (host_ready) and in order,
// at the configuration or program control level as host_prog asks,
// and that free slots with no host byte are idle.
module tb_pixel_feeder;
  import sintulf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic vid_line_start = 0, vid_valid = 0, host_valid = 0, host_prog = 0, host_ready;
  logic [7:0] vid_data = '0, host_data = '0;
  chain_word_t chain_out;
  int checks = 0, failures = 0;
  int n_head = 0, n_pix = 0, n_ctrl = 0, n_idle = 0;

  pixel_feeder dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int host_next = 0;     // next host byte value offered
  task automatic step(logic ls, logic vv, logic [7:0] vd, logic hv);
    chain_word_t e;
    logic took;
    vid_line_start = ls; vid_valid = vv; vid_data = vd;
    host_valid = hv; host_data = 8'(host_next); host_prog = host_next[1];
    #1;
    took = hv && !ls && !vv;
    check(host_ready == (!ls && !vv), "host_ready");
    if (ls)        begin e = '{kind: TK_HEAD, level: '0, data: '0}; n_head++; end
    else if (vv)   begin e = '{kind: TK_DATA, level: '0, data: vd}; n_pix++; end
    else if (took) begin
      e = '{kind: TK_CTRL, level: host_prog ? CTRL_PROG : CTRL_CFG, data: 8'(host_next)};
      n_ctrl++;
    end
    else           begin e = IDLE_WORD; n_idle++; end
    @(negedge clk);
    check(chain_out == e, $sformatf("out %p expected %p", chain_out, e));
    if (took) host_next++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      step(1, 0, 0, r[0]);
      for (int c = 0; c < 12; c++) step(0, 1, 8'(r * 16 + c), 1);
      for (int b = 0; b < 4; b++) step(0, 0, 0, (b != 2));
    end
    check(n_head == 5 && n_pix == 60 && n_ctrl > 0 && n_idle > 0, "all slot kinds produced");
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
