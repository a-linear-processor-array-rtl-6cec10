// proc_model -- behavioural model of a subsystem processor (testbench only).
//
// The processor of a subsystem is a conventional sequential processor
// with its own program memory; its design is not part of this RTL. This
// model stands in for it in testbenches. Once its program memory has been
// loaded over the chain (prog_loaded), the first program byte selects one
// of two built-in behaviours (bit 0):
//   0  neighbourhood transform: 3x3 grey-level maximum. For each of the
//      `xchg` result positions j it reads window columns j..j+2 of the
//      three newest complete rows and writes their maximum. It starts once
//      three rows are held.
//   1  data reduction: counts the words of the newest complete row that
//      are >= THRESH and commits that single count as its result.
// It reads the window ring one word per clock through the combinational
// read port and writes one result per clock, then commits. It drives its
// outputs at the falling clock edge and samples read data 1 time unit
// later, so the clock period must exceed 2 units. Work starts the cycle
// after row_ready and must end before the next head tag reaches the node;
// `busy_cycles` reports how long the last row took.
module proc_model
  import sintulf_pkg::*;
#(
  parameter int unsigned WIN_MAX   = 64,
  parameter int unsigned RING_ROWS = 4,
  parameter int unsigned THRESH    = 128,
  parameter int unsigned PROG_MAX  = 256,
  localparam int unsigned CW = $clog2(WIN_MAX),
  localparam int unsigned RW = $clog2(RING_ROWS),
  localparam int unsigned PW = $clog2(PROG_MAX)
) (
  input  logic              clk,
  input  logic              prog_loaded,
  output logic [PW-1:0]     pm_addr,
  input  logic [DATA_W-1:0] pm_data,
  input  logic              row_ready,
  input  logic [RW:0]       rows_avail,
  output logic [RW-1:0]     rd_row,
  output logic [CW-1:0]     rd_col,
  input  logic [DATA_W-1:0] rd_data,
  output logic              res_wr_en,
  output logic [CW-1:0]     res_wr_addr,
  output logic [DATA_W-1:0] res_wr_data,
  output logic              res_commit,
  output logic [CW:0]       res_count,
  input  logic              res_ready,
  input  node_cfg_t         cfg,
  output int                busy_cycles
);

  logic [DATA_W-1:0] vals [WIN_MAX];
  logic              prog;

  assign pm_addr = '0;
  assign prog    = pm_data[0];

  task automatic read_word(input int r, input int c, output logic [DATA_W-1:0] v);
    rd_row = RW'(r);
    rd_col = CW'(c);
    #1;
    v = rd_data;
    @(negedge clk);
  endtask

  // row_ready sampled like a flip-flop input, free of races with the
  // edge that brings the head tag
  logic row_ready_q = 1'b0;
  always @(posedge clk) row_ready_q <= row_ready;

  initial begin
    rd_row      = '0;
    rd_col      = '0;
    res_wr_en   = 1'b0;
    res_wr_addr = '0;
    res_wr_data = '0;
    res_commit  = 1'b0;
    res_count   = '0;
    busy_cycles = 0;
    forever begin
      @(negedge clk);
      if (row_ready_q && prog_loaded) begin
        int n, t0;
        logic [DATA_W-1:0] v;
        t0 = 0;
        n  = 0;
        if (prog == 1'b0 && rows_avail >= 3) begin
          for (int j = 0; j < int'(cfg.xchg); j++) begin
            logic [DATA_W-1:0] m;
            m = '0;
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++) begin
                read_word(r, j + c, v);
                t0++;
                if (v > m) m = v;
              end
            vals[j] = m;
          end
          n = int'(cfg.xchg);
        end else if (prog == 1'b1 && rows_avail >= 1) begin
          int cntv;
          cntv = 0;
          for (int c = 0; c < int'(cfg.width); c++) begin
            read_word(0, c, v);
            t0++;
            if (v >= DATA_W'(THRESH)) cntv++;
          end
          vals[0] = DATA_W'(cntv);
          n = 1;
        end
        if (n > 0) begin
          for (int j = 0; j < n; j++) begin
            res_wr_en   = 1'b1;
            res_wr_addr = CW'(j);
            res_wr_data = vals[j];
            @(negedge clk);
            t0++;
          end
          res_wr_en  = 1'b0;
          res_commit = 1'b1;
          res_count  = (CW+1)'(n);
          @(negedge clk);
          res_commit = 1'b0;
          t0++;
        end
        busy_cycles = t0;
      end
    end
  end

endmodule
