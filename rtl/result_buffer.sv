// result_buffer -- double buffer between a processor and its chain node.
//
// The processor computes the results of one row (new pixels for a
// neighbourhood transform, or descriptive data for data reduction) while
// the node sends out the results of the row before. Two banks are used:
// the processor fills the write bank and then pulses `commit` with the
// number of results; at the next head tag the node pulses `swap`, the
// committed bank becomes the read bank and its count is latched in
// rd_count. The node then places rd_count results, in address order,
// into the slots it exchanges during that row. If nothing was committed
// before the head tag, rd_count is 0 for that row.
//
// Processor side: wr_en/wr_addr/wr_data, commit/commit_count, and
// wr_ready, which is low from a commit until the swap that consumes it
// (writes then would corrupt the bank about to be sent).
// Node side: swap, rd_addr, combinational rd_data, rd_count.
//
// The exchange of results into freed slots is the original design's; the double
// buffer, the commit handshake and the sizes are this design's choices.
module result_buffer #(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned RES_MAX = 64,
  localparam int unsigned AW = $clog2(RES_MAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              commit,
  input  logic [AW:0]       commit_count,
  output logic              wr_ready,
  // node side
  input  logic              swap,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data,
  output logic [AW:0]       rd_count
);

  logic [DATA_W-1:0] mem [2][RES_MAX];
  logic              rd_bank;
  logic              pending;
  logic [AW:0]       pending_count;

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) mem[~rd_bank][wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank       <= 1'b0;
      pending       <= 1'b0;
      pending_count <= '0;
      rd_count      <= '0;
    end else begin
      if (swap) begin
        if (pending || commit) begin
          rd_bank  <= ~rd_bank;
          rd_count <= pending ? pending_count : commit_count;
        end else begin
          rd_count <= '0;
        end
        pending <= 1'b0;
      end else if (commit && wr_ready) begin
        pending       <= 1'b1;
        pending_count <= commit_count;
      end
    end
  end

  assign wr_ready = !pending;
  assign rd_data  = mem[rd_bank][rd_addr];

  // A commit must not overrun the bank.
  assert property (@(posedge clk) disable iff (!rst_n)
                   commit |-> commit_count <= (AW+1)'(RES_MAX));

endmodule
