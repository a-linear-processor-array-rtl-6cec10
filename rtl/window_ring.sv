// window_ring -- ring buffer of window rows for one subsystem.
//
// A node picks the pixels of its window (a column interval) from every
// image row and writes them here. Only the rows covered by the current
// neighbourhood are needed at any moment, so the rows rotate through a
// ring of RING_ROWS row slots as the working position slides down the
// image: the node writes the row in transit into one slot while its
// processor reads the RING_ROWS-1 previous, complete rows.
//
// Write side (node): wr_en/wr_col/wr_data write one pixel of the row in
// transit. row_advance (one cycle, at the head tag that ends a row) makes
// that row the newest complete row and moves writing to the next slot,
// overwriting the oldest row.
// Read side (processor): rd_row selects a complete row by age (0 = newest,
// RING_ROWS-2 = oldest still held), rd_col a column within the window.
// rd_data is combinational. rows_avail counts complete rows, saturating at
// RING_ROWS-1, so the processor can tell when its neighbourhood is full.
//
// The ring principle is the original design's; RING_ROWS = 4 (a three-row
// neighbourhood plus the row in transit), WIN_MAX = 64 and the
// asynchronous read port are this design's choices.
module window_ring #(
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned WIN_MAX   = 64,
  parameter int unsigned RING_ROWS = 4,
  localparam int unsigned CW = $clog2(WIN_MAX),
  localparam int unsigned RW = $clog2(RING_ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [CW-1:0]     wr_col,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              row_advance,
  input  logic [RW-1:0]     rd_row,
  input  logic [CW-1:0]     rd_col,
  output logic [DATA_W-1:0] rd_data,
  output logic [RW:0]       rows_avail
);

  logic [DATA_W-1:0] mem [RING_ROWS][WIN_MAX];
  logic [RW-1:0]     wr_slot;
  logic [RW-1:0]     rd_slot;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_slot][wr_col] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_slot    <= '0;
      rows_avail <= '0;
    end else if (row_advance) begin
      wr_slot <= (wr_slot == RW'(RING_ROWS - 1)) ? '0 : wr_slot + 1'b1;
      if (rows_avail != (RW+1)'(RING_ROWS - 1)) rows_avail <= rows_avail + 1'b1;
    end
  end

  // Newest complete row sits one slot behind the write slot.
  logic [RW+1:0] back;
  always_comb begin
    back    = (RW+2)'(wr_slot) + (RW+2)'(RING_ROWS - 1) - (RW+2)'(rd_row);
    rd_slot = (back >= (RW+2)'(RING_ROWS)) ? RW'(back - (RW+2)'(RING_ROWS)) : RW'(back);
  end

  assign rd_data = mem[rd_slot][rd_col];

endmodule
