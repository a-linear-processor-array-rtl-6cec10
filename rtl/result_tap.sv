// result_tap -- reads one pipeline level off the end of the chain.
//
// The chain output carries head tags, idle slots and data words of
// several levels (untouched supply pixels, results of each stage). The tap
// keeps only the data words of the selected level and numbers them from
// the last head tag, skipping idle slots and other levels. For a
// neighbourhood transform this is the result pixel stream; after data
// reduction it is the condensed row read as a packed sequence.
//
// Outputs are registered, one clock after the word is presented:
// row_start pulses for each head tag, valid/data/col give each selected
// word and its position in the row. The original design shows the result stream
// leaving the chain; the level filter and the column count are this
// design's.
module result_tap
  import sintulf_pkg::*;
#(
  parameter int unsigned COL_W = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  chain_word_t        chain_in,
  input  logic [LEVEL_W-1:0] sel_level,
  output logic               row_start,
  output logic               valid,
  output logic [DATA_W-1:0]  data,
  output logic [COL_W-1:0]   col
);

  logic [COL_W-1:0] next_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_start <= 1'b0;
      valid     <= 1'b0;
      data      <= '0;
      col       <= '0;
      next_col  <= '0;
    end else begin
      row_start <= (chain_in.kind == TK_HEAD);
      valid     <= 1'b0;
      if (chain_in.kind == TK_HEAD) begin
        next_col <= '0;
      end else if (chain_in.kind == TK_DATA && chain_in.level == sel_level) begin
        valid    <= 1'b1;
        data     <= chain_in.data;
        col      <= next_col;
        next_col <= next_col + 1'b1;
      end
    end
  end

endmodule
