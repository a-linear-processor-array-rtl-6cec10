// program_memory -- local program store of one subsystem's processor.
//
// Every processor has its own program memory, loaded over the chain by its
// node (see node_ctrl): the node writes program bytes to consecutive
// addresses as they pass. The processor reads it through an asynchronous
// read port. PROG_MAX = 256 bytes is this design's choice; the original
// design only says programs are small (compact loops and short pipeline
// steps).
//
// Write: wr_en/wr_addr/wr_data, sampled on the rising edge.
// Read:  rd_addr -> rd_data, combinational.
module program_memory #(
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned PROG_MAX = 256,
  localparam int unsigned PW = $clog2(PROG_MAX)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [PW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [PW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [PROG_MAX];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
