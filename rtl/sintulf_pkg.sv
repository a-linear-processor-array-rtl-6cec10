// sintulf_pkg -- types and constants shared by the node-chain modules.
//
// The chain is a byte-wide shift register. Each chain slot carries one
// byte of data plus a few tag lines that say what the byte is:
//   TK_IDLE  an empty slot (freed by data reduction or configuration)
//   TK_HEAD  the head tag, sent in front of every image row
//   TK_DATA  a pixel or a result; `level` counts how many pipeline stages
//            (chain units) have produced it: 0 = supply pixel from the
//            feeder, 1 = result of the first stage, and so on
//   TK_CTRL  a control byte: with level 0 a byte of a node configuration
//            record, with level 1 a byte of a processor program
// The byte-wide data path follows the original design; the tag encoding and the
// level field are this design's choice. With 8 data and 4 tag lines per
// direction the chain needs 24 pins, which leaves room for clock, reset
// and supplies within a 28-pin package.
package sintulf_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned LEVEL_W = 2;

  typedef enum logic [1:0] {
    TK_IDLE = 2'd0,
    TK_HEAD = 2'd1,
    TK_DATA = 2'd2,
    TK_CTRL = 2'd3
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e           kind;
    logic [LEVEL_W-1:0]  level;
    logic [DATA_W-1:0]   data;
  } chain_word_t;

  localparam chain_word_t IDLE_WORD = '{kind: TK_IDLE, level: '0, data: '0};

  // Number of control bytes in one node configuration record.
  localparam int unsigned CFG_BYTES = 4;

  // Level field of control words: configuration record or program byte.
  localparam logic [LEVEL_W-1:0] CTRL_CFG  = 2'd0;
  localparam logic [LEVEL_W-1:0] CTRL_PROG = 2'd1;

  // Decoded node configuration.
  typedef struct packed {
    logic               active;    // node takes part in pick and exchange
    logic               load_prog; // node copies the next program sent
    logic [LEVEL_W-1:0] in_level;  // level of the data words the node picks
    logic [7:0]         skip;      // matching words bypassed after the head tag
    logic [7:0]         width;     // window width in words
    logic [7:0]         xchg;      // slots exchanged (window width - overlap)
  } node_cfg_t;

endpackage
