// ca_pkg: types and constants shared by the cellular-automaton (CA) logic and
// fault simulator.
//
// The simulator maps a levelled gate netlist onto a 2-D array of identical
// cells. Every cell holds one machine word, so WORD_W input patterns are
// simulated side by side (parallel-pattern simulation). The word length of 8
// bits and the eight cell states follow the published design; the 8-bit
// offset and count registers follow its statement that a cell holds 8-bit
// registers. The gate-operation encoding, the configuration record and the
// token record that travels on the vertical data paths are this design's own.
package ca_pkg;

  localparam int unsigned WORD_W = 8;  // machine word: patterns in parallel
  localparam int unsigned HALF_W = WORD_W / 2;  // good / faulty halves
  localparam int unsigned REG_W  = 8;  // OffReg, FanoutNo and path counters

  typedef logic [WORD_W-1:0]       word_t;
  typedef logic signed [REG_W-1:0] off_t;
  typedef logic [REG_W-1:0]        cnt_t;

  // The eight cell states.
  typedef enum logic [2:0] {
    ST_FANOUT      = 3'd0,  // fanout cell, waits for its distributed signal
    ST_FANOUTRECV  = 3'd1,  // top fanout cell of a node, also starts distribution
    ST_NEWPIPE     = 3'd2,  // Fanout cell holding a new signal for one cycle
    ST_NEWPIPERECV = 3'd3,  // FanoutRecv cell holding a new signal for one cycle
    ST_FANIN       = 3'd4,  // fanin cell above the bottom one of its node
    ST_BOTFANIN    = 3'd5,  // bottom fanin cell of a node
    ST_DETECTING   = 3'd6,  // primary-output cell, fault not yet seen
    ST_DETECTED    = 3'd7   // primary-output cell, fault seen
  } state_e;

  // Base operation of a distributed gate; the top fanin cell may invert it.
  typedef enum logic [1:0] {
    OP_AND = 2'd0,  // AND / NAND (also BUF / NOT for a one-input node)
    OP_OR  = 2'd1,  // OR / NOR
    OP_XOR = 2'd2   // XOR / XNOR
  } op_e;

  // Configuration preloaded into one cell before simulation.
  typedef struct packed {
    state_e state;      // initial state (the cell's role)
    off_t   off;        // OffReg
    cnt_t   fanout_no;  // FanoutNo (kept by the top fanin cell of a node)
    op_e    op;         // gate operation (fanin cells)
    logic   inv;        // invert the result (top fanin cell)
    logic   top;        // topmost fanin cell of its node
    logic   part;       // counts towards column completion (column sync)
  } cell_cfg_t;

  // One entry of the upward or downward data path of a column.
  // off is the offset still to travel, seen from the cell holding the entry;
  // cnt is the number of target cells still to be served.
  typedef struct packed {
    logic  v;
    logic  up;
    off_t  off;
    cnt_t  cnt;
    word_t sig;
  } token_t;

  function automatic word_t gate_op(op_e op, word_t a, word_t b);
    unique case (op)
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      default: return a & b;
    endcase
  endfunction

endpackage
