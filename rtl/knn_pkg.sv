// knn_pkg: constants and types shared by the KNN associative memory.
//
// The word width N, class-label width L, vote-counter width PW and the
// dimension-extension width E are the figures of the 180 nm prototype
// (8-bit components, 3-bit labels, 4-bit k, 24-bit distance accumulators).
// The host command set is this design's own: the prototype's host interface
// is not published.
package knn_pkg;

  localparam int unsigned N     = 8;        // bits per vector component
  localparam int unsigned SAD_W = 2 * N;    // squared absolute difference
  localparam int unsigned E     = 24;       // DEC / DEU width
  localparam int unsigned L     = 3;        // class-label bits
  localparam int unsigned PW    = 4;        // vote-counter / k bits
  localparam int unsigned NCLS  = 1 << L;   // number of classes
  localparam int unsigned LVL_W = $clog2(E);

  // Host commands. cmd_addr selects an element (row*COLS+col) where needed.
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_WR_REF   = 4'd1,  // reference word of element cmd_addr <= cmd_data
    OP_WR_IN    = 4'd2,  // input word of element cmd_addr <= cmd_data
    OP_WR_CS    = 4'd3,  // switch after element cmd_addr: CS <= cmd_data[0]
    OP_WR_CLS   = 4'd4,  // class label of the KNN unit after element cmd_addr
    OP_CLR_DEC  = 4'd5,  // clear all distance accumulators
    OP_COMPUTE  = 4'd6,  // all DCUs compute (REF-IN)^2, DECs accumulate it
    OP_SET_TOP  = 4'd7,  // first bit the search evaluates <= cmd_data
    OP_SEARCH   = 4'd8   // KNN search and vote with k = cmd_data[PW-1:0]
  } cmd_op_t;

endpackage
