// hsu_pkg: shared constants, opcodes and record types of the Hierarchical
// Search Unit (HSU), a GPU ray-tracing unit extended to run Euclidean and
// angular distance tests and B-tree key comparisons on the same single-lane
// pipelined datapath that performs ray-box and ray-triangle tests.
//
// Sizes taken from the design description: four sub-cores share one unit,
// the warp buffer has 8 entries, the datapath is 9 stages deep, the Euclidean
// mode is 16 elements wide, the angular mode 8 wide, a key node holds up to
// 36 separators, a box node has 4 children and a thread returns its result in
// four 32-bit registers. The warp width (32), the per-thread operand and node
// layouts, FIFO depths and the node-type encoding are this design's choices.
package hsu_pkg;

  // ---- sizes ---------------------------------------------------------------
  localparam int unsigned WARP_SIZE    = 32;  // threads per warp (assumed)
  localparam int unsigned NUM_SUBCORES = 4;   // sub-cores / SM sharing one unit
  localparam int unsigned WB_ENTRIES   = 8;   // warp buffer entries
  localparam int unsigned RB_ENTRIES   = 8;   // result buffer slots (assumed)
  localparam int unsigned PIPE_DEPTH   = 9;   // datapath stages
  localparam int unsigned EUCLID_W     = 16;  // POINT_EUCLID width
  localparam int unsigned ANGULAR_W    = 8;   // POINT_ANGULAR width
  localparam int unsigned KEY_SEPS     = 36;  // separators per KEY_COMPARE
  localparam int unsigned BOX_CHILDREN = 4;   // children tested per box node
  localparam int unsigned OPND_WORDS   = 16;  // register operand words / thread
  localparam int unsigned NODE_WORDS   = 36;  // node words fetched / thread
  localparam int unsigned RES_WORDS    = 4;   // result registers / thread
  localparam int unsigned MEMQ_DEPTH   = 16;  // memory access FIFO (assumed)
  localparam int unsigned RESPQ_DEPTH  = 8;   // response FIFO (assumed)
  localparam int unsigned WARP_ID_W    = 6;   // 64 warps per SM
  localparam int unsigned DST_W        = 8;   // destination register index

  // Word of a RAY_INTERSECT node that tells a box node from a triangle node.
  localparam int unsigned NODE_TYPE_WORD = 31;
  localparam logic [31:0] NODE_TYPE_BOX  = 32'd0;
  localparam logic [31:0] NODE_TYPE_TRI  = 32'd1;

  localparam logic [31:0] FP_ZERO    = 32'h0000_0000;
  localparam logic [31:0] FP_POS_INF = 32'h7F80_0000;
  localparam logic [31:0] NULL_PTR   = 32'h0000_0000;

  typedef logic [31:0] word_t;

  // ---- instructions --------------------------------------------------------
  typedef enum logic [1:0] {
    OP_RAY_INTERSECT = 2'd0,
    OP_POINT_EUCLID  = 2'd1,
    OP_POINT_ANGULAR = 2'd2,
    OP_KEY_COMPARE   = 2'd3
  } hsu_op_e;

  // Operating modes of the unified datapath (RAY_INTERSECT splits in two).
  typedef enum logic [2:0] {
    MODE_BOX     = 3'd0,
    MODE_TRI     = 3'd1,
    MODE_EUCLID  = 3'd2,
    MODE_ANGULAR = 3'd3,
    MODE_KEY     = 3'd4
  } dp_mode_e;

  // One warp instruction as dispatched by a sub-core.
  typedef struct packed {
    hsu_op_e                                   op;
    logic                                      acc;      // accumulate bit
    logic [WARP_ID_W-1:0]                      warp_id;
    logic [DST_W-1:0]                          dst;
    logic [WARP_SIZE-1:0]                      active;
    word_t [WARP_SIZE-1:0]                     ptr;      // node address
    word_t [WARP_SIZE-1:0][OPND_WORDS-1:0]     opnd;     // ray / query data
  } hsu_instr_t;

  // Per-instruction bookkeeping that travels to the result buffer.
  typedef struct packed {
    logic [$clog2(NUM_SUBCORES)-1:0] subcore;
    logic [WARP_ID_W-1:0]            warp_id;
    logic [DST_W-1:0]                dst;
    hsu_op_e                         op;
    logic                            acc;
    logic [WARP_SIZE-1:0]            active;
  } hsu_tag_t;

  // Completed warp instruction written back to the register file.
  typedef struct packed {
    hsu_tag_t                               tag;
    word_t [WARP_SIZE-1:0][RES_WORDS-1:0]   res;
  } hsu_wb_t;

  // Memory access FIFO entry and memory response.
  typedef struct packed {
    logic [$clog2(WB_ENTRIES)-1:0] entry;
    logic [$clog2(WARP_SIZE)-1:0]  lane;
    word_t                         addr;
  } mem_req_t;

  typedef struct packed {
    logic [$clog2(WB_ENTRIES)-1:0] entry;
    logic [$clog2(WARP_SIZE)-1:0]  lane;
    word_t [NODE_WORDS-1:0]        data;
  } mem_resp_t;

  // One thread issued into the datapath.
  typedef struct packed {
    dp_mode_e                          mode;
    logic                              acc;
    logic [$clog2(RB_ENTRIES)-1:0]     slot;
    logic [$clog2(WARP_SIZE)-1:0]      lane;
    word_t [OPND_WORDS-1:0]            opnd;
    word_t [NODE_WORDS-1:0]            node;
  } dp_in_t;

  // One thread leaving the datapath.
  typedef struct packed {
    logic                              acc;   // partial beat: nothing to write
    logic [$clog2(RB_ENTRIES)-1:0]     slot;
    logic [$clog2(WARP_SIZE)-1:0]      lane;
    word_t [RES_WORDS-1:0]             res;
  } dp_out_t;

endpackage
