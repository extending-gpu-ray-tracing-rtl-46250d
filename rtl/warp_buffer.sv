// warp_buffer: holds the HSU warp instructions that are gathering their node
// data, so that several instructions' memory fetches can be in flight at
// once (memory-level parallelism).
//
// Each of the WB_ENTRIES entries keeps: the instruction's opcode, accumulate
// bit and write-back tag, its active mask, every thread's register operands
// (ray or query data) and node pointer, the fetched node data, a requested
// mask (thread has pushed its fetch into the memory access FIFO) and a valid
// mask (thread's node data has arrived). An entry is ready for the datapath
// when its valid mask equals its active mask.
//
// Operation:
//   * allocate: an accepted instruction is written into a free entry in one
//     cycle (alloc_ready is high while an entry is free).
//   * request: every cycle the lowest-numbered entry with an active thread
//     that has not requested yet pushes one {entry, lane, address} request
//     into the memory access FIFO (req_valid/req_ready).
//   * response: a returned node (resp_valid) is written into its thread's
//     slot and the thread's valid bit is set; always accepted.
//   * free: the datapath scheduler clears an entry after issuing its last
//     thread.
// It also keeps an age matrix (older[i][j]: entry i was allocated before
// entry j) and a chain flag per entry, set for the instructions of a
// multi-beat distance operation (its own accumulate bit, or the previous
// instruction's), which the scheduler must issue strictly in order.
//
// The entry contents follow the design description; the request order and
// the age/chain bookkeeping are this design's choices.
module warp_buffer
  import hsu_pkg::*;
#(
  parameter int unsigned ENTRIES = WB_ENTRIES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocation
  input  logic                          alloc_valid,
  input  hsu_instr_t                    alloc_instr,
  input  logic [$clog2(NUM_SUBCORES)-1:0] alloc_subcore,
  output logic                          alloc_ready,
  // memory access FIFO
  output logic                          req_valid,
  output mem_req_t                      req,
  input  logic                          req_ready,
  // response FIFO
  input  logic                          resp_valid,
  input  mem_resp_t                     resp,
  // scheduler view
  output logic [ENTRIES-1:0]            entry_valid,
  output logic [ENTRIES-1:0]            entry_ready,
  output logic [ENTRIES-1:0]            entry_chain,
  output logic [ENTRIES-1:0][ENTRIES-1:0] older,
  output hsu_tag_t [ENTRIES-1:0]        entry_tag,
  input  logic [$clog2(ENTRIES)-1:0]    rd_entry,
  input  logic [$clog2(WARP_SIZE)-1:0]  rd_lane,
  output word_t [OPND_WORDS-1:0]        rd_opnd,
  output word_t [NODE_WORDS-1:0]        rd_node,
  input  logic                          free_valid,
  input  logic [$clog2(ENTRIES)-1:0]    free_entry
);
  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned LW = $clog2(WARP_SIZE);

  logic [ENTRIES-1:0]                 v;
  hsu_tag_t                           tag   [ENTRIES];
  logic [WARP_SIZE-1:0]               reqd  [ENTRIES];
  logic [WARP_SIZE-1:0]               vmask [ENTRIES];
  logic [ENTRIES-1:0]                 chain;
  logic                               last_acc;
  word_t [OPND_WORDS-1:0]             opnd  [ENTRIES][WARP_SIZE];
  word_t                              ptr   [ENTRIES][WARP_SIZE];
  word_t [NODE_WORDS-1:0]             node  [ENTRIES][WARP_SIZE];

  // ------------------------------------------------------------ allocation
  logic [EW-1:0] free_idx;
  logic          do_alloc;
  always_comb begin
    alloc_ready = 1'b0;
    free_idx    = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!v[i]) begin
        alloc_ready = 1'b1;
        free_idx    = EW'(i);
      end
  end
  assign do_alloc = alloc_valid && alloc_ready;

  // --------------------------------------------------- request generation
  logic [EW-1:0] rq_e;
  logic [LW-1:0] rq_l;
  logic          rq_any;
  always_comb begin
    rq_any = 1'b0;
    rq_e   = '0;
    rq_l   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      logic [WARP_SIZE-1:0] pend;
      pend = tag[i].active & ~reqd[i];
      if (v[i] && |pend) begin
        rq_any = 1'b1;
        rq_e   = EW'(i);
        for (int l = WARP_SIZE - 1; l >= 0; l--)
          if (pend[l]) rq_l = LW'(l);
      end
    end
  end
  assign req_valid  = rq_any;
  assign req.entry  = rq_e;
  assign req.lane   = rq_l;
  assign req.addr   = ptr[rq_e][rq_l];

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v        <= '0;
      chain    <= '0;
      last_acc <= 1'b0;
      older    <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tag[i]   <= '0;
        reqd[i]  <= '0;
        vmask[i] <= '0;
      end
    end else begin
      if (free_valid) begin
        v[free_entry] <= 1'b0;
        for (int j = 0; j < ENTRIES; j++) older[free_entry][j] <= 1'b0;
      end
      if (req_valid && req_ready)
        reqd[rq_e][rq_l] <= 1'b1;
      if (resp_valid)
        vmask[resp.entry][resp.lane] <= 1'b1;
      if (do_alloc) begin
        v[free_idx]     <= 1'b1;
        tag[free_idx]   <= '{subcore: alloc_subcore, warp_id: alloc_instr.warp_id,
                             dst: alloc_instr.dst, op: alloc_instr.op,
                             acc: alloc_instr.acc, active: alloc_instr.active};
        reqd[free_idx]  <= '0;
        vmask[free_idx] <= '0;
        chain[free_idx] <= alloc_instr.acc || last_acc;
        last_acc        <= alloc_instr.acc;
        // every entry still valid is older than the new one
        for (int j = 0; j < ENTRIES; j++) begin
          older[free_idx][j] <= 1'b0;
          older[j][free_idx] <= v[j] && !(free_valid && free_entry == EW'(j));
        end
      end
    end
  end

  // payload storage
  always_ff @(posedge clk) begin
    if (do_alloc)
      for (int l = 0; l < WARP_SIZE; l++) begin
        opnd[free_idx][l] <= alloc_instr.opnd[l];
        ptr[free_idx][l]  <= alloc_instr.ptr[l];
      end
    if (resp_valid)
      node[resp.entry][resp.lane] <= resp.data;
  end

  // ------------------------------------------------------- scheduler view
  always_comb
    for (int i = 0; i < ENTRIES; i++) begin
      entry_valid[i] = v[i];
      entry_ready[i] = v[i] && (vmask[i] == tag[i].active);
      entry_chain[i] = chain[i];
      entry_tag[i]   = tag[i];
    end
  assign rd_opnd = opnd[rd_entry][rd_lane];
  assign rd_node = node[rd_entry][rd_lane];

  // rules of the interfaces
  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> v[resp.entry] && tag[resp.entry].active[resp.lane])
    else $error("warp_buffer: response for an inactive thread");
  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> alloc_instr.active != '0)
    else $error("warp_buffer: instruction with empty active mask");
endmodule
