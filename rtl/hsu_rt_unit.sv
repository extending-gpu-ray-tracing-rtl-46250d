// hsu_rt_unit: the Hierarchical Search Unit of one SM, a GPU ray-tracing unit
// whose datapath also computes N-dimensional Euclidean and angular distances
// and B-tree key comparisons.
//
// Flow of one warp instruction (RAY_INTERSECT, POINT_EUCLID, POINT_ANGULAR or
// KEY_COMPARE):
//   1. The sub-cores dispatch instructions; subcore_arbiter picks one per
//      cycle round robin, locked to one sub-core during a multi-beat
//      (accumulate) distance operation.
//   2. warp_buffer stores the active mask, each thread's ray/query operands
//      and node pointer. Its active threads' node fetches go one per cycle
//      through the memory access FIFO (sync_fifo) to the L1 cache port
//      (mem_req_*). Node data returns through the response FIFO (mem_resp_*).
//   3. When all active threads have their node data, dp_scheduler issues
//      them one per cycle, skipping inactive lanes, into hsu_datapath, the
//      unified 9-stage single-lane pipeline, and clears the entry.
//   4. result_buffer gathers the thread results and sends the whole warp's
//      results to the register file (wb_*) once its last thread is done.
//
// Interfaces: sc_valid/sc_ready per sub-core with an hsu_instr_t bundle;
// mem_req valid/ready with {entry, lane, address}; mem_resp valid/ready with
// {entry, lane, NODE_WORDS words} (the cache or interconnect may answer in
// any order); wb valid/ready with the tag and RES_WORDS words per lane.
// The L1 cache, the interconnect, the sub-cores and the register file are
// outside this unit. Peak rate: one thread per cycle through the datapath;
// latency of a thread through the datapath: 9 cycles.
module hsu_rt_unit
  import hsu_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // dispatch from the sub-cores
  input  logic [NUM_SUBCORES-1:0]     sc_valid,
  input  hsu_instr_t [NUM_SUBCORES-1:0] sc_instr,
  output logic [NUM_SUBCORES-1:0]     sc_ready,
  // L1 data cache port
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output mem_req_t                    mem_req,
  input  logic                        mem_resp_valid,
  output logic                        mem_resp_ready,
  input  mem_resp_t                   mem_resp,
  // register file write-back
  output logic                        wb_valid,
  input  logic                        wb_ready,
  output hsu_wb_t                     wb
);
  localparam int unsigned EW = $clog2(WB_ENTRIES);
  localparam int unsigned SCW = $clog2(NUM_SUBCORES);

  // ------------------------------------------------------ sub-core arbiter
  logic [NUM_SUBCORES-1:0] grant, req_acc;
  logic [SCW-1:0]          grant_idx;
  logic                    alloc_ready, arb_locked;
  always_comb
    for (int s = 0; s < NUM_SUBCORES; s++) req_acc[s] = sc_instr[s].acc;

  subcore_arbiter #(.N(NUM_SUBCORES)) u_arb (
    .clk, .rst_n, .req(sc_valid), .req_acc, .grant_ready(alloc_ready),
    .grant, .grant_idx, .locked(arb_locked)
  );
  assign sc_ready = grant;

  // ------------------------------------------------------------ warp buffer
  logic                                  wbq_req_valid, wbq_req_ready;
  mem_req_t                              wbq_req;
  logic                                  rq_pop_valid;
  mem_resp_t                             rq_head;
  logic [WB_ENTRIES-1:0]                 entry_valid, entry_ready, entry_chain;
  logic [WB_ENTRIES-1:0][WB_ENTRIES-1:0] older;
  hsu_tag_t [WB_ENTRIES-1:0]             entry_tag;
  logic [EW-1:0]                         rd_entry, free_entry;
  logic [$clog2(WARP_SIZE)-1:0]          rd_lane;
  word_t [OPND_WORDS-1:0]                rd_opnd;
  word_t [NODE_WORDS-1:0]                rd_node;
  logic                                  free_valid;

  warp_buffer u_wb (
    .clk, .rst_n,
    .alloc_valid(|grant), .alloc_instr(sc_instr[grant_idx]), .alloc_subcore(grant_idx),
    .alloc_ready,
    .req_valid(wbq_req_valid), .req(wbq_req), .req_ready(wbq_req_ready),
    .resp_valid(rq_pop_valid), .resp(rq_head),
    .entry_valid, .entry_ready, .entry_chain, .older, .entry_tag,
    .rd_entry, .rd_lane, .rd_opnd, .rd_node, .free_valid, .free_entry
  );

  // ---------------------------------------------------- memory access FIFO
  logic mq_full, mq_empty;
  sync_fifo #(.WIDTH($bits(mem_req_t)), .DEPTH(MEMQ_DEPTH)) u_memq (
    .clk, .rst_n,
    .push(wbq_req_valid && !mq_full), .push_data(wbq_req), .full(mq_full),
    .pop(mem_req_valid && mem_req_ready), .pop_data(mem_req), .empty(mq_empty)
  );
  assign wbq_req_ready = !mq_full;
  assign mem_req_valid = !mq_empty;

  // ------------------------------------------------------- response FIFO
  logic rq_full, rq_empty;
  sync_fifo #(.WIDTH($bits(mem_resp_t)), .DEPTH(RESPQ_DEPTH)) u_respq (
    .clk, .rst_n,
    .push(mem_resp_valid && !rq_full), .push_data(mem_resp), .full(rq_full),
    .pop(rq_pop_valid), .pop_data(rq_head), .empty(rq_empty)
  );
  assign mem_resp_ready = !rq_full;
  assign rq_pop_valid   = !rq_empty;

  // ------------------------------------------------------------ scheduler
  logic           rb_alloc_ready, rb_alloc_valid;
  logic [$clog2(RB_ENTRIES)-1:0] rb_alloc_slot;
  hsu_tag_t       rb_alloc_tag;
  logic           dp_in_valid;
  dp_in_t         dp_in;

  dp_scheduler u_sched (
    .clk, .rst_n,
    .entry_valid, .entry_ready, .entry_chain, .older, .entry_tag,
    .rd_entry, .rd_lane, .rd_opnd, .rd_node, .free_valid, .free_entry,
    .rb_alloc_ready, .rb_alloc_slot, .rb_alloc_valid, .rb_alloc_tag,
    .dp_valid(dp_in_valid), .dp_in
  );

  // ------------------------------------------------------------- datapath
  logic    dp_out_valid;
  dp_out_t dp_out;
  hsu_datapath u_dp (
    .clk, .rst_n, .in_valid(dp_in_valid), .in(dp_in),
    .out_valid(dp_out_valid), .out(dp_out)
  );

  // -------------------------------------------------------- result buffer
  result_buffer u_rb (
    .clk, .rst_n,
    .alloc_valid(rb_alloc_valid), .alloc_tag(rb_alloc_tag),
    .alloc_ready(rb_alloc_ready), .alloc_slot(rb_alloc_slot),
    .dp_valid(dp_out_valid), .dp_out,
    .wb_valid, .wb, .wb_ready
  );

  // the arbiter lock must hold across every accumulate beat
  assert property (@(posedge clk) disable iff (!rst_n)
                   (arb_locked && |grant) |-> $past(grant_idx) == grant_idx || !$past(|grant))
    else $error("hsu_rt_unit: accumulate lock broken");
endmodule
