// dp_scheduler: the datapath scheduler. It picks a warp buffer entry whose
// node data is complete and feeds its active threads into the single-lane
// datapath, one thread per cycle, skipping lanes whose active bit is 0, so a
// warp with a sparse active mask takes only as many cycles as it has active
// threads. After the entry's last active thread has been issued the entry is
// cleared. A result buffer slot is claimed for the instruction when it is
// picked.
//
// Selection: among ready entries, the oldest. Entries of a multi-beat
// distance operation (chain flag) are taken only once no older entry is
// waiting, and no entry may overtake a waiting chain entry, so the beats
// reach the per-lane accumulators in program order, the beat that clears the
// accumulate bit comes last and no other thread sees a partial sum. The next entry is picked in the
// cycle the current one issues its last thread, so consecutive instructions
// issue back to back without a bubble.
//
// Mode: RAY_INTERSECT threads become ray-box or ray-triangle threads
// according to the type word of the node each thread fetched; the other
// opcodes map one to one.
//
// Timing: issue is registered through the datapath's first stage; a thread is
// issued in the cycle it is shown on dp_valid/dp_in.
module dp_scheduler
  import hsu_pkg::*;
#(
  parameter int unsigned ENTRIES = WB_ENTRIES
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // warp buffer
  input  logic [ENTRIES-1:0]              entry_valid,
  input  logic [ENTRIES-1:0]              entry_ready,
  input  logic [ENTRIES-1:0]              entry_chain,
  input  logic [ENTRIES-1:0][ENTRIES-1:0] older,
  input  hsu_tag_t [ENTRIES-1:0]          entry_tag,
  output logic [$clog2(ENTRIES)-1:0]      rd_entry,
  output logic [$clog2(WARP_SIZE)-1:0]    rd_lane,
  input  word_t [OPND_WORDS-1:0]          rd_opnd,
  input  word_t [NODE_WORDS-1:0]          rd_node,
  output logic                            free_valid,
  output logic [$clog2(ENTRIES)-1:0]      free_entry,
  // result buffer slot allocation
  input  logic                            rb_alloc_ready,
  input  logic [$clog2(RB_ENTRIES)-1:0]   rb_alloc_slot,
  output logic                            rb_alloc_valid,
  output hsu_tag_t                        rb_alloc_tag,
  // datapath
  output logic                            dp_valid,
  output dp_in_t                          dp_in
);
  localparam int unsigned EW = $clog2(ENTRIES);
  localparam int unsigned LW = $clog2(WARP_SIZE);
  localparam int unsigned SW = $clog2(RB_ENTRIES);

  logic                 busy;
  logic [EW-1:0]        cur;
  logic [SW-1:0]        cur_slot;
  logic [WARP_SIZE-1:0] rem;

  // ------------------------------------------------------------- issue
  logic [LW-1:0]        lane;
  logic [WARP_SIZE-1:0] rem_next;
  logic                 finishing;
  always_comb begin
    lane = '0;
    for (int l = WARP_SIZE - 1; l >= 0; l--)
      if (rem[l]) lane = LW'(l);
    rem_next  = rem;
    rem_next[lane] = 1'b0;
    finishing = busy && (rem_next == '0);
  end

  assign rd_entry   = cur;
  assign rd_lane    = lane;
  assign dp_valid   = busy;
  assign free_valid = finishing;
  assign free_entry = cur;

  always_comb begin
    dp_in      = '0;
    dp_in.acc  = entry_tag[cur].acc;
    dp_in.slot = cur_slot;
    dp_in.lane = lane;
    dp_in.opnd = rd_opnd;
    dp_in.node = rd_node;
    case (entry_tag[cur].op)
      OP_RAY_INTERSECT: dp_in.mode = (rd_node[NODE_TYPE_WORD] == NODE_TYPE_TRI) ? MODE_TRI : MODE_BOX;
      OP_POINT_EUCLID:  dp_in.mode = MODE_EUCLID;
      OP_POINT_ANGULAR: dp_in.mode = MODE_ANGULAR;
      default:          dp_in.mode = MODE_KEY;
    endcase
  end

  // --------------------------------------------------------- selection
  logic [ENTRIES-1:0] elig;
  logic [EW-1:0]      pick;
  logic               pick_any;
  logic               can_pick;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      logic older_wait, older_chain;
      older_wait  = 1'b0;
      older_chain = 1'b0;
      for (int j = 0; j < ENTRIES; j++)
        if (entry_valid[j] && older[j][i] && !(busy && EW'(j) == cur)) begin
          older_wait  = 1'b1;
          older_chain = older_chain | entry_chain[j];
        end
      elig[i] = entry_ready[i] && !(busy && EW'(i) == cur) &&
                !(entry_chain[i] && older_wait) && !older_chain;
    end
    pick     = '0;
    pick_any = 1'b0;
    for (int i = 0; i < ENTRIES; i++) begin
      logic oldest;
      oldest = 1'b1;
      for (int j = 0; j < ENTRIES; j++)
        if (elig[j] && older[j][i]) oldest = 1'b0;
      if (elig[i] && oldest && !pick_any) begin
        pick     = EW'(i);
        pick_any = 1'b1;
      end
    end
  end

  assign can_pick       = (!busy || finishing) && pick_any && rb_alloc_ready;
  assign rb_alloc_valid = can_pick;
  assign rb_alloc_tag   = entry_tag[pick];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cur      <= '0;
      cur_slot <= '0;
      rem      <= '0;
    end else if (can_pick) begin
      busy     <= 1'b1;
      cur      <= pick;
      cur_slot <= rb_alloc_slot;
      rem      <= entry_tag[pick].active;
    end else if (busy) begin
      busy <= !finishing;
      rem  <= rem_next;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> rem != '0)
    else $error("dp_scheduler: busy with nothing to issue");
endmodule
