// result_buffer: collects the per-thread results that leave the single-lane
// datapath one at a time and returns a warp instruction's results to the
// register file in one write-back once all its active threads are done (a
// corner-turn buffer: results arrive thread by thread, leave warp-wide).
//
// Each of RB_ENTRIES slots holds an instruction's write-back tag (sub-core,
// warp, destination register, opcode, accumulate bit, active mask), a done
// mask and RES_WORDS result words per lane. A slot is claimed by the
// datapath scheduler when it picks an instruction (alloc_ready says a slot is
// free, alloc_slot which one) and is released when its write-back is
// accepted (wb_valid && wb_ready). The datapath can always write: every
// thread in flight owns a claimed slot, so the pipeline never stalls.
// Threads of an accumulate beat only mark themselves done; their result words
// stay zero, and the write-back carries acc = 1 so that nothing is written
// to registers.
//
// Slot count, the lowest-free-slot allocation and the lowest-slot-first
// write-back order are this design's choices.
module result_buffer
  import hsu_pkg::*;
#(
  parameter int unsigned SLOTS = RB_ENTRIES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // slot allocation
  input  logic                     alloc_valid,
  input  hsu_tag_t                 alloc_tag,
  output logic                     alloc_ready,
  output logic [$clog2(SLOTS)-1:0] alloc_slot,
  // datapath results
  input  logic                     dp_valid,
  input  dp_out_t                  dp_out,
  // register file write-back
  output logic                     wb_valid,
  output hsu_wb_t                  wb,
  input  logic                     wb_ready
);
  localparam int unsigned SW = $clog2(SLOTS);

  logic [SLOTS-1:0]                       v;
  hsu_tag_t                               tag  [SLOTS];
  logic [WARP_SIZE-1:0]                   done [SLOTS];
  word_t [WARP_SIZE-1:0][RES_WORDS-1:0]   res  [SLOTS];

  always_comb begin
    alloc_ready = 1'b0;
    alloc_slot  = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (!v[i]) begin
        alloc_ready = 1'b1;
        alloc_slot  = SW'(i);
      end
  end

  logic [SW-1:0] wb_slot;
  always_comb begin
    wb_valid = 1'b0;
    wb_slot  = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (v[i] && done[i] == tag[i].active) begin
        wb_valid = 1'b1;
        wb_slot  = SW'(i);
      end
  end
  assign wb.tag = tag[wb_slot];
  assign wb.res = res[wb_slot];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0;
      for (int i = 0; i < SLOTS; i++) begin
        tag[i]  <= '0;
        done[i] <= '0;
      end
    end else begin
      if (wb_valid && wb_ready) v[wb_slot] <= 1'b0;
      if (dp_valid) done[dp_out.slot][dp_out.lane] <= 1'b1;
      if (alloc_valid && alloc_ready) begin
        v[alloc_slot]    <= 1'b1;
        tag[alloc_slot]  <= alloc_tag;
        done[alloc_slot] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < SLOTS; i++) res[i] <= '0;
    end else begin
      if (alloc_valid && alloc_ready) res[alloc_slot] <= '0;
      if (dp_valid && !dp_out.acc) res[dp_out.slot][dp_out.lane] <= dp_out.res;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   dp_valid |-> v[dp_out.slot] && tag[dp_out.slot].active[dp_out.lane] && !done[dp_out.slot][dp_out.lane])
    else $error("result_buffer: result for an unclaimed slot or lane");
endmodule
