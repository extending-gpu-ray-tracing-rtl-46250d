// subcore_arbiter: selects which sub-core's HSU warp instruction enters the
// warp buffer. The sub-cores of an SM share one unit; when several dispatch
// in the same cycle a round-robin arbiter picks one.
//
// Accumulate lock: a multi-beat distance instruction is a run of instructions
// whose accumulate bit is set, closed by one with the bit clear. While the
// last granted instruction had its accumulate bit set, the arbiter stops
// rotating and grants only the sub-core that issued it, so no other warp's
// instruction can slip between the beats. The lock is released by the next
// grant whose accumulate bit is clear. This behaviour follows the design
// description; the rotation order (search starting after the last winner)
// is this design's choice.
//
// Interface: req/req_acc per sub-core; grant_ready says the warp buffer has a
// free entry. grant is one-hot (or zero) and combinational; a grant is taken
// in the cycle it is shown.
module subcore_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         req_acc,
  input  logic                 grant_ready,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 locked
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last;
  logic          lock_q;
  logic [IW-1:0] cand;

  assign locked = lock_q;

  always_comb begin
    grant     = '0;
    grant_idx = last;
    cand      = last;
    if (grant_ready) begin
      if (lock_q) begin
        if (req[last]) grant[last] = 1'b1;
      end else begin
        for (int k = N; k >= 1; k--) begin
          cand = IW'((int'(last) + k) % N);
          if (req[cand]) begin
            grant       = '0;
            grant[cand] = 1'b1;
            grant_idx   = cand;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last   <= IW'(N - 1);
      lock_q <= 1'b0;
    end else if (|grant) begin
      last   <= grant_idx;
      lock_q <= req_acc[grant_idx];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("subcore_arbiter: more than one grant");
  assert property (@(posedge clk) disable iff (!rst_n) (lock_q && |grant) |-> grant_idx == last)
    else $error("subcore_arbiter: lock broken");
endmodule
