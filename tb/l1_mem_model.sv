// l1_mem_model: behavioural model of the L1 data cache and interconnect seen
// by the HSU's node fetch port, for simulation only. Node contents are loaded
// by the testbench with put(). A request is accepted when req_ready is high
// (randomly withheld to create back-pressure); it is answered after a short
// latency (a hit) or a long, random one (a miss), so answers come back out of
// request order. At most one answer is offered per cycle, held until
// resp_ready.
module l1_mem_model
  import hsu_pkg::*;
#(
  parameter int HIT_PCT    = 50,
  parameter int MISS_MIN   = 20,
  parameter int MISS_MAX   = 80,
  parameter int STALL_PCT  = 20
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  mem_req_t  req,
  output logic      resp_valid,
  input  logic      resp_ready,
  output mem_resp_t resp
);
  typedef word_t [NODE_WORDS-1:0] node_t;
  node_t store [word_t];

  typedef struct {
    mem_resp_t r;
    int        due;
    int        seq;
  } pend_t;
  pend_t pend [$];
  int    now = 0;
  int    seq_in = 0;
  int    last_seq_out = -1;
  int    n_reqs = 0, n_out_of_order = 0, n_stall = 0;

  function automatic void put(word_t addr, node_t data);
    store[addr] = data;
  endfunction

  always @(posedge clk) now <= now + 1;

  initial begin
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp       = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      req_ready  <= 1'b0;
      resp_valid <= 1'b0;
    end else begin
      // accept
      if (req_valid && req_ready) begin
        pend_t p;
        p.r.entry = req.entry;
        p.r.lane  = req.lane;
        p.r.data  = store.exists(req.addr) ? store[req.addr] : '0;
        p.due     = now + (($urandom % 100) < HIT_PCT ? 3 :
                           MISS_MIN + int'($urandom % (MISS_MAX - MISS_MIN + 1)));
        p.seq     = seq_in++;
        pend.push_back(p);
        n_reqs++;
      end
      req_ready <= ($urandom % 100) >= STALL_PCT;
      if (req_valid && !req_ready) n_stall++;
      // answer
      if (!resp_valid || resp_ready) begin
        int best;
        best = -1;
        for (int i = 0; i < pend.size(); i++)
          if (pend[i].due <= now && (best < 0 || pend[i].due < pend[best].due)) best = i;
        if (best >= 0) begin
          resp       <= pend[best].r;
          resp_valid <= 1'b1;
          if (pend[best].seq < last_seq_out) n_out_of_order++;
          last_seq_out = pend[best].seq;
          pend.delete(best);
        end else begin
          resp_valid <= 1'b0;
        end
      end
    end
  end
endmodule
