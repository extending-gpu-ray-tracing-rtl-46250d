// tb_hsu_workloads: runs the search workloads' inner operations through the
// whole HSU at its full size: distances between points of the dimensions used
// by common nearest-neighbour benchmark sets, and B-tree node searches.
//
// Each distance is one warp of 32 query/candidate pairs. A point of dimension
// D is split into ceil(D/16) POINT_EUCLID or ceil(D/8) POINT_ANGULAR beats;
// every beat but the last carries the accumulate bit, and short tails are
// zero-padded. The four sub-cores each run a share of the list concurrently.
// The unit's answer is checked two ways:
//   * bit-exact against a model of the datapath's reduction order (pairwise
//     tree inside a beat, then acc = acc + partial per beat), computed here
//     with single-rounded FP32 operations, and
//   * against the exact real-valued distance (relative error below 1e-4),
//     which shows the chain computes the whole distance, not one slice.
// Accumulate beats must write back with acc = 1 in their tag. The B-tree
// workload sends KEY_COMPARE on nodes of sorted separators with a random
// separator count and checks the bit vector, and that its popcount is the
// child to visit. Dimensions: 96 (angular), 784, 960 (Euclidean), 200, 65, 256
// (angular), 128 (Euclidean) and 3 (Euclidean point clouds, one zero-padded
// beat). A watchdog ends the run after 300000 cycles.
module tb_hsu_workloads;
  import hsu_pkg::*;
  import hsu_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_SUBCORES-1:0]       sc_valid, sc_ready;
  hsu_instr_t [NUM_SUBCORES-1:0] sc_instr;
  logic      mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  mem_req_t  mem_req;
  mem_resp_t mem_resp;
  logic      wb_valid, wb_ready;
  hsu_wb_t   wb;

  hsu_rt_unit dut (.*);

  l1_mem_model u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_ready(mem_resp_ready), .resp(mem_resp)
  );

  int checks = 0, failures = 0;

  typedef word_t [WARP_SIZE-1:0][RES_WORDS-1:0] res_t;
  typedef word_t [NODE_WORDS-1:0] node_t;

  // one instruction with its node data and expected write-back
  typedef struct {
    hsu_instr_t ins;
    node_t      node [WARP_SIZE];
    res_t       exp;
    real        exact [WARP_SIZE][2];   // real-valued totals, last beat only
    logic       loose;                  // compare with exact values
  } job_t;
  job_t jobs [NUM_SUBCORES][$];
  job_t pending [int];                  // by {warp_id, dst}
  int   n_jobs = 0, n_wb = 0;
  word_t next_addr = 32'h0010_0000;

  // -------------------------------------------- datapath reduction order
  function automatic word_t euclid_beat(word_t q [16], word_t c [16]);
    word_t s [16];
    for (int i = 0; i < 16; i++) s[i] = fmul(fsub(q[i], c[i]), fsub(q[i], c[i]));
    for (int i = 0; i < 8; i++) s[i] = fadd(s[2*i], s[2*i+1]);
    for (int i = 0; i < 4; i++) s[i] = fadd(s[2*i], s[2*i+1]);
    for (int i = 0; i < 2; i++) s[i] = fadd(s[2*i], s[2*i+1]);
    return fadd(s[0], s[1]);
  endfunction

  function automatic void angular_beat(input word_t q [16], input word_t c [16],
                                       output word_t dot, output word_t nrm);
    word_t p [8], n [8];
    for (int i = 0; i < 8; i++) begin p[i] = fmul(q[i], c[i]); n[i] = fmul(c[i], c[i]); end
    for (int i = 0; i < 4; i++) begin p[i] = fadd(p[2*i], p[2*i+1]); n[i] = fadd(n[2*i], n[2*i+1]); end
    for (int i = 0; i < 2; i++) begin p[i] = fadd(p[2*i], p[2*i+1]); n[i] = fadd(n[2*i], n[2*i+1]); end
    dot = fadd(p[0], p[1]);
    nrm = fadd(n[0], n[1]);
  endfunction

  // ---------------------------------------------- distance workload builder
  int wl_id = 0;
  task automatic add_distance(int sc, int dim, logic angular);
    localparam int MAXD = 960;
    word_t q [WARP_SIZE][MAXD], c [WARP_SIZE][MAXD];
    word_t acc0 [WARP_SIZE], acc1 [WARP_SIZE];
    real   ex0 [WARP_SIZE], ex1 [WARP_SIZE];
    int    w, beats;
    w     = angular ? ANGULAR_W : EUCLID_W;
    beats = (dim + w - 1) / w;
    for (int l = 0; l < WARP_SIZE; l++) begin
      ex0[l] = 0.0; ex1[l] = 0.0; acc0[l] = FP_ZERO; acc1[l] = FP_ZERO;
      for (int i = 0; i < beats * w; i++) begin
        q[l][i] = (i < dim) ? fpos(-4, 0) : FP_ZERO;
        c[l][i] = (i < dim) ? fpos(-4, 0) : FP_ZERO;
        if (angular) begin
          ex0[l] += f2r(q[l][i]) * f2r(c[l][i]);
          ex1[l] += f2r(c[l][i]) * f2r(c[l][i]);
        end else
          ex0[l] += (f2r(q[l][i]) - f2r(c[l][i])) ** 2;
      end
    end
    for (int b = 0; b < beats; b++) begin
      job_t j;
      j = '{default: '0};
      j.ins.op      = angular ? OP_POINT_ANGULAR : OP_POINT_EUCLID;
      j.ins.acc     = (b != beats - 1);
      j.ins.warp_id = WARP_ID_W'(wl_id);
      j.ins.dst     = DST_W'(b);
      j.ins.active  = '1;
      j.loose       = !j.ins.acc;
      for (int l = 0; l < WARP_SIZE; l++) begin
        word_t qs [16], cs [16];
        for (int i = 0; i < 16; i++) begin qs[i] = FP_ZERO; cs[i] = FP_ZERO; end
        for (int i = 0; i < w; i++) begin
          qs[i] = q[l][b*w+i];
          cs[i] = c[l][b*w+i];
          j.ins.opnd[l][i] = qs[i];
          j.node[l][i]     = cs[i];
        end
        j.ins.ptr[l] = next_addr;
        next_addr += 32'd256;
        if (angular) begin
          word_t d, n;
          angular_beat(qs, cs, d, n);
          acc0[l] = fadd(d, acc0[l]);
          acc1[l] = fadd(n, acc1[l]);
        end else
          acc0[l] = fadd(euclid_beat(qs, cs), acc0[l]);
        if (!j.ins.acc) begin
          j.exp[l][0] = acc0[l];
          j.exp[l][1] = angular ? acc1[l] : FP_ZERO;
          j.exact[l][0] = ex0[l];
          j.exact[l][1] = ex1[l];
        end
      end
      jobs[sc].push_back(j);
      n_jobs++;
    end
    wl_id++;
  endtask

  // ---------------------------------------------- B-tree node search
  task automatic add_btree(int sc, int n_nodes);
    for (int k = 0; k < n_nodes; k++) begin
      job_t j;
      j = '{default: '0};
      j.ins.op      = OP_KEY_COMPARE;
      j.ins.warp_id = WARP_ID_W'(wl_id);
      j.ins.dst     = DST_W'(k);
      j.ins.active  = '1;
      for (int l = 0; l < WARP_SIZE; l++) begin
        int cnt, base, key, child;
        logic [35:0] bits;
        cnt  = 1 + int'($urandom % KEY_SEPS);
        base = int'($urandom % 1000);
        key  = int'($urandom % (base + 40 * cnt + 20));
        bits = '0;
        child = 0;
        for (int s = 0; s < NODE_WORDS; s++) begin
          int sep;
          sep = base + 40 * s;                       // sorted separators
          j.node[l][s] = r2f(real'(sep));
          if (s < cnt && key >= sep) begin bits[s] = 1'b1; child++; end
        end
        j.ins.opnd[l][0] = r2f(real'(key));
        j.ins.opnd[l][1] = word_t'(cnt);
        j.ins.ptr[l] = next_addr;
        next_addr += 32'd256;
        j.exp[l][0] = bits[31:0];
        j.exp[l][1] = {28'd0, bits[35:32]};
        // sorted separators: the set bits form a prefix; their count is the child
        if ($countones(bits) != child || (bits & (bits + 36'd1)) != '0) begin
          failures++;
          $display("FAIL btree model");
        end
      end
      jobs[sc].push_back(j);
      n_jobs++;
    end
    wl_id++;
  endtask

  // -------------------------------------------------------------- sub-cores
  for (genvar s = 0; s < NUM_SUBCORES; s++) begin : g_sc
    initial begin
      sc_valid[s] = 1'b0;
      sc_instr[s] = '0;
      @(posedge rst_n);
      while (jobs[s].size() != 0) begin
        job_t j;
        j = jobs[s].pop_front();
        for (int l = 0; l < WARP_SIZE; l++) u_mem.put(j.ins.ptr[l], j.node[l]);
        pending[{j.ins.warp_id, j.ins.dst}] = j;
        sc_instr[s] = j.ins;
        sc_valid[s] = 1'b1;
        do @(posedge clk); while (!sc_ready[s]);
        #1;
        sc_valid[s] = 1'b0;
      end
    end
  end

  // ------------------------------------------------------------- write-back
  initial wb_ready = 1'b0;
  always @(posedge clk) if (rst_n) wb_ready <= ($urandom % 8) != 0;

  int n_loose = 0, n_acc_wb = 0;
  always @(posedge clk) begin
    if (rst_n && wb_valid && wb_ready) begin
      int id;
      job_t j;
      id = {wb.tag.warp_id, wb.tag.dst};
      n_wb++;
      checks++;
      if (!pending.exists(id)) begin
        failures++;
        $display("FAIL unexpected write-back %0d", id);
      end else begin
        j = pending[id];
        pending.delete(id);
        if (wb.tag.acc != j.ins.acc || wb.tag.op != j.ins.op) begin
          failures++;
          $display("FAIL tag of write-back %0d", id);
        end
        if (j.ins.acc) n_acc_wb++;
        else begin
          if (wb.res != j.exp) begin
            failures++;
            if (failures < 8)
              for (int l = 0; l < WARP_SIZE; l++)
                if (wb.res[l] != j.exp[l])
                  $display("FAIL %0d lane %0d got %h %h exp %h %h", id, l,
                           wb.res[l][0], wb.res[l][1], j.exp[l][0], j.exp[l][1]);
          end
          if (j.loose) begin
            n_loose++;
            for (int l = 0; l < WARP_SIZE; l++)
              for (int k = 0; k < 1 + int'(j.ins.op == OP_POINT_ANGULAR); k++) begin
                real got, want, err;
                got  = f2r(wb.res[l][k]);
                want = j.exact[l][k];
                err  = (got > want) ? got - want : want - got;
                checks++;
                if (err > 1.0e-4 * want + 1.0e-30) begin
                  failures++;
                  if (failures < 8) $display("FAIL %0d lane %0d word %0d: %g vs exact %g", id, l, k, got, want);
                end
              end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------------ main
  initial begin
    add_distance(0, 96,  1'b1);   // deep1b, angular
    add_distance(1, 784, 1'b0);   // fashion-mnist / mnist, Euclidean
    add_distance(2, 960, 1'b0);   // gist, Euclidean
    add_distance(3, 200, 1'b1);   // glove, angular
    add_distance(0, 65,  1'b1);   // last-fm, angular
    add_distance(1, 256, 1'b1);   // nytimes, angular
    add_distance(2, 128, 1'b0);   // sift, Euclidean
    add_distance(3, 3,   1'b0);   // 3-D point clouds, Euclidean
    add_btree(0, 4);              // B-tree internal nodes
    add_btree(3, 4);
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (n_wb == n_jobs);
    repeat (10) @(posedge clk);
    checks++;
    if (pending.size() != 0) begin failures++; $display("FAIL %0d instructions lost", pending.size()); end
    checks++;
    if (n_loose != 8) begin failures++; $display("FAIL only %0d distances completed", n_loose); end
    checks++;
    if (n_acc_wb != n_jobs - 8 - 8) begin failures++; $display("FAIL %0d accumulate beats written back", n_acc_wb); end
    $display("instructions %0d (accumulate beats %0d), distances %0d", n_jobs, n_acc_wb, n_loose);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d write-backs", n_wb, n_jobs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
