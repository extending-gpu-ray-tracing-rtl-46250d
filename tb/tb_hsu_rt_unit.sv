// tb_hsu_rt_unit: end-to-end test of the whole HSU at its full size. Four
// sub-core drivers dispatch random warp instructions of every opcode: box and
// triangle RAY_INTERSECT (mixed within a warp), POINT_EUCLID, POINT_ANGULAR
// and KEY_COMPARE, with full, sparse and single-lane active masks, plus
// multi-beat (accumulate) Euclidean and angular operations. A behavioural
// cache answers node fetches out of order with random latency and
// back-pressure; the register-file side randomly withholds wb_ready.
// Every write-back is compared, lane by lane, with the reference model.
// The test also counts each mechanism of the unit and fails if one never
// happened: arbitration between sub-cores, the accumulate lock, a full warp
// buffer, a full memory access FIFO, out-of-order node returns, lane skipping
// for sparse masks, mixed box/triangle warps, in-order chain issue,
// back-to-back issue of consecutive instructions, a full result buffer and
// write-back back-pressure.
module tb_hsu_rt_unit;
  import hsu_pkg::*;
  import hsu_tb_pkg::*;
  import hsu_ref_pkg::*;

  localparam int N_INSTR_PER_SC = 150;

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
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------- instruction pool
  typedef struct {
    hsu_instr_t ins;
    word_t      node [WARP_SIZE][NODE_WORDS];
    logic       mixed;
  } job_t;
  job_t jobs [NUM_SUBCORES][$];

  typedef word_t [WARP_SIZE-1:0][RES_WORDS-1:0] res_t;
  res_t exp_res [int];              // key: {warp_id, dst}
  logic exp_acc [int];
  logic [WARP_SIZE-1:0] exp_mask [int];
  int n_sent = 0, n_wb = 0, n_threads = 0, n_sparse_done = 0, n_mixed_done = 0;
  logic mixed_of [int];
  word_t next_addr = 32'h0001_0000;
  int next_id = 0;

  function automatic job_t make_job(hsu_op_e op, logic acc, int id, logic [WARP_SIZE-1:0] mask,
                                    ref word_t qv [WARP_SIZE][OPND_WORDS]);
    job_t j;
    int nb = 0, nt = 0;
    j.ins = '0;
    j.ins.op = op;
    j.ins.acc = acc;
    j.ins.warp_id = WARP_ID_W'(id >> DST_W);
    j.ins.dst = DST_W'(id);
    j.ins.active = mask;
    for (int l = 0; l < WARP_SIZE; l++) begin
      dp_in_t t;
      dp_mode_e m;
      case (op)
        OP_RAY_INTERSECT: m = ($urandom % 2) ? MODE_BOX : MODE_TRI;
        OP_POINT_EUCLID:  m = MODE_EUCLID;
        OP_POINT_ANGULAR: m = MODE_ANGULAR;
        default:          m = MODE_KEY;
      endcase
      t = gen_thread(m, l, acc);
      if (m == MODE_BOX) begin
        t.node[NODE_TYPE_WORD] = NODE_TYPE_BOX;
        if (mask[l]) nb++;
      end
      if (m == MODE_TRI && mask[l]) nt++;
      // a multi-beat operation keeps its query in registers across beats
      if (op == OP_POINT_EUCLID || op == OP_POINT_ANGULAR)
        for (int w = 0; w < OPND_WORDS; w++) t.opnd[w] = qv[l][w];
      j.ins.opnd[l] = t.opnd;
      j.ins.ptr[l]  = next_addr;
      next_addr += 32'd256;
      for (int w = 0; w < NODE_WORDS; w++) j.node[l][w] = t.node[w];
    end
    j.mixed = (nb > 0) && (nt > 0);
    return j;
  endfunction

  function automatic logic [WARP_SIZE-1:0] rand_mask();
    case ($urandom % 4)
      0: return '1;
      1: return WARP_SIZE'(1) << ($urandom % WARP_SIZE);
      default: begin
        logic [WARP_SIZE-1:0] m;
        m = WARP_SIZE'($urandom) & WARP_SIZE'($urandom);
        return (m == '0) ? WARP_SIZE'(1) : m;
      end
    endcase
  endfunction

  // expected results, computed in the order instructions are accepted
  function automatic void expect_job(job_t j);
    res_t r;
    int id;
    r = '0;
    id = {j.ins.warp_id, j.ins.dst};
    for (int l = 0; l < WARP_SIZE; l++)
      if (j.ins.active[l]) begin
        dp_in_t t;
        word_t res [4];
        logic hit;
        t = '0;
        t.lane = 5'(l);
        t.acc  = j.ins.acc;
        t.opnd = j.ins.opnd[l];
        for (int w = 0; w < NODE_WORDS; w++) t.node[w] = j.node[l][w];
        case (j.ins.op)
          OP_RAY_INTERSECT: t.mode = (t.node[NODE_TYPE_WORD] == NODE_TYPE_TRI) ? MODE_TRI : MODE_BOX;
          OP_POINT_EUCLID:  t.mode = MODE_EUCLID;
          OP_POINT_ANGULAR: t.mode = MODE_ANGULAR;
          default:          t.mode = MODE_KEY;
        endcase
        ref_thread(t, res, hit);
        if (!(j.ins.acc && (j.ins.op == OP_POINT_EUCLID || j.ins.op == OP_POINT_ANGULAR)))
          for (int w = 0; w < RES_WORDS; w++) r[l][w] = res[w];
      end
    exp_res[id]  = r;
    exp_acc[id]  = j.ins.acc && (j.ins.op == OP_POINT_EUCLID || j.ins.op == OP_POINT_ANGULAR);
    exp_mask[id] = j.ins.active;
    mixed_of[id] = j.mixed;
  endfunction

  // ----------------------------------------------------------- sub-cores
  for (genvar s = 0; s < NUM_SUBCORES; s++) begin : g_sc
    initial begin
      sc_valid[s] = 1'b0;
      sc_instr[s] = '0;
      @(posedge rst_n);
      while (jobs[s].size() != 0) begin
        job_t j;
        j = jobs[s].pop_front();
        for (int l = 0; l < WARP_SIZE; l++) begin
          typedef word_t [NODE_WORDS-1:0] node_t;
          node_t nd;
          for (int w = 0; w < NODE_WORDS; w++) nd[w] = j.node[l][w];
          u_mem.put(j.ins.ptr[l], nd);
        end
        sc_instr[s] = j.ins;
        sc_valid[s] = 1'b1;
        do @(posedge clk); while (!sc_ready[s]);
        expect_job(j);
        n_sent++;
        #1;
        sc_valid[s] = 1'b0;
        // accumulate beats follow immediately, otherwise a random pause
        if (!j.ins.acc && ($urandom % 3 == 0)) repeat ($urandom % 20) @(posedge clk);
        #1;
      end
    end
  end

  // ------------------------------------------------------------- write-back
  // the register file accepts most cycles, with occasional long stalls
  int wb_hold = 0;
  initial wb_ready = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (wb_hold > 0) begin
        wb_hold  <= wb_hold - 1;
        wb_ready <= 1'b0;
      end else begin
        wb_ready <= ($urandom % 4) != 0;
        if ($urandom % 300 == 0) wb_hold <= 60;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && wb_valid && wb_ready) begin
      int id;
      id = {wb.tag.warp_id, wb.tag.dst};
      n_wb++;
      checks++;
      if (!exp_res.exists(id)) begin
        failures++;
        $display("FAIL unexpected write-back id %0d", id);
      end else begin
        if (wb.tag.acc != exp_acc[id] || wb.tag.active != exp_mask[id] || wb.res != exp_res[id]) begin
          failures++;
          if (failures < 8) begin
            $display("FAIL write-back id %0d op %0d acc %0d/%0d", id, wb.tag.op, wb.tag.acc, exp_acc[id]);
            for (int l = 0; l < WARP_SIZE; l++)
              if (wb.res[l] != exp_res[id][l]) $display("  lane %0d got %h exp %h", l, wb.res[l], exp_res[id][l]);
          end
        end
        if (exp_mask[id] != '1) n_sparse_done++;
        if (mixed_of[id]) n_mixed_done++;
        exp_res.delete(id);
      end
    end
  end

  // ------------------------------------------------------ mechanism counters
  int c_arb = 0, c_lock = 0, c_wbfull = 0, c_mqfull = 0, c_chain_wait = 0;
  int c_b2b = 0, c_rbfull = 0, c_wbstall = 0, c_issue = 0, c_skip = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(sc_valid) > 1 && |sc_ready) c_arb++;
    if (dut.u_arb.locked && |(sc_valid & ~sc_ready & ~(NUM_SUBCORES'(1) << dut.u_arb.last))) c_lock++;
    if (|sc_valid && !dut.alloc_ready) c_wbfull++;
    if (dut.mq_full) c_mqfull++;
    if (|(dut.entry_ready & ~dut.u_sched.elig & ~(dut.u_sched.busy ? (WB_ENTRIES'(1) << dut.u_sched.cur) : '0))) c_chain_wait++;
    if (dut.u_sched.finishing && dut.u_sched.can_pick) c_b2b++;
    if (dut.u_sched.pick_any && !dut.rb_alloc_ready) c_rbfull++;
    if (wb_valid && !wb_ready) c_wbstall++;
    if (dut.dp_in_valid) begin
      c_issue++;
      if (dut.u_sched.lane != 0 && !dut.entry_tag[dut.u_sched.cur].active[dut.u_sched.lane - 1]) c_skip++;
    end
  end

  task automatic need(int cnt, string what);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    word_t qv [WARP_SIZE][OPND_WORDS];
    ref_reset();
    for (int s = 0; s < NUM_SUBCORES; s++) begin
      int k;
      k = 0;
      while (k < N_INSTR_PER_SC) begin
        int kind;
        kind = int'($urandom % 6);
        for (int l = 0; l < WARP_SIZE; l++)
          for (int w = 0; w < OPND_WORDS; w++) qv[l][w] = frand(-4, 4);
        if (kind == 5) begin
          // multi-beat distance operation: beats with acc set, then one without
          int beats;
          hsu_op_e op;
          logic [WARP_SIZE-1:0] m;
          op = ($urandom % 2) ? OP_POINT_EUCLID : OP_POINT_ANGULAR;
          beats = 2 + int'($urandom % 7);
          m = rand_mask();
          for (int b = 0; b < beats; b++) begin
            jobs[s].push_back(make_job(op, b != beats - 1, next_id, m, qv));
            next_id++;
            k++;
          end
        end else begin
          hsu_op_e op;
          op = (kind == 0 || kind == 1) ? OP_RAY_INTERSECT : hsu_op_e'(kind - 1);
          jobs[s].push_back(make_job(op, 1'b0, next_id, rand_mask(), qv));
          next_id++;
          k++;
        end
      end
    end
    begin
      int total;
      total = 0;
      for (int s = 0; s < NUM_SUBCORES; s++) total += jobs[s].size();
      repeat (4) @(posedge clk);
      #1 rst_n = 1'b1;
      wait (n_wb == total);
      repeat (20) @(posedge clk);
      checks++;
      if (exp_res.size() != 0) begin failures++; $display("FAIL %0d instructions never written back", exp_res.size()); end
      // every active thread went through the datapath exactly once
      begin
        checks++;
        if (c_issue != n_threads_total) begin
          failures++;
          $display("FAIL issued %0d threads, expected %0d", c_issue, n_threads_total);
        end
      end
      need(c_arb, "arbitration between sub-cores");
      need(c_lock, "accumulate lock holding off another sub-core");
      need(c_wbfull, "warp buffer full");
      need(c_mqfull, "memory access FIFO full");
      need(u_mem.n_out_of_order, "out-of-order node return");
      need(c_skip, "inactive lanes skipped");
      need(n_sparse_done, "sparse-mask instruction completed");
      need(n_mixed_done, "warp mixing box and triangle nodes");
      need(c_chain_wait, "ready entry held back for chain order");
      need(c_b2b, "back-to-back instruction issue");
      need(c_rbfull, "result buffer full");
      need(c_wbstall, "write-back back-pressure");
      $display("instr %0d threads %0d cycles %0d | arb %0d lock %0d wbfull %0d mqfull %0d ooo %0d skip %0d sparse %0d mixed %0d chain %0d b2b %0d rbfull %0d wbstall %0d",
               total, c_issue, cycle, c_arb, c_lock, c_wbfull, c_mqfull, u_mem.n_out_of_order, c_skip,
               n_sparse_done, n_mixed_done, c_chain_wait, c_b2b, c_rbfull, c_wbstall);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int n_threads_total = 0;
  always @(posedge clk) if (rst_n) for (int s = 0; s < NUM_SUBCORES; s++)
    if (sc_valid[s] && sc_ready[s]) n_threads_total += $countones(sc_instr[s].active);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d write-backs", n_wb, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
