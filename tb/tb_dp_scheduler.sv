// tb_dp_scheduler: surrounds the scheduler with a model warp buffer whose
// entries become ready at random times, some of them forming accumulate
// chains, and a result buffer that is sometimes full. Checks that every
// active lane of every entry is issued exactly once, in lane order, one per
// cycle; that only ready entries issue; that among entries ready at the same
// time the oldest goes first; that chain entries issue in allocation order
// and nothing overtakes a waiting chain entry; that the entry is freed with
// its last thread; that RAY_INTERSECT threads take the box or triangle mode
// from their node; and that a batch of ready entries issues with no idle
// cycle (one thread per cycle).
module tb_dp_scheduler;
  import hsu_pkg::*;
  localparam int E = WB_ENTRIES;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [E-1:0] entry_valid, entry_ready, entry_chain;
  logic [E-1:0][E-1:0] older;
  hsu_tag_t [E-1:0] entry_tag;
  logic [2:0] rd_entry, free_entry, rb_alloc_slot;
  logic [4:0] rd_lane;
  word_t [OPND_WORDS-1:0] rd_opnd;
  word_t [NODE_WORDS-1:0] rd_node;
  logic free_valid, rb_alloc_ready, rb_alloc_valid, dp_valid;
  hsu_tag_t rb_alloc_tag;
  dp_in_t dp_in;

  dp_scheduler dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_chain = 0, n_rbfull = 0;
  int seq [E];
  int ready_at [E];
  int seq_ctr = 0, cycle = 0;
  logic [WARP_SIZE-1:0] issued [E];
  logic [WARP_SIZE-1:0] tri_lanes [E];
  int last_lane [E];
  int issue_seq [$];          // allocation numbers in issue order
  logic in_entry;
  int cur_e;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL %s (cycle %0d)", m, cycle);
  endtask

  always_comb
    for (int i = 0; i < E; i++)
      for (int j = 0; j < E; j++)
        older[i][j] = entry_valid[i] && entry_valid[j] && (seq[i] < seq[j]);

  always_comb begin
    rd_opnd = '0;
    rd_node = '0;
    rd_opnd[0] = {24'd0, 3'(rd_entry), 5'(rd_lane)};
    rd_node[NODE_TYPE_WORD] = tri_lanes[rd_entry][rd_lane] ? NODE_TYPE_TRI : NODE_TYPE_BOX;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // ready flags follow ready_at
  always_comb
    for (int i = 0; i < E; i++) entry_ready[i] = entry_valid[i] && (cycle >= ready_at[i]);

  // checker and environment
  always @(posedge clk) if (rst_n) begin
    if (rb_alloc_valid) begin
      int p;
      p = -1;
      for (int i = 0; i < E; i++) if (entry_tag[i] == rb_alloc_tag && entry_ready[i]) p = i;
      checks++;
      if (!rb_alloc_ready) fail("picked without a result slot");
      // the pick must be ready, and no older ready entry may be passed over
      // unless chain order holds it back
      for (int i = 0; i < E; i++) begin
        logic chain_wait;
        chain_wait = 1'b0;
        for (int j = 0; j < E; j++)
          if (entry_valid[j] && seq[j] < seq[i] && !issued_all(j)) chain_wait = 1'b1;
        if (p >= 0 && i != p && entry_ready[i] && seq[i] < seq[p] && !(dp_valid && rd_entry == 3'(i)) &&
            !(entry_chain[i] && chain_wait)) fail("older ready entry passed over");
      end
      if (p >= 0) begin
        for (int j = 0; j < E; j++)
          if (entry_valid[j] && entry_chain[j] && seq[j] < seq[p] && !(dp_valid && rd_entry == 3'(j)))
            fail("overtook a waiting chain entry");
        issue_seq.push_back(seq[p]);
        if (entry_chain[p]) n_chain++;
      end
    end
    if (!rb_alloc_ready && |entry_ready) n_rbfull++;
    if (dp_valid) begin
      int e, l;
      e = int'(rd_entry);
      l = int'(dp_in.lane);
      checks++;
      if (!entry_ready[e] || !entry_tag[e].active[l] || issued[e][l]) fail("bad issue");
      if (l <= last_lane[e]) fail("lanes out of order");
      if (dp_in.opnd[0] != {24'd0, 3'(e), 5'(l)}) fail("wrong operands");
      if (entry_tag[e].op == OP_RAY_INTERSECT &&
          dp_in.mode != (tri_lanes[e][l] ? MODE_TRI : MODE_BOX)) fail("wrong ray mode");
      if (entry_tag[e].op == OP_KEY_COMPARE && dp_in.mode != MODE_KEY) fail("wrong key mode");
      issued[e][l] = 1'b1;
      last_lane[e] = l;
      checks++;
      if (free_valid != (issued[e] == entry_tag[e].active)) fail("free not with last lane");
    end
    if (free_valid) entry_valid[free_entry] <= 1'b0;
  end

  function automatic logic issued_all(int j);
    return issued[j] == entry_tag[j].active;
  endfunction

  task automatic alloc(int i, logic chain, int delay);
    entry_valid[i] = 1'b1;
    entry_chain[i] = chain;
    seq[i] = seq_ctr++;
    ready_at[i] = cycle + delay;
    issued[i] = '0;
    last_lane[i] = -1;
    tri_lanes[i] = WARP_SIZE'($urandom);
    entry_tag[i] = '0;
    entry_tag[i].op = hsu_op_e'($urandom % 4);
    entry_tag[i].dst = 8'(seq[i]);
    entry_tag[i].active = WARP_SIZE'($urandom) & WARP_SIZE'($urandom);
    if (entry_tag[i].active == '0) entry_tag[i].active = 1;
  endtask

  initial begin
    entry_valid = '0; entry_chain = '0; entry_tag = '0;
    rb_alloc_ready = 1'b1; rb_alloc_slot = '0;
    for (int i = 0; i < E; i++) begin seq[i] = 0; ready_at[i] = 0; issued[i] = '0; tri_lanes[i] = '0; last_lane[i] = -1; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // phase 1: all entries ready at once, no chains: one thread per cycle
    begin
      int total, first, last_c;
      total = 0;
      for (int i = 0; i < E; i++) begin alloc(i, 1'b0, 0); total += $countones(entry_tag[i].active); end
      first = -1; last_c = 0;
      while (entry_valid != '0) begin
        @(posedge clk);
        if (dp_valid) begin if (first < 0) first = cycle; last_c = cycle; end
        #1;
      end
      checks++;
      if (last_c - first + 1 != total) fail($sformatf("issue took %0d cycles for %0d threads", last_c - first + 1, total));
    end
    // phase 2: random arrivals, chains, result buffer sometimes full
    for (int it = 0; it < 3000; it++) begin
      rb_alloc_ready = ($urandom % 6) != 0;
      rb_alloc_slot = 3'($urandom);
      if ($urandom % 3 == 0) begin
        int f;
        f = -1;
        for (int i = E - 1; i >= 0; i--) if (!entry_valid[i]) f = i;
        if (f >= 0) alloc(f, ($urandom % 3) == 0, int'($urandom % 30));
      end
      @(posedge clk);
      #1;
    end
    rb_alloc_ready = 1'b1;
    repeat (400) @(posedge clk);
    #1;
    checks++;
    if (entry_valid != '0) fail("entries left over");
    checks++;
    if (n_chain == 0 || n_rbfull == 0) fail("chain or full result buffer not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
