// tb_warp_buffer: allocates random instructions until the buffer is full,
// accepts its node fetch requests with random back-pressure and answers them
// in random order. Checks that every active thread (and no inactive one)
// requests its own pointer exactly once, that an entry turns ready exactly
// when its last active thread's data has arrived, that the read port returns
// the stored operands and node data, that alloc_ready drops when all entries
// are taken, the age matrix and the chain flag of accumulate instructions.
module tb_warp_buffer;
  import hsu_pkg::*;
  localparam int E = WB_ENTRIES;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc_valid, alloc_ready, req_valid, req_ready, resp_valid, free_valid;
  hsu_instr_t alloc_instr;
  logic [1:0] alloc_subcore;
  mem_req_t req;
  mem_resp_t resp;
  logic [E-1:0] entry_valid, entry_ready, entry_chain;
  logic [E-1:0][E-1:0] older;
  hsu_tag_t [E-1:0] entry_tag;
  logic [2:0] rd_entry, free_entry;
  logic [4:0] rd_lane;
  word_t [OPND_WORDS-1:0] rd_opnd;
  word_t [NODE_WORDS-1:0] rd_node;

  warp_buffer dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0;
  hsu_instr_t ins [E];
  logic [WARP_SIZE-1:0] got_req [E], got_resp [E];
  mem_req_t pend [$];
  int alloc_order [$];

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endtask

  function automatic word_t nodew(int e, int l, int w);
    return {8'(e), 8'(l), 16'(w)} ^ 32'hA5A5_0000;
  endfunction

  initial begin
    alloc_valid = 0; alloc_instr = '0; alloc_subcore = '0; req_ready = 0;
    resp_valid = 0; resp = '0; free_valid = 0; free_entry = '0; rd_entry = '0; rd_lane = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < 6; round++) begin
      int ne;
      alloc_order.delete();
      // allocate until full
      ne = 0;
      while (1) begin
        hsu_instr_t x;
        #1;
        if (!alloc_ready) begin n_full++; break; end
        x = '0;
        x.op = hsu_op_e'($urandom % 4);
        x.acc = (ne == 2);
        x.warp_id = 6'($urandom);
        x.dst = 8'(ne);
        x.active = WARP_SIZE'($urandom) | WARP_SIZE'(1 << ($urandom % 32));
        for (int l = 0; l < WARP_SIZE; l++) begin
          x.ptr[l] = 32'($urandom);
          for (int w = 0; w < OPND_WORDS; w++) x.opnd[l][w] = $urandom;
        end
        alloc_instr = x; alloc_valid = 1'b1;
        begin
          int idx;
          idx = -1;
          for (int i = E - 1; i >= 0; i--) if (!entry_valid[i]) idx = i;
          ins[idx] = x; got_req[idx] = '0; got_resp[idx] = '0;
          alloc_order.push_back(idx);
        end
        @(posedge clk); #1;
        alloc_valid = 1'b0;
        ne++;
      end
      checks++;
      if (ne != E) fail($sformatf("allocated %0d entries", ne));
      // age matrix and chain flags
      for (int a = 0; a < E; a++)
        for (int b = 0; b < E; b++) begin
          checks++;
          if (older[alloc_order[a]][alloc_order[b]] != (a < b)) fail("age matrix");
        end
      for (int a = 0; a < E; a++) begin
        checks++;
        if (entry_chain[alloc_order[a]] != (a == 2 || a == 3)) fail($sformatf("chain flag of #%0d", a));
      end
      // serve requests, answer out of order
      while (1) begin
        logic all_done;
        req_ready = ($urandom % 3) != 0;
        resp_valid = 1'b0;
        if (pend.size() != 0 && ($urandom % 2)) begin
          int k;
          k = int'($urandom % pend.size());
          resp.entry = pend[k].entry;
          resp.lane  = pend[k].lane;
          for (int w = 0; w < NODE_WORDS; w++) resp.data[w] = nodew(resp.entry, resp.lane, w);
          resp_valid = 1'b1;
          pend.delete(k);
        end
        #1;
        if (req_valid && req_ready) begin
          checks++;
          if (!ins[req.entry].active[req.lane] || got_req[req.entry][req.lane] ||
              req.addr != ins[req.entry].ptr[req.lane]) fail("bad request");
          got_req[req.entry][req.lane] = 1'b1;
          pend.push_back(req);
        end
        @(posedge clk);
        if (resp_valid) got_resp[resp.entry][resp.lane] = 1'b1;
        #1;
        for (int i = 0; i < E; i++) begin
          checks++;
          if (entry_ready[i] != (got_resp[i] == ins[i].active)) fail($sformatf("ready of entry %0d", i));
        end
        all_done = 1'b1;
        for (int i = 0; i < E; i++) if (got_resp[i] != ins[i].active) all_done = 1'b0;
        if (all_done) break;
      end
      req_ready = 1'b0; resp_valid = 1'b0;
      // read back and free every entry
      for (int i = 0; i < E; i++) begin
        for (int k = 0; k < 4; k++) begin
          rd_entry = 3'(i); rd_lane = 5'($urandom);
          #1;
          if (ins[i].active[rd_lane]) begin
            checks++;
            if (rd_opnd != ins[i].opnd[rd_lane] || rd_node[7] != nodew(i, int'(rd_lane), 7)) fail("read port");
          end
        end
        checks++;
        if (entry_tag[i].active != ins[i].active || entry_tag[i].dst != ins[i].dst) fail("tag");
        free_valid = 1'b1; free_entry = 3'(i);
        @(posedge clk); #1;
        free_valid = 1'b0;
      end
      checks++;
      if (entry_valid != '0) fail("entries not freed");
    end
    checks++;
    if (n_full == 0) fail("never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
