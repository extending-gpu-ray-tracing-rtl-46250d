// tb_result_buffer: claims slots for random instructions, delivers their
// thread results in random order interleaved across slots, and accepts
// write-backs with random back-pressure. Checks that a write-back appears
// only once every active lane is done, carries the instruction's tag and the
// delivered words (zero for inactive lanes and accumulate beats), that each
// instruction is written back exactly once and that alloc_ready drops when
// every slot is taken.
module tb_result_buffer;
  import hsu_pkg::*;
  localparam int S = RB_ENTRIES;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc_valid, alloc_ready, dp_valid, wb_valid, wb_ready;
  hsu_tag_t alloc_tag;
  logic [2:0] alloc_slot;
  dp_out_t dp_out;
  hsu_wb_t wb;

  result_buffer dut (.*);
  always #5 clk = ~clk;

  typedef word_t [WARP_SIZE-1:0][RES_WORDS-1:0] res_t;
  int checks = 0, failures = 0, n_full = 0, n_wb = 0, n_alloc = 0;
  logic     busy [S];
  hsu_tag_t tg [S];
  res_t     er [S];
  logic [WARP_SIZE-1:0] todo [S];

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL %s", m);
  endtask

  initial begin
    alloc_valid = 0; alloc_tag = '0; dp_valid = 0; dp_out = '0; wb_ready = 0;
    for (int i = 0; i < S; i++) begin busy[i] = 0; todo[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 20000; it++) begin
      int cand [$];
      cand.delete();
      // new instruction
      alloc_valid = ($urandom % 4) == 0;
      alloc_tag = '0;
      alloc_tag.dst = 8'($urandom);
      alloc_tag.warp_id = 6'($urandom);
      alloc_tag.op = hsu_op_e'($urandom % 4);
      alloc_tag.acc = ($urandom % 5) == 0;
      alloc_tag.active = WARP_SIZE'($urandom) & WARP_SIZE'($urandom);
      if (alloc_tag.active == '0) alloc_tag.active = 1;
      // one thread result
      dp_valid = 1'b0;
      for (int i = 0; i < S; i++) if (busy[i] && todo[i] != '0) cand.push_back(i);
      if (cand.size() != 0 && ($urandom % 4) != 0) begin
        int s, l;
        s = cand[$urandom % cand.size()];
        do l = int'($urandom % WARP_SIZE); while (!todo[s][l]);
        dp_valid = 1'b1;
        dp_out.slot = 3'(s);
        dp_out.lane = 5'(l);
        dp_out.acc  = tg[s].acc;
        for (int w = 0; w < RES_WORDS; w++) dp_out.res[w] = $urandom;
        todo[s][l] = 1'b0;
        if (!tg[s].acc) er[s][l] = dp_out.res;
      end
      wb_ready = ($urandom % 3) != 0;
      #1;
      if (!alloc_ready) n_full++;
      checks++;
      begin
        int nb;
        nb = 0;
        for (int i = 0; i < S; i++) nb += int'(busy[i]);
        if (alloc_ready != (nb < S)) fail("alloc_ready");
      end
      if (wb_valid) begin
        int s;
        s = -1;
        for (int i = 0; i < S; i++) if (busy[i] && tg[i] == wb.tag && todo[i] == '0) s = i;
        checks++;
        if (s < 0) fail("write-back of unfinished or unknown instruction");
        else if (wb.res != er[s]) fail("write-back data");
        if (s >= 0 && wb_ready) begin busy[s] = 1'b0; n_wb++; end
      end
      if (alloc_valid && alloc_ready) begin
        int s;
        s = int'(alloc_slot);
        checks++;
        if (busy[s]) fail("allocated a busy slot");
        busy[s] = 1'b1; tg[s] = alloc_tag; er[s] = '0; todo[s] = alloc_tag.active;
        n_alloc++;
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_full == 0 || n_wb < 100) fail("full or write-back not exercised");
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
