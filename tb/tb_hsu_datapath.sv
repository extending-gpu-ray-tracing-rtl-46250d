// tb_hsu_datapath: drives random threads of all five operating modes into the
// unified datapath, back to back and with random gaps, and compares every
// result with a reference model that performs the same single-precision
// operations in the same order. Also checks the fixed 9-cycle latency,
// multi-beat accumulation (Euclidean and angular, interleaved across lanes)
// and counts that box hits and misses, triangle hits and misses and every
// mode actually occurred.
module tb_hsu_datapath;
  import hsu_pkg::*;
  import hsu_tb_pkg::*;
  import hsu_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  dp_in_t in;
  logic out_valid;
  dp_out_t out;

  hsu_datapath dut (.clk, .rst_n, .in_valid, .in, .out_valid, .out);

  always #5 clk = ~clk;

  typedef struct {
    dp_out_t r;
    int      cyc;
    logic    chk_res;
  } exp_t;
  exp_t q[$];
  int cycle = 0;
  int checks = 0, failures = 0;
  int n_mode[5];
  int box_hits = 0, box_miss = 0, tri_hits = 0, tri_miss = 0, acc_beats = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // expected output of one thread (updates the accumulator model)
  function automatic exp_t expect_of(dp_in_t t);
    exp_t e;
    word_t res [4];
    logic hit;
    e.r = '0;
    e.r.slot = t.slot;
    e.r.lane = t.lane;
    e.r.acc  = t.acc && (t.mode == MODE_EUCLID || t.mode == MODE_ANGULAR);
    e.chk_res = !e.r.acc;
    e.cyc = cycle;
    ref_thread(t, res, hit);
    if (t.mode == MODE_BOX) begin if (hit) box_hits++; else box_miss++; end
    if (t.mode == MODE_TRI) begin if (hit) tri_hits++; else tri_miss++; end
    for (int i = 0; i < 4; i++) e.r.res[i] = res[i];
    return e;
  endfunction

  // ------------------------------------------------------------- checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (cycle - e.cyc != PIPE_DEPTH) begin
          failures++;
          $display("FAIL latency %0d", cycle - e.cyc);
        end
        if (out.acc != e.r.acc || out.slot != e.r.slot || out.lane != e.r.lane ||
            (e.chk_res && out.res != e.r.res)) begin
          failures++;
          if (failures < 10)
            $display("FAIL lane %0d acc %0d: got %h expected %h", out.lane, out.acc, out.res, e.r.res);
        end
      end
    end
  end

  task automatic issue(dp_in_t t);
    exp_t e;
    in = t;
    in_valid = 1'b1;
    e = expect_of(t);
    e.cyc = cycle;
    q.push_back(e);
    n_mode[int'(t.mode)]++;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  initial begin
    in_valid = 1'b0;
    in = '0;
    ref_reset();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // mixed single-beat traffic, back to back
    for (int i = 0; i < 3000; i++) begin
      dp_mode_e m;
      m = dp_mode_e'($urandom % 5);
      issue(gen_thread(m, int'($urandom % 32), 1'b0));
      if ($urandom % 8 == 0) begin @(posedge clk); #1; end
    end
    // multi-beat: several lanes, each with a chain of beats, interleaved
    for (int k = 0; k < 60; k++) begin
      dp_mode_e m;
      int beats;
      m = ($urandom % 2) ? MODE_EUCLID : MODE_ANGULAR;
      beats = 2 + int'($urandom % 8);
      for (int b = 0; b < beats; b++)
        for (int l = 0; l < 4; l++) begin
          issue(gen_thread(m, (k % 8) * 4 + l, b != beats - 1));
          if (b != beats - 1) acc_beats++;
        end
    end
    repeat (20) @(posedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    // every mechanism must have been exercised
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never issued", m); end
    end
    checks += 5;
    if (box_hits == 0) begin failures++; $display("FAIL no box hit"); end
    if (box_miss == 0) begin failures++; $display("FAIL no box miss"); end
    if (tri_hits == 0) begin failures++; $display("FAIL no triangle hit"); end
    if (tri_miss == 0) begin failures++; $display("FAIL no triangle miss"); end
    if (acc_beats == 0) begin failures++; $display("FAIL no accumulate beat"); end
    $display("box hit/miss %0d/%0d tri hit/miss %0d/%0d accumulate beats %0d",
             box_hits, box_miss, tri_hits, tri_miss, acc_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
