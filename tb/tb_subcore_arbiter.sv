// tb_subcore_arbiter: random requests from four sub-cores. Checks that the
// grant is one of the requesters, follows round-robin order (the first
// requester after the previous winner), is withheld while the warp buffer is
// full, and that after a grant with the accumulate bit set only the same
// sub-core is granted until a grant without it.
module tb_subcore_arbiter;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, req_acc, grant;
  logic [1:0]   grant_idx;
  logic         grant_ready, locked;
  int checks = 0, failures = 0, n_locked_block = 0;
  int last = N - 1;
  logic lock = 1'b0;

  subcore_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    req = '0; req_acc = '0; grant_ready = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      logic [N-1:0] exp_g;
      req         = N'($urandom);
      req_acc     = N'($urandom) & N'($urandom) & N'($urandom);
      grant_ready = ($urandom % 8) != 0;
      #1;
      exp_g = '0;
      if (grant_ready) begin
        if (lock) begin
          if (req[last]) exp_g[last] = 1'b1;
          if (req & ~(N'(1) << last)) n_locked_block++;
        end else
          for (int k = 1; k <= N; k++)
            if (exp_g == '0 && req[(last + k) % N]) exp_g[(last + k) % N] = 1'b1;
      end
      checks++;
      if (grant !== exp_g || locked !== lock) begin
        failures++;
        if (failures < 10) $display("FAIL req %b lock %0d last %0d: grant %b expected %b", req, lock, last, grant, exp_g);
      end
      if (exp_g != '0) begin
        for (int k = 0; k < N; k++) if (exp_g[k]) last = k;
        lock = req_acc[last];
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_locked_block == 0) begin failures++; $display("FAIL lock never blocked anyone"); end
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
