// tb_sync_fifo: random push/pop traffic against a queue model, including
// simultaneous push and pop while full, checking order, data, full and empty.
module tb_sync_fifo;
  localparam int W = 20, D = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  logic [W-1:0] push_data, pop_data;
  int checks = 0, failures = 0, n_full = 0, n_both_full = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      // check flags and head against the model
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == D) ||
          (model.size() != 0 && pop_data != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL size %0d empty %0d full %0d head %h", model.size(), empty, full, pop_data);
      end
      push = ($urandom % 100) < ((i / 500) % 2 ? 70 : 35);
      pop  = !empty && (($urandom % 100) < 50);
      if (full && !pop) push = 1'b0;
      push_data = W'($urandom);
      if (full) n_full++;
      if (full && push && pop) n_both_full++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_data);
      #1;
    end
    checks++;
    if (n_full == 0 || n_both_full == 0) begin failures++; $display("FAIL full case not reached"); end
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
