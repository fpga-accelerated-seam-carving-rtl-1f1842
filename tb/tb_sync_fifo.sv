// tb_sync_fifo: random pushes and pops against a queue model, including
// push-while-full-with-pop, occupancy and flags.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [11:0] push_data = 0, pop_data;
  logic empty, full;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [11:0] model [$];

  sync_fifo #(.WIDTH(12), .DEPTH(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full_pushpop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 5) || count != 3'(model.size())) begin
        failures++; $display("FAIL flags size=%0d count=%0d", model.size(), count);
      end
      if (model.size() > 0) begin
        checks++;
        if (pop_data != model[0]) begin failures++; $display("FAIL data %h exp %h", pop_data, model[0]); end
      end
      pop  = (model.size() > 0) && ($urandom % 3 != 0);
      push = ((model.size() < 5) || pop) && ((i / 200) % 2 == 0 ? ($urandom % 4 != 0) : ($urandom % 3 == 0));
      push_data = 12'($urandom);
      if (push && pop && model.size() == 5) full_pushpop++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    checks++;
    if (full_pushpop == 0) begin failures++; $display("FAIL never pushed and popped while full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
