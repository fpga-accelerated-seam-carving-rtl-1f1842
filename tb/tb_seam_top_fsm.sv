// tb_seam_top_fsm: checks the stage sequence Stage 1 -> 2 -> 3 -> Finish,
// that no stage advances without done, and that Finish holds.
module tb_seam_top_fsm;
  import seam_pkg::*;
  logic clk = 0, rst_n = 0, done = 0;
  stage_e stage;
  logic finish;
  int checks = 0, failures = 0;

  seam_top_fsm dut (.clk, .rst_n, .done, .stage, .finish);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (stage=%0d finish=%0b)", what, stage, finish); end
  endtask

  task automatic idle_cycles(int n, stage_e exp);
    repeat (n) begin
      @(posedge clk); #1;
      check(stage == exp && finish == (exp == ST_FINISH), "hold without done");
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check(stage == ST_STAGE1 && !finish, "reset into Stage 1");
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      stage_e seq [4] = '{ST_STAGE1, ST_STAGE2, ST_STAGE3, ST_FINISH};
      for (int s = 0; s < 3; s++) begin
        idle_cycles(1 + $urandom % 5, seq[s]);
        done = 1; @(posedge clk); #1 done = 0;
        check(stage == seq[s+1], "advance on done");
      end
      check(finish, "finish output in Finish");
      done = 1; repeat (3) @(posedge clk); #1 done = 0;
      check(stage == ST_FINISH, "Finish holds");
      rst_n = 0; #1 check(stage == ST_STAGE1, "async reset");
      @(posedge clk); #1 rst_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
