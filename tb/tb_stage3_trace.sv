// tb_stage3_trace: random last accumulation rows (some with ties) and random
// valid paths matrices; for NSAR = 1..5 (and 0 and 7, which clamp) checks the
// queue entries row by row from the bottom row to the top against the
// reference tracer, the 511 marker of unused seams, a stall on a full queue
// and the done pulse.
module tb_stage3_trace;
  import seam_pkg::*;
  localparam int H = 6, W = 12, N = H * W;
  logic clk = 0, rst_n = 0, go = 0, done;
  logic [2:0] nsar = 1, nsar_used;
  acc_t acc_row [W];
  logic [6:0] pm_raddr [NSAR_MAX];
  col_t pm_rdata [NSAR_MAX];
  logic q_push, q_full = 0;
  seam_row_t q_data;
  int path[], acc_last[], seams[];
  int checks = 0, failures = 0, full_stalls = 0;

  stage3_trace #(.FRAME_H(H), .FRAME_W(W)) dut (.*);
  always #5 clk = ~clk;
  for (genvar k = 0; k < NSAR_MAX; k++) begin : g_pm
    always @(posedge clk) pm_rdata[k] <= col_t'(path[pm_raddr[k] < N ? pm_raddr[k] : 0]);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    path = new[N]; acc_last = new[W];
    foreach (path[i]) path[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 14; run++) begin
      int ns, eff, row_exp, pushes;
      ns  = (run == 12) ? 0 : (run == 13) ? 7 : 1 + run % 5;
      eff = (ns == 0) ? 1 : (ns > 5) ? 5 : ns;
      foreach (acc_last[c]) begin
        acc_last[c] = (run % 2) ? $urandom % 4 : $urandom % 60000;
        acc_row[c] = acc_t'(acc_last[c]);
      end
      for (int r = 1; r < H; r++) for (int c = 0; c < W; c++) begin
        int d;
        d = int'($urandom % 3) - 1;
        if (c + d < 0 || c + d >= W) d = 0;
        path[r * W + c] = c + d;
      end
      seam_ref_pkg::ref_seams(H, W, eff, acc_last, path, seams);
      @(negedge clk); nsar = 3'(ns); go = 1;
      row_exp = H - 1; pushes = 0;
      while (1) begin
        q_full = ($urandom % 5 == 0);
        @(posedge clk);
        if (q_full && dut.state == 2 && dut.phase == 0) full_stalls++;
        if (q_push) begin
          pushes++;
          checks++;
          if (q_full) begin failures++; $display("FAIL push into a full queue"); end
          if (int'(q_data.row) != row_exp) begin failures++; $display("FAIL row %0d exp %0d", q_data.row, row_exp); end
          for (int k = 0; k < NSAR_MAX; k++) begin
            int exp;
            exp = (k < eff) ? seams[k * H + row_exp] : 511;
            checks++;
            if (int'(q_data.cols[k]) != exp) begin
              failures++; $display("FAIL run %0d row %0d seam %0d col %0d exp %0d", run, row_exp, k, q_data.cols[k], exp);
            end
          end
          row_exp--;
        end
        if (done) break;
        #1;
        @(negedge clk); go = 0;
      end
      @(negedge clk); go = 0; q_full = 0;
      checks++;
      if (pushes != H || int'(nsar_used) != eff) begin failures++; $display("FAIL pushes %0d nsar_used %0d", pushes, nsar_used); end
      repeat (2) @(posedge clk);
    end
    checks++;
    if (full_stalls == 0) begin failures++; $display("FAIL full queue never stalled travel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
