// tb_min_k_picker: streams of random values (some with many equal values)
// are offered with gaps; after each stream the slots must hold the K smallest
// in ascending order, earlier (smaller) column first on ties.
module tb_min_k_picker;
  import seam_pkg::*;
  localparam int K = 5;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  acc_t in_val = 0;
  col_t in_col = 0;
  acc_t val [K];
  col_t col [K];
  logic vld [K];
  int checks = 0, failures = 0;

  min_k_picker #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      int n;
      int v [];
      int used [];
      n = 1 + $urandom % 40;
      v = new[n]; used = new[n];
      foreach (v[i]) begin v[i] = (run % 3 == 0) ? $urandom % 3 : $urandom % 65536; used[i] = 0; end
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < n; i++) begin
        while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_val = acc_t'(v[i]); in_col = col_t'(i);
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        int best;
        best = -1;
        for (int i = 0; i < n; i++) if (!used[i] && (best < 0 || v[i] < v[best])) best = i;
        checks++;
        if (best < 0) begin
          if (vld[k]) begin failures++; $display("FAIL slot %0d should be empty", k); end
        end else begin
          used[best] = 1;
          if (!vld[k] || int'(val[k]) != v[best] || int'(col[k]) != best) begin
            failures++; $display("FAIL run %0d slot %0d got %0d@%0d exp %0d@%0d", run, k, val[k], col[k], v[best], best);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
