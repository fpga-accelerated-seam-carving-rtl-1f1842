// tb_sobel_pipe: streams random rows of 3-byte columns, with gaps in
// in_valid, and compares every output with a direct 3x3 Sobel computation
// (x response with reversed sign, as the pipeline produces it).
module tb_sobel_pipe;
  import seam_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  pix3_t in_pix;
  logic out_valid;
  logic signed [11:0] gx, gy;
  int checks = 0, failures = 0;

  sobel_pipe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix3_t cols [20];
    int nout;
    in_pix = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 30; row++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int c = 0; c < 20; c++) cols[c] = pix3_t'({8'($urandom), 8'($urandom), 8'($urandom)});
      if (row == 0) for (int c = 0; c < 20; c++) cols[c] = '{8'd255, 8'd255, 8'd255};
      if (row == 1) for (int c = 0; c < 20; c++) cols[c] = (c % 2) ? '{8'd255, 8'd255, 8'd255} : '{8'd0, 8'd0, 8'd0};
      nout = 0;
      for (int c = 0; c < 20; c++) begin
        while ($urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_pix = cols[c];
        @(posedge clk); #1;
        checks++;
        if (out_valid != (c >= 2)) begin failures++; $display("FAIL valid at %0d", c); end
        if (c >= 2) begin
          int ex, ey;
          ex = (cols[c-2].top + 2*cols[c-2].mid + cols[c-2].bot) - (cols[c].top + 2*cols[c].mid + cols[c].bot);
          ey = (cols[c-2].bot - cols[c-2].top) + 2*(cols[c-1].bot - cols[c-1].top) + (cols[c].bot - cols[c].top);
          checks++;
          if (int'(gx) != ex || int'(gy) != ey) begin
            failures++; $display("FAIL row %0d col %0d gx %0d/%0d gy %0d/%0d", row, c-1, gx, ex, gy, ey);
          end
        end
        in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
