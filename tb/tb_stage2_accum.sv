// tb_stage2_accum: runs the accumulation on random energy maps (one with many
// ties) held in a testbench memory with one cycle read latency; checks every
// paths-matrix write, the final accumulation row against the reference, the
// done pulse and the cycle count of a run.
module tb_stage2_accum;
  import seam_pkg::*;
  localparam int H = 7, W = 12, N = H * W;
  logic clk = 0, rst_n = 0, go = 0, done;
  logic [6:0] em_raddr, pm_waddr;
  pix_t em_rdata;
  logic pm_we;
  col_t pm_wdata;
  acc_t acc_row [W];
  int emap[], acc_last[], path[];
  int pm_seen [N];
  int checks = 0, failures = 0;

  stage2_accum #(.FRAME_H(H), .FRAME_W(W)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) em_rdata <= pix_t'(emap[em_raddr < N ? em_raddr : 0]);

  always @(posedge clk) if (rst_n && pm_we) begin
    checks++;
    pm_seen[pm_waddr]++;
    if (int'(pm_wdata) != path[pm_waddr]) begin
      failures++; $display("FAIL path[%0d] got %0d exp %0d", pm_waddr, pm_wdata, path[pm_waddr]);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    emap = new[N];
    foreach (emap[i]) emap[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int cyc;
      foreach (emap[i]) emap[i] = (run % 2) ? $urandom % 4 : $urandom % 256;
      if (run == 5) foreach (emap[i]) emap[i] = 255;
      seam_ref_pkg::ref_accumulate(H, W, emap, acc_last, path);
      foreach (pm_seen[i]) pm_seen[i] = 0;
      @(negedge clk); go = 1;
      cyc = 0;
      do begin @(posedge clk); cyc++; #1; end while (!done);
      @(negedge clk); go = 0;
      checks++;
      if (cyc != W + 3 + W * (H - 1)) begin failures++; $display("FAIL cycles %0d", cyc); end
      @(posedge clk); #1;
      for (int c = 0; c < W; c++) begin
        checks++;
        if (int'(acc_row[c]) != acc_last[c]) begin failures++; $display("FAIL acc[%0d] %0d exp %0d", c, acc_row[c], acc_last[c]); end
      end
      for (int i = W; i < N; i++) begin
        checks++;
        if (pm_seen[i] != 1) begin failures++; $display("FAIL path %0d written %0d times", i, pm_seen[i]); end
      end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
