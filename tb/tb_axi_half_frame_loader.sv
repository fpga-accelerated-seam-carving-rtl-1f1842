// tb_axi_half_frame_loader: loads blocks of row representations from the
// SDRAM model (with ARREADY/RVALID stalls) and checks every byte written into
// the buffer, the number of bursts, the done pulse and a second load.
module tb_axi_half_frame_loader;
  import seam_pkg::*;
  localparam int H = 8, W = 32, ROWS = 4, BL = 4;
  localparam longint BASE = 64'h2000;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] start_addr = 0;
  logic busy, done;
  logic [15:0] err_count;
  logic ar_valid, ar_ready, r_valid, r_ready;
  axi_ar_t ar;
  axi_r_t r;
  logic wr_en;
  logic [1:0] wr_row, wr_sub;
  logic [1:0] wr_word;
  logic [63:0] wr_data;
  int bursts, stalls;
  int checks = 0, failures = 0;
  logic [7:0] got [ROWS][3][W];

  axi_half_frame_loader #(.ROWS(ROWS), .FRAME_W(W), .BURST_LEN(BL)) dut (.*);
  axi_sdram_model #(.H(H), .W(W), .BASE(BASE)) mem (
    .clk, .rst_n, .ar_valid, .ar, .ar_ready, .r_valid, .r, .r_ready, .bursts, .stalls);
  always #5 clk = ~clk;

  always @(posedge clk) if (wr_en) for (int k = 0; k < 8; k++) got[wr_row][wr_sub][wr_word*8+k] <= wr_data[k*8 +: 8];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dones;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      int b0;
      longint first_row;
      first_row = (blk == 0) ? 0 : (blk == 1) ? 4 : 9;   // frame 0 rows 0-3 and 4-7, frame 1 rows 1-4
      b0 = bursts;
      @(negedge clk);
      start = 1; start_addr = 32'(BASE + first_row * 3 * W);
      @(negedge clk); start = 0;
      checks++; if (!busy) begin failures++; $display("FAIL busy"); end
      dones = 0;
      while (busy) begin @(posedge clk); #1; if (done) dones++; end
      checks++; if (dones != 1) begin failures++; $display("FAIL done pulses %0d", dones); end
      checks++; if (bursts - b0 != ROWS * 3 * W / 8 / BL) begin failures++; $display("FAIL bursts %0d", bursts - b0); end
      for (int rr = 0; rr < ROWS; rr++) for (int s = 0; s < 3; s++) for (int c = 0; c < W; c++) begin
        int exp;
        exp = seam_ref_pkg::rowrep_byte((first_row + rr) * 3 * W + s * W + c, H, W);
        checks++;
        if (int'(got[rr][s][c]) != exp) begin
          failures++; $display("FAIL blk %0d row %0d sub %0d col %0d got %0d exp %0d", blk, rr, s, c, got[rr][s][c], exp);
        end
      end
    end
    checks++; if (stalls == 0 || err_count != 0) begin failures++; $display("FAIL stalls %0d err %0d", stalls, err_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
