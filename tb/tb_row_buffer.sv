// tb_row_buffer: fills both banks with random beats, then reads every column
// of both banks and checks the 3-byte block (top, middle, bottom), including
// a write into one bank while the other is read.
module tb_row_buffer;
  import seam_pkg::*;
  localparam int W = 40;   // 5 words per sub-row: not a power of two
  logic clk = 0;
  logic wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [1:0] wr_sub = 0;
  logic [2:0] wr_word = 0;
  logic [63:0] wr_data = 0;
  logic [5:0] rd_col = 0;
  pix3_t rd_pix;
  logic [7:0] model [2][3][W];
  int checks = 0, failures = 0;

  row_buffer #(.FRAME_W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_beat(int b, int s, int w);
    @(negedge clk);
    wr_en = 1; wr_bank = b[0]; wr_sub = 2'(s); wr_word = 3'(w);
    wr_data = {$urandom, $urandom};
    for (int k = 0; k < 8; k++) model[b][s][w*8+k] = wr_data[k*8 +: 8];
  endtask

  initial begin
    for (int b = 0; b < 2; b++) for (int s = 0; s < 3; s++) for (int w = 0; w < W/8; w++) write_beat(b, s, w);
    @(negedge clk); wr_en = 0;
    for (int pass = 0; pass < 4; pass++) begin
      for (int c = 0; c < W; c++) begin
        int b;
        b = pass % 2;
        @(negedge clk);
        rd_bank = b[0]; rd_col = 6'(c);
        // meanwhile rewrite the other bank
        wr_en = 1; wr_bank = ~b[0]; wr_sub = 2'($urandom % 3); wr_word = 3'($urandom % 5); wr_data = {$urandom, $urandom};
        @(posedge clk);
        for (int k = 0; k < 8; k++) model[1-b][wr_sub][wr_word*8+k] = wr_data[k*8 +: 8];
        rd_col <= 6'($urandom % W);  // the next address must not disturb this read
        #1;
        checks++;
        if (rd_pix.top != model[b][0][c] || rd_pix.mid != model[b][1][c] || rd_pix.bot != model[b][2][c]) begin
          failures++; $display("FAIL bank %0d col %0d", b, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
