// tb_energy_lane: drives one lane with its two rows over several frames, in
// the processing FSM's column order (edge columns twice), then reads the
// per-pixel state in Final mode and compares spatial maximum, previous pixel
// and temporal maximum with a direct computation.
module tb_energy_lane;
  import seam_pkg::*;
  localparam int W = 16, FR = 5;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, half = 0, first_frame = 1, fin_mode = 0;
  pix3_t in_pix;
  logic [3:0] in_col = 0;
  logic [4:0] fin_addr = 0;
  px_state_t fin_state;
  logic idle;
  int checks = 0, failures = 0;
  int sp [2][W], tp [2][W], pv [2][W];
  pix3_t img [2][W];

  energy_lane #(.FRAME_W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic int colsum(pix3_t p); return p.top + 2 * p.mid + p.bot; endfunction
  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_pix = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FR; f++) begin
      for (int h = 0; h < 2; h++) begin
        for (int c = 0; c < W; c++) img[h][c] = pix3_t'({8'($urandom), 8'($urandom), 8'($urandom)});
        if (f == 2) for (int c = 0; c < W; c++) img[h][c] = '{8'd255, 8'd0, 8'd255};  // strong edges
        // reference
        for (int c = 0; c < W; c++) begin
          int cl, cr, gx, gy, e, d;
          cl = c == 0 ? 0 : c - 1; cr = c == W - 1 ? W - 1 : c + 1;
          gx = colsum(img[h][cr]) - colsum(img[h][cl]);
          gy = (img[h][cl].bot - img[h][cl].top) + 2 * (img[h][c].bot - img[h][c].top) + (img[h][cr].bot - img[h][cr].top);
          e = (iabs(gx) + iabs(gy)) >> 3;
          if (f == 0) begin sp[h][c] = e; tp[h][c] = 0; end
          else begin
            d = iabs(int'(img[h][c].mid) - pv[h][c]);
            if (e > sp[h][c]) sp[h][c] = e;
            if (d > tp[h][c]) tp[h][c] = d;
          end
          pv[h][c] = img[h][c].mid;
        end
        // drive
        @(negedge clk); half = h[0]; first_frame = (f == 0); clear = 1;
        @(negedge clk); clear = 0;
        for (int k = 0; k < W + 2; k++) begin
          int c;
          c = (k == 0) ? 0 : (k > W) ? W - 1 : k - 1;
          in_valid = 1; in_col = 4'(c); in_pix = img[h][c];
          @(negedge clk);
        end
        in_valid = 0;
        while (!idle) @(negedge clk);
        @(negedge clk);
      end
    end
    // Final-mode read back
    fin_mode = 1;
    for (int h = 0; h < 2; h++) for (int c = 0; c < W; c++) begin
      fin_addr = 5'(h * W + c);
      @(posedge clk); #1;
      checks++;
      if (int'(fin_state.spatial) != sp[h][c] || int'(fin_state.temporal) != tp[h][c] || int'(fin_state.prev) != pv[h][c]) begin
        failures++;
        $display("FAIL h%0d c%0d sp %0d/%0d tp %0d/%0d pv %0d/%0d", h, c, fin_state.spatial, sp[h][c],
                 fin_state.temporal, tp[h][c], fin_state.prev, pv[h][c]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
