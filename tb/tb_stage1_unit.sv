// tb_stage1_unit: runs stage 1 on a small video (8 rows, 16 columns, 4 lanes,
// 3 frames, two AXI ports against the SDRAM model with stalls) and compares
// every energy map write with the software reference.  Also checks that
// loading and processing overlapped (double buffering) and that each address
// is written once.
module tb_stage1_unit;
  import seam_pkg::*;
  localparam int H = 8, W = 16, L = 4, FR = 3, P = 2, BL = 2, WGT = 5;
  localparam longint BASE = 64'h1000;
  logic clk = 0, rst_n = 0, go = 0, done;
  logic ar_valid [P], ar_ready [P], r_valid [P], r_ready [P];
  axi_ar_t ar [P];
  axi_r_t r [P];
  logic em_we;
  logic [6:0] em_waddr;
  pix_t em_wdata;
  logic [31:0] overlap_cycles;
  int bursts [P], stalls [P];
  int checks = 0, failures = 0;
  int emap[];
  int written [H*W];

  stage1_unit #(.FRAME_H(H), .FRAME_W(W), .LANES(L), .FRAMES(FR), .PORTS(P), .BURST_LEN(BL)) dut (
    .clk, .rst_n, .go, .done, .video_base(32'(BASE)), .energy_weight(4'(WGT)),
    .ar_valid, .ar, .ar_ready, .r_valid, .r, .r_ready,
    .em_we, .em_waddr, .em_wdata, .overlap_cycles);
  for (genvar p = 0; p < P; p++) begin : g_mem
    axi_sdram_model #(.H(H), .W(W), .BASE(BASE)) mem (
      .clk, .rst_n, .ar_valid(ar_valid[p]), .ar(ar[p]), .ar_ready(ar_ready[p]),
      .r_valid(r_valid[p]), .r(r[p]), .r_ready(r_ready[p]), .bursts(bursts[p]), .stalls(stalls[p]));
  end
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && em_we) begin
    checks++;
    written[em_waddr]++;
    if (int'(em_wdata) != emap[em_waddr]) begin
      failures++; $display("FAIL energy[%0d] got %0d exp %0d", em_waddr, em_wdata, emap[em_waddr]);
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seam_ref_pkg::ref_energy(H, W, FR, WGT, emap);
    foreach (written[i]) written[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); go = 1;
    @(posedge done); @(negedge clk); go = 0;
    repeat (5) @(posedge clk);
    foreach (written[i]) begin
      checks++;
      if (written[i] != 1) begin failures++; $display("FAIL address %0d written %0d times", i, written[i]); end
    end
    checks++;
    if (overlap_cycles == 0) begin failures++; $display("FAIL no load/process overlap"); end
    checks++;
    if (bursts[0] + bursts[1] != FR * H * 3 * W / 8 / BL) begin failures++; $display("FAIL bursts %0d", bursts[0] + bursts[1]); end
    $display("overlap cycles %0d, stalls %0d/%0d", overlap_cycles, stalls[0], stalls[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
