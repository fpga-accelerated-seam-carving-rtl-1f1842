// tb_seam_carver_full: complete runs of the accelerator at its default size:
// 150 frames of 240 x 320 pixels (5 s of 30 fps video), 120 lanes, two SDRAM
// ports with random stalls.  Three runs, one per quality setting: NSAR 5 (low
// quality, fastest) with weight 4, NSAR 3 with weight 8 (spatial energy only)
// and NSAR 1 (high quality) with weight 0 (temporal energy only); a reset
// starts each run.  Each run waits for Finish, reads STATUS and all 240 seam
// rows through the HPS read port and compares them with the software
// reference.  About 2.4 M clock cycles per run.
// It counts the design's mechanisms and fails if one never happened:
// stage transitions, overlap of loading and processing (double buffering),
// AXI stalls, each NSAR mode, unused-seam markers and reads of an empty queue.
module tb_seam_carver_full;
  import seam_pkg::*;
  localparam int H = 240, W = 320, FR = 150, P = 2;
  localparam longint BASE = 64'h10000;
  localparam int MAX_CYCLES = 40000000;

  logic clk = 0, rst_n = 0;
  logic [3:0] energy_weight = 4;
  logic [2:0] nsar = 1;
  logic sd_ar_valid [P], sd_ar_ready [P], sd_r_valid [P], sd_r_ready [P];
  axi_ar_t sd_ar [P];
  axi_r_t sd_r [P];
  logic h_ar_valid = 0, h_ar_ready, h_r_valid, h_r_ready = 0;
  logic [11:0] h_ar_addr = 0;
  logic [63:0] h_r_data;
  logic [1:0] h_r_resp;
  stage_e stage;
  logic finish;
  logic [31:0] overlap_cycles;
  int bursts [P], stalls [P];
  int checks = 0, failures = 0;

  seam_carver_top dut (
    .clk, .rst_n, .video_base(32'(BASE)), .energy_weight, .nsar,
    .sd_ar_valid, .sd_ar, .sd_ar_ready, .sd_r_valid, .sd_r, .sd_r_ready,
    .h_ar_valid, .h_ar_ready, .h_ar_addr, .h_r_valid, .h_r_ready, .h_r_data, .h_r_resp,
    .stage, .finish, .overlap_cycles);
  for (genvar p = 0; p < P; p++) begin : g_mem
    axi_sdram_model #(.H(H), .W(W), .BASE(BASE), .STALL_DIV(8)) mem (
      .clk, .rst_n, .ar_valid(sd_ar_valid[p]), .ar(sd_ar[p]), .ar_ready(sd_ar_ready[p]),
      .r_valid(sd_r_valid[p]), .r(sd_r[p]), .r_ready(sd_r_ready[p]), .bursts(bursts[p]), .stalls(stalls[p]));
  end
  always #5 clk = ~clk;

  // mechanism counters
  int n_stage [5];
  int n_rows_read = 0, n_overlap = 0, n_axi_stall = 0, n_empty_read = 0, n_unused_marker = 0;
  int n_mode [6];
  stage_e last_stage = ST_STAGE1;
  always @(posedge clk) if (rst_n) begin
    if (stage != last_stage) n_stage[int'(stage)]++;
    last_stage <= stage;
  end

  task automatic hps_read(input logic [11:0] a, output logic [63:0] d);
    @(negedge clk); h_ar_valid = 1; h_ar_addr = a;
    do @(posedge clk); while (!h_ar_ready);
    #1 h_ar_valid = 0;
    @(negedge clk); h_r_ready = 1;
    do @(posedge clk); while (!h_r_valid);
    d = h_r_data;
    checks++;
    if (h_r_resp != 2'b00) begin failures++; $display("FAIL HPS read response %0d", h_r_resp); end
    #1 h_r_ready = 0;
  endtask

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int emap[], acc_last[], path[], seams[];
    int modes [3] = '{5, 3, 1};
    int weights [3] = '{4, 8, 0};
    logic [63:0] d;
    foreach (n_stage[i]) n_stage[i] = 0;
    foreach (n_mode[i]) n_mode[i] = 0;
    for (int run = 0; run < 3; run++) begin
      int cyc;
      nsar = 3'(modes[run]);
      energy_weight = 4'(weights[run]);
      seam_ref_pkg::ref_energy(H, W, FR, weights[run], emap);
      seam_ref_pkg::ref_accumulate(H, W, emap, acc_last, path);
      seam_ref_pkg::ref_seams(H, W, modes[run], acc_last, path, seams);
      rst_n = 0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      cyc = 0;
      while (!finish) begin @(posedge clk); cyc++; end
      $display("run %0d: NSAR %0d finished after %0d cycles", run, modes[run], cyc);
      n_overlap   += (overlap_cycles > 0);
      n_axi_stall += stalls[0] + stalls[1];
      hps_read(12'h000, d);
      checks++;
      if (d[15:0] != 16'(H) || d[18:16] != 3'(modes[run]) || d[24] != 1'b1) begin
        failures++; $display("FAIL status %h", d);
      end
      for (int i = 0; i < H; i++) begin
        int row;
        row = H - 1 - i;   // the queue holds the bottom row first
        hps_read(12'h008, d);
        n_rows_read++;
        checks++;
        if (d[63] != 1'b1 || int'(d[52:45]) != row) begin failures++; $display("FAIL entry %0d: %h", i, d); end
        for (int k = 0; k < NSAR_MAX; k++) begin
          int got, exp;
          got = int'(d[k*9 +: 9]);
          exp = (k < modes[run]) ? seams[k * H + row] : 511;
          if (k >= modes[run] && got == 511) n_unused_marker++;
          checks++;
          if (got != exp) begin
            failures++; $display("FAIL run %0d row %0d seam %0d: col %0d exp %0d", run, row, k, got, exp);
          end
        end
      end
      hps_read(12'h008, d);
      checks++;
      if (d[63] != 1'b0) begin failures++; $display("FAIL queue not empty after all rows"); end
      else n_empty_read++;
      n_mode[modes[run]]++;
      if (run == 0) begin
        $write("seam 0 columns, top to bottom:");
        for (int r = 0; r < H; r++) $write(" %0d", seams[r]);
        $display("");
      end
    end
    // every mechanism must have happened
    begin
      string names [11] = '{"stage 2 entered", "stage 3 entered", "finish entered", "load/process overlap",
                            "AXI stall", "NSAR 1 run", "NSAR 3 run", "NSAR 5 run",
                            "unused-seam marker", "seam rows read", "empty queue read"};
      int counts [11];
      counts = '{n_stage[2], n_stage[3], n_stage[4], n_overlap, n_axi_stall,
                 n_mode[1], n_mode[3], n_mode[5], n_unused_marker, n_rows_read, n_empty_read};
      for (int i = 0; i < 11; i++) begin
        $display("mechanism %-22s : %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
