// seam_carver_top: FPGA accelerator for content-aware video resizing by seam carving.
//
// The accelerator finds the vertical seams (connected top-to-bottom pixel
// paths of least importance) that are removed from every frame of a video.
// One energy map is computed for the whole video, so the same seams are
// removed from all frames and the result does not jitter; several seams (NSAR,
// 1 to 5) are taken from one energy map to save time.  The stages:
//   Stage 1  stage1_unit: reads the video from HPS SDRAM through two 64-bit
//            AXI read ports, half a frame (120 rows) at a time with double
//            buffering, and builds per pixel the largest Sobel energy and the
//            largest frame-to-frame change over all frames; then writes their
//            weighted sum into the energy map.
//   Stage 2  stage2_accum: dynamic-programming accumulation row by row,
//            recording the cheapest upper neighbour of every pixel in the
//            paths matrix (path_mem, one copy per seam).
//   Stage 3  stage3_trace: picks the NSAR cheapest bottom cells and follows
//            each seam up through its own path copy, queueing one entry per
//            row into the seam index queue.
//   Finish   the HPS reads the queue through hps_readout and removes the
//            pixels in software.
// seam_top_fsm steps through the stages on each stage's done pulse.
// All of this follows the document; widths, the queue entry format, the
// register map, edge and tie rules are this design's choices (see the blocks).
//
// Interface: video_base (byte address of the video in SDRAM), energy_weight
// (0..8, spatial weight out of 8), nsar (seams per run, 1..5), PORTS AXI4 read
// masters towards SDRAM, one AXI read slave for the HPS, stage and finish.
// Start: release reset; the run begins at once and ends in Finish.
module seam_carver_top
  import seam_pkg::*;
#(
  parameter int unsigned FRAME_H   = 240,
  parameter int unsigned FRAME_W   = 320,
  parameter int unsigned LANES     = 120,
  parameter int unsigned FRAMES    = 150,
  parameter int unsigned PORTS     = 2,
  parameter int unsigned BURST_LEN = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [AXI_ADDR_W-1:0] video_base,
  input  logic [3:0]            energy_weight,
  input  logic [2:0]            nsar,
  // FPGA-to-SDRAM AXI4 read masters
  output logic                  sd_ar_valid [PORTS],
  output axi_ar_t               sd_ar       [PORTS],
  input  logic                  sd_ar_ready [PORTS],
  input  logic                  sd_r_valid  [PORTS],
  input  axi_r_t                sd_r        [PORTS],
  output logic                  sd_r_ready  [PORTS],
  // HPS-to-FPGA AXI read slave
  input  logic                  h_ar_valid,
  output logic                  h_ar_ready,
  input  logic [11:0]           h_ar_addr,
  output logic                  h_r_valid,
  input  logic                  h_r_ready,
  output logic [63:0]           h_r_data,
  output logic [1:0]            h_r_resp,
  // status
  output stage_e                stage,
  output logic                  finish,
  output logic [31:0]           overlap_cycles
);
  localparam int unsigned N  = FRAME_H * FRAME_W;
  localparam int unsigned EA = $clog2(N);

  logic done_s1, done_s2, done_s3, stage_done;

  // ---- top FSM ----
  always_comb begin
    unique case (stage)
      ST_STAGE1: stage_done = done_s1;
      ST_STAGE2: stage_done = done_s2;
      ST_STAGE3: stage_done = done_s3;
      default:   stage_done = 1'b0;
    endcase
  end
  seam_top_fsm u_fsm (.clk, .rst_n, .done(stage_done), .stage, .finish);

  // ---- stage 1 ----
  logic          em_we;
  logic [EA-1:0] em_waddr, em_raddr;
  pix_t          em_wdata, em_rdata;
  stage1_unit #(
    .FRAME_H(FRAME_H), .FRAME_W(FRAME_W), .LANES(LANES), .FRAMES(FRAMES),
    .PORTS(PORTS), .BURST_LEN(BURST_LEN)
  ) u_s1 (
    .clk, .rst_n,
    .go(stage == ST_STAGE1), .done(done_s1),
    .video_base, .energy_weight,
    .ar_valid(sd_ar_valid), .ar(sd_ar), .ar_ready(sd_ar_ready),
    .r_valid(sd_r_valid), .r(sd_r), .r_ready(sd_r_ready),
    .em_we, .em_waddr, .em_wdata,
    .overlap_cycles
  );

  // ---- final energy map ----
  sdp_ram #(.WIDTH($bits(pix_t)), .DEPTH(N)) u_emap (
    .clk, .we(em_we), .waddr(em_waddr), .wdata(em_wdata),
    .raddr(em_raddr), .rdata(em_rdata)
  );

  // ---- stage 2 ----
  logic          pm_we;
  logic [EA-1:0] pm_waddr;
  col_t          pm_wdata;
  acc_t          acc_row [FRAME_W];
  stage2_accum #(.FRAME_H(FRAME_H), .FRAME_W(FRAME_W)) u_s2 (
    .clk, .rst_n,
    .go(stage == ST_STAGE2), .done(done_s2),
    .em_raddr, .em_rdata,
    .pm_we, .pm_waddr, .pm_wdata,
    .acc_row
  );

  // ---- accumulation paths, one copy per seam ----
  logic [EA-1:0] pm_raddr [NSAR_MAX];
  col_t          pm_rdata [NSAR_MAX];
  path_mem #(.DEPTH(N), .COPIES(NSAR_MAX)) u_paths (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_raddr), .rdata(pm_rdata)
  );

  // ---- stage 3 ----
  logic      q_push, q_pop, q_empty, q_full;
  seam_row_t q_in, q_head;
  logic [$clog2(FRAME_H+1)-1:0] q_count;
  logic [2:0] nsar_used;
  stage3_trace #(.FRAME_H(FRAME_H), .FRAME_W(FRAME_W)) u_s3 (
    .clk, .rst_n,
    .go(stage == ST_STAGE3), .nsar, .done(done_s3),
    .acc_row,
    .pm_raddr, .pm_rdata,
    .q_push, .q_data(q_in), .q_full,
    .nsar_used
  );

  // ---- seam index queue: one entry per row ----
  sync_fifo #(.WIDTH($bits(seam_row_t)), .DEPTH(FRAME_H)) u_seamq (
    .clk, .rst_n,
    .push(q_push), .push_data(q_in),
    .pop(q_pop), .pop_data(q_head),
    .empty(q_empty), .full(q_full), .count(q_count)
  );

  // ---- Final: HPS readout ----
  hps_readout #(.ADDR_W(12)) u_hps (
    .clk, .rst_n,
    .ar_valid(h_ar_valid), .ar_ready(h_ar_ready), .ar_addr(h_ar_addr),
    .r_valid(h_r_valid), .r_ready(h_r_ready), .r_data(h_r_data), .r_resp(h_r_resp),
    .q_head, .q_empty, .q_count(16'(q_count)), .q_pop,
    .finish, .nsar(nsar_used), .stage
  );
endmodule
