// stage1_unit: stage 1 of the seam carver (energy maps over the whole video).
//
// The video is processed half a frame at a time: LANES rows, one lane per row,
// all rows in parallel.  Two FSMs share two row buffers (double buffering):
//   * the load FSM has the AXI loaders (PORTS of them, each reading LANES/PORTS
//     rows) copy the next half frame from SDRAM into a free buffer bank;
//   * the processing FSM streams the columns of a full bank through the lanes
//     (sobel_pipe + energy_lane), which update the per-pixel running maxima of
//     spatial and temporal energy, then frees the bank.
// The handshake between them is one "full" flag per bank: the load FSM sets
// it when a load ends and may only load into an empty bank; the processing
// FSM waits for it and clears it when its pass ends.  So the next half frame
// loads while the current one is processed.  After the last half of the last
// frame the processing FSM enters its Final state: for every pixel it reads
// the lane memories and writes the weighted sum
//     E = (w * spatial + (8 - w) * temporal) / 8,   w = energy_weight (0..8)
// into the frame-sized energy map, row by row.
// The document gives the two FSMs, the double buffering, the lanes and the
// tunable weighted sum; the bank flags, the 0..8 weight scale and the edge
// handling (the first and last columns are fed twice, so the Sobel window
// repeats the edge column) are this design's choices.
//
// Interface: go (level) starts a run from idle; done pulses when the energy
// map is complete.  video_base is the byte address of frame 0 in SDRAM, laid
// out frame by frame, row by row, each row as its top, middle and bottom
// sub-rows of FRAME_W bytes.  PORTS AXI4 read masters (ar_*/r_* arrays).
// em_* is the write port of the energy map (address row * FRAME_W + column).
// Timing: a half frame pass takes FRAME_W + 2 cycles plus a few of drain; the
// Final state writes one pixel per cycle.
module stage1_unit
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
  input  logic                  go,
  output logic                  done,
  input  logic [AXI_ADDR_W-1:0] video_base,
  input  logic [3:0]            energy_weight,
  // AXI4 read masters to SDRAM
  output logic                  ar_valid [PORTS],
  output axi_ar_t               ar       [PORTS],
  input  logic                  ar_ready [PORTS],
  input  logic                  r_valid  [PORTS],
  input  axi_r_t                r        [PORTS],
  output logic                  r_ready  [PORTS],
  // energy map write port
  output logic                  em_we,
  output logic [$clog2(FRAME_H*FRAME_W)-1:0] em_waddr,
  output pix_t                  em_wdata,
  // observation
  output logic [31:0]           overlap_cycles   // cycles where load and processing ran together
);
  localparam int unsigned HALVES = FRAME_H / LANES;      // parts per frame (2)
  localparam int unsigned NH     = FRAMES * HALVES;      // half frames in the video
  localparam int unsigned RPP    = LANES / PORTS;        // rows per port
  localparam int unsigned CW     = $clog2(FRAME_W);
  localparam int unsigned HW     = $clog2(NH + 1);
  localparam int unsigned EA     = $clog2(FRAME_H * FRAME_W);
  localparam int unsigned SA     = $clog2(2 * FRAME_W);
  localparam int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1;
  localparam int unsigned ROW_BYTES = 3 * FRAME_W;

  initial begin
    assert (FRAME_H % LANES == 0 && HALVES <= 2) else $error("LANES must be FRAME_H or FRAME_H/2");
    assert (LANES % PORTS == 0) else $error("LANES must split evenly over the ports");
  end

  // ------------------------------------------------------------------
  // bank handshake
  // ------------------------------------------------------------------
  logic bank_full [2];
  logic ld_finish, pr_release;
  logic ld_bank, pr_bank;

  // ------------------------------------------------------------------
  // load FSM
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {LD_IDLE, LD_START, LD_WAIT} ld_e;
  ld_e           ld_state;
  logic [HW-1:0] ld_idx;
  logic          ld_active;                   // run in progress
  logic [PORTS-1:0] port_busy, port_done, port_seen;
  logic [AXI_ADDR_W-1:0] ld_addr;             // first byte of the half frame

  logic [$clog2(RPP)-1:0]      lw_row  [PORTS];
  logic [1:0]                  lw_sub  [PORTS];
  logic [$clog2(FRAME_W/8)-1:0] lw_word [PORTS];
  logic [AXI_DATA_W-1:0]       lw_data [PORTS];
  logic                        lw_en   [PORTS];

  for (genvar p = 0; p < PORTS; p++) begin : g_port
    logic [15:0] err_count;
    axi_half_frame_loader #(.ROWS(RPP), .FRAME_W(FRAME_W), .BURST_LEN(BURST_LEN)) u_ld (
      .clk, .rst_n,
      .start     (ld_state == LD_START),
      .start_addr(ld_addr + AXI_ADDR_W'(p * RPP * ROW_BYTES)),
      .busy      (port_busy[p]),
      .done      (port_done[p]),
      .err_count (err_count),
      .ar_valid  (ar_valid[p]), .ar(ar[p]), .ar_ready(ar_ready[p]),
      .r_valid   (r_valid[p]),  .r(r[p]),   .r_ready(r_ready[p]),
      .wr_en     (lw_en[p]), .wr_row(lw_row[p]), .wr_sub(lw_sub[p]),
      .wr_word   (lw_word[p]), .wr_data(lw_data[p])
    );
  end

  assign ld_bank   = ld_idx[0];
  assign ld_finish = (ld_state == LD_WAIT) && ((port_seen | port_done) == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_state  <= LD_IDLE;
      ld_idx    <= '0;
      ld_addr   <= '0;
      port_seen <= '0;
    end else begin
      unique case (ld_state)
        LD_IDLE: begin
          if (go && !ld_active) begin
            ld_idx  <= '0;
            ld_addr <= video_base;
          end else if (ld_active && ld_idx < HW'(NH) && !bank_full[ld_bank]) begin
            ld_state <= LD_START;
          end
        end
        LD_START: begin
          port_seen <= '0;
          ld_state  <= LD_WAIT;
        end
        LD_WAIT: begin
          port_seen <= port_seen | port_done;
          if (ld_finish) begin
            ld_state <= LD_IDLE;
            ld_idx   <= ld_idx + 1'b1;
            ld_addr  <= ld_addr + AXI_ADDR_W'(LANES * ROW_BYTES);
          end
        end
        default: ld_state <= LD_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // processing FSM
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {PR_IDLE, PR_WAIT, PR_RUN, PR_DRAIN, PR_FINAL, PR_DONE} pr_e;
  pr_e            pr_state;
  logic [HW-1:0]  pr_idx;
  logic [CW+1:0]  feed_k;            // 0 .. FRAME_W+1
  logic [3:0]     drain_k;
  logic           part;              // which half of the frame (row block)
  logic           first_frame;
  logic [LANES-1:0] lane_idle;

  assign ld_active = (pr_state != PR_IDLE) && (pr_state != PR_DONE);
  assign pr_bank   = pr_idx[0];
  assign pr_release = (pr_state == PR_DRAIN) && (drain_k >= 4'd3) && (&lane_idle);

  // column sequence 0, 0, 1, ..., W-1, W-1
  logic [CW-1:0] feed_col;
  always_comb begin
    if (feed_k == 0)                        feed_col = '0;
    else if (feed_k > (CW+2)'(FRAME_W))     feed_col = CW'(FRAME_W - 1);
    else                                    feed_col = CW'(feed_k - 1);
  end

  // Final-state counters
  logic [EA-1:0] fin_addr_lin;
  logic [LW-1:0] fin_lane;
  logic          fin_part;
  logic [CW-1:0] fin_col;
  logic          fin_step;                   // a read is issued this cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pr_state    <= PR_IDLE;
      pr_idx      <= '0;
      feed_k      <= '0;
      drain_k     <= '0;
      part        <= 1'b0;
      first_frame <= 1'b1;
      fin_addr_lin <= '0;
      fin_lane    <= '0;
      fin_part    <= 1'b0;
      fin_col     <= '0;
    end else begin
      unique case (pr_state)
        PR_IDLE: if (go) begin
          pr_state    <= PR_WAIT;
          pr_idx      <= '0;
          part        <= 1'b0;
          first_frame <= 1'b1;
        end
        PR_WAIT: if (bank_full[pr_bank]) begin
          pr_state <= PR_RUN;
          feed_k   <= '0;
        end
        PR_RUN: begin
          if (feed_k == (CW+2)'(FRAME_W + 1)) begin
            pr_state <= PR_DRAIN;
            drain_k  <= '0;
          end else begin
            feed_k <= feed_k + 1'b1;
          end
        end
        PR_DRAIN: begin
          if (drain_k != 4'hf) drain_k <= drain_k + 1'b1;
          if (pr_release) begin
            pr_idx <= pr_idx + 1'b1;
            if (HALVES == 2) part <= ~part;
            if (HALVES == 1 || part) first_frame <= 1'b0;
            if (pr_idx == HW'(NH - 1)) begin
              pr_state     <= PR_FINAL;
              fin_addr_lin <= '0;
              fin_lane     <= '0;
              fin_part     <= 1'b0;
              fin_col      <= '0;
            end else begin
              pr_state <= PR_WAIT;
            end
          end
        end
        PR_FINAL: begin
          // walk rows 0..H-1 and columns 0..W-1; row = part * LANES + lane
          if (fin_col == CW'(FRAME_W - 1)) begin
            fin_col <= '0;
            if (fin_lane == LW'(LANES - 1)) begin
              fin_lane <= '0;
              fin_part <= 1'b1;
            end else begin
              fin_lane <= fin_lane + 1'b1;
            end
          end else begin
            fin_col <= fin_col + 1'b1;
          end
          fin_addr_lin <= fin_addr_lin + 1'b1;
          if (fin_addr_lin == EA'(FRAME_H * FRAME_W - 1)) pr_state <= PR_DONE;
        end
        PR_DONE: pr_state <= PR_IDLE;
        default: pr_state <= PR_IDLE;
      endcase
    end
  end
  assign fin_step = (pr_state == PR_FINAL);
  assign done     = (pr_state == PR_DONE);   // the last energy write lands at this edge

  // bank flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_full[0] <= 1'b0;
      bank_full[1] <= 1'b0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (ld_finish && ld_bank == b[0])       bank_full[b] <= 1'b1;
        else if (pr_release && pr_bank == b[0]) bank_full[b] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overlap_cycles <= '0;
    else if ((ld_state == LD_WAIT) && (pr_state == PR_RUN)) overlap_cycles <= overlap_cycles + 1'b1;
  end

  // ------------------------------------------------------------------
  // lanes: row buffer + energy lane
  // ------------------------------------------------------------------
  // the row buffer answers one cycle after the read, so the lane input is
  // the delayed feed
  logic          in_valid_q;
  logic [CW-1:0] in_col_q;
  logic          clear_lane;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid_q <= 1'b0;
      in_col_q   <= '0;
    end else begin
      in_valid_q <= (pr_state == PR_RUN);
      in_col_q   <= feed_col;
    end
  end
  assign clear_lane = (pr_state == PR_WAIT);

  logic [SA-1:0] fin_raddr;
  assign fin_raddr = fin_part ? SA'(fin_col) + SA'(FRAME_W) : SA'(fin_col);
  px_state_t lane_state [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    localparam int unsigned P  = l / RPP;
    localparam int unsigned LR = l % RPP;
    pix3_t pix;
    row_buffer #(.FRAME_W(FRAME_W)) u_buf (
      .clk,
      .wr_en  (lw_en[P] && (lw_row[P] == ($clog2(RPP))'(LR))),
      .wr_bank(ld_bank),
      .wr_sub (lw_sub[P]),
      .wr_word(lw_word[P]),
      .wr_data(lw_data[P]),
      .rd_bank(pr_bank),
      .rd_col (feed_col),
      .rd_pix (pix)
    );
    energy_lane #(.FRAME_W(FRAME_W)) u_lane (
      .clk, .rst_n,
      .clear      (clear_lane),
      .in_valid   (in_valid_q),
      .in_pix     (pix),
      .in_col     (in_col_q),
      .half       (part),
      .first_frame(first_frame),
      .fin_mode   (fin_step),
      .fin_addr   (fin_raddr),
      .fin_state  (lane_state[l]),
      .idle       (lane_idle[l])
    );
  end

  // ------------------------------------------------------------------
  // Final: weighted sum into the energy map (one cycle after the read)
  // ------------------------------------------------------------------
  logic [LW-1:0] sel_lane;
  logic [EA-1:0] sel_addr;
  logic          sel_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_lane  <= '0;
      sel_addr  <= '0;
      sel_valid <= 1'b0;
    end else begin
      sel_lane  <= fin_lane;
      sel_addr  <= fin_addr_lin;
      sel_valid <= fin_step;
    end
  end

  logic [3:0]  w_sp, w_tp;
  logic [11:0] wsum;
  px_state_t   sel_state;
  assign sel_state = lane_state[sel_lane];
  assign w_sp = (energy_weight > 4'd8) ? 4'd8 : energy_weight;
  assign w_tp = 4'd8 - w_sp;
  assign wsum = 12'(w_sp) * 12'(sel_state.spatial) + 12'(w_tp) * 12'(sel_state.temporal);

  assign em_we    = sel_valid;
  assign em_waddr = sel_addr;
  assign em_wdata = pix_t'(wsum >> 3);
endmodule
