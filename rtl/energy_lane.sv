// energy_lane: one row lane of stage 1 (spatial and temporal energy).
//
// Stage 1 processes the rows of a half frame in parallel, one lane per row.
// A lane receives its row's 3-byte columns, one per cycle, and for every
// pixel
//   * computes the spatial energy, the Sobel norm (|Gx| + |Gy|) >> NORM_SHIFT,
//     from the adder pipeline of sobel_pipe,
//   * keeps the largest spatial energy seen over all frames so far,
//   * computes the temporal energy as |pixel - pixel in the previous frame|
//     and keeps its largest value over all frames so far, and
//   * records the pixel as the previous value for the next frame.
// The three bytes of per-pixel state live in the lane's own memory (one entry
// per column for each of the two rows the lane handles, one per half frame).
// Compared values enter a small buffer queue and are written back from it.
// The document gives the running maxima, the previous-pixel record and the
// queue; the L1 norm scaled to 8 bits, the write-back queue depth and the
// handling of the first frame (no previous pixel: temporal energy 0) are this
// design's choices.
//
// Interface: clear before each row pass; in_valid/in_pix/in_col give one
// column per cycle in the order the processing FSM reads them (the edge
// columns are repeated, so a row of W pixels takes W+2 inputs); half selects
// which of the lane's two rows is being processed; first_frame marks frame 0.
// In the Final state the processing FSM reads the state through fin_mode /
// fin_addr (half * FRAME_W + column) -> fin_state (one cycle latency).  idle is high once every value
// of the pass has been written back.
// Timing: a pixel's state is written 3 cycles after the input that completes
// its 3x3 window.
module energy_lane
  import seam_pkg::*;
#(
  parameter int unsigned FRAME_W    = 320,
  parameter int unsigned NORM_SHIFT = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       in_valid,
  input  pix3_t                      in_pix,
  input  logic [$clog2(FRAME_W)-1:0] in_col,
  input  logic                       half,
  input  logic                       first_frame,
  input  logic                       fin_mode,
  input  logic [$clog2(2*FRAME_W)-1:0] fin_addr,
  output px_state_t                  fin_state,
  output logic                       idle
);
  localparam int unsigned CW = $clog2(FRAME_W);
  localparam int unsigned AW = $clog2(2*FRAME_W);

  // ---- Sobel adder pipeline ----
  logic               s_valid;
  logic signed [11:0] gx, gy;
  sobel_pipe u_sobel (
    .clk, .rst_n, .clear, .in_valid, .in_pix,
    .out_valid(s_valid), .gx, .gy
  );

  // ---- track the centre column of the Sobel window ----
  logic [CW-1:0] d_col, cen_col;
  pix_t          d_mid, cen_mid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_col <= '0; cen_col <= '0; d_mid <= '0; cen_mid <= '0;
    end else if (in_valid) begin
      d_col   <= in_col;
      d_mid   <= in_pix.mid;
      cen_col <= d_col;
      cen_mid <= d_mid;
    end
  end

  // ---- lane state memory ----
  logic          st_we;
  logic [AW-1:0] st_waddr, st_raddr;
  px_state_t     st_wdata, st_rdata;
  // entry of (half, column): half * FRAME_W + column
  function automatic logic [AW-1:0] st_addr(logic h, logic [CW-1:0] c);
    return h ? AW'(c) + AW'(FRAME_W) : AW'(c);
  endfunction
  assign st_raddr = fin_mode ? fin_addr : st_addr(half, d_col);
  sdp_ram #(.WIDTH($bits(px_state_t)), .DEPTH(2*FRAME_W)) u_state (
    .clk, .we(st_we), .waddr(st_waddr), .wdata(st_wdata),
    .raddr(st_raddr), .rdata(st_rdata)
  );
  assign fin_state = st_rdata;

  // ---- compare ----
  logic [11:0] ax, ay;
  logic [12:0] l1;
  pix_t        e_sp, diff, new_sp, new_tp;
  always_comb begin
    ax   = gx[11] ? 12'(-gx) : 12'(gx);
    ay   = gy[11] ? 12'(-gy) : 12'(gy);
    l1   = 13'(ax) + 13'(ay);
    e_sp = pix_t'(l1 >> NORM_SHIFT);
    diff = (cen_mid > st_rdata.prev) ? cen_mid - st_rdata.prev : st_rdata.prev - cen_mid;
    if (first_frame) begin
      new_sp = e_sp;
      new_tp = '0;
    end else begin
      new_sp = (e_sp > st_rdata.spatial)  ? e_sp : st_rdata.spatial;
      new_tp = (diff > st_rdata.temporal) ? diff : st_rdata.temporal;
    end
  end

  // ---- write-back buffer queue ----
  typedef struct packed {
    logic [AW-1:0] addr;
    px_state_t     st;
  } wb_t;
  wb_t  q_in, q_out;
  logic q_empty, q_full;
  logic [$clog2(5)-1:0] q_count;
  assign q_in.addr        = st_addr(half, cen_col);
  assign q_in.st.spatial  = new_sp;
  assign q_in.st.prev     = cen_mid;
  assign q_in.st.temporal = new_tp;

  sync_fifo #(.WIDTH($bits(wb_t)), .DEPTH(4)) u_wbq (
    .clk, .rst_n,
    .push(s_valid), .push_data(q_in),
    .pop(!q_empty), .pop_data(q_out),
    .empty(q_empty), .full(q_full), .count(q_count)
  );
  assign st_we    = !q_empty;
  assign st_waddr = q_out.addr;
  assign st_wdata = q_out.st;
  assign idle     = q_empty && !s_valid;
endmodule
