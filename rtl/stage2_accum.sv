// stage2_accum: stage 2 of the seam carver (accumulation).
//
// The accumulation row is a bank of FRAME_W registers.  In the Load state the
// first row of the energy map is copied into it, one cell per cycle, until
// `counter` has counted the whole row.  In the Acc state the rows 1..H-1 are
// streamed through, one cell per cycle: the new value of cell c is its energy
// plus the smallest of the three cells above it (c-1, c, c+1 of the previous
// row), and the column of that smallest cell is written into the accumulation
// paths matrix at (row, c).  The register is updated in place; the old value
// of cell c-1, which the next cell still needs, is kept in one extra register.
// Cells at the left and right edge have only two cells above them.  Ties go
// to the cell straight above, then to the left one.  When the last cell is
// done (accumulate_done) the FSM pulses done and returns to Idle.  The states,
// the register row and the paths matrix follow the document; the edge rule,
// the tie rule and the serial one-cell-per-cycle order are this design's.
//
// Interface: go (level, the top is in stage 2) starts a run from Idle.  em_*
// reads the energy map (address row * FRAME_W + column, one cycle latency).
// pm_* writes the paths matrix (same addressing, rows 1..H-1; the value is the
// column in the row above).  acc_row holds the accumulation row; after done
// it is the last row, the total cost of the cheapest seam ending at each column.
// Timing: done comes FRAME_W + 3 + FRAME_W * (FRAME_H - 1) cycles after go
// is seen in Idle (one cell per cycle plus the read latency).
module stage2_accum
  import seam_pkg::*;
#(
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned FRAME_W = 320
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               go,
  output logic                               done,
  output logic [$clog2(FRAME_H*FRAME_W)-1:0] em_raddr,
  input  pix_t                               em_rdata,
  output logic                               pm_we,
  output logic [$clog2(FRAME_H*FRAME_W)-1:0] pm_waddr,
  output col_t                               pm_wdata,
  output acc_t                               acc_row [FRAME_W]
);
  localparam int unsigned EA = $clog2(FRAME_H * FRAME_W);
  localparam int unsigned CW = $clog2(FRAME_W);
  localparam int unsigned N  = FRAME_H * FRAME_W;

  typedef enum logic [1:0] {S2_IDLE, S2_LOAD, S2_ACC} s2_e;
  s2_e state;

  logic [EA-1:0] iss_addr;        // next address to read
  logic          iss_more;        // addresses left to issue in this state
  logic          d_valid;         // read data arrives this cycle
  logic [EA-1:0] d_addr;
  logic [CW-1:0] d_col;
  logic [CW:0]   counter;         // cells loaded in the Load state
  logic          accumulate_done;
  acc_t          acc [FRAME_W];
  acc_t          left_old;

  assign em_raddr = iss_addr;

  // ---- min of the three cells above ----
  acc_t a_c, a_l, a_r, best, sum;
  col_t best_col;
  logic has_l, has_r;
  always_comb begin
    has_l = (d_col != 0);
    has_r = (d_col != CW'(FRAME_W - 1));
    a_c   = acc[d_col];
    a_l   = left_old;
    a_r   = has_r ? acc[d_col + 1'b1] : '1;
    best     = a_c;
    best_col = col_t'(d_col);
    if (has_l && a_l < best) begin
      best     = a_l;
      best_col = col_t'(d_col - 1'b1);
    end
    if (has_r && a_r < best) begin
      best     = a_r;
      best_col = col_t'(d_col + 1'b1);
    end
    sum = best + acc_t'(em_rdata);
  end

  assign accumulate_done = (state == S2_ACC) && d_valid && (d_addr == EA'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S2_IDLE;
      iss_addr <= '0;
      iss_more <= 1'b0;
      d_valid  <= 1'b0;
      d_addr   <= '0;
      d_col    <= '0;
      counter  <= '0;
      left_old <= '0;
      for (int c = 0; c < FRAME_W; c++) acc[c] <= '0;
    end else begin
      // read pipeline: the cell read in this cycle arrives in the next one
      d_valid <= iss_more && (state != S2_IDLE);
      d_addr  <= iss_addr;
      if (iss_more && state != S2_IDLE) begin
        d_col <= (d_col == CW'(FRAME_W - 1) || !d_valid) ? '0 : d_col + 1'b1;
      end
      if (iss_more && state != S2_IDLE) iss_addr <= iss_addr + 1'b1;

      unique case (state)
        S2_IDLE: if (go) begin
          state    <= S2_LOAD;
          iss_addr <= '0;
          iss_more <= 1'b1;
          counter  <= '0;
          d_col    <= '0;
        end
        S2_LOAD: begin
          if (iss_addr == EA'(FRAME_W - 1)) iss_more <= 1'b0;
          if (d_valid) begin
            acc[d_col] <= acc_t'(em_rdata);
            counter    <= counter + 1'b1;
          end
          if (counter == (CW+1)'(FRAME_W)) begin
            state    <= S2_ACC;
            iss_more <= 1'b1;   // iss_addr already points at row 1
          end
        end
        S2_ACC: begin
          if (iss_addr == EA'(N - 1)) iss_more <= 1'b0;
          if (d_valid) begin
            acc[d_col] <= sum;
            left_old   <= a_c;
          end
          if (accumulate_done) state <= S2_IDLE;
        end
        default: state <= S2_IDLE;
      endcase
    end
  end

  assign done     = accumulate_done;
  assign pm_we    = (state == S2_ACC) && d_valid;
  assign pm_waddr = d_addr;
  assign pm_wdata = best_col;
  assign acc_row  = acc;
endmodule
