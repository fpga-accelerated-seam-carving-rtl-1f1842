// stage3_trace: stage 3 of the seam carver (Pick and Travel).
//
// Pick: the last accumulation row is streamed through min_k_picker, which
// keeps the NSAR cheapest bottom-row cells; their columns are where the seams
// end.  comp_done marks that the whole row has been compared.
// Travel: all NSAR seams are followed upwards together, each through its own
// copy of the paths matrix: the cell at (row, column) holds the column of the
// seam in the row above, which becomes the next address, like walking a
// linked list.  For every row, from the bottom row to the top one, one entry
// {row, column of each seam} is pushed into the seam index queue.  When the
// top row has been pushed (reached_top) the FSM returns to Idle and pulses
// done.  States and transitions follow the document's stage 3 diagram.
// Columns of unused seam slots (slot >= NSAR) are reported as all ones.  The
// one-entry-per-row queue format and the three cycles per row (push, read,
// take) are this design's choices.
//
// Interface: go (level) starts from Idle; nsar (1..NSAR_MAX, larger values are
// clamped, 0 counts as 1) is sampled then.  acc_row is the last accumulation
// row.  pm_raddr/pm_rdata read the path copies (one cycle latency).  q_* push
// into the seam index queue; a full queue stalls Travel.
// Timing: FRAME_W + 2 cycles of Pick, 3 cycles per row of Travel.
module stage3_trace
  import seam_pkg::*;
#(
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned FRAME_W = 320
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               go,
  input  logic [2:0]                         nsar,
  output logic                               done,
  input  acc_t                               acc_row [FRAME_W],
  output logic [$clog2(FRAME_H*FRAME_W)-1:0] pm_raddr [NSAR_MAX],
  input  col_t                               pm_rdata [NSAR_MAX],
  output logic                               q_push,
  output seam_row_t                          q_data,
  input  logic                               q_full,
  output logic [2:0]                         nsar_used
);
  localparam int unsigned EA = $clog2(FRAME_H * FRAME_W);
  localparam int unsigned CW = $clog2(FRAME_W);

  typedef enum logic [1:0] {S3_IDLE, S3_PICK, S3_TRAVEL} s3_e;
  typedef enum logic [1:0] {T_PUSH, T_READ, T_TAKE} tph_e;
  s3_e  state;
  tph_e phase;

  logic [CW:0]   pick_k;
  logic          comp_done, reached_top;
  logic          pk_valid;
  acc_t          pk_val [NSAR_MAX];
  col_t          pk_col [NSAR_MAX];
  logic          pk_vld [NSAR_MAX];
  col_t          cur_col [NSAR_MAX];
  row_t          row_q;
  logic [EA-1:0] row_base;        // row_q * FRAME_W

  assign pk_valid  = (state == S3_PICK) && (pick_k < (CW+1)'(FRAME_W));
  assign comp_done = (state == S3_PICK) && (pick_k == (CW+1)'(FRAME_W + 1));

  min_k_picker #(.K(NSAR_MAX)) u_pick (
    .clk, .rst_n,
    .clear   (state == S3_IDLE),
    .in_valid(pk_valid),
    .in_val  (acc_row[pk_valid ? pick_k[CW-1:0] : '0]),
    .in_col  (col_t'(pick_k)),
    .val     (pk_val),
    .col     (pk_col),
    .vld     (pk_vld)
  );

  assign reached_top = (state == S3_TRAVEL) && (phase == T_PUSH) && !q_full && (row_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S3_IDLE;
      phase     <= T_PUSH;
      pick_k    <= '0;
      row_q     <= '0;
      row_base  <= '0;
      nsar_used <= 3'd1;
      for (int k = 0; k < NSAR_MAX; k++) cur_col[k] <= '0;
    end else begin
      unique case (state)
        S3_IDLE: if (go) begin
          state     <= S3_PICK;
          pick_k    <= '0;
          nsar_used <= (nsar == 0) ? 3'd1 : (nsar > 3'(NSAR_MAX)) ? 3'(NSAR_MAX) : nsar;
        end
        S3_PICK: begin
          if (!comp_done) pick_k <= pick_k + 1'b1;
          else begin
            state    <= S3_TRAVEL;
            phase    <= T_PUSH;
            row_q    <= row_t'(FRAME_H - 1);
            row_base <= EA'((FRAME_H - 1) * FRAME_W);
            for (int k = 0; k < NSAR_MAX; k++) cur_col[k] <= pk_col[k];
          end
        end
        S3_TRAVEL: begin
          unique case (phase)
            T_PUSH: if (!q_full) begin
              if (reached_top) state <= S3_IDLE;
              else             phase <= T_READ;
            end
            T_READ: phase <= T_TAKE;
            T_TAKE: begin
              for (int k = 0; k < NSAR_MAX; k++) cur_col[k] <= pm_rdata[k];
              row_q    <= row_q - 1'b1;
              row_base <= row_base - EA'(FRAME_W);
              phase    <= T_PUSH;
            end
            default: phase <= T_PUSH;
          endcase
        end
        default: state <= S3_IDLE;
      endcase
    end
  end

  for (genvar k = 0; k < NSAR_MAX; k++) begin : g_rd
    assign pm_raddr[k] = row_base + EA'(cur_col[k]);
    assign q_data.cols[k] = (k < nsar_used) ? cur_col[k] : '1;
  end
  assign q_data.row = row_q;
  assign q_push     = (state == S3_TRAVEL) && (phase == T_PUSH) && !q_full;
  assign done       = reached_top;
endmodule
