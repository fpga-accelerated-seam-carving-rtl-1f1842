// axi_half_frame_loader: the load FSM of stage 1 for one FPGA-to-SDRAM port.
//
// The video sits in HPS SDRAM as "row representations": for every frame and
// row, the row above, the row itself and the row below, each FRAME_W bytes,
// one after the other (3 * FRAME_W bytes per row).  The rows of a half frame
// are therefore one contiguous block.  On `start` the loader reads ROWS rows
// of such a block, beginning at `start_addr`, through a 64-bit AXI4 read port
// and writes every 8-byte beat into the loading buffer, telling it which row
// (0..ROWS-1), which of the three sub-rows (0 top, 1 middle, 2 bottom) and
// which 8-column word the beat belongs to.  The document gives the 64-bit AXI
// read port to SDRAM and the two-port split; the burst length, the one
// outstanding burst at a time and the address layout are this design's
// choices.
//
// Interface: start (pulse, while idle) with start_addr (byte address, 8-byte
// aligned); done pulses one cycle after the last beat is written; busy is high
// in between.  AXI: ar_* address channel, r_* data channel (INCR bursts of
// BURST_LEN beats).  A response other than OKAY is counted in err_count and
// the data is written anyway.
// Timing: a beat is written into the buffer in the cycle it is accepted.
module axi_half_frame_loader
  import seam_pkg::*;
#(
  parameter int unsigned ROWS      = 60,       // rows this port loads per half frame
  parameter int unsigned FRAME_W   = 320,
  parameter int unsigned BURST_LEN = 8         // beats per AXI burst
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [AXI_ADDR_W-1:0]        start_addr,
  output logic                         busy,
  output logic                         done,
  output logic [15:0]                  err_count,
  // AXI4 read master
  output logic                         ar_valid,
  output axi_ar_t                      ar,
  input  logic                         ar_ready,
  input  logic                         r_valid,
  input  axi_r_t                       r,
  output logic                         r_ready,
  // write port into the loading buffer
  output logic                         wr_en,
  output logic [$clog2(ROWS)-1:0]      wr_row,
  output logic [1:0]                   wr_sub,
  output logic [$clog2(FRAME_W/8)-1:0] wr_word,
  output logic [AXI_DATA_W-1:0]        wr_data
);
  localparam int unsigned WORDS_PER_SUB = FRAME_W / 8;
  localparam int unsigned TOTAL_WORDS   = ROWS * 3 * WORDS_PER_SUB;
  localparam int unsigned BURSTS        = TOTAL_WORDS / BURST_LEN;

  initial begin
    assert (FRAME_W % 8 == 0) else $error("FRAME_W must be a multiple of 8");
    assert (TOTAL_WORDS % BURST_LEN == 0) else $error("block must be whole bursts");
  end

  typedef enum logic [1:0] {L_IDLE, L_ADDR, L_DATA, L_DONE} lstate_e;
  lstate_e state;

  logic [AXI_ADDR_W-1:0]        addr_q;
  logic [$clog2(BURSTS+1)-1:0]  bursts_left;
  logic [$clog2(ROWS)-1:0]      row_q;
  logic [1:0]                   sub_q;
  logic [$clog2(WORDS_PER_SUB)-1:0] word_q;

  assign busy     = (state != L_IDLE);
  assign done     = (state == L_DONE);
  assign ar_valid = (state == L_ADDR);
  assign ar.addr  = addr_q;
  assign ar.len   = 8'(BURST_LEN - 1);
  assign r_ready  = (state == L_DATA);

  assign wr_en   = (state == L_DATA) && r_valid;
  assign wr_row  = row_q;
  assign wr_sub  = sub_q;
  assign wr_word = word_q;
  assign wr_data = r.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= L_IDLE;
      addr_q      <= '0;
      bursts_left <= '0;
      row_q       <= '0;
      sub_q       <= '0;
      word_q      <= '0;
      err_count   <= '0;
    end else begin
      unique case (state)
        L_IDLE: if (start) begin
          state       <= L_ADDR;
          addr_q      <= start_addr;
          bursts_left <= ($clog2(BURSTS+1))'(BURSTS);
          row_q       <= '0;
          sub_q       <= '0;
          word_q      <= '0;
        end
        L_ADDR: if (ar_ready) begin
          state  <= L_DATA;
          addr_q <= addr_q + AXI_ADDR_W'(BURST_LEN * 8);
        end
        L_DATA: if (r_valid) begin
          if (r.resp != 2'b00) err_count <= err_count + 1'b1;
          // step word -> sub-row -> row
          if (word_q == ($clog2(WORDS_PER_SUB))'(WORDS_PER_SUB - 1)) begin
            word_q <= '0;
            if (sub_q == 2'd2) begin
              sub_q <= '0;
              row_q <= row_q + 1'b1;
            end else begin
              sub_q <= sub_q + 1'b1;
            end
          end else begin
            word_q <= word_q + 1'b1;
          end
          if (r.last) begin
            bursts_left <= bursts_left - 1'b1;
            state <= (bursts_left == 1) ? L_DONE : L_ADDR;
          end
        end
        L_DONE: state <= L_IDLE;
        default: state <= L_IDLE;
      endcase
    end
  end

  // AXI rule: a raised ARVALID stays up, with a stable address, until ARREADY.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ar_valid && !ar_ready |=> ar_valid && $stable(ar));
endmodule
