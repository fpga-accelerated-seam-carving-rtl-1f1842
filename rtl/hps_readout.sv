// hps_readout: the Final stage, the port through which the HPS reads the seams.
//
// The ARM core reads the seam pixel indices from the FPGA over the
// HPS-to-FPGA bridge with 64-bit AXI reads.  This is the FPGA side of those
// reads: a read-only AXI slave with two 64-bit registers.
//   0x00 STATUS  [15:0] entries waiting in the seam index queue,
//                [18:16] number of seams per run (NSAR) of the result,
//                [24] finish (all seams found), [27:25] stage.
//   0x08 SEAM    reading it takes the oldest queue entry: [63] valid,
//                [52:45] row, [44:0] five 9-bit columns, seam k in
//                bits [9k+8:9k]; unused seams read as 511.  An empty queue
//                reads valid = 0.
// Other addresses answer SLVERR.  The document gives the 64-bit AXI read
// path and the serial hand-over of the indices; the register map is this
// design's.  All ADDR_W address bits are decoded.
//
// Interface: AXI read address (ar_valid/ar_ready/ar_addr) and read data
// (r_valid/r_ready/r_data/r_resp, single beats) channels; q_* is the head of
// the seam index queue.
// Timing: one read outstanding; the data is valid the cycle after the address
// is accepted and the queue entry is removed at the address handshake.
module hps_readout
  import seam_pkg::*;
#(
  parameter int unsigned ADDR_W = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ar_valid,
  output logic              ar_ready,
  input  logic [ADDR_W-1:0] ar_addr,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [63:0]       r_data,
  output logic [1:0]        r_resp,
  input  seam_row_t         q_head,
  input  logic              q_empty,
  input  logic [15:0]       q_count,
  output logic              q_pop,
  input  logic              finish,
  input  logic [2:0]        nsar,
  input  stage_e            stage
);
  logic ar_hs;
  assign ar_ready = !r_valid;
  assign ar_hs    = ar_valid && ar_ready;
  assign q_pop    = ar_hs && (ar_addr == ADDR_W'(8)) && !q_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_data  <= '0;
      r_resp  <= 2'b00;
    end else begin
      if (ar_hs) begin
        r_valid <= 1'b1;
        r_resp  <= 2'b00;
        unique case (ar_addr)
          ADDR_W'(0): r_data <= {36'd0, stage, finish, 5'd0, nsar, q_count};
          ADDR_W'(8): r_data <= q_empty ? 64'd0 : {1'b1, 10'd0, q_head};
          default: begin
            r_data <= '0;
            r_resp <= 2'b10;
          end
        endcase
      end else if (r_valid && r_ready) begin
        r_valid <= 1'b0;
      end
    end
  end

  // AXI rule: RVALID stays up with stable data until RREADY.
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    r_valid && !r_ready |=> r_valid && $stable(r_data));
endmodule
