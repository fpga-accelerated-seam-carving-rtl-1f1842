// path_mem: the accumulation paths matrix, kept in COPIES identical copies.
//
// Stage 2 writes, for every pixel of rows 1..H-1, the column of the cheapest
// of the three pixels above it.  Stage 3 traces up to NSAR_MAX seams at the
// same time, each following its own chain of columns from the bottom row to
// the top, so each seam reads its own copy of the matrix: one write port
// feeds all copies, and every copy has its own read port.  The document gives
// the matrix, its frame size and the five copies; keeping the copies in step
// by writing them together (instead of copying the matrix after stage 2) is
// this design's choice.
//
// Interface: we/waddr/wdata write all copies (address row * FRAME_W + column);
// raddr[k]/rdata[k] read copy k.
// Timing: synchronous read, data one cycle after the address.
module path_mem
  import seam_pkg::*;
#(
  parameter int unsigned DEPTH  = 76800,     // FRAME_H * FRAME_W
  parameter int unsigned COPIES = 5
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  col_t                     wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr [COPIES],
  output col_t                     rdata [COPIES]
);
  for (genvar k = 0; k < COPIES; k++) begin : g_copy
    sdp_ram #(.WIDTH($bits(col_t)), .DEPTH(DEPTH)) u_copy (
      .clk, .we, .waddr, .wdata,
      .raddr(raddr[k]), .rdata(rdata[k])
    );
  end
endmodule
