// row_buffer: double-buffered embedded memory for one lane's row representation.
//
// Each lane of stage 1 owns one row of the half frame being processed.  Its
// row representation (the row above, the row itself, the row below) is kept
// in two banks: the load FSM fills one bank while the processing FSM reads
// the other (double buffering, one bank = one memory block in the document's
// memory budget).  Each sub-row is a memory of 64-bit words so that a whole
// SDRAM beat (8 columns of one sub-row) is written at once; a read returns the
// 3-byte block (top, middle, bottom) of one column, which is how the document
// reads the row representation.  The word organisation is this design's.
//
// Interface: write port wr_en/wr_bank/wr_sub/wr_word/wr_data (sub 0 top,
// 1 middle, 2 bottom); read port rd_bank/rd_col.
// Timing: rd_pix is the column addressed one cycle earlier.
module row_buffer
  import seam_pkg::*;
#(
  parameter int unsigned FRAME_W = 320
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic                         wr_bank,
  input  logic [1:0]                   wr_sub,
  input  logic [$clog2(FRAME_W/8)-1:0] wr_word,
  input  logic [AXI_DATA_W-1:0]        wr_data,
  input  logic                         rd_bank,
  input  logic [$clog2(FRAME_W)-1:0]   rd_col,
  output pix3_t                        rd_pix
);
  localparam int unsigned WORDS = FRAME_W / 8;
  localparam int unsigned WA    = $clog2(WORDS);
  localparam int unsigned CA    = $clog2(FRAME_W);

  logic [AXI_DATA_W-1:0] mem_t [2][WORDS];
  logic [AXI_DATA_W-1:0] mem_m [2][WORDS];
  logic [AXI_DATA_W-1:0] mem_b [2][WORDS];
  logic [AXI_DATA_W-1:0] q_t, q_m, q_b;
  logic [2:0]            byte_sel;

  logic [WA-1:0] rword;
  assign rword = rd_col[CA-1:3];

  always_ff @(posedge clk) begin
    if (wr_en && wr_sub == 2'd0) mem_t[wr_bank][wr_word] <= wr_data;
    if (wr_en && wr_sub == 2'd1) mem_m[wr_bank][wr_word] <= wr_data;
    if (wr_en && wr_sub == 2'd2) mem_b[wr_bank][wr_word] <= wr_data;
    q_t      <= mem_t[rd_bank][rword];
    q_m      <= mem_m[rd_bank][rword];
    q_b      <= mem_b[rd_bank][rword];
    byte_sel <= rd_col[2:0];
  end

  // Byte k of a beat is column 8*word + k (little-endian, as the HPS stores it).
  assign rd_pix.top = q_t[byte_sel*8 +: 8];
  assign rd_pix.mid = q_m[byte_sel*8 +: 8];
  assign rd_pix.bot = q_b[byte_sel*8 +: 8];
endmodule
