// seam_pkg: types and constants shared by the video seam-carving accelerator.
//
// The accelerator works on 8-bit grey-scale frames of 240 rows by 320 columns
// by default (module parameters FRAME_H and FRAME_W).
// Energies are stored as one byte per pixel, like a frame, so every energy map
// has the same size as a frame.  Accumulated seam costs need 16 bits
// (240 rows x 255).  Column indices need 9 bits for 320 columns.  Up to 5
// seams are found per algorithmic run (NSAR, "number of seams per algorithmic
// run"): 1 = high quality, 3 = medium, 5 = low quality / fastest.
//
// The AXI types carry only the fields the read-only masters and slaves of this
// design use (no ID, lock, cache, prot, QoS).  Widths of the counters and the
// exact AXI subset are choices of this implementation.
package seam_pkg;

  localparam int unsigned PIX_W     = 8;    // grey-scale pixel and energy width
  localparam int unsigned ACC_W     = 16;   // accumulated seam cost width
  localparam int unsigned COL_W     = 9;    // column index width (320 columns)
  localparam int unsigned ROW_W     = 8;    // row index width (240 rows)
  localparam int unsigned NSAR_MAX  = 5;    // most seams per algorithmic run
  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 64;  // FPGA-to-SDRAM and HPS-to-FPGA reads

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [ACC_W-1:0] acc_t;
  typedef logic [COL_W-1:0] col_t;
  typedef logic [ROW_W-1:0] row_t;

  // One column of a "row representation": the pixel above, the pixel itself
  // and the pixel below, read from embedded memory as one 3-byte block.
  typedef struct packed {
    pix_t top;
    pix_t mid;
    pix_t bot;
  } pix3_t;

  // Per-pixel state kept by stage 1 across all frames of the video.
  typedef struct packed {
    pix_t spatial;   // largest spatial (Sobel) energy so far
    pix_t prev;      // pixel value in the previous frame
    pix_t temporal;  // largest frame-to-frame difference so far
  } px_state_t;

  // Phases of the top-level controller.
  typedef enum logic [2:0] {
    ST_STAGE1 = 3'd1,
    ST_STAGE2 = 3'd2,
    ST_STAGE3 = 3'd3,
    ST_FINISH = 3'd4
  } stage_e;

  // One entry of the seam index queue: a row and, for each seam, the column
  // of the pixel of that row the seam removes.  53 bits fit one 64-bit read.
  typedef struct packed {
    row_t                      row;
    logic [NSAR_MAX-1:0][COL_W-1:0] cols;
  } seam_row_t;

  // AXI4 read address channel payload (INCR bursts of 8-byte beats).
  typedef struct packed {
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;   // beats - 1
  } axi_ar_t;

  // AXI4 read data channel payload.
  typedef struct packed {
    logic [AXI_DATA_W-1:0] data;
    logic [1:0]            resp;
    logic                  last;
  } axi_r_t;

endpackage
