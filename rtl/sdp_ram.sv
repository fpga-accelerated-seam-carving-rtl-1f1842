// sdp_ram: simple dual-port embedded memory (one write port, one read port).
//
// Used for the frame-sized final energy map, each copy of the accumulation
// paths matrix and each lane's per-pixel energy state.  It is written as an
// array so that synthesis maps it onto embedded memory blocks (M10K on the
// Cyclone V the design targets).
//
// Interface: we/waddr/wdata write one word; raddr is sampled every cycle and
// the word appears on rdata one cycle later (synchronous read).  A read of the
// address being written in the same cycle returns the old word.
// The memory is not cleared by reset; its users write a word before reading it.
module sdp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 76800   // 240 x 320: one frame
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
