// sync_fifo: the "buffer queue" of the seam-carving accelerator.
//
// A single-clock first-in first-out queue.  Stage 1 uses one per lane to hold
// compared energy values until they are written back into embedded memory;
// stage 3 uses one to hold the seam pixel indices until the HPS reads them.
// The document names the queue but not its construction: this is a plain
// circular buffer with a write pointer, a read pointer and an occupancy count.
//
// Interface: push/push_data enter a word when not full; the head word is
// always visible on pop_data while not empty, and pop removes it.  A push and
// a pop may happen in the same cycle, also when the queue is full (the pop
// frees the slot).  push while full (without pop) and pop while empty are
// ignored; assertions flag them.
// Timing: a pushed word is visible at pop_data one cycle later.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  input  logic             pop,
  output logic [WIDTH-1:0] pop_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_pop, do_push;
  assign empty   = (count == 0);
  assign full    = (32'(count) == DEPTH);
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign pop_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  // The users of the queue never overfill it or read it empty.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
