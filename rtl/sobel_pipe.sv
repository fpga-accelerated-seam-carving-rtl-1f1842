// sobel_pipe: pipelined partial-sum adders for the 3x3 Sobel operator.
//
// The row representation is read one 3-byte column (top a, middle b, bottom c)
// per cycle, so each column's share of the three Sobel outputs it touches is
// added as soon as it is read, following the document's partial equations:
//   X1 = a + 2b + c      (to the output left of the column)
//   X2 = 0               (to the output of the column itself)
//   X3 = -(a + 2b + c)   (to the output right of the column)
//   Y1 = Y3 = c - a,  Y2 = 2(c - a)
// Three registers per axis hold the running sums, as in the document's adder
// diagram: R4 <- X1(col n), R5 <- R4 + X2(col n), R6 <- R5 + X3(col n).  After
// three consecutive columns j-1, j, j+1 have entered, R6 holds the x response
// of column j and the matching y register the y response.  The x result is the
// standard Sobel Gx with its sign reversed, which the later norm ignores.
//
// Interface: in_valid/in_pix feed one column; a column is only accepted with
// in_valid.  out_valid rises once three columns have entered since clear.
// clear (one cycle, before a new row) empties the pipeline.
// Timing: after columns j-1, j, j+1 have entered, gx/gy (with out_valid) hold
// the response of column j in the cycle after column j+1 entered.
module sobel_pipe
  import seam_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  pix3_t               in_pix,
  output logic                out_valid,
  output logic signed [11:0]  gx,
  output logic signed [11:0]  gy
);
  logic signed [11:0] x1, x3, y1, y2;
  logic signed [11:0] r4, r5, r6;      // x partial sums
  logic signed [11:0] s4, s5, s6;      // y partial sums
  logic [1:0]         fill;

  always_comb begin
    x1 = 12'(in_pix.top) + (12'(in_pix.mid) << 1) + 12'(in_pix.bot);
    x3 = -x1;
    y1 = 12'(in_pix.bot) - 12'(in_pix.top);
    y2 = y1 <<< 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r4, r5, r6, s4, s5, s6} <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      {r4, r5, r6, s4, s5, s6} <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else if (in_valid) begin
      r4 <= x1;
      r5 <= r4;            // + X2, which is zero
      r6 <= r5 + x3;
      s4 <= y1;
      s5 <= s4 + y2;
      s6 <= s5 + y1;       // Y3 = Y1
      if (fill != 2'd3) fill <= fill + 1'b1;
      out_valid <= (fill >= 2'd2);
    end else begin
      out_valid <= 1'b0;
    end
  end

  assign gx = r6;
  assign gy = s6;
endmodule
