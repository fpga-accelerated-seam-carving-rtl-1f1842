// min_k_picker: keeps the K smallest values of a stream and where they came from.
//
// Used in the Pick state of stage 3: the last accumulation row is streamed in,
// one cell per cycle, and the picker ends up holding the K cheapest seam end
// points, sorted from the cheapest.  It is a chain of K comparator slots, each
// holding a value and its column.  Every slot compares the incoming value
// with its own at once; the first slot whose value is larger (or that is
// still empty) takes the new value, and the slots behind it shift down by one.
// Equal values keep their arrival order, so the smaller column wins a tie.
// The document asks for a series of comparators that yields the columns of
// the minima; this insertion chain, one value per cycle, is this design's form.
//
// Interface: clear empties all slots; in_valid/in_val/in_col offer one value.
// val/col/vld give the slots, slot 0 the smallest.
// Timing: a value is in the slots one cycle after it is offered.
module min_k_picker
  import seam_pkg::*;
#(
  parameter int unsigned K = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  acc_t in_val,
  input  col_t in_col,
  output acc_t val [K],
  output col_t col [K],
  output logic vld [K]
);
  logic lt [K];
  always_comb begin
    for (int i = 0; i < K; i++) lt[i] = !vld[i] || (in_val < val[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        val[i] <= '0; col[i] <= '0; vld[i] <= 1'b0;
      end
    end else if (clear) begin
      for (int i = 0; i < K; i++) vld[i] <= 1'b0;
    end else if (in_valid) begin
      for (int i = 0; i < K; i++) begin
        if (lt[i]) begin
          if (i == 0 || !lt[i-1]) begin
            val[i] <= in_val; col[i] <= in_col; vld[i] <= 1'b1;
          end else begin
            val[i] <= val[i-1]; col[i] <= col[i-1]; vld[i] <= vld[i-1];
          end
        end
      end
    end
  end
endmodule
