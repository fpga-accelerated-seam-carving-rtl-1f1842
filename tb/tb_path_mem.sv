// tb_path_mem: one write reaches every copy; each copy is read through its
// own port at a different address in the same cycle.
module tb_path_mem;
  import seam_pkg::*;
  localparam int D = 60, K = 5;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0;
  col_t wdata = 0;
  logic [5:0] raddr [K];
  col_t rdata [K];
  col_t model [D];
  int checks = 0, failures = 0;

  path_mem #(.DEPTH(D), .COPIES(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (raddr[k]) raddr[k] = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = col_t'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      int a [K];
      @(negedge clk);
      foreach (a[k]) begin a[k] = $urandom % D; raddr[k] = 6'(a[k]); end
      @(posedge clk); #1;
      foreach (a[k]) begin
        checks++;
        if (rdata[k] != model[a[k]]) begin failures++; $display("FAIL copy %0d addr %0d", k, a[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
