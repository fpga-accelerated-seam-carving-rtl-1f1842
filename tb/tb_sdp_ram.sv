// tb_sdp_ram: writes random words, reads them back with one cycle latency,
// and checks read-during-write returns the old word.
module tb_sdp_ram;
  localparam int D = 200;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [9:0] wdata = 0, rdata;
  logic [9:0] model [D];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(10), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = 10'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      int a;
      logic [9:0] exp;
      a = $urandom % D;
      @(negedge clk);
      raddr = 8'(a);
      exp = model[a];
      we = ($urandom % 2) == 0; waddr = (we && ($urandom % 2 == 0)) ? 8'(a) : 8'($urandom % D); wdata = 10'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata != exp) begin failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
