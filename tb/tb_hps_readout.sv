// tb_hps_readout: HPS-side AXI reads of STATUS, SEAM (popping a queue model,
// including reads of an empty queue) and an unmapped address, with RREADY
// back-pressure.
module tb_hps_readout;
  import seam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ar_valid = 0, ar_ready, r_valid, r_ready = 0;
  logic [11:0] ar_addr = 0;
  logic [63:0] r_data;
  logic [1:0] r_resp;
  seam_row_t q_head;
  logic q_empty, q_pop, finish = 0;
  logic [15:0] q_count;
  logic [2:0] nsar = 3;
  stage_e stage = ST_STAGE3;
  seam_row_t model [$];
  int checks = 0, failures = 0;

  hps_readout #(.ADDR_W(12)) dut (.*);
  always #5 clk = ~clk;
  assign q_empty = (model.size() == 0);
  assign q_count = 16'(model.size());
  assign q_head  = q_empty ? '0 : model[0];
  always @(posedge clk) if (q_pop) void'(model.pop_front());

  task automatic axi_read(input logic [11:0] a, output logic [63:0] d, output logic [1:0] resp);
    @(negedge clk); ar_valid = 1; ar_addr = a;
    do @(posedge clk); while (!ar_ready);
    #1 ar_valid = 0;
    repeat ($urandom % 3) @(negedge clk);
    @(negedge clk); r_ready = 1;
    do @(posedge clk); while (!r_valid);
    d = r_data; resp = r_resp;
    #1 r_ready = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] d;
    logic [1:0] resp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      seam_row_t e;
      e.row = row_t'(i);
      for (int k = 0; k < NSAR_MAX; k++) e.cols[k] = col_t'($urandom);
      model.push_back(e);
    end
    finish = 1; stage = ST_FINISH;
    axi_read(12'h000, d, resp);
    checks++;
    if (resp != 0 || d[15:0] != 16'd20 || d[18:16] != 3'd3 || d[24] != 1'b1 || d[27:25] != 3'(ST_FINISH))
      begin failures++; $display("FAIL status %h", d); end
    for (int i = 0; i < 22; i++) begin
      seam_row_t exp;
      logic had;
      had = model.size() > 0;
      exp = had ? model[0] : '0;
      axi_read(12'h008, d, resp);
      checks++;
      if (resp != 0 || d[63] != had || (had && d[52:0] != 53'(exp))) begin
        failures++; $display("FAIL seam read %0d: %h", i, d);
      end
      if (i < 20) begin
        checks++;
        if (int'(d[52:45]) != i) begin failures++; $display("FAIL row order"); end
      end
    end
    axi_read(12'h010, d, resp);
    checks++;
    if (resp != 2'b10) begin failures++; $display("FAIL unmapped resp %0d", resp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
