// axi_sdram_model: behavioural model of the HPS SDRAM seen through one
// FPGA-to-SDRAM AXI4 read port (not synthesizable, testbench only).
//
// It holds no memory: every byte is computed from its address with
// seam_ref_pkg::rowrep_byte, which describes the video array the HPS prepares
// (row representations of the synthetic test video starting at BASE).
// ARREADY and RVALID are held low on random cycles (about one in STALL_DIV) to
// exercise the handshakes; INCR bursts of 8-byte beats are answered in order,
// one burst at a time.  It counts accepted bursts and stall cycles.
module axi_sdram_model
  import seam_pkg::*;
#(
  parameter int unsigned H = 8,
  parameter int unsigned W = 16,
  parameter longint unsigned BASE = 64'h1000,
  parameter int unsigned STALL_DIV = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ar_valid,
  input  axi_ar_t ar,
  output logic    ar_ready,
  output logic    r_valid,
  output axi_r_t  r,
  input  logic    r_ready,
  output int      bursts,
  output int      stalls
);
  logic        busy;
  longint      addr;
  int          left;

  function automatic logic [63:0] beat(longint a);
    logic [63:0] d;
    for (int k = 0; k < 8; k++) d[k*8 +: 8] = 8'(seam_ref_pkg::rowrep_byte(a - longint'(BASE) + k, H, W));
    return d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; ar_ready <= 1'b0; r_valid <= 1'b0; r <= '0;
      addr <= 0; left <= 0; bursts <= 0; stalls <= 0;
    end else begin
      if (!busy) begin
        if (ar_valid && ar_ready) begin
          busy     <= 1'b1;
          addr     <= longint'(ar.addr);
          left     <= int'(ar.len) + 1;
          ar_ready <= 1'b0;
          bursts   <= bursts + 1;
        end else begin
          ar_ready <= ($urandom % STALL_DIV) != 0;
          if (ar_valid && !ar_ready) stalls <= stalls + 1;
        end
      end else begin
        if (r_valid && r_ready) begin
          r_valid <= 1'b0;
          if (r.last) busy <= 1'b0;
        end else if (!r_valid && left > 0) begin
          if (($urandom % STALL_DIV) != 0) begin
            r_valid <= 1'b1;
            r.data  <= beat(addr);
            r.resp  <= 2'b00;
            r.last  <= (left == 1);
            addr    <= addr + 8;
            left    <= left - 1;
          end else begin
            stalls <= stalls + 1;
          end
        end
      end
    end
  end
endmodule
