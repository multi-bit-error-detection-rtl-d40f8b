// dmc_codeword_mem - array that stores the 46-bit decimal-matrix codewords.
//
// One synchronous write port, one synchronous read port (rd_cw and rd_valid
// appear on the clock edge after rd_en) and an upset port. The upset port
// XORs upset_mask into the word at upset_addr, modelling a radiation-induced
// multiple cell upset in the stored bits; if it hits the word being written
// in the same cycle the flips land on the new data. The array itself has no
// reset (like an SRAM); only the read register and rd_valid are reset by
// rst_n (active low, synchronous to clk).
// The source only says the codewords are held in memory: depth, ports,
// read latency and the upset port are this design's own choices.
module dmc_codeword_mem
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wr_en,
  input  logic [AW-1:0] wr_addr,
  input  codeword_t wr_cw,
  input  logic      rd_en,
  input  logic [AW-1:0] rd_addr,
  output codeword_t rd_cw,
  output logic      rd_valid,
  input  logic      upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [CW_W-1:0] upset_mask
);

  codeword_t mem [DEPTH];

  logic hit_write;
  assign hit_write = upset_en && wr_en && (upset_addr == wr_addr);

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_addr] <= wr_cw ^ (hit_write ? upset_mask : '0);
    if (upset_en && !hit_write)
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_cw    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en) rd_cw <= mem[rd_addr];
    end
  end

`ifndef SYNTHESIS
  // Addresses must stay inside the array when DEPTH is not a power of two.
  always_ff @(posedge clk) begin
    if (wr_en)    assert (32'(wr_addr) < DEPTH)    else $error("dmc_codeword_mem: write address out of range");
    if (rd_en)    assert (32'(rd_addr) < DEPTH)    else $error("dmc_codeword_mem: read address out of range");
    if (upset_en) assert (32'(upset_addr) < DEPTH) else $error("dmc_codeword_mem: upset address out of range");
  end
`endif

endmodule
