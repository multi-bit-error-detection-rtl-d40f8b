// dmc_protected_mem - a word memory protected by the decimal matrix code.
//
// Writes pass through dmc_encoder, so each 32-bit word is stored as a 46-bit
// codeword (14 check bits). Reads return the stored codeword through
// dmc_decoder, which repairs single-bit errors and the in-row bursts of up
// to four adjacent bits that the code can locate, and reports what it found
// in rd_status and rd_syndrome. The upset port flips chosen bits of a stored
// codeword, standing in for radiation hits on the cells.
//
// Timing: a write takes effect at the clock edge with wr_en. rd_data,
// rd_status, rd_syndrome and rd_valid appear one clock after rd_en (the
// memory's read register); encoding and decoding are combinational around
// the array. Corrected data is returned but not written back.
// Encoder, memory and decoder in this order follow the source; the read
// latency, ports and the absence of write-back are this design's choices.
module dmc_protected_mem
  import dmc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  data_t           wr_data,
  input  logic            rd_en,
  input  logic [AW-1:0]   rd_addr,
  output data_t           rd_data,
  output logic            rd_valid,
  output dmc_status_t     rd_status,
  output syndrome_t       rd_syndrome,
  input  logic            upset_en,
  input  logic [AW-1:0]   upset_addr,
  input  logic [CW_W-1:0] upset_mask
);

  codeword_t wr_cw;
  codeword_t rd_cw;

  dmc_encoder u_enc (
    .data_i (wr_data),
    .cw_o   (wr_cw)
  );

  dmc_codeword_mem #(.DEPTH(DEPTH)) u_mem (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (wr_en),
    .wr_addr    (wr_addr),
    .wr_cw      (wr_cw),
    .rd_en      (rd_en),
    .rd_addr    (rd_addr),
    .rd_cw      (rd_cw),
    .rd_valid   (rd_valid),
    .upset_en   (upset_en),
    .upset_addr (upset_addr),
    .upset_mask (upset_mask)
  );

  dmc_decoder u_dec (
    .cw_i       (rd_cw),
    .data_o     (rd_data),
    .syndrome_o (rd_syndrome),
    .status_o   (rd_status)
  );

endmodule
