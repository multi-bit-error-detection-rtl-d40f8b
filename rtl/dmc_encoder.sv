// dmc_encoder - decimal matrix code encoder, 32 data bits to a 46-bit codeword.
//
// The data word is viewed as an 8 x 4 matrix (row r holds D4r..D4r+3). The
// encoder appends four column parities V0..V3 and ten horizontal
// parity-sharing bits M0..M9; every check bit is a plain XOR tree, see
// dmc_pkg for the equations. Rows k and k+4 share the pair M2k/M2k+1, and the
// two diagonal strands M8/M9 tell the two rows of a pair apart.
//
// Interface: data_i (D0 = bit 0) in, cw_o = {M9..M0, V3..V0, D31..D0} out.
// The code is systematic: the 32 data bits pass straight through into the
// codeword, only the 14 check bits are computed.
// Timing: purely combinational, no clock; one XOR tree of at most 8 inputs.
// The equations follow the published code; the codeword bit order and the
// column set of M1/M3/M5/M7 are this design's own choices.
module dmc_encoder
  import dmc_pkg::*;
(
  input  data_t     data_i,
  output codeword_t cw_o
);

  assign cw_o = encode(data_i);

  // The packed codeword must hold exactly the data and the 14 check bits.
  if ($bits(codeword_t) != CW_W) begin : g_width_check
    $error("dmc_encoder: codeword width mismatch");
  end

endmodule
