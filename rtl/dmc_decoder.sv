// dmc_decoder - decimal matrix code decoder and corrector.
//
// How it works: the check bits are recomputed from the received data and
// XORed with the received ones, giving a 4-bit V syndrome and a 10-bit M
// syndrome. The V syndrome is the column pattern e of the error (an odd
// number of flips in a column shows as a 1). Assuming all data errors lie in
// one row, the decoder predicts, for each of the 8 rows, the M syndrome that
// pattern e in that row would produce (M pair of the row pair, plus the two
// diagonal strands). If exactly one row's prediction equals the observed M
// syndrome, that row is XORed with e. This repairs any single-bit error and
// the in-row bursts the code can locate, including the 4-bit burst filling a
// whole row.
//
// Outcome flags (status_o):
//   err_detected    any syndrome bit set
//   corrected       one row located and repaired
//   check_bit_error syndrome of weight one: a single check bit flipped (every
//                   data bit enters one V and at least one M equation, so a
//                   data error never gives weight one); data passes as read
//   uncorrectable   any other non-zero syndrome; data passes as read
//
// Interface: cw_i = {M9..M0, V3..V0, D31..D0}; data_o, syndrome_o = {M, V}.
// Timing: purely combinational.
// The syndrome and the column-then-row search follow the published
// procedure; the uniqueness test and the three error classes are this
// design's own, as the source describes decoding only by example.
module dmc_decoder
  import dmc_pkg::*;
(
  input  codeword_t   cw_i,
  output data_t       data_o,
  output syndrome_t   syndrome_o,
  output dmc_status_t status_o
);

  vbits_t          sv;
  mbits_t          sm;
  logic [ROWS-1:0] row_match;
  logic [ROWS-1:0] row_fix;
  logic [3:0]      match_cnt;
  logic [4:0]      syn_weight;

  assign sv = calc_v(cw_i.d) ^ cw_i.v;
  assign sm = calc_m(cw_i.d) ^ cw_i.m;

  // Predicted M syndrome for column pattern sv in each row.
  always_comb begin
    mbits_t          pred;
    logic [COLS-1:0] m8_row, m9_row;
    row_match = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      m8_row = row_bits(M8_MASK, r);
      m9_row = row_bits(M9_MASK, r);
      pred = '0;
      pred[2*(r % (ROWS/2))]     = ^(sv & M_EVEN_COLS);
      pred[2*(r % (ROWS/2)) + 1] = ^(sv & M_ODD_COLS);
      pred[8] = ^(sv & m8_row);
      pred[9] = ^(sv & m9_row);
      row_match[r] = (sv != '0) && (sm == pred);
    end
  end

  always_comb begin
    match_cnt = '0;
    for (int unsigned r = 0; r < ROWS; r++) match_cnt += 4'(row_match[r]);
    syn_weight = 5'($countones({sm, sv}));
  end

  assign row_fix = (match_cnt == 4'd1) ? row_match : '0;

  always_comb begin
    data_o = cw_i.d;
    for (int unsigned r = 0; r < ROWS; r++)
      if (row_fix[r]) data_o[r*COLS +: COLS] = cw_i.d[r*COLS +: COLS] ^ sv;
  end

  assign syndrome_o = '{m: sm, v: sv};

  always_comb begin
    status_o.err_detected    = (syn_weight != 5'd0);
    status_o.corrected       = (row_fix != '0);
    status_o.check_bit_error = (syn_weight == 5'd1);
    status_o.uncorrectable   = status_o.err_detected && !status_o.corrected
                               && !status_o.check_bit_error;
  end

  if ($bits(codeword_t) != CW_W) begin : g_width_check
    $error("dmc_decoder: codeword width mismatch");
  end

`ifndef SYNTHESIS
  // Exactly one outcome class whenever an error is seen.
  always_comb
    if (status_o.err_detected)
      assert ($onehot({status_o.corrected, status_o.uncorrectable,
                       status_o.check_bit_error}))
        else $error("dmc_decoder: inconsistent status flags");
`endif

endmodule
