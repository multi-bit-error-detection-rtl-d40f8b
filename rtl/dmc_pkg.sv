// dmc_pkg - shared types, sizes and parity-equation helpers of the decimal
// matrix code (DMC) for 32-bit memory words.
//
// The 32 data bits D0..D31 are laid out row by row in an 8 x 4 matrix:
// D(4r+c) sits in row r, column c. Fourteen check bits protect them:
//   V0..V3  vertical parity of each column (XOR of its 8 bits),
//   M2k     XOR of columns 0,1,2 of rows k and k+4 (k = 0..3),
//   M2k+1   XOR of columns 1,3   of rows k and k+4,
//   M8, M9  XOR of the bits on two interleaved diagonal ("DNA") strands,
//           chosen so that in each row pair (k, k+4) and each column exactly
//           one of the two bits lies on a strand.
// The column/row layout, V, M0, M2k and the M8/M9 bit lists follow the
// published code; the exact M2k+1 column set (columns 1 and 3) is this
// design's reading of the worked error examples.
// Codeword layout: {M9..M0, V3..V0, D31..D0}, 46 bits.
package dmc_pkg;

  localparam int unsigned ROWS   = 8;
  localparam int unsigned COLS   = 4;
  localparam int unsigned DATA_W = ROWS * COLS;     // 32
  localparam int unsigned V_W    = COLS;            // 4
  localparam int unsigned M_W    = 10;
  localparam int unsigned CHK_W  = V_W + M_W;       // 14
  localparam int unsigned CW_W   = DATA_W + CHK_W;  // 46

  // Columns used by the two row-pair parity bits (bit c = column c).
  localparam logic [COLS-1:0] M_EVEN_COLS = 4'b0111;  // M0, M2, M4, M6
  localparam logic [COLS-1:0] M_ODD_COLS  = 4'b1010;  // M1, M3, M5, M7

  // Diagonal strands: M8 = D0^D5^D10^D15^D20^D23^D29^D30,
  //                   M9 = D3^D6^D9^D12^D17^D18^D24^D27.
  localparam logic [DATA_W-1:0] M8_MASK = 32'h6090_8421;
  localparam logic [DATA_W-1:0] M9_MASK = 32'h0906_1248;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [V_W-1:0]    vbits_t;
  typedef logic [M_W-1:0]    mbits_t;

  typedef struct packed {
    mbits_t m;  // M9..M0
    vbits_t v;  // V3..V0
    data_t  d;  // D31..D0
  } codeword_t;

  typedef struct packed {
    mbits_t m;
    vbits_t v;
  } syndrome_t;

  // Decoder outcome flags.
  typedef struct packed {
    logic err_detected;    // syndrome is non-zero
    logic corrected;       // a data row was located and repaired
    logic uncorrectable;   // data errors that could not be located
    logic check_bit_error; // single flipped check bit, data is intact
  } dmc_status_t;

  // Four-bit slice of row r.
  function automatic logic [COLS-1:0] row_bits(data_t d, int unsigned r);
    return d[r*COLS +: COLS];
  endfunction

  // Vertical parities V0..V3.
  function automatic vbits_t calc_v(data_t d);
    vbits_t v = '0;
    for (int unsigned r = 0; r < ROWS; r++) v ^= row_bits(d, r);
    return v;
  endfunction

  // Horizontal parity-sharing bits M0..M9.
  function automatic mbits_t calc_m(data_t d);
    mbits_t m = '0;
    for (int unsigned k = 0; k < ROWS / 2; k++) begin
      m[2*k]   = ^((row_bits(d, k) ^ row_bits(d, k + ROWS/2)) & M_EVEN_COLS);
      m[2*k+1] = ^((row_bits(d, k) ^ row_bits(d, k + ROWS/2)) & M_ODD_COLS);
    end
    m[8] = ^(d & M8_MASK);
    m[9] = ^(d & M9_MASK);
    return m;
  endfunction

  function automatic codeword_t encode(data_t d);
    codeword_t cw;
    cw.d = d;
    cw.v = calc_v(d);
    cw.m = calc_m(d);
    return cw;
  endfunction

endpackage
