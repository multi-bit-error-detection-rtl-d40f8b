// dmc_ref_pkg - reference model of the decimal matrix code for testbenches.
//
// Written independently of the RTL. Each data bit D(i), in row i/4 and
// column i%4 of the 8 x 4 matrix, gets a 14-bit signature {M9..M0, V3..V0}
// listing the check bits whose equations contain it:
//   V(c)               its column c,
//   M(2*(row%4))       if c is 0, 1 or 2,
//   M(2*(row%4)+1)     if c is 1 or 3,
//   M8 for D0 D5 D10 D15 D20 D23 D29 D30, M9 for D3 D6 D9 D12 D17 D18 D24 D27.
// The check bits of a word are the XOR of the signatures of its set bits.
// Decoding is brute force: for each row, the column pattern from the V
// syndrome is placed in that row and its syndrome compared with the observed
// one. Loop bounds are variables so that the simulator keeps the loops.
package dmc_ref_pkg;

  int unsigned n_bits = 32;
  int unsigned n_rows = 8;

  typedef struct {
    logic [31:0] data;
    logic        detected;
    logic        corrected;
    logic        uncorrectable;
    logic        check_bit_error;
  } ref_result_t;

  function automatic logic [13:0] ref_sig(int unsigned i);
    logic [3:0] v = '0;
    logic [9:0] m = '0;
    int unsigned r = i / 4;
    int unsigned c = i % 4;
    v[c] = 1'b1;
    if (c inside {0, 1, 2}) m[2*(r%4)]   = 1'b1;
    if (c inside {1, 3})    m[2*(r%4)+1] = 1'b1;
    if (i inside {0, 5, 10, 15, 20, 23, 29, 30}) m[8] = 1'b1;
    if (i inside {3, 6, 9, 12, 17, 18, 24, 27})  m[9] = 1'b1;
    return {m, v};
  endfunction

  // Returns {M9..M0, V3..V0} for a data word.
  function automatic logic [13:0] ref_check(logic [31:0] d);
    logic [13:0] chk = '0;
    for (int unsigned i = 0; i < n_bits; i++)
      if (d[i]) chk ^= ref_sig(i);
    return chk;
  endfunction

  function automatic logic [45:0] ref_encode(logic [31:0] d);
    return {ref_check(d), d};
  endfunction

  function automatic ref_result_t ref_decode(logic [45:0] cw);
    ref_result_t res;
    logic [13:0] syn;
    logic [3:0]  sv;
    int          hits = 0;
    int          hit_row = 0;
    syn = ref_check(cw[31:0]) ^ cw[45:32];
    sv  = syn[3:0];
    for (int unsigned r = 0; r < n_rows; r++)
      if (sv != 0 && ref_check(32'(sv) << (4*r)) == syn) begin
        hits++;
        hit_row = int'(r);
      end
    res.data            = cw[31:0];
    res.detected        = (syn != 0);
    res.corrected       = 1'b0;
    res.check_bit_error = ($countones(syn) == 1);
    if (hits == 1) begin
      res.data      = cw[31:0] ^ (32'(sv) << (4*hit_row));
      res.corrected = 1'b1;
    end
    res.uncorrectable = res.detected && !res.corrected && !res.check_bit_error;
    return res;
  endfunction

  // Codeword mask flipping the listed data bits.
  function automatic logic [45:0] dbits(int a, int b = -1, int c = -1, int d = -1);
    logic [45:0] m = '0;
    m[a] = 1'b1;
    if (b >= 0) m[b] = 1'b1;
    if (c >= 0) m[c] = 1'b1;
    if (d >= 0) m[d] = 1'b1;
    return m;
  endfunction

endpackage
