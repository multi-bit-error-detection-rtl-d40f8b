// tb_dmc_decoder - self-checking test of dmc_decoder.
//
// A list of test vectors (data word + error mask) is built first; each is
// encoded by the reference model, corrupted, applied to the decoder, and the
// decoder's data, syndrome and flags are compared with the brute-force
// reference decoder. Some vectors carry an extra expectation: clean words
// must pass untouched; every single data-bit error, the four published
// examples (D0; D0+D3; D0+D1+D2; D0..D3) and a 4-bit burst filling any row
// must be corrected; a single check-bit error must leave the data alone; the
// published examples must show the published syndrome bits. Every horizontal
// burst of 2..4 adjacent bits in a row and random 1..6-bit errors are
// compared with the reference; the number of located bursts is printed.
module tb_dmc_decoder;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  typedef enum logic [2:0] {
    K_ANY, K_CLEAN, K_CORRECT, K_CHECKBIT, K_BURST2, K_BURST3, K_BURST4
  } kind_e;

  typedef struct {
    logic [31:0] d;
    logic [45:0] err;
    kind_e       kind;
    logic        syn_known;
    logic [13:0] syn;
  } vec_t;

  vec_t        vecs[$];
  codeword_t   cw;
  data_t       data;
  syndrome_t   syn;
  dmc_status_t st;
  int          checks = 0;
  int          failures = 0;
  int          burst_ok[7];
  int          burst_tot[7];
  logic        clk = 1'b0;
  logic        ready = 1'b0;
  int          idx = 0;

  always #5 clk = ~clk;

  dmc_decoder dut (.cw_i(cw), .data_o(data), .syndrome_o(syn), .status_o(st));

  function automatic void add(logic [31:0] d, logic [45:0] err, kind_e k,
                              logic syn_known = 1'b0, logic [13:0] s = '0);
    vec_t v;
    v.d = d; v.err = err; v.kind = k; v.syn_known = syn_known; v.syn = s;
    vecs.push_back(v);
  endfunction

  function automatic void fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endfunction

  function automatic void check(vec_t v);
    ref_result_t r;
    logic [45:0] rx;
    rx = ref_encode(v.d) ^ v.err;
    r  = ref_decode(rx);
    checks++;
    if (data !== r.data || st.err_detected !== r.detected ||
        st.corrected !== r.corrected || st.uncorrectable !== r.uncorrectable ||
        st.check_bit_error !== r.check_bit_error ||
        {syn.m, syn.v} !== (ref_check(rx[31:0]) ^ rx[45:32]))
      fail($sformatf("vs reference: data=%h err=%h out=%h exp=%h st=%b", v.d, v.err,
                     data, r.data, st));
    case (v.kind)
      K_CLEAN: begin
        checks++;
        if (st != '0 || data != v.d) fail($sformatf("clean word %h", v.d));
      end
      K_CORRECT: begin
        checks++;
        if (!st.corrected || data != v.d) fail($sformatf("not corrected err=%h", v.err));
      end
      K_CHECKBIT: begin
        checks++;
        if (!st.check_bit_error || st.corrected || data != v.d)
          fail($sformatf("check bit err=%h", v.err));
      end
      K_BURST2, K_BURST3, K_BURST4: begin
        burst_tot[v.kind]++;
        if (st.corrected) burst_ok[v.kind]++;
      end
      default: ;
    endcase
    if (v.syn_known) begin
      checks++;
      if ({syn.m, syn.v} != v.syn)
        fail($sformatf("syndrome %b expected %b (err=%h)", {syn.m, syn.v}, v.syn, v.err));
    end
  endfunction

  initial begin
    #500000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] d;
    for (int i = 0; i < 50; i++) add($urandom(), '0, K_CLEAN);
    for (int b = 0; b < CW_W; b++)
      add($urandom(), 46'(1) << b, (b < DATA_W) ? K_CORRECT : K_CHECKBIT);
    // Published examples with the check bits they are said to disturb
    // (syndrome shown as {M9..M0, V3..V0}).
    d = $urandom();
    add(d, dbits(0),          K_CORRECT, 1'b1, {10'b01_0000_0001, 4'b0001});
    add(d, dbits(0, 3),       K_CORRECT, 1'b1, {10'b11_0000_0011, 4'b1001});
    add(d, dbits(0, 1, 2),    K_CORRECT, 1'b1, {10'b01_0000_0011, 4'b0111});
    add(d, dbits(0, 1, 2, 3), K_CORRECT, 1'b1, {10'b11_0000_0001, 4'b1111});
    for (int r = 0; r < ROWS; r++) add($urandom(), 46'hF << (4*r), K_CORRECT);
    for (int len = 2; len <= 4; len++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c + len <= COLS; c++)
          add($urandom(), ((46'(1) << len) - 1) << (4*r + c), kind_e'(32'(K_BURST2) + len - 2));
    for (int i = 0; i < 3000; i++) begin
      automatic logic [45:0] e = '0;
      automatic int n = 1 + $urandom_range(5);
      for (int k = 0; k < n; k++) e[$urandom_range(CW_W-1)] = 1'b1;
      add($urandom(), e, K_ANY);
    end

    ready = 1'b1;
  end

  // Apply one vector per clock; check it on the next edge. All checking runs
  // in this clocked process.
  always @(posedge clk) begin
    if (ready) begin
      if (idx > 0) check(vecs[idx-1]);
      if (idx < vecs.size()) begin
        cw <= ref_encode(vecs[idx].d) ^ vecs[idx].err;
        idx <= idx + 1;
      end else begin
        for (int len = 2; len <= 4; len++)
          $display("adjacent %0d-bit bursts located: %0d of %0d", len,
                   burst_ok[len + 2], burst_tot[len + 2]);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
