// tb_dmc_encoder - self-checking test of dmc_encoder.
//
// Compares the codeword with the index-list reference model for walking-one
// data, all-zero/all-one words and random words, and checks the published
// single-bit examples: flipping D0 must change exactly V0, M0 and M8, and
// flipping D1 must give a column pattern V = 0100 (V1 only).
module tb_dmc_encoder;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  data_t     data;
  codeword_t cw;
  int        checks = 0;
  int        failures = 0;

  dmc_encoder dut (.data_i(data), .cw_o(cw));

  task automatic check_word(data_t d);
    data = d;
    #1;
    checks++;
    if (cw !== ref_encode(d)) begin
      failures++;
      $display("FAIL data=%h cw=%h expected=%h", d, cw, ref_encode(d));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] base, diff;
    check_word('0);
    check_word('1);
    for (int i = 0; i < DATA_W; i++) check_word(data_t'(1) << i);
    for (int i = 0; i < 2000; i++) check_word($urandom());

    // Published example: D0 in error shows in M0, V0 and M8.
    data = 32'h0; #1; base = {cw.m, cw.v};
    data = 32'h1; #1; diff = {cw.m, cw.v} ^ base;
    checks++;
    if (diff != {10'b01_0000_0001, 4'b0001}) begin
      failures++;
      $display("FAIL D0 example diff=%b", diff);
    end
    // D1 in error: V syndrome 0100 read as V0..V3 (column 1).
    data = 32'h2; #1; diff = {cw.m, cw.v} ^ base;
    checks++;
    if (diff[3:0] != 4'b0010) begin
      failures++;
      $display("FAIL D1 example V diff=%b", diff[3:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
