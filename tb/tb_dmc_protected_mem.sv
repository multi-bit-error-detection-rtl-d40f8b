// tb_dmc_protected_mem - end-to-end test of the DMC-protected memory.
//
// Runs the top at its default size. Each round writes a random word, hits
// the stored codeword through the upset port with an error of one class,
// reads it back and compares rd_data, rd_status and rd_syndrome with the
// reference model applied to a shadow copy of the stored codeword. Rounds
// walk over every address and cycle through the error classes: none, one
// data bit, a 4-bit burst filling a row, a 2- or 3-bit adjacent burst, the
// published D0+D3 pair, one check bit, two bits in the same column. The read
// latency (rd_valid one clock after rd_en) is checked on every read. Each
// decoder outcome - clean, corrected single bit, corrected multi-bit burst,
// check-bit error, uncorrectable - must occur at least once.
module tb_dmc_protected_mem;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned ROUNDS = 400;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            wr_en = 1'b0, rd_en = 1'b0, upset_en = 1'b0;
  logic [AW-1:0]   wr_addr = '0, rd_addr = '0, upset_addr = '0;
  data_t           wr_data = '0;
  logic [CW_W-1:0] upset_mask = '0;
  data_t           rd_data;
  logic            rd_valid;
  dmc_status_t     rd_status;
  syndrome_t       rd_syndrome;

  dmc_protected_mem dut (.*);

  logic [CW_W-1:0] shadow [DEPTH];
  int              phase = 0;
  int              round = 0;
  int              reset_cycles = 0;
  logic [AW-1:0]   addr;
  int              checks = 0;
  int              failures = 0;
  int              n_clean = 0, n_single = 0, n_burst = 0, n_checkbit = 0, n_uncorr = 0;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endfunction

  function automatic logic [CW_W-1:0] error_of_class(int cls);
    int unsigned r = $urandom_range(ROWS-1);
    int unsigned len;
    case (cls)
      0: return '0;
      1: return CW_W'(1) << $urandom_range(DATA_W-1);
      2: return CW_W'(4'hF) << (4*r);
      3: begin
        len = 2 + $urandom_range(1);
        return ((CW_W'(1) << len) - 1) << (4*r + $urandom_range(COLS - len));
      end
      4: return dbits(0, 3);
      5: return CW_W'(1) << (DATA_W + $urandom_range(CHK_W-1));
      default: return (CW_W'(1) << (4*r)) | (CW_W'(1) << (4*((r+1) % ROWS)));
    endcase
  endfunction

  function automatic void check_read();
    ref_result_t exp = ref_decode(shadow[addr]);
    checks++;
    if (rd_valid !== 1'b1) fail("rd_valid not high one clock after rd_en");
    checks++;
    if (rd_data !== exp.data || rd_status.err_detected !== exp.detected ||
        rd_status.corrected !== exp.corrected ||
        rd_status.uncorrectable !== exp.uncorrectable ||
        rd_status.check_bit_error !== exp.check_bit_error ||
        {rd_syndrome.m, rd_syndrome.v} !== (ref_check(shadow[addr][31:0]) ^ shadow[addr][45:32]))
      fail($sformatf("round %0d addr %0d: data=%h exp=%h status=%b", round, addr,
                     rd_data, exp.data, rd_status));
    if (!exp.detected) n_clean++;
    else if (exp.corrected && $countones(shadow[addr][31:0] ^ exp.data) == 1) n_single++;
    else if (exp.corrected) n_burst++;
    else if (exp.check_bit_error) n_checkbit++;
    else n_uncorr++;
  endfunction

  always @(posedge clk) begin
    wr_en    <= 1'b0;
    rd_en    <= 1'b0;
    upset_en <= 1'b0;
    if (!rst_n) begin
      reset_cycles <= reset_cycles + 1;
      if (reset_cycles == 3) rst_n <= 1'b1;
    end else begin
      // rd_valid must be low except one clock after a read.
      if (phase != 4) begin
        checks++;
        if (rd_valid !== 1'b0) fail("rd_valid high without a read");
      end
      case (phase)
        0: begin
          addr = AW'(round % DEPTH);
          wr_en   <= 1'b1;
          wr_addr <= addr;
          wr_data <= $urandom();
          phase   <= 1;
        end
        1: begin
          shadow[addr] = ref_encode(wr_data);
          upset_en   <= 1'b1;
          upset_addr <= addr;
          upset_mask <= error_of_class(round % 7);
          phase      <= 2;
        end
        2: begin
          shadow[addr] = shadow[addr] ^ upset_mask;
          rd_en   <= 1'b1;
          rd_addr <= addr;
          phase   <= 3;
        end
        3: phase <= 4;  // rd_en is sampled at the end of this clock
        default: begin
          check_read();
          round++;
          phase <= 0;
          if (round == ROUNDS) begin
            $display("outcomes: clean=%0d single=%0d burst=%0d check_bit=%0d uncorrectable=%0d",
                     n_clean, n_single, n_burst, n_checkbit, n_uncorr);
            checks += 5;
            if (n_clean == 0)    fail("no clean read");
            if (n_single == 0)   fail("no single-bit correction");
            if (n_burst == 0)    fail("no multi-bit burst correction");
            if (n_checkbit == 0) fail("no check-bit error");
            if (n_uncorr == 0)   fail("no uncorrectable error");
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      endcase
    end
  end
endmodule
