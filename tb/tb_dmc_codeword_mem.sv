// tb_dmc_codeword_mem - self-checking test of dmc_codeword_mem.
//
// Keeps a shadow copy of the array. Each clock it issues a random mix of
// write, read and upset (including an upset on the word being written), and
// checks that rd_cw equals the shadow word and rd_valid is high exactly one
// clock after rd_en (one-cycle read latency). Reset must clear rd_valid.
module tb_dmc_codeword_mem;
  import dmc_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            wr_en = 1'b0, rd_en = 1'b0, upset_en = 1'b0;
  logic [AW-1:0]   wr_addr = '0, rd_addr = '0, upset_addr = '0;
  codeword_t       wr_cw = '0;
  logic [CW_W-1:0] upset_mask = '0;
  codeword_t       rd_cw;
  logic            rd_valid;

  logic [CW_W-1:0] shadow [DEPTH];
  logic [CW_W-1:0] exp_q;
  logic            exp_valid = 1'b0;
  int              cycle = 0;
  int              checks = 0;
  int              failures = 0;
  int              n_same_addr_upsets = 0;

  dmc_codeword_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (cycle == 2) begin
      checks++;
      if (rd_valid !== 1'b0) begin failures++; $display("FAIL rd_valid after reset"); end
      rst_n <= 1'b1;
    end
    if (rst_n) begin
      // Check the read issued on the previous edge.
      checks++;
      if (rd_valid !== exp_valid) begin
        failures++; $display("FAIL rd_valid=%b exp=%b cycle %0d", rd_valid, exp_valid, cycle);
      end
      if (exp_valid) begin
        checks++;
        if (rd_cw !== exp_q) begin
          failures++; $display("FAIL rd_cw=%h exp=%h cycle %0d", rd_cw, exp_q, cycle);
        end
      end
      // Model this edge: read sees the array before the edge's updates.
      exp_valid <= rd_en;
      if (rd_en) exp_q <= shadow[rd_addr];
      if (wr_en) shadow[wr_addr] = wr_cw;
      if (upset_en) shadow[upset_addr] = shadow[upset_addr] ^ upset_mask;
      if (wr_en && upset_en && wr_addr == upset_addr) n_same_addr_upsets++;
      // Next stimulus; first DEPTH cycles fill the array.
      if (cycle < DEPTH + 4) begin
        wr_en    <= 1'b1;
        wr_addr  <= AW'(cycle - 3);
        wr_cw    <= CW_W'({$urandom(), $urandom()});
        rd_en    <= 1'b0;
        upset_en <= 1'b0;
      end else if (cycle < 600) begin
        wr_en      <= $urandom_range(1) == 1;
        wr_addr    <= AW'($urandom());
        wr_cw      <= CW_W'({$urandom(), $urandom()});
        rd_en      <= $urandom_range(1) == 1;
        rd_addr    <= AW'($urandom());
        upset_en   <= $urandom_range(3) == 0;
        upset_addr <= ($urandom_range(3) == 0) ? AW'(wr_addr) : AW'($urandom());
        upset_mask <= CW_W'({$urandom(), $urandom()});
      end else begin
        checks++;
        if (n_same_addr_upsets == 0) begin
          failures++; $display("FAIL no upset coincided with a write");
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
