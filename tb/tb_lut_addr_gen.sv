// tb_lut_addr_gen: checks that the LUT builder fills exactly the right entries.
//
// For random complete codes (and the four-symbol worked example) the records
// (symbol, length, codeword) are fed with random gaps. Every write is captured
// into a model of the table. Afterwards each of the 2^max_len indices must
// hold {length, symbol} of the one codeword that is a prefix of it, every index
// must have been written exactly once, and the build must take one cycle per
// written entry when the records are offered back to back.
module tb_lut_addr_gen;
  import chuff_pkg::*;
  import chuff_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [LEN_W-1:0]    max_len = '0;
  logic                in_valid = 0, in_ready, wr_en, idle;
  sym_code_t           in_data;
  logic [MAX_BITS-1:0] wr_addr;
  lut_word_t           wr_data;

  int checks = 0, failures = 0;
  int model [1 << MAX_BITS];
  int hits  [1 << MAX_BITS];
  int writes;

  always #5 clk = ~clk;

  lut_addr_gen dut (.*);

  always @(posedge clk) if (rst_n && wr_en) begin
    model[wr_addr] <= int'({wr_data.len, wr_data.sym});
    hits[wr_addr]  <= hits[wr_addr] + 1;
    writes         <= writes + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(huff_code h, bit gaps);
    int i, cycles, bad, size;
    size = 1 << h.maxlen;
    for (int a = 0; a < size; a++) begin model[a] = -1; hits[a] = 0; end
    writes = 0;
    max_len = LEN_W'(h.maxlen);
    i = 0; cycles = 0;
    @(negedge clk);
    while (i < h.n || !idle) begin
      in_valid = (i < h.n) && (!gaps || $urandom_range(2, 0) != 0);
      in_data  = '{sym: SYM_W'(h.sym[i % 256]), len: LEN_W'(h.len[i % 256]), code: MAX_BITS'(h.code[i % 256])};
      @(posedge clk);
      if (in_valid && in_ready) i++;
      @(negedge clk);
      cycles++;
    end
    in_valid = 0;
    @(negedge clk);
    check(writes == size, $sformatf("%0d writes for %0d entries", writes, size));
    if (!gaps) check(cycles == size + 1, $sformatf("build took %0d cycles for %0d entries", cycles, size));
    bad = 0;
    for (int a = 0; a < size; a++)
      if (model[a] != h.lut_entry(a) || hits[a] != 1) bad++;
    check(bad == 0, $sformatf("%0d of %0d LUT entries wrong (max_len %0d)", bad, size, h.maxlen));
  endtask

  initial begin
    static huff_code h = new;
    in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    h.clear(); h.cnt[1] = 1; h.cnt[2] = 1; h.cnt[3] = 2; h.n = 4;
    h.sym[0] = 65; h.sym[1] = 66; h.sym[2] = 67; h.sym[3] = 68;
    h.len[0] = 1; h.len[1] = 2; h.len[2] = 3; h.len[3] = 3;
    h.finish_code();
    run(h, 0);
    // Figure-style table: 000-011 A, 100-101 B, 110 C, 111 D.
    check(model[0] == 'h141 && model[3] == 'h141 && model[4] == 'h242 &&
          model[5] == 'h242 && model[6] == 'h343 && model[7] == 'h344, "worked example table");
    for (int t = 0; t < 24; t++) begin
      h.random_complete(int'($urandom_range(256, 2)), (t < 4) ? 15 : int'($urandom_range(12, 2)));
      run(h, t % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
