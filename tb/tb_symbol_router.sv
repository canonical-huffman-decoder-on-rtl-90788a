// tb_symbol_router: checks that header symbols are tagged with the right code
// length.
//
// For random complete codes (some with many empty lengths) the testbench loads
// the per-length counts, streams the symbols in header order with random gaps,
// and stalls the output at random. Every accepted symbol must come out
// unchanged, tagged with its length in the reference code, and `busy` must drop
// exactly after the last one. One symbol per cycle must pass when neither side
// stalls.
module tb_symbol_router;
  import chuff_pkg::*;
  import chuff_tb_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [CNT_W-1:0]       count [MAX_BITS+1];
  logic [CNT_W+LEN_W-1:0] total = '0;
  logic                   sym_valid = 0, sym_ready, out_valid, out_ready = 0, busy;
  logic [SYM_W-1:0]       sym_data = '0;
  sym_len_t               out_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  symbol_router dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(huff_code h, bit stalls);
    int sent, got, cycles;
    foreach (count[l]) count[l] = CNT_W'(h.cnt[l]);
    total = (CNT_W+LEN_W)'(h.n);
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    check(busy == 1'b1, "busy after load");
    sent = 0; got = 0; cycles = 0;
    while (got < h.n && cycles < 10000) begin
      sym_valid = (sent < h.n) && (!stalls || $urandom_range(3, 0) != 0);
      sym_data  = SYM_W'(h.sym[sent]);
      out_ready = !stalls || $urandom_range(3, 0) != 0;
      #1;
      check(sym_ready == out_ready, "ready passes through while busy");
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(out_data.sym == SYM_W'(h.sym[got]), "symbol unchanged");
        check(int'(out_data.len) == h.len[got],
              $sformatf("symbol %0d tagged %0d, expected %0d", got, out_data.len, h.len[got]));
        got++; sent++;
      end
      @(negedge clk);
      cycles++;
    end
    sym_valid = 0;
    check(got == h.n, "all symbols passed");
    check(busy == 1'b0, "busy drops after last symbol");
    if (!stalls) check(cycles == h.n, $sformatf("one symbol per cycle: %0d cycles for %0d", cycles, h.n));
  endtask

  initial begin
    static huff_code h = new;
    foreach (count[l]) count[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Worked example: A(1) B(2) C(3) D(3)
    h.clear(); h.cnt[1] = 1; h.cnt[2] = 1; h.cnt[3] = 2; h.n = 4;
    h.sym[0] = 65; h.sym[1] = 66; h.sym[2] = 67; h.sym[3] = 68;
    h.len[0] = 1; h.len[1] = 2; h.len[2] = 3; h.len[3] = 3;
    h.finish_code();
    run(h, 0);
    for (int t = 0; t < 30; t++) begin
      h.random_complete(int'($urandom_range(256, 2)), int'($urandom_range(15, 2)));
      run(h, t % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
