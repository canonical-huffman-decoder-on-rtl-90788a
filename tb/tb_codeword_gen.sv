// tb_codeword_gen: checks the per-length codeword generators.
//
// The generators are loaded with starting codewords computed in closed form,
// then fed the symbols of random complete codes in header order, tagged with
// their lengths, with random output stalls. Each record must carry the symbol,
// its length and the codeword the reference assigns with the sequential rule
// code(i) = (code(i-1) + 1) << (len(i) - len(i-1)). A stalled record must not
// advance its generator.
module tb_codeword_gen;
  import chuff_pkg::*;
  import chuff_tb_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  logic [MAX_BITS:0] start_code [MAX_BITS+1];
  logic      in_valid = 0, in_ready, out_valid, out_ready = 0;
  sym_len_t  in_data;
  sym_code_t out_data;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  codeword_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(huff_code h);
    int i;
    foreach (start_code[l]) start_code[l] = (MAX_BITS+1)'(h.first_code(l));
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    i = 0;
    while (i < h.n) begin
      in_valid  = $urandom_range(4, 0) != 0;
      in_data   = '{sym: SYM_W'(h.sym[i]), len: LEN_W'(h.len[i])};
      out_ready = $urandom_range(3, 0) != 0;
      #1;
      check(out_valid == in_valid && in_ready == out_ready, "handshake passes through");
      if (in_valid) begin
        check(out_data.sym == SYM_W'(h.sym[i]) && int'(out_data.len) == h.len[i], "symbol and length joined");
        check(int'(out_data.code) == h.code[i],
              $sformatf("symbol %0d code %0h expected %0h", i, out_data.code, h.code[i]));
      end
      @(posedge clk);
      if (in_valid && out_ready) i++;
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    static huff_code h = new;
    foreach (start_code[l]) start_code[l] = '0;
    in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    h.clear(); h.cnt[1] = 1; h.cnt[2] = 1; h.cnt[3] = 2; h.n = 4;
    h.sym[0] = 65; h.sym[1] = 66; h.sym[2] = 67; h.sym[3] = 68;
    h.len[0] = 1; h.len[1] = 2; h.len[2] = 3; h.len[3] = 3;
    h.finish_code();
    check(h.code[2] == 6 && h.code[3] == 7, "reference: C=110, D=111");
    run(h);
    for (int t = 0; t < 30; t++) begin
      h.random_complete(int'($urandom_range(256, 2)), int'($urandom_range(15, 2)));
      run(h);
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
