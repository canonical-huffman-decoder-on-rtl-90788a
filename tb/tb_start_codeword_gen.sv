// tb_start_codeword_gen: checks the starting-codeword generator.
//
// Three instances run side by side with the recurrence unrolled 14, 7 and 1
// times. Each trial streams 15 per-length counts, from random complete codes
// and from arbitrary count vectors, with random gaps in cnt_valid. The starting
// codewords are compared with the closed form sum_{k<L} count(k) * 2^(L-k);
// max_len and the symbol total are checked too, and so is the latency from the
// last count to `done`: ceil(14/UNROLL) cycles.
module tb_start_codeword_gen;
  import chuff_pkg::*;
  import chuff_tb_pkg::*;

  localparam int NU = 3;
  localparam int UNR [NU] = '{14, 7, 1};

  logic clk = 0, rst_n = 0, clear = 0;
  logic cnt_valid = 0;
  logic [CNT_W-1:0] cnt_data = '0;
  logic [NU-1:0] cnt_ready, done;
  logic [MAX_BITS:0]      start_code [NU][MAX_BITS+1];
  logic [CNT_W-1:0]       count      [NU][MAX_BITS+1];
  logic [LEN_W-1:0]       max_len    [NU];
  logic [CNT_W+LEN_W-1:0] total      [NU];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NU; g++) begin : g_dut
    start_codeword_gen #(.UNROLL(UNR[g])) dut (
      .clk, .rst_n, .clear, .cnt_valid, .cnt_data, .cnt_ready(cnt_ready[g]),
      .done(done[g]), .start_code(start_code[g]), .count(count[g]),
      .max_len(max_len[g]), .total_syms(total[g])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_trial(int c[16]);
    int lat [NU];
    int exp_code, exp_max, exp_tot;
    bit seen [NU];
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int l = 1; l <= 15; l++) begin
      cnt_valid = 0;
      while ($urandom_range(3, 0) == 0) @(negedge clk);
      cnt_valid = 1; cnt_data = CNT_W'(c[l]);
      check(cnt_ready == '1, "cnt_ready low while loading");
      @(negedge clk);
    end
    cnt_valid = 0;
    foreach (lat[u]) begin lat[u] = 0; seen[u] = 0; end
    for (int cyc = 1; cyc <= 20; cyc++) begin
      for (int u = 0; u < NU; u++)
        if (done[u] && !seen[u]) begin seen[u] = 1; lat[u] = cyc - 1; end
      @(negedge clk);
    end
    exp_max = 0; exp_tot = 0;
    for (int l = 1; l <= 15; l++) begin
      exp_tot += c[l];
      if (c[l] != 0) exp_max = l;
    end
    for (int u = 0; u < NU; u++) begin
      check(seen[u], $sformatf("U=%0d never done", UNR[u]));
      check(lat[u] == (14 + UNR[u] - 1) / UNR[u],
            $sformatf("U=%0d latency %0d", UNR[u], lat[u]));
      check(int'(max_len[u]) == exp_max, $sformatf("U=%0d max_len %0d exp %0d", UNR[u], max_len[u], exp_max));
      check(int'(total[u]) == exp_tot, $sformatf("U=%0d total %0d exp %0d", UNR[u], total[u], exp_tot));
      for (int l = 1; l <= 15; l++) begin
        exp_code = 0;
        for (int k = 1; k < l; k++) exp_code += c[k] << (l - k);
        exp_code &= 'hFFFF;
        check(int'(start_code[u][l]) == exp_code,
              $sformatf("U=%0d L=%0d code %0d exp %0d", UNR[u], l, start_code[u][l], exp_code));
        check(int'(count[u][l]) == c[l], "count echo");
      end
    end
  endtask

  initial begin
    static huff_code h = new;
    int c[16];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // The worked example: counts 1, 1, 2 -> starting codes 0, 2 (10), 6 (110).
    foreach (c[i]) c[i] = 0;
    c[1] = 1; c[2] = 1; c[3] = 2;
    run_trial(c);
    check(start_code[0][2] == 2 && start_code[0][3] == 6, "worked example");
    for (int t = 0; t < 40; t++) begin
      if (t % 2 == 0) begin
        h.random_complete(int'($urandom_range(256, 2)), int'($urandom_range(15, 8)));
        c = h.cnt;
      end else begin
        foreach (c[i]) c[i] = (i == 0) ? 0 : int'($urandom_range(20, 0));
      end
      run_trial(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
