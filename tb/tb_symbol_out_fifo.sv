// tb_symbol_out_fifo: checks the decoded-symbol output buffer.
//
// Random pushes (only when `space` is high, as the decoder does) and random
// pops are compared with a queue model: data order, fill count, `space` and
// out_valid. Bursts fill it completely and drain it.
module tb_symbol_out_fifo;
  logic clk = 0, rst_n = 0, push = 0, space, out_valid, out_ready = 0;
  logic [7:0] push_data = '0, out_data;
  logic [2:0] count;

  int checks = 0, failures = 0, fulls = 0;
  int q [$];

  always #5 clk = ~clk;

  symbol_out_fifo dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int pp, pr;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      // alternate phases biased to fill and to drain
      pp = ((i / 50) % 2 == 0) ? 3 : 1;
      pr = ((i / 50) % 2 == 0) ? 1 : 3;
      #1;
      check(int'(count) == q.size(), "count");
      check(space == (q.size() < 4), "space");
      check(out_valid == (q.size() != 0), "out_valid");
      if (q.size() != 0) check(int'(out_data) == q[0], $sformatf("head %0d exp %0d", out_data, q[0]));
      if (q.size() == 4) fulls++;
      push      = space && $urandom_range(3, 0) < pp;
      push_data = 8'($urandom);
      out_ready = $urandom_range(3, 0) < pr;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (push) q.push_back(int'(push_data));
      @(negedge clk);
    end
    check(fulls > 0, "buffer filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
