// tb_bitstream_buffer: checks bitstream buffering and index forming.
//
// A random bitstream is sent in 16-bit chunks with random gaps, the last chunk
// flagged. A consumer takes random bit counts (1..max_len) whenever
// index_valid is high, sometimes pausing. Each time, `index` must equal the
// next max_len bits of the reference stream at the consumer's position, with
// zeros read past its end, and index_valid must be high exactly when max_len
// bits are buffered or the stream has ended. Several max_len values are used.
module tb_bitstream_buffer;
  import chuff_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic [LEN_W-1:0] max_len = 4'd15;
  logic in_valid = 0, in_last = 0, in_ready;
  logic [IN_W-1:0] in_data = '0;
  logic index_valid, eos;
  logic [MAX_BITS-1:0] index;
  logic [5:0] fill;
  logic consume = 0;
  logic [LEN_W-1:0] consume_len = '0;

  int checks = 0, failures = 0;
  bit stream [$];
  int sent_words, pos;

  always #5 clk = ~clk;

  bitstream_buffer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_index(int p, int ml);
    int v = 0;
    for (int b = 0; b < ml; b++) v = (v << 1) | ((p + b < stream.size()) ? int'(stream[p + b]) : 0);
    return v;
  endfunction

  task automatic run(int nwords, int ml);
    int taken, pad_used;
    stream.delete();
    for (int i = 0; i < nwords * 16; i++) stream.push_back(1'($urandom));
    max_len = LEN_W'(ml);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    sent_words = 0; pos = 0; taken = 0; pad_used = 0;
    while (pos < nwords * 16 + ml) begin
      in_valid = (sent_words < nwords) && $urandom_range(2, 0) != 0;
      for (int b = 0; b < 16; b++) in_data[15 - b] = stream[(sent_words % nwords) * 16 + b];
      in_last = (sent_words == nwords - 1);
      consume = index_valid && $urandom_range(3, 0) != 0;
      consume_len = LEN_W'($urandom_range(ml, 1));
      #1;
      check(index_valid == (eos || int'(fill) >= ml), "index_valid rule");
      check(int'(fill) == sent_words * 16 - pos || (eos && fill == 0), "fill level");
      if (index_valid) begin
        check(int'(index) == ref_index(pos, ml),
              $sformatf("index %0h exp %0h at bit %0d", index, ref_index(pos, ml), pos));
        if (pos + ml > nwords * 16) pad_used++;
      end
      @(posedge clk);
      if (in_valid && in_ready) sent_words++;
      if (consume) pos += int'(consume_len);
      @(negedge clk);
    end
    in_valid = 0; consume = 0;
    check(eos == 1'b1, "end of stream seen");
    check(pad_used > 0, "zero padding reached");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) run(int'($urandom_range(60, 1)), (t < 10) ? 15 : int'($urandom_range(15, 1)));
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
