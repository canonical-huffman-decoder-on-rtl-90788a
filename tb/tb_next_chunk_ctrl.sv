// tb_next_chunk_ctrl: checks symbol decoding against a model LUT and buffer.
//
// The testbench models the bitstream buffer (a bit queue read at the current
// position, with random starvation) and the memory controller (a LUT built
// from the reference code, one-cycle read latency, random refusals of the
// grant). For random codes and messages the decoded symbols must match the
// message, the consumed bit counts must match the code lengths, and with no
// stalls each symbol must take exactly two cycles.
module tb_next_chunk_ctrl;
  import chuff_pkg::*;
  import chuff_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy;
  logic [31:0] num_syms = '0;
  logic index_valid = 0, consume, rd_req, rd_gnt, rd_valid = 0, sym_push, sym_space = 1;
  logic [MAX_BITS-1:0] index, rd_addr;
  logic [LEN_W-1:0] consume_len;
  lut_word_t rd_data;
  logic [SYM_W-1:0] sym_data;

  int checks = 0, failures = 0;
  huff_code h;
  bit stream [$];
  int msg [$];
  int pos, got;
  bit stall, refuse;

  always #5 clk = ~clk;

  next_chunk_ctrl dut (.*);

  function automatic int ref_index(int p, int ml);
    int v = 0;
    for (int b = 0; b < ml; b++) v = (v << 1) | ((p + b < stream.size()) ? int'(stream[p + b]) : 0);
    return v;
  endfunction

  // Buffer model: the window at `pos`, sometimes starved.
  always_comb index = MAX_BITS'(ref_index(pos, h.maxlen));
  assign rd_gnt = rd_req && !refuse;

  always @(posedge clk) begin
    rd_valid <= rd_gnt;
    if (rd_gnt) rd_data <= lut_word_t'(16'(h.lut_entry(int'(rd_addr))));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sym_push) begin
      check(sym_space, "push only with space");
      check(got < msg.size() && int'(sym_data) == msg[got],
            $sformatf("symbol %0d = %0d exp %0d", got, sym_data, msg[got % (msg.size() + 1)]));
      check(consume && int'(consume_len) == h.len[h.idx_of[msg[got]]], "consumed bits = code length");
      pos <= pos + int'(consume_len);
      got <= got + 1;
    end
  end

  task automatic run(int nmsg, bit stalls);
    int cycles;
    stream.delete(); msg.delete();
    for (int i = 0; i < nmsg; i++) begin
      msg.push_back(h.sym[$urandom_range(h.n - 1, 0)]);
      h.encode(msg[i], stream);
    end
    pos = 0; got = 0;
    @(negedge clk); start = 1; num_syms = 32'(nmsg);
    @(negedge clk); start = 0;
    cycles = 0;
    while (busy && cycles < 100000) begin
      stall       = stalls && $urandom_range(3, 0) == 0;
      index_valid = !stall;
      // output space only shrinks through the decoder's own pushes
      if (!rd_valid) sym_space = !(stalls && $urandom_range(4, 0) == 0);
      refuse      = stalls && $urandom_range(4, 0) == 0;
      @(negedge clk);
      cycles++;
    end
    index_valid = 0; refuse = 0; sym_space = 1;
    check(got == nmsg, $sformatf("decoded %0d of %0d", got, nmsg));
    check(pos == stream.size(), "all bits consumed");
    if (!stalls) check(cycles == 2 * nmsg, $sformatf("%0d cycles for %0d symbols", cycles, nmsg));
  endtask

  initial begin
    h = new;
    rd_data = '0; refuse = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      h.random_complete(int'($urandom_range(256, 2)), int'($urandom_range(15, 2)));
      run(int'($urandom_range(300, 1)), t % 2 == 1);
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
