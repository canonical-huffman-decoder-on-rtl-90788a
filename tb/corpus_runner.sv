// corpus_runner: one decoder instance and the workload sequence used by
// tb_corpus_workloads.
//
// It generates stand-ins for the kinds of files found in the usual
// lossless-compression corpora (see tb_corpus_workloads), builds a Huffman code
// for each from its byte frequencies (lengths limited to 15), sends header and
// bitstream through a chuff_decoder_top with the given UNROLL, and compares
// every decoded byte. It also checks that the starting codewords take
// ceil(14/UNROLL) cycles and decoding two cycles per byte, and prints bits per
// byte and cycle counts per workload. `finished` rises when all are done;
// `checks` and `failures` count the comparisons.
module corpus_runner #(
  parameter int unsigned UNROLL = 14
) (
  output int   checks,
  output int   failures,
  output logic finished
);
  import chuff_pkg::*;
  import chuff_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] num_syms = '0;
  logic hdr_valid = 0, hdr_ready, bs_valid = 0, bs_last = 0, bs_ready;
  logic [15:0] hdr_data = '0, bs_data = '0;
  logic sym_valid, sym_ready = 0, busy, done;
  logic [7:0] sym_data;
  logic [LEN_W-1:0] max_len;
  logic [MAX_BITS:0] lut_words;

  int dec_cycles, build_cycles, sc_cycles;

  always #5 clk = ~clk;

  chuff_decoder_top #(.UNROLL(UNROLL)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.busy) dec_cycles++;
    if (dut.u_start.state == dut.u_start.S_COMPUTE) sc_cycles++;
    if (dut.state == dut.T_SYMS || dut.state == dut.T_BUILD) build_cycles++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(string name, int msg[$]);
    huff_code    h = new;
    int          f [256];
    bit          stream [$];
    logic [15:0] words [$];
    logic [15:0] hdr [$];
    int          got;
    foreach (f[i]) f[i] = 0;
    foreach (msg[i]) f[msg[i]]++;
    h.from_freq(f);
    for (int l = 1; l <= 15; l++) hdr.push_back(16'(h.cnt[l]));
    for (int i = 0; i < h.n; i++) hdr.push_back(16'(h.sym[i]));
    foreach (msg[i]) h.encode(msg[i], stream);
    pack16(stream, words);
    dec_cycles = 0; build_cycles = 0; sc_cycles = 0; got = 0;
    @(negedge clk); start = 1; num_syms = 32'(msg.size());
    @(negedge clk); start = 0;
    fork
      begin
        foreach (hdr[i]) begin
          hdr_valid = 1; hdr_data = hdr[i];
          @(posedge clk);
          while (!hdr_ready) @(posedge clk);
          @(negedge clk);
        end
        hdr_valid = 0;
      end
      begin
        foreach (words[i]) begin
          bs_valid = 1; bs_data = words[i]; bs_last = (i == words.size() - 1);
          @(posedge clk);
          while (!bs_ready) @(posedge clk);
          @(negedge clk);
        end
        bs_valid = 0; bs_last = 0;
      end
      begin
        sym_ready = 1;
        while (got < msg.size()) begin
          @(posedge clk);
          if (sym_valid) begin
            check(int'(sym_data) == msg[got], $sformatf("%s: byte %0d = %0d expected %0d", name, got, sym_data, msg[got]));
            got++;
          end
          @(negedge clk);
        end
        sym_ready = 0;
      end
    join
    while (busy) @(negedge clk);
    check(got == msg.size(), {name, ": all bytes decoded"});
    check(int'(max_len) == h.maxlen, {name, ": LUT width"});
    check(sc_cycles == (14 + int'(UNROLL) - 1) / int'(UNROLL),
          $sformatf("%s: starting codewords took %0d cycles with UNROLL=%0d", name, sc_cycles, UNROLL));
    check(dec_cycles == 2 * msg.size(), $sformatf("%s: %0d decode cycles for %0d bytes", name, dec_cycles, msg.size()));
    $display("UNROLL=%0d %-10s bytes=%0d symbols_in_code=%0d max_len=%0d bits/byte=%0.2f lut_build_cycles=%0d decode_cycles=%0d",
             UNROLL, name, msg.size(), h.n, h.maxlen, real'(stream.size()) / msg.size(), build_cycles, dec_cycles);
  endtask

  initial begin
    int msg [$];
    static string words [16] = '{"the ", "of ", "and ", "a ", "to ", "in ", "is ", "that ",
                          "decoder ", "table ", "code ", "length ", "symbol, ", "bits. ", "Huffman ", "\n"};
    string w;
    int    r;
    checks = 0; failures = 0; finished = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    msg.delete(); repeat (3000) msg.push_back("a");
    run("aaa", msg);

    msg.delete(); for (int i = 0; i < 3000; i++) msg.push_back("a" + i % 26);
    run("alphabet", msg);

    msg.delete(); repeat (3000) msg.push_back(32 + int'($urandom_range(94, 0)));
    run("random", msg);

    msg.delete();
    while (msg.size() < 4000) begin
      // Zipf-like choice of words: low indices much more likely.
      r = int'($urandom_range(15, 0));
      r = (r * int'($urandom_range(15, 0))) / 15;
      w = words[r];
      for (int c = 0; c < w.len(); c++) msg.push_back(int'(w[c]));
    end
    run("text", msg);

    msg.delete();
    repeat (4000) begin
      r = int'($urandom_range(9, 0));
      msg.push_back(int'((r < 3) ? "a" : (r < 6) ? "t" : (r < 8) ? "g" : "c"));
    end
    run("genome", msg);

    msg.delete();
    repeat (4000) begin
      r = int'($urandom_range(255, 0));
      // skewed: small values common, every value possible
      msg.push_back((r * int'($urandom_range(255, 0)) * int'($urandom_range(255, 0))) / (255 * 255));
    end
    run("binary", msg);

    finished = 1;
  end
endmodule
