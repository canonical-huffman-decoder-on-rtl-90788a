// tb_chuff_decoder_top: end-to-end test of the canonical Huffman decoder at
// its default parameters (15-bit codes, 64 KB LUT, recurrence unrolled 14x).
//
// Each block sends a header (15 per-length counts, then the symbols in
// canonical order) and a bitstream encoded by the reference model, and checks
// every decoded byte against the message. Blocks used, in order:
//   * the four-symbol worked example (counts 1,1,2; A B C D; bits 11011110000,
//     five symbols) which must decode to C D B A A;
//   * a code with lengths 1..15, which fills all 2^15 LUT words;
//   * random complete codes with longest length 2..15, one of them 15;
//   * codes built with Huffman's algorithm from skewed byte frequencies.
// Half of the blocks stall the header, bitstream and output streams at
// random. For blocks without stalls, the LUT build must write exactly
// 2^max_len words and decoding must take two cycles per symbol.
// Mechanisms that must each occur at least once: multi-entry LUT fill, a
// skipped empty code length, prefetch of the bitstream while the LUT is being
// built, the decoder waiting for bitstream bits, output back-pressure, zero
// padding at the end of a stream, a one-cycle unrolled starting-code
// computation and a LUT rebuilt for a following block.
module tb_chuff_decoder_top;
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

  int checks = 0, failures = 0;

  // mechanism counters
  int n_lut_expand = 0, n_len_skip = 0, n_prefetch = 0, n_bit_wait = 0;
  int n_out_bp = 0, n_pad = 0, n_unroll1 = 0, n_rebuild = 0;
  int dec_cycles = 0, build_cycles = 0;

  always #5 clk = ~clk;

  chuff_decoder_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_addr.in_valid && dut.u_addr.in_ready && dut.u_addr.in_data.len < max_len) n_lut_expand++;
    if (dut.u_router.fire && dut.u_router.remaining == 1 &&
        dut.u_router.nxt_len > dut.u_router.cur_len + 1) n_len_skip++;
    if (bs_valid && bs_ready && (dut.state == dut.T_COUNTS || dut.state == dut.T_SYMS ||
                                 dut.state == dut.T_BUILD)) n_prefetch++;
    if (dut.u_dec.state == dut.u_dec.S_ISSUE && !dut.index_valid) n_bit_wait++;
    if (dut.u_dec.state == dut.u_dec.S_ISSUE && dut.index_valid && !dut.sym_space) n_out_bp++;
    if (dut.rd_req && dut.eos && dut.bfill < 6'(max_len)) n_pad++;
    if (dut.u_start.state == dut.u_start.S_COMPUTE && dut.u_start.chain_bits[14] > 15 &&
        dut.u_start.bits == 2) n_unroll1++;
    if (dut.u_dec.busy) dec_cycles++;
    if (dut.state == dut.T_SYMS || dut.state == dut.T_BUILD) build_cycles++;
  end

  task automatic run_block(huff_code h, int msg[$], bit stalls, int bits_override = -1);
    bit          stream [$];
    logic [15:0] words  [$];
    logic [15:0] hdr    [$];
    int          got;
    for (int l = 1; l <= 15; l++) hdr.push_back(16'(h.cnt[l]));
    for (int i = 0; i < h.n; i++) hdr.push_back(16'(h.sym[i]));
    foreach (msg[i]) h.encode(msg[i], stream);
    if (bits_override >= 0) while (stream.size() < bits_override) stream.push_back(0);
    pack16(stream, words);
    dec_cycles = 0; build_cycles = 0;
    @(negedge clk); start = 1; num_syms = 32'(msg.size());
    @(negedge clk); start = 0;
    got = 0;
    fork
      begin : header
        foreach (hdr[i]) begin
          hdr_valid = 0;
          while (stalls && $urandom_range(3, 0) == 0) @(negedge clk);
          hdr_valid = 1; hdr_data = hdr[i];
          @(posedge clk);
          while (!hdr_ready) @(posedge clk);
          @(negedge clk);
        end
        hdr_valid = 0;
      end
      begin : bitstream
        foreach (words[i]) begin
          bs_valid = 0;
          while (stalls && $urandom_range(9, 0) < 8) @(negedge clk);
          bs_valid = 1; bs_data = words[i]; bs_last = (i == words.size() - 1);
          @(posedge clk);
          while (!bs_ready) @(posedge clk);
          @(negedge clk);
        end
        bs_valid = 0; bs_last = 0;
      end
      begin : sink
        while (got < msg.size()) begin
          sym_ready = !stalls || $urandom_range(3, 0) == 0;
          @(posedge clk);
          if (sym_valid && sym_ready) begin
            check(int'(sym_data) == msg[got], $sformatf("symbol %0d: %0d expected %0d", got, sym_data, msg[got]));
            got++;
          end
          @(negedge clk);
        end
        sym_ready = 0;
      end
    join
    while (busy) @(negedge clk);
    check(got == msg.size(), "all symbols decoded");
    check(int'(max_len) == h.maxlen, $sformatf("max_len %0d exp %0d", max_len, h.maxlen));
    if (!stalls) begin
      check(int'(lut_words) == (1 << h.maxlen), $sformatf("LUT words %0d exp %0d", lut_words, 1 << h.maxlen));
      check(dec_cycles == 2 * msg.size(), $sformatf("decode took %0d cycles for %0d symbols", dec_cycles, msg.size()));
      check(build_cycles <= (1 << h.maxlen) + 3, $sformatf("LUT build took %0d cycles", build_cycles));
    end
    n_rebuild++;
  endtask

  initial begin
    static huff_code h = new;
    int msg [$];
    int f [256];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Worked example.
    h.clear(); h.cnt[1] = 1; h.cnt[2] = 1; h.cnt[3] = 2; h.n = 4;
    h.sym[0] = "A"; h.sym[1] = "B"; h.sym[2] = "C"; h.sym[3] = "D";
    h.len[0] = 1; h.len[1] = 2; h.len[2] = 3; h.len[3] = 3;
    h.finish_code();
    msg = '{"C", "D", "B", "A", "A"};
    run_block(h, msg, 0, 11);
    check(lut_words == 8, "example LUT has eight words");

    // Deepest code: lengths 1, 2, ..., 14, 15, 15 fill the whole 2^15-word LUT.
    h.clear();
    for (int l = 1; l <= 15; l++) h.cnt[l] = (l == 15) ? 2 : 1;
    h.n = 16;
    for (int i = 0; i < 16; i++) begin h.sym[i] = 200 + i; h.len[i] = (i < 15) ? i + 1 : 15; end
    h.finish_code();
    msg.delete();
    for (int i = 0; i < 300; i++) msg.push_back(h.sym[$urandom_range(15, 0)]);
    run_block(h, msg, 0);
    check(lut_words == 16'(1 << 15), "full 64 KB LUT written");

    // Random complete codes.
    for (int t = 0; t < 12; t++) begin
      h.random_complete(int'($urandom_range(256, 2)), (t == 0) ? 15 : int'($urandom_range(15, 2)));
      msg.delete();
      for (int i = 0; i < 400; i++) msg.push_back(h.sym[$urandom_range(h.n - 1, 0)]);
      run_block(h, msg, t % 2 == 1);
    end

    // Huffman codes from skewed frequencies.
    for (int t = 0; t < 4; t++) begin
      foreach (f[i]) f[i] = (i < 40 + 50 * t) ? 1 + (i * 37 % 11) * (i % 7) * (t + 1) : 0;
      h.from_freq(f);
      msg.delete();
      for (int i = 0; i < 500; i++) msg.push_back(h.sym[$urandom_range(h.n - 1, 0)]);
      run_block(h, msg, t % 2 == 0);
    end

    check(n_lut_expand > 0, "mechanism: multi-entry LUT fill");
    check(n_len_skip > 0, "mechanism: empty code length skipped");
    check(n_prefetch > 0, "mechanism: bitstream prefetched during LUT build");
    check(n_bit_wait > 0, "mechanism: decoder waited for bitstream bits");
    check(n_out_bp > 0, "mechanism: output back-pressure");
    check(n_pad > 0, "mechanism: zero padding at end of stream");
    check(n_unroll1 > 0, "mechanism: one-cycle unrolled starting codes");
    check(n_rebuild > 1, "mechanism: LUT rebuilt for a new block");
    $display("mechanisms: lut_expand=%0d len_skip=%0d prefetch=%0d bit_wait=%0d out_bp=%0d pad=%0d unroll1=%0d blocks=%0d",
             n_lut_expand, n_len_skip, n_prefetch, n_bit_wait, n_out_bp, n_pad, n_unroll1, n_rebuild);
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
