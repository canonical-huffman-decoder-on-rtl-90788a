// tb_corpus_workloads: decodes stand-ins for the kinds of files found in the
// usual lossless-compression corpora, through the whole decoder in all three
// starting-codeword variants (UNROLL = 14, 7 and 1) side by side.
//
// The files themselves are not available to a simulation, so each workload is
// generated: a run of one repeated byte and a repeated alphabet (like the
// artificial corpus), uniformly random printable bytes, English-like text
// assembled from a word list (like the text files of the Calgary and
// Canterbury corpora), a four-letter genome-like sequence and raw bytes with a
// skewed distribution over all 256 values (like the larger binary files). Each
// instance of corpus_runner Huffman-codes, decodes and compares every workload;
// this module sums their results and provides the watchdog.
module tb_corpus_workloads;
  localparam int NV = 3;
  localparam int UNR [NV] = '{14, 7, 1};

  int   checks_v [NV];
  int   failures_v [NV];
  logic finished_v [NV];

  for (genvar g = 0; g < NV; g++) begin : g_var
    corpus_runner #(.UNROLL(UNR[g])) u_run (
      .checks(checks_v[g]), .failures(failures_v[g]), .finished(finished_v[g]));
  end

  int checks, failures;

  function automatic bit all_finished();
    for (int i = 0; i < NV; i++) if (finished_v[i] !== 1'b1) return 0;
    return 1;
  endfunction

  initial begin
    #10;
    while (!all_finished()) #100;
    checks = 0; failures = 0;
    for (int i = 0; i < NV; i++) begin checks += checks_v[i]; failures += failures_v[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    checks = 0; failures = 1;
    for (int i = 0; i < NV; i++) begin checks += checks_v[i]; failures += failures_v[i]; end
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
