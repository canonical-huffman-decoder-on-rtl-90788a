// start_codeword_gen: starting codeword of every code length.
//
// The header opens with the number of symbols of each code length, for lengths
// 1..MAX_BITS in order. This block takes those counts one per cycle on a
// valid/ready stream, then runs the canonical recurrence
//     code = 0; next_code[1] = 0;
//     for b = 2..MAX_BITS: code = (code + count[b-1]) << 1; next_code[b] = code;
// The MAX_BITS-1 iterations are unrolled UNROLL times: each compute cycle
// evaluates UNROLL chained add-and-shift steps, so the recurrence takes
// ceil((MAX_BITS-1)/UNROLL) cycles. UNROLL = 14 (the default) finishes it in a
// single cycle; UNROLL = 1 is the one-step-per-cycle baseline; 7 is the
// intermediate point. The recurrence, the 15-bit limit and the unroll factors
// come from the original many-core mapping of this decoder; the streaming interface is this
// design's own.
//
// Besides the starting codewords the block reports the counts it took, their
// sum (symbols that follow in the header) and the longest code length with a
// non-zero count, which sets the LUT index width.
//
// Timing: `clear` (one cycle) empties it. Counts are accepted while cnt_ready
// is high (MAX_BITS cycles when cnt_valid is held high); `done` rises
// ceil((MAX_BITS-1)/UNROLL) cycles after the last count and stays high, with
// all outputs stable, until the next `clear`.
module start_codeword_gen
  import chuff_pkg::*;
#(
  parameter int unsigned UNROLL = 14
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  // Count stream, code lengths 1..MAX_BITS in order.
  input  logic                         cnt_valid,
  input  logic [CNT_W-1:0]             cnt_data,
  output logic                         cnt_ready,
  // Results, valid while done is high. Index 0 is unused.
  output logic                         done,
  output logic [MAX_BITS:0]            start_code [MAX_BITS+1],
  output logic [CNT_W-1:0]             count      [MAX_BITS+1],
  output logic [LEN_W-1:0]             max_len,
  output logic [CNT_W+LEN_W-1:0]       total_syms
);

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_DONE} state_t;
  state_t state;

  logic [LEN_W:0]         ld_idx;    // next count to load (1..MAX_BITS)
  logic [LEN_W:0]         bits;      // next length whose code is computed
  logic [MAX_BITS:0]      code_r;    // running code of length bits-1

  // UNROLL chained iterations of the recurrence, starting at length `bits`.
  logic [MAX_BITS:0] chain_code [UNROLL+1];
  logic [LEN_W:0]    chain_bits [UNROLL+1];
  logic [MAX_BITS:0] cnt_ext;
  logic [LEN_W-1:0]  prev_len;

  always_comb begin
    chain_code[0] = code_r;
    chain_bits[0] = bits;
    for (int u = 0; u < int'(UNROLL); u++) begin
      if (chain_bits[u] <= (LEN_W+1)'(MAX_BITS)) begin
        prev_len          = chain_bits[u][LEN_W-1:0] - 1'b1;
        cnt_ext           = (MAX_BITS+1)'(count[prev_len]);
        chain_code[u+1]   = (chain_code[u] + cnt_ext) << 1;
        chain_bits[u+1]   = chain_bits[u] + 1'b1;
      end else begin
        prev_len          = '0;
        cnt_ext           = '0;
        chain_code[u+1]   = chain_code[u];
        chain_bits[u+1]   = chain_bits[u];
      end
    end
  end

  assign cnt_ready = (state == S_LOAD);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      ld_idx     <= 1;
      bits       <= 2;
      code_r     <= '0;
      max_len    <= '0;
      total_syms <= '0;
      for (int i = 0; i <= int'(MAX_BITS); i++) begin
        start_code[i] <= '0;
        count[i]      <= '0;
      end
    end else if (clear) begin
      state      <= S_LOAD;
      ld_idx     <= 1;
      bits       <= 2;
      code_r     <= '0;
      max_len    <= '0;
      total_syms <= '0;
      for (int i = 0; i <= int'(MAX_BITS); i++) begin
        start_code[i] <= '0;
        count[i]      <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: if (cnt_valid) begin
          count[ld_idx[LEN_W-1:0]] <= cnt_data;
          total_syms    <= total_syms + (CNT_W+LEN_W)'(cnt_data);
          if (cnt_data != '0) max_len <= ld_idx[LEN_W-1:0];
          if (ld_idx == (LEN_W+1)'(MAX_BITS)) state <= S_COMPUTE;
          ld_idx <= ld_idx + 1'b1;
        end
        S_COMPUTE: begin
          // start_code[1] stays 0; store the codes this cycle produced.
          for (int u = 0; u < int'(UNROLL); u++)
            if (chain_bits[u] <= (LEN_W+1)'(MAX_BITS))
              start_code[chain_bits[u][LEN_W-1:0]] <= chain_code[u+1];
          code_r <= chain_code[UNROLL];
          bits   <= chain_bits[UNROLL];
          if (chain_bits[UNROLL] > (LEN_W+1)'(MAX_BITS)) state <= S_DONE;
        end
        S_DONE: ;
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
