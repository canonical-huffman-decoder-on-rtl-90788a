// next_chunk_ctrl: decodes one symbol per LUT access.
//
// For every symbol the controller sends the current max_len-bit window of the
// bitstream to the LUT as a read address. The LUT word that comes back holds
// the symbol and its code length: the symbol is pushed to the output stage and
// the bitstream buffer is told to drop exactly that many bits, which lines the
// window up on the next codeword. It stops after `num_syms` symbols.
//
// Timing: two cycles per symbol when bits and output space are available. In
// ISSUE the read is requested (index_valid and a free output slot required);
// in WAIT the LUT word arrives, the symbol is pushed and the bits are consumed
// on the same edge. `start` (one cycle, with num_syms) arms it; `busy` is high
// until the last symbol is pushed. One symbol per memory access and the use of
// the code length to find the next chunk follow the original
// many-core mapping; the two-state
// schedule is this design's.
module next_chunk_ctrl
  import chuff_pkg::*;
#(
  parameter int unsigned NSYM_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [NSYM_W-1:0]   num_syms,
  output logic                busy,
  // Bitstream buffer
  input  logic                index_valid,
  input  logic [MAX_BITS-1:0] index,
  output logic                consume,
  output logic [LEN_W-1:0]    consume_len,
  // LUT read port through the memory controller
  output logic                rd_req,
  output logic [MAX_BITS-1:0] rd_addr,
  input  logic                rd_gnt,
  input  logic                rd_valid,
  input  lut_word_t           rd_data,
  // Decoded symbol output stage
  output logic                sym_push,
  output logic [SYM_W-1:0]    sym_data,
  input  logic                sym_space
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;
  state_t            state;
  logic [NSYM_W-1:0] left;

  assign busy        = (state != S_IDLE);
  assign rd_req      = (state == S_ISSUE) && index_valid && sym_space;
  assign rd_addr     = index;
  assign consume     = (state == S_WAIT) && rd_valid;
  assign consume_len = rd_data.len;
  assign sym_push    = consume;
  assign sym_data    = rd_data.sym;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      left  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          left  <= num_syms;
          state <= (num_syms != '0) ? S_ISSUE : S_IDLE;
        end
        S_ISSUE: if (rd_req && rd_gnt) state <= S_WAIT;
        S_WAIT: if (rd_valid) begin
          left  <= left - 1'b1;
          state <= (left == NSYM_W'(1)) ? S_IDLE : S_ISSUE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A valid LUT entry always carries a non-zero code length.
  a_len_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    consume |-> consume_len != '0);

endmodule
