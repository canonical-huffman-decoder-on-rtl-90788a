// chuff_decoder_top: bit-parallel, LUT-based canonical Huffman decoder.
//
// A canonical Huffman code is fully described by how many symbols have each
// code length, plus the symbols listed in canonical order. The decoder turns
// such a header into a look-up table (LUT) and then decodes the bitstream one
// symbol per LUT access, looking at max_len bits at a time instead of one bit:
//
//   header --> start_codeword_gen --> symbol_router --> codeword_gen
//          --> lut_addr_gen --> lut_mem_ctrl --> lut_sram (64 KB LUT)
//   bitstream --> bitstream_buffer --> next_chunk_ctrl --(read)--> lut_mem_ctrl
//                                      next_chunk_ctrl --> symbol_out_fifo --> out
//
// Operation of one block: pulse `start` with `num_syms`, the number of symbols
// to decode. The header stream (hdr_*) then carries MAX_BITS counts (symbols of
// length 1..MAX_BITS, in the low CNT_W bits of a word) followed by the symbols
// in canonical order (low byte of a word). The starting codewords are computed,
// each symbol receives its codeword and is written into all LUT entries that
// begin with it, and then decoding starts. The bitstream (bs_*, 16-bit chunks,
// first bit in the MSB, `bs_last` on the final chunk) may be sent at any time
// after `start`; it is buffered while the LUT is built. Decoded bytes leave on
// sym_*. `busy` is high from `start` until the last symbol has left, and `done`
// pulses once then. `max_len` and `lut_words` report the LUT index width and
// how many LUT words were written for the current header.
//
// Timing: MAX_BITS header cycles for the counts, ceil((MAX_BITS-1)/UNROLL)
// cycles for the starting codewords, one cycle per symbol of the header plus
// one per extra LUT entry (2^max_len LUT writes in all for a complete code),
// then two cycles per decoded symbol. The task split follows the
// original many-core mapping; the sequencing between tasks is this design's own.
module chuff_decoder_top
  import chuff_pkg::*;
#(
  parameter int unsigned UNROLL    = 14,
  parameter int unsigned NSYM_W    = 32,
  parameter int unsigned OUT_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [NSYM_W-1:0]   num_syms,
  // Header
  input  logic                hdr_valid,
  input  logic [IN_W-1:0]     hdr_data,
  output logic                hdr_ready,
  // Encoded bitstream
  input  logic                bs_valid,
  input  logic [IN_W-1:0]     bs_data,
  input  logic                bs_last,
  output logic                bs_ready,
  // Decoded symbols
  output logic                sym_valid,
  output logic [SYM_W-1:0]    sym_data,
  input  logic                sym_ready,
  // Status
  output logic                busy,
  output logic                done,
  output logic [LEN_W-1:0]    max_len,
  output logic [MAX_BITS:0]   lut_words
);

  typedef enum logic [2:0] {T_IDLE, T_COUNTS, T_SYMS, T_BUILD, T_DECODE} tstate_t;
  tstate_t state;

  logic [NSYM_W-1:0] nsyms_q;

  // ---------------------------------------------------------------- header
  logic                   cnt_valid, cnt_ready, sc_done;
  logic [MAX_BITS:0]      start_code [MAX_BITS+1];
  logic [CNT_W-1:0]       count      [MAX_BITS+1];
  logic [CNT_W+LEN_W-1:0] total_syms;
  logic                   tab_load;

  assign cnt_valid = (state == T_COUNTS) && hdr_valid;
  assign tab_load  = (state == T_COUNTS) && sc_done;

  start_codeword_gen #(.UNROLL(UNROLL)) u_start (
    .clk, .rst_n, .clear(start),
    .cnt_valid, .cnt_data(hdr_data[CNT_W-1:0]), .cnt_ready,
    .done(sc_done), .start_code, .count, .max_len, .total_syms
  );

  logic     rt_sym_valid, rt_sym_ready, rt_busy;
  logic     rt_out_valid, rt_out_ready;
  sym_len_t rt_out;

  assign rt_sym_valid = (state == T_SYMS) && hdr_valid;
  assign hdr_ready    = ((state == T_COUNTS) && cnt_ready) ||
                        ((state == T_SYMS) && rt_sym_ready);

  symbol_router u_router (
    .clk, .rst_n, .load(tab_load), .count, .total(total_syms),
    .sym_valid(rt_sym_valid), .sym_data(hdr_data[SYM_W-1:0]), .sym_ready(rt_sym_ready),
    .out_valid(rt_out_valid), .out_data(rt_out), .out_ready(rt_out_ready),
    .busy(rt_busy)
  );

  logic      cw_valid, cw_ready;
  sym_code_t cw_rec;

  codeword_gen u_cwgen (
    .clk, .rst_n, .load(tab_load), .start_code,
    .in_valid(rt_out_valid), .in_data(rt_out), .in_ready(rt_out_ready),
    .out_valid(cw_valid), .out_data(cw_rec), .out_ready(cw_ready)
  );

  logic                wr_en, ag_idle;
  logic [MAX_BITS-1:0] wr_addr;
  lut_word_t           wr_data;

  lut_addr_gen u_addr (
    .clk, .rst_n, .max_len,
    .in_valid(cw_valid), .in_data(cw_rec), .in_ready(cw_ready),
    .wr_en, .wr_addr, .wr_data, .idle(ag_idle)
  );

  // ---------------------------------------------------------------- memory
  logic                rd_req, rd_gnt, rd_valid;
  logic [MAX_BITS-1:0] rd_addr;
  lut_word_t           rd_data;
  logic                mem_en, mem_we;
  logic [MAX_BITS-1:0] mem_addr;
  logic [LUT_DW-1:0]   mem_wdata, mem_rdata;

  lut_mem_ctrl u_mctl (
    .clk, .rst_n, .clear(start),
    .wr_en, .wr_addr, .wr_data,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data, .wr_count(lut_words),
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  lut_sram #(.AW(MAX_BITS), .DW(LUT_DW)) u_lut (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  // ---------------------------------------------------------------- decode
  logic                index_valid, eos, consume;
  logic [MAX_BITS-1:0] index;
  logic [LEN_W-1:0]    consume_len;
  logic [5:0]          bfill;

  bitstream_buffer #(.BUF_W(48)) u_buf (
    .clk, .rst_n, .clear(start), .max_len,
    .in_valid(bs_valid && (state != T_IDLE)), .in_data(bs_data), .in_last(bs_last),
    .in_ready(bs_ready),
    .index_valid, .index, .eos, .fill(bfill),
    .consume, .consume_len
  );

  logic             dec_start, dec_busy, sym_push, sym_space;
  logic [SYM_W-1:0] push_data;
  logic [$clog2(OUT_DEPTH+1)-1:0] out_count;

  assign dec_start = (state == T_BUILD) && ag_idle;

  next_chunk_ctrl #(.NSYM_W(NSYM_W)) u_dec (
    .clk, .rst_n, .start(dec_start), .num_syms(nsyms_q), .busy(dec_busy),
    .index_valid, .index, .consume, .consume_len,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data,
    .sym_push, .sym_data(push_data), .sym_space
  );

  symbol_out_fifo #(.DEPTH(OUT_DEPTH), .W(SYM_W)) u_out (
    .clk, .rst_n, .push(sym_push), .push_data, .space(sym_space),
    .out_valid(sym_valid), .out_data(sym_data), .out_ready(sym_ready),
    .count(out_count)
  );

  // ---------------------------------------------------------------- sequencing
  assign busy = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      nsyms_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          nsyms_q <= num_syms;
          state   <= T_COUNTS;
        end
        T_COUNTS: if (sc_done) state <= T_SYMS;
        T_SYMS:   if (!rt_busy) state <= T_BUILD;
        T_BUILD:  if (ag_idle) state <= T_DECODE;
        T_DECODE: if (!dec_busy && out_count == '0) begin
          state <= T_IDLE;
          done  <= 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == T_IDLE);

endmodule
