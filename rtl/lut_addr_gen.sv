// lut_addr_gen: joins symbol and code length into a LUT word and writes it to
// every LUT index that starts with the symbol's codeword.
//
// The LUT is indexed by the next max_len bits of the bitstream, where max_len
// is the longest code length in use. A symbol of length L with codeword c owns
// the 2^(max_len-L) indices from c << (max_len-L) up to the next multiple of
// that, so looking up any max_len-bit window that begins with c returns the
// symbol and L. The block takes one (symbol, length, codeword) record, then
// issues one write per cycle over that address range.
//
// Interface: in_* is a valid/ready stream; a record is accepted when the block
// is idle or on the cycle of the last write of the previous record, so records
// of length max_len are written back to back at one per cycle. wr_* goes to the
// memory controller, which always takes a write. `idle` is high when no record
// is pending. The range rule follows the original LUT layout; the one-write-
// per-cycle sequencer is this design's choice.
module lut_addr_gen
  import chuff_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [LEN_W-1:0]    max_len,
  input  logic                in_valid,
  input  sym_code_t           in_data,
  output logic                in_ready,
  output logic                wr_en,
  output logic [MAX_BITS-1:0] wr_addr,
  output lut_word_t           wr_data,
  output logic                idle
);

  logic                active;
  logic [MAX_BITS-1:0] addr;
  logic [MAX_BITS:0]   left;      // writes still to issue, including this one
  lut_word_t           word;
  logic                last;
  logic [LEN_W-1:0]    shamt;

  assign last     = active && (left == (MAX_BITS+1)'(1));
  assign in_ready = !active || last;
  assign idle     = !active;
  assign wr_en    = active;
  assign wr_addr  = addr;
  assign wr_data  = word;
  assign shamt    = max_len - in_data.len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      addr   <= '0;
      left   <= '0;
      word   <= '0;
    end else if (in_valid && in_ready) begin
      active <= 1'b1;
      addr   <= in_data.code << shamt;
      left   <= (MAX_BITS+1)'(1) << shamt;
      word   <= '{rsvd: '0, len: in_data.len, sym: in_data.sym};
    end else if (active) begin
      addr <= addr + 1'b1;
      left <= left - 1'b1;
      if (last) active <= 1'b0;
    end
  end

  // A symbol can never be longer than the LUT index.
  a_len_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready) |-> (in_data.len != '0 && in_data.len <= max_len));

endmodule
