// bitstream_buffer: buffers the encoded bitstream and forms the LUT index.
//
// The encoded bitstream arrives in 16-bit chunks, first bit in the MSB. The
// buffer keeps up to BUF_W bits left-aligned in a shift register: bit BUF_W-1 is
// the next undecoded bit. The LUT index is the next max_len bits, read as a
// number. After a lookup the decoder consumes the code length of the symbol it
// found, which shifts the window left by that many bits; a new chunk is taken
// whenever at least 16 bits of room are free, so the window refills from the
// stream while decoding goes on. With BUF_W = 48 a chunk is taken whenever 32
// or fewer bits are held, so even after a 15-bit symbol at least 18 bits remain
// and a decoder that reads every other cycle never waits on a steady stream.
//
// Interface: in_* is a valid/ready stream of chunks, `in_last` marks the final
// one. `index_valid` is high when max_len bits are buffered, or when the
// final chunk has been taken (missing bits then read as zeros, the padding
// that ends a stream). `consume` with `consume_len` shifts the window in the
// same cycle's clock edge; it must not exceed `fill` except past the end of the
// stream, where fill saturates at zero. `clear` empties the buffer for a new
// stream. in_ready depends only on registered state. Two-byte chunks follow the
// original many-core mapping; BUF_W and the zero padding are this design's choices.
module bitstream_buffer
  import chuff_pkg::*;
#(
  parameter int unsigned BUF_W = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [LEN_W-1:0]     max_len,
  // Encoded bitstream chunks
  input  logic                 in_valid,
  input  logic [IN_W-1:0]      in_data,
  input  logic                 in_last,
  output logic                 in_ready,
  // LUT index
  output logic                 index_valid,
  output logic [MAX_BITS-1:0]  index,
  output logic                 eos,
  output logic [$clog2(BUF_W+1)-1:0] fill,
  // Consumption
  input  logic                 consume,
  input  logic [LEN_W-1:0]     consume_len
);

  localparam int unsigned FW = $clog2(BUF_W+1);

  logic [BUF_W-1:0] window;
  logic [BUF_W-1:0] shifted;
  logic [FW-1:0]    fill_after;
  logic [MAX_BITS-1:0] head;
  logic [LEN_W-1:0]    drop;

  assign in_ready    = !eos && (fill <= FW'(BUF_W - IN_W));
  assign head        = window[BUF_W-1 -: MAX_BITS];
  assign drop        = LEN_W'(MAX_BITS) - max_len;
  assign index       = head >> drop;
  assign index_valid = (max_len != '0) && (eos || fill >= FW'(max_len));

  always_comb begin
    shifted    = window;
    fill_after = fill;
    if (consume) begin
      shifted    = window << consume_len;
      fill_after = (fill > FW'(consume_len)) ? fill - FW'(consume_len) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window <= '0;
      fill   <= '0;
      eos    <= 1'b0;
    end else if (clear) begin
      window <= '0;
      fill   <= '0;
      eos    <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        window <= shifted | (BUF_W'(in_data) << (FW'(BUF_W - IN_W) - fill_after));
        fill   <= fill_after + FW'(IN_W);
        eos    <= in_last;
      end else begin
        window <= shifted;
        fill   <= fill_after;
      end
    end
  end

endmodule
