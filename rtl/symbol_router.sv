// symbol_router: tags each header symbol with its code length.
//
// After the counts, the header lists the symbols sorted by code length (and in
// canonical order within a length). Knowing the per-length counts, the router
// walks the lengths from the shortest used one upwards: it passes count[L]
// symbols tagged with length L, then moves to the next length with a non-zero
// count, skipping empty lengths. It is the entry of the lane of per-length
// codeword generators; which generator takes a symbol follows from the tag.
//
// Interface: `load` (one cycle, with `count` and `total` valid) arms it. Symbols
// then flow from sym_* to out_* with valid/ready; the path is combinational, so
// one symbol passes per cycle when the consumer is ready. `busy` is high from
// `load` until `total` symbols have passed; a zero total never goes busy.
// The walk over the lengths is this design's way of doing what the original
// many-core mapping assigns to the first processor of the lane.
module symbol_router
  import chuff_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [CNT_W-1:0]       count [MAX_BITS+1],
  input  logic [CNT_W+LEN_W-1:0] total,
  // Header symbols
  input  logic                   sym_valid,
  input  logic [SYM_W-1:0]       sym_data,
  output logic                   sym_ready,
  // Tagged symbols
  output logic                   out_valid,
  output sym_len_t               out_data,
  input  logic                   out_ready,
  output logic                   busy
);

  logic [LEN_W-1:0]       cur_len;
  logic [CNT_W-1:0]       remaining;   // symbols still due at cur_len
  logic [CNT_W+LEN_W-1:0] left;        // symbols still due overall
  logic                   fire;

  // First length above `from` with a non-zero count (0 when none).
  function automatic logic [LEN_W-1:0] next_used(input logic [LEN_W-1:0] from,
                                                 input logic [CNT_W-1:0] c [MAX_BITS+1]);
    logic [LEN_W-1:0] r;
    r = '0;
    for (int l = int'(MAX_BITS); l >= 1; l--)
      if (l > int'(from) && c[l] != '0) r = LEN_W'(l);
    return r;
  endfunction

  logic [LEN_W-1:0] nxt_len;
  assign nxt_len   = next_used(cur_len, count);

  assign busy      = (left != '0);
  assign out_valid = busy && sym_valid;
  assign sym_ready = busy && out_ready;
  assign fire      = out_valid && out_ready;
  assign out_data  = '{sym: sym_data, len: cur_len};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_len   <= '0;
      remaining <= '0;
      left      <= '0;
    end else if (load) begin
      cur_len   <= next_used('0, count);
      remaining <= count[next_used('0, count)];
      left      <= total;
    end else if (fire) begin
      left <= left - 1'b1;
      if (remaining == CNT_W'(1)) begin
        cur_len   <= nxt_len;
        remaining <= count[nxt_len];
      end else begin
        remaining <= remaining - 1'b1;
      end
    end
  end

endmodule
