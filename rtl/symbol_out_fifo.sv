// symbol_out_fifo: output stage for decoded symbols.
//
// A small first-in first-out buffer between the decoder and the consumer of
// decoded bytes, so that a consumer which pauses only stalls decoding once the
// buffer is full. `space` tells the decoder that a push will fit; the decoder
// checks it before it starts a LUT read, and a read only ever adds one entry.
//
// Interface: push/push_data in, out_* a valid/ready stream; the head is shown
// combinationally from storage (one cycle from push to out_valid). DEPTH must
// be a power of two. `count` gives the fill level. The original
// many-core mapping ends the decoder with a processor that sends the decoded symbol out of the array; the
// buffer depth is this design's choice.
module symbol_out_fifo #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_data,
  output logic                       space,
  output logic                       out_valid,
  output logic [W-1:0]               out_data,
  input  logic                       out_ready,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          pop;

  assign space     = (count < CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (push && space) begin
        mem[wp] <= push_data;
        wp      <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      count <= count + CW'(push && space) - CW'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> space);

endmodule
