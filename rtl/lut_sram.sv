// lut_sram: the single-port SRAM that holds the decoding LUT.
//
// 2^AW words of DW bits with a synchronous read: the word at `addr` appears on
// `rdata` the cycle after `en` is high with `we` low. A write (`en` and `we`)
// stores `wdata` at the clock edge; rdata keeps its previous value on writes
// and idle cycles. With the defaults (2^15 x 16 bits) it is the 64 KB memory
// module of the decoder, enough for a full LUT of 15-bit codes. Written as a
// plain array so that synthesis can map it onto an SRAM macro.
module lut_sram #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
