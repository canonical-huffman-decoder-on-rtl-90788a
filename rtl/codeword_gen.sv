// codeword_gen: the lane of per-code-length codeword generators.
//
// There is one generator per code length 1..MAX_BITS. On `load` each takes the
// starting codeword of its length. A tagged symbol from the router is handed to
// the generator of its length, which gives it its current codeword and then
// increments it, so the first symbol of a length gets the starting codeword and
// each later one the codeword of its predecessor plus one. The symbol, its
// length and its codeword are then joined into one record for the LUT builder.
//
// Interface: in_* and out_* are valid/ready streams; the path is combinational
// (the codeword is read from the selected generator's register), so a symbol
// passes in the cycle it is offered if out_ready is high. A generator steps on
// the cycle its symbol is accepted downstream. Codewords are right-aligned in
// the MAX_BITS-wide field. One generator per length follows the processor
// lane of the original many-core mapping; the register-per-length form is this design's.
module codeword_gen
  import chuff_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [MAX_BITS:0] start_code [MAX_BITS+1],
  input  logic              in_valid,
  input  sym_len_t          in_data,
  output logic              in_ready,
  output logic              out_valid,
  output sym_code_t         out_data,
  input  logic              out_ready
);

  logic [MAX_BITS:0] next_cw [MAX_BITS+1];
  logic              fire;

  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign fire      = in_valid && out_ready;
  assign out_data  = '{sym: in_data.sym, len: in_data.len,
                       code: next_cw[in_data.len][MAX_BITS-1:0]};

  for (genvar l = 0; l <= MAX_BITS; l++) begin : g_lane
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        next_cw[l] <= '0;
      else if (load)
        next_cw[l] <= (l == 0) ? '0 : start_code[l];
      else if (fire && in_data.len == LEN_W'(l))
        next_cw[l] <= next_cw[l] + 1'b1;
    end
  end

endmodule
