// lut_mem_ctrl: memory controller in front of the LUT SRAM.
//
// Two clients share the single SRAM port: the LUT builder, which writes, and
// the bitstream decoder, which reads. Writes take the port whenever they come;
// a read request is granted in a cycle without a write. The read data is
// returned with rd_valid one cycle after the grant, as a LUT word. The
// controller also keeps a count of words written since the last `clear`, which
// the top reads to check that a LUT build has covered 2^max_len entries.
//
// Timing: rd_gnt is combinational from rd_req and wr_en; rd_valid and rd_data
// follow the granted request by one cycle (the SRAM latency). The original
// many-core mapping places a memory controller processor between the tasks and the memory; its
// priority rule and the write counter are this design's.
module lut_mem_ctrl
  import chuff_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  // Write client (LUT builder)
  input  logic                wr_en,
  input  logic [MAX_BITS-1:0] wr_addr,
  input  lut_word_t           wr_data,
  // Read client (decoder)
  input  logic                rd_req,
  input  logic [MAX_BITS-1:0] rd_addr,
  output logic                rd_gnt,
  output logic                rd_valid,
  output lut_word_t           rd_data,
  output logic [MAX_BITS:0]   wr_count,
  // SRAM port
  output logic                mem_en,
  output logic                mem_we,
  output logic [MAX_BITS-1:0] mem_addr,
  output logic [LUT_DW-1:0]   mem_wdata,
  input  logic [LUT_DW-1:0]   mem_rdata
);

  assign rd_gnt    = rd_req && !wr_en;
  assign mem_en    = wr_en || rd_req;
  assign mem_we    = wr_en;
  assign mem_addr  = wr_en ? wr_addr : rd_addr;
  assign mem_wdata = wr_data;
  assign rd_data   = lut_word_t'(mem_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      wr_count <= '0;
    end else begin
      rd_valid <= rd_gnt;
      if (clear)      wr_count <= '0;
      else if (wr_en) wr_count <= wr_count + 1'b1;
    end
  end

endmodule
