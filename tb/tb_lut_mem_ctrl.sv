// tb_lut_mem_ctrl: checks the LUT memory controller with the real SRAM behind
// it.
//
// Random write and read requests are issued, often in the same cycle. A read
// may only be granted when no write is present; granted reads must return the
// model's word with rd_valid exactly one cycle later, and ungranted ones must
// not produce rd_valid. The write counter must count every write since the
// last clear.
module tb_lut_mem_ctrl;
  import chuff_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic wr_en = 0, rd_req = 0, rd_gnt, rd_valid;
  logic [MAX_BITS-1:0] wr_addr = '0, rd_addr = '0;
  lut_word_t wr_data, rd_data;
  logic [MAX_BITS:0] wr_count;
  logic mem_en, mem_we;
  logic [MAX_BITS-1:0] mem_addr;
  logic [LUT_DW-1:0] mem_wdata, mem_rdata;

  logic [15:0] model [1 << MAX_BITS];
  int checks = 0, failures = 0;
  int nwr;

  always #5 clk = ~clk;

  lut_mem_ctrl dut (.*);
  lut_sram #(.AW(MAX_BITS), .DW(LUT_DW)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic        exp_valid;
    logic [15:0] exp_data;
    int          a;
    wr_data = '0;
    for (int i = 0; i < 64; i++) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Initialise the region used so every read is defined.
    for (int i = 0; i < 64; i++) begin
      wr_en = 1; wr_addr = MAX_BITS'(i); wr_data = lut_word_t'(16'(i * 7));
      model[i] = 16'(i * 7);
      @(negedge clk);
    end
    wr_en = 0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    check(wr_count == 0, "write counter cleared");
    nwr = 0; exp_valid = 0; exp_data = '0;
    for (int i = 0; i < 3000; i++) begin
      wr_en   = $urandom_range(2, 0) == 0;
      wr_addr = MAX_BITS'($urandom_range(63, 0));
      wr_data = lut_word_t'(16'($urandom));
      rd_req  = $urandom_range(1, 0) == 1;
      rd_addr = MAX_BITS'($urandom_range(63, 0));
      #1;
      check(rd_gnt == (rd_req && !wr_en), "grant rule");
      check(rd_valid == exp_valid, "rd_valid one cycle after grant");
      if (exp_valid) check(rd_data == exp_data, $sformatf("read data %0h exp %0h", rd_data, exp_data));
      exp_valid = rd_gnt;
      exp_data  = model[rd_addr];
      if (wr_en) begin
        model[wr_addr] = wr_data;
        nwr++;
      end
      @(negedge clk);
    end
    wr_en = 0; rd_req = 0;
    check(int'(wr_count) == nwr, $sformatf("write count %0d exp %0d", wr_count, nwr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
