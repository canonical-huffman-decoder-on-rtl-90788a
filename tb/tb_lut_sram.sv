// tb_lut_sram: checks the LUT memory at its full 2^15 x 16 size.
//
// Random writes and reads are checked against a model array, including the
// first and last address. Read data must appear exactly one cycle after the
// read and must hold while the memory is idle or writing.
module tb_lut_sram;
  logic        clk = 0, en = 0, we = 0;
  logic [14:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [1 << 15];
  bit          known [1 << 15];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_sram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(int a, int d);
    @(negedge clk); en = 1; we = 1; addr = 15'(a); wdata = 16'(d);
    model[a] = 16'(d); known[a] = 1;
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic read_check(int a);
    logic [15:0] held;
    @(negedge clk); en = 1; we = 0; addr = 15'(a);
    @(negedge clk); en = 0;
    check(rdata == model[a], $sformatf("read %0h got %0h exp %0h", a, rdata, model[a]));
    held = rdata;
    // idle cycle and a write elsewhere must not disturb the read data
    @(negedge clk); en = 1; we = 1; addr = 15'(a ^ 1); wdata = ~held;
    model[a ^ 1] = ~held; known[a ^ 1] = 1;
    @(negedge clk); en = 0; we = 0;
    check(rdata == held, "read data held");
  endtask

  initial begin
    int a;
    write(0, 'h1234);
    write('h7FFF, 'hBEEF);
    read_check(0);
    read_check('h7FFF);
    for (int i = 0; i < 2000; i++) write(int'($urandom_range('h7FFF, 0)), int'($urandom_range('hFFFF, 0)));
    for (int i = 0; i < 3000; i++) begin
      a = int'($urandom_range('h7FFF, 0));
      if (known[a]) read_check(a);
    end
    check(checks > 100, "enough reads");
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
