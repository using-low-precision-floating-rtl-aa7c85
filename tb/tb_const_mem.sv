// tb_const_mem: writes random words to random addresses of the constant
// memory and reads them back, checking the one-cycle read latency, the
// full default depth and that addresses past the end read zero.
module tb_const_mem;
  localparam int DEPTH = 900;
  logic clk = 1'b0;
  logic [9:0] addr, waddr;
  logic [22:0] rdata, wdata;
  logic we;
  logic [22:0] model [int];
  int checks = 0, failures = 0;
  const_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); we = 1; waddr = 10'($urandom_range(DEPTH - 1)); if (i == 0) waddr = 10'(DEPTH - 1);
      wdata = 23'($urandom); model[int'(waddr)] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (model[a]) begin
      @(negedge clk); addr = 10'(a);
      @(negedge clk); checks++;
      if (rdata !== model[a]) begin failures++; if (failures < 10) $display("FAIL a=%0d got %h exp %h", a, rdata, model[a]); end
    end
    @(negedge clk); addr = 10'(DEPTH + 5); @(negedge clk); checks++; if (rdata !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
