// tb_data_mem: random writes on port A, then reads on both ports at once
// against a model; checks the one-cycle read latency, that a read of the
// word being written returns the old contents, and addresses past the end.
module tb_data_mem;
  localparam int DEPTH = 6100;
  logic clk = 1'b0;
  logic [12:0] a_addr, b_addr;
  logic a_we;
  logic [15:0] a_wdata, a_rdata, b_rdata, old;
  logic [15:0] model [int];
  int checks = 0, failures = 0, ka, kb;
  data_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk); a_we = 1; a_addr = 13'($urandom_range(DEPTH - 1)); a_wdata = 16'($urandom);
      model[int'(a_addr)] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 2000; i++) begin
      void'(model.first(ka)); kb = ka;
      repeat ($urandom_range(100)) void'(model.next(ka));
      repeat ($urandom_range(100)) void'(model.next(kb));
      @(negedge clk); a_addr = 13'(ka); b_addr = 13'(kb);
      @(negedge clk); checks += 2;
      if (a_rdata !== model[ka] || b_rdata !== model[kb]) begin failures++; if (failures < 10) $display("FAIL %0d %0d", ka, kb); end
    end
    // read during write returns old data, new data next time
    void'(model.first(ka)); old = model[ka];
    @(negedge clk); a_addr = 13'(ka); a_we = 1; a_wdata = ~old;
    @(negedge clk); a_we = 0; checks++; if (a_rdata !== old) failures++;
    @(negedge clk); checks++; if (a_rdata !== ~old) failures++;
    @(negedge clk); b_addr = 13'(DEPTH + 1); @(negedge clk); checks++; if (b_rdata !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
