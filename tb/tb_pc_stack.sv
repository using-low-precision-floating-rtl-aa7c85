// tb_pc_stack: random pushes and pops against a queue model, filling the
// stack to its depth so that the overflow flag must rise, and popping it
// empty so that underflow must rise.
module tb_pc_stack;
  localparam int DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, empty, overflow, underflow;
  logic [12:0] din, top;
  logic [12:0] q [$];
  int checks = 0, failures = 0;
  bit ovf_seen = 0, unf_seen = 0;
  pc_stack #(.DEPTH(DEPTH), .AW(13)) dut (.*);
  always #5 clk = ~clk;
  task automatic step(bit pu, bit po);
    @(negedge clk); push = pu; pop = po; din = 13'($urandom);
    @(posedge clk);
    if (pu && po) begin if (q.size() > 0) q[q.size() - 1] = din; else unf_seen = 1; end
    else if (pu) begin if (q.size() < DEPTH) q.push_back(din); else ovf_seen = 1; end
    else if (po) begin if (q.size() > 0) void'(q.pop_back()); else unf_seen = 1; end
    #1;
    checks++;
    if (empty !== (q.size() == 0) || (q.size() > 0 && top !== q[q.size() - 1]) ||
        overflow !== ovf_seen || underflow !== unf_seen) begin
      failures++;
      if (failures < 10) $display("FAIL size=%0d top=%h empty=%b ovf=%b unf=%b", q.size(), top, empty, overflow, underflow);
    end
  endtask
  initial begin
    push = 0; pop = 0; din = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 200; i++) step($urandom_range(2) != 0, $urandom_range(2) == 0);
    for (int i = 0; i < 20; i++) step(1, 0);
    for (int i = 0; i < 20; i++) step(0, 1);
    checks++; if (!overflow || !underflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
