// tb_regfile: random writes and three-port reads of the register file
// against an array model; checks the reset value, the write-through of a
// register written in the same cycle it is read, and that nothing is
// written when we is low.
module tb_regfile;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] ra, rb, rc, wa;
  logic [22:0] qa, qb, qc, wd;
  logic we;
  logic [22:0] model [16];
  int checks = 0, failures = 0;
  regfile dut (.*);
  always #5 clk = ~clk;
  task automatic chk(logic [22:0] got, logic [22:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0; rc = 0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin ra = 4'(i); #1 chk(qa, 23'd0, "reset"); end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = 23'($urandom);
      ra = 4'($urandom); rb = (t % 3 == 0) ? wa : 4'($urandom); rc = 4'($urandom);
      #1;
      chk(qa, (we && wa == ra) ? wd : model[ra], "qa");
      chk(qb, (we && wa == rb) ? wd : model[rb], "qb");
      chk(qc, (we && wa == rc) ? wd : model[rc], "qc");
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
