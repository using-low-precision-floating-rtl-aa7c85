// tb_bit_access: reads a random bit stream in random chunks of 1..16 bits,
// driving the unit as the core does: GETB in one cycle (EX), the two memory
// words at the current word address and the registered offset the next
// cycle (MEM). Checks the extracted bits against the stream, the wrap
// request at word crossings, and SETBP.
module tb_bit_access;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ex_get, ex_setbp, wrap;
  logic [4:0] ex_n, mem_n;
  logic [3:0] ex_bpval, bp, mem_off;
  logic [31:0] words;
  logic [15:0] bits;
  logic [15:0] w [64];
  int checks = 0, failures = 0, ncross = 0;
  int pos, wa, n;
  bit_access dut (.*);
  always #5 clk = ~clk;
  function automatic logic [15:0] stream(int p, int k);
    logic [15:0] r = '0;
    for (int i = 0; i < k; i++) r = {r[14:0], w[(p + i) / 16][15 - ((p + i) % 16)]};
    return r;
  endfunction
  initial begin
    foreach (w[i]) w[i] = 16'($urandom);
    ex_get = 0; ex_setbp = 0; ex_bpval = 0; ex_n = 5'd1; mem_n = 5'd1; mem_off = 0; words = 0;
    #12 rst_n = 1'b1;
    // start at bit 5 of word 0
    @(negedge clk); ex_setbp = 1; ex_bpval = 4'd5; @(posedge clk); #1 ex_setbp = 0;
    pos = 5; wa = 0;
    while (pos < 60 * 16) begin
      n = $urandom_range(1, 16);
      @(negedge clk); ex_get = 1; ex_n = 5'(n);
      #1;
      checks++;
      if (bp !== 4'(pos % 16) || wrap !== ((pos % 16) + n >= 16)) begin
        failures++; if (failures < 10) $display("FAIL bp=%0d wrap=%b pos=%0d n=%0d", bp, wrap, pos, n);
      end
      if (wrap) ncross++;
      @(posedge clk); mem_off <= bp; mem_n <= 5'(n);
      @(negedge clk); ex_get = 0; words = {w[wa], w[wa + 1]};
      #1;
      checks++;
      if (bits !== stream(pos, n)) begin failures++; if (failures < 10) $display("FAIL bits=%h exp=%h", bits, stream(pos, n)); end
      pos += n; wa = pos / 16;
    end
    checks++; if (ncross == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
