// tb_addr_gen: sets up circular buffers of random base and length, steps
// the address register through several laps and compares it with a model;
// also checks plain increment with LEN = 0 and that a write of AR wins over
// an increment.
module tb_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic set_ar, set_base, set_len, inc, wrapped;
  logic [12:0] wdata, ar, ar_next;
  int checks = 0, failures = 0, nwrap = 0;
  int mar, mbase, mlen;
  addr_gen #(.AW(13)) dut (.*);
  always #5 clk = ~clk;
  task automatic wr(int which, int v);
    @(negedge clk); set_ar = (which == 0); set_base = (which == 1); set_len = (which == 2); wdata = 13'(v); inc = 0;
    @(posedge clk); #1; set_ar = 0; set_base = 0; set_len = 0;
  endtask
  initial begin
    set_ar = 0; set_base = 0; set_len = 0; inc = 0; wdata = 0;
    #12 rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      mbase = $urandom_range(4000); mlen = (r % 5 == 4) ? 0 : $urandom_range(1, 40);
      mar = mbase + ((mlen > 0) ? $urandom_range(mlen - 1) : 0);
      wr(1, mbase); wr(2, mlen); wr(0, mar);
      for (int i = 0; i < 100; i++) begin
        @(negedge clk); inc = 1'($urandom);
        if (i == 50) begin set_ar = 1; wdata = 13'(mbase); end
        @(posedge clk);
        if (set_ar) mar = mbase;
        else if (inc) begin
          if (mlen > 0 && mar == mbase + mlen - 1) begin mar = mbase; nwrap++; end
          else mar = (mar + 1) % 8192;
        end
        #1; set_ar = 0;
        checks++;
        if (ar !== 13'(mar)) begin failures++; if (failures < 10) $display("FAIL ar=%0d exp=%0d", ar, mar); end
      end
    end
    checks++; if (nwrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
