// tb_instr_decoder: builds instructions of every class from random fields
// and checks the decoded register numbers, immediates, addressing mode and
// control flags against the fields used to build them.
module tb_instr_decoder;
  import dsp_pkg::*;
  logic [23:0] instr;
  dec_t dec;
  int checks = 0, failures = 0;
  instr_decoder dut (.*);
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s instr=%h", what, instr); end
  endtask
  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [3:0] rd, ra, rb, fn;
      logic [15:0] imm;
      logic [12:0] addr;
      logic [1:0] md;
      rd = 4'($urandom); ra = 4'($urandom); rb = 4'($urandom); fn = 4'($urandom_range(6));
      imm = 16'($urandom); addr = 13'($urandom); md = 2'($urandom);
      instr = {4'h1, rd, imm}; #1;
      chk(dec.is_ldi && dec.int_wb && dec.rd == rd && dec.imm == imm && !dec.fp_op, "LDI");
      instr = {4'h3, rd, ra, rb, 4'h0, fn}; #1;
      chk(dec.int_wb && dec.rd == rd && dec.ra == ra && dec.rb == rb && dec.alu_op == alu_op_e'(fn) && !dec.alu_imm, "ALU");
      instr = {4'h4, rd, ra, fn, imm[7:0]}; #1;
      chk(dec.alu_imm && dec.alu_op == alu_op_e'(fn) && dec.imm == {{8{imm[7]}}, imm[7:0]}, "ALUI");
      instr = {4'h5, rd, ra, rb, 4'h0, fn}; #1;
      chk(dec.fp_op && !dec.int_wb && dec.fpu_op == fpu_op_e'(fn) && dec.rc == rd && dec.ra == ra && dec.rb == rb, "FPU");
      chk((fn == 4'd4) == (dec.amode == AM_ARI) || fn != 4'd4, "MACA mode");
      instr = {4'h7, rd, md, 1'b0, addr}; #1;
      chk(dec.mem_rd && dec.mem_fp && dec.int_wb && dec.amode == amode_e'(md) && dec.addr == addr && dec.ra == addr[3:0], "LDF");
      instr = {4'h8, rd, md, 1'b0, addr}; #1;
      chk(dec.mem_wr && !dec.int_wb && dec.rc == rd && dec.addr == addr, "ST");
      instr = {4'h9, rd, md, 1'b0, addr}; #1;
      chk(dec.cmem_rd && dec.int_wb && !dec.mem_rd, "LDC");
      instr = {4'hA, rd, ra, 10'd0, md}; #1;
      chk(dec.ar_sel == md && dec.ar_wr == (md != 2'd3) && dec.int_wb == (md == 2'd3) && dec.ra == ra, "AR");
      instr = {4'hB, rd, 4'b0000, 8'd0, fn}; #1;
      chk(dec.bit_get && dec.int_wb && dec.bit_n == 5'(fn) + 5'd1, "GETB");
      instr = {4'hB, rd, 4'b0001, ra, 8'd0}; #1;
      chk(dec.bit_setbp && !dec.int_wb && dec.ra == ra, "SETBP");
      instr = {4'hC, md, ra, 1'b0, addr}; #1;
      chk(dec.br && dec.br_cond == brcond_e'(md) && dec.ra == ra && dec.addr == addr && !dec.int_wb, "BR");
      instr = {4'hD, 20'(imm)}; #1;
      chk(dec.ret && !dec.br, "RET");
      instr = {4'hE, rd, 12'd0, fn}; #1;
      chk(dec.io_in && dec.int_wb && dec.io_port == fn, "IN");
      instr = {4'hF, 4'd0, ra, 8'd0, fn}; #1;
      chk(dec.io_out && dec.ra == ra && dec.io_port == fn && !dec.int_wb, "OUT");
      instr = {4'h0, 2'b01, 4'd0, 1'b0, addr}; #1;
      chk(dec.btree && dec.valid && dec.addr == addr && dec.bit_n == 5'd1 && !dec.int_wb && !dec.br, "BTREE");
      instr = 24'h000000; #1;
      chk(!dec.valid && !dec.btree && !dec.int_wb && !dec.fp_op && !dec.mem_wr && !dec.br, "NOP");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
