// tb_dsp_top: end-to-end test of the DSP at its default memory sizes. It
// assembles a short program, loads it and the data and constant memories
// through the loader port during reset, runs the core, and compares every
// OUT event (port, value) with a list of expected values computed by this
// testbench with the real-number reference model (fp_ref_pkg).
// The program exercises: LDI/LDH, integer ALU and immediate operations,
// LD/ST/LDF/LDC with absolute, register and AR addressing, FADD, FSUB, FMUL,
// FMAC, the MAC with memory operand and modulo wrap of AR, FRND and FINT,
// GETB across word boundaries, SETBP/RDBP, BTREE taken and not taken,
// a BNZ loop with its delay slot,
// CALL/RET through the hardware stack, IN and OUT, and the missing
// interlock (a read too early sees the old register value). Each mechanism
// is counted and a mechanism that never happens counts as a failure.
// Scheduling: two instructions after an integer result, five after a
// floating point one, never an integer write-back three after an FP op.
module tb_dsp_top;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        ld_we = 1'b0;
  logic [1:0]  ld_sel = '0;
  logic [12:0] ld_addr = '0;
  logic [23:0] ld_data = '0;
  logic        io_in_rd, io_out_we, wb_conflict, stack_error;
  logic [3:0]  io_in_port, io_out_port;
  logic [15:0] io_in_data, io_out_data;

  dsp_top dut (.*);

  always #5 clk = ~clk;
  assign io_in_data = (io_in_port == 4'd3) ? 16'hBEEF : 16'h0000;

  int checks = 0, failures = 0;
  int cycles = 0;

  // ------------------------------------------------------------ assembler
  logic [23:0] prog [$];
  function automatic void emit(logic [23:0] w); prog.push_back(w); endfunction
  function automatic void nops(int n); repeat (n) prog.push_back(24'h0); endfunction
  function automatic logic [23:0] LDI(int rd, int imm); return {4'h1, 4'(rd), 16'(imm)}; endfunction
  function automatic logic [23:0] LDH(int rd, int v); return {4'h2, 4'(rd), 9'd0, 7'(v)}; endfunction
  function automatic logic [23:0] ALU(int fn, int rd, int ra, int rb); return {4'h3, 4'(rd), 4'(ra), 4'(rb), 4'd0, 4'(fn)}; endfunction
  function automatic logic [23:0] ALUI(int fn, int rd, int ra, int imm); return {4'h4, 4'(rd), 4'(ra), 4'(fn), 8'(imm)}; endfunction
  function automatic logic [23:0] FPU(int fn, int rd, int ra, int rb); return {4'h5, 4'(rd), 4'(ra), 4'(rb), 4'd0, 4'(fn)}; endfunction
  function automatic logic [23:0] MEMOP(int op, int rd, int mode, int addr); return {4'(op), 4'(rd), 2'(mode), 1'b0, 13'(addr)}; endfunction
  function automatic logic [23:0] AROP(int sel, int ra, int rd); return {4'hA, 4'(rd), 4'(ra), 10'd0, 2'(sel)}; endfunction
  function automatic logic [23:0] GETB(int rd, int n); return {4'hB, 4'(rd), 4'b0000, 8'd0, 4'(n - 1)}; endfunction
  function automatic logic [23:0] SETBP(int ra); return {4'hB, 4'd0, 4'b0001, 4'(ra), 8'd0}; endfunction
  function automatic logic [23:0] RDBP(int rd); return {4'hB, 4'(rd), 4'b0010, 12'd0}; endfunction
  function automatic logic [23:0] BR(int cond, int ra, int target); return {4'hC, 2'(cond), 4'(ra), 1'b0, 13'(target)}; endfunction
  function automatic logic [23:0] BTREE(int target); return {4'h0, 2'b01, 4'd0, 1'b0, 13'(target)}; endfunction
  function automatic logic [23:0] RET(); return {4'hD, 20'd0}; endfunction
  function automatic logic [23:0] IN(int rd, int port); return {4'hE, 4'(rd), 12'd0, 4'(port)}; endfunction
  function automatic logic [23:0] OUT(int ra, int port); return {4'hF, 4'd0, 4'(ra), 8'd0, 4'(port)}; endfunction
  localparam int F_ADD = 0, F_SUB = 1, F_MUL = 2, F_MAC = 3, F_MACA = 4, F_RND = 5, F_INT = 6;
  localparam int A_ADD = 0, A_SUB = 1, A_XOR = 4, A_SHL = 5, A_SRA = 7;
  localparam int O_LD = 6, O_LDF = 7, O_ST = 8, O_LDC = 9;
  localparam int M_ABS = 0, M_REG = 1, M_ARI = 2;

  // expected OUT events
  logic [19:0] expq [$];
  function automatic void expect_out(int port, logic [15:0] v); expq.push_back({4'(port), v}); endfunction

  // ------------------------------------------------------------ data
  logic [15:0] xmem [4];       // memory floats at 100..103
  logic [22:0] cval [2];       // constants at 0..1
  logic [15:0] bitw [6];       // bit stream at 200..205
  int          getn [12];

  initial begin
    logic [22:0] acc, p, a8, a9, r10, r11, r12, big, c7;
    logic [47:0] stream;
    int sub_addr, loop_addr, bitpos, fin;
    logic [95:0] allbits;

    for (int i = 0; i < 4; i++) xmem[i] = {1'($urandom), 5'(int'($urandom_range(10)) - 5), 10'($urandom)};
    cval[0] = rnd_r(-3, 3);
    cval[1] = {1'b0, 6'd21, 16'd0};                // 1024.0
    for (int i = 0; i < 6; i++) bitw[i] = 16'($urandom);
    bitw[5][8] = 1'b1;   // stream bit 87: the first BTREE is taken
    bitw[5][7] = 1'b0;   // stream bit 88: the second falls through
    getn = '{3, 5, 16, 1, 7, 12, 16, 2, 9, 4, 11, 1};

    // ---- program
    // no interlock: r15 read one instruction after LDI still holds 0
    emit(LDI(15, 7)); emit(OUT(15, 13)); nops(2); emit(OUT(15, 13));
    expect_out(13, 16'd0); expect_out(13, 16'd7);
    // AR circular buffer [100,104)
    emit(LDI(1, 100)); emit(LDI(2, 4)); nops(2);
    emit(AROP(0, 1, 0)); emit(AROP(1, 1, 0)); emit(AROP(2, 2, 0));
    // r3 = float zero, r4 = cmem[0]
    emit(LDI(3, 0)); nops(2); emit(LDH(3, 7'b0100000));
    emit(MEMOP(O_LDC, 4, M_ABS, 0)); emit(MEMOP(O_LDC, 7, M_ABS, 1)); nops(2);
    acc = {1'b0, 6'b100000, 16'd0};
    for (int k = 0; k < 6; k++) begin
      emit(FPU(F_MACA, 3, 4, 0)); nops(5);
      p   = real2r(r2real(cval[0]) * m2real(xmem[k % 4]));
      acc = real2r(r2real(acc) + r2real(p));
    end
    emit(AROP(3, 0, 5)); nops(2); emit(OUT(5, 1));     // AR after 6 steps: 102
    expect_out(1, 16'd102);
    emit(FPU(F_RND, 5, 3, 0)); emit(FPU(F_MUL, 6, 3, 7)); nops(5);
    emit(MEMOP(O_ST, 5, M_ABS, 300)); emit(OUT(5, 2)); emit(FPU(F_INT, 6, 6, 0)); nops(5);
    emit(OUT(6, 3));
    expect_out(2, real2m(r2real(acc)));
    expect_out(3, real2int(r2real(real2r(r2real(acc) * 1024.0))));
    // LD back what was stored, through register addressing
    emit(LDI(8, 300)); nops(2); emit(MEMOP(O_LD, 9, M_REG, 8)); nops(2); emit(OUT(9, 4));
    expect_out(4, real2m(r2real(acc)));
    // LDF, FADD/FSUB/FMUL back to back, then FMAC
    emit(MEMOP(O_LDF, 8, M_ABS, 101)); emit(MEMOP(O_LDF, 9, M_ABS, 102)); nops(2);
    emit(FPU(F_ADD, 10, 8, 9)); emit(FPU(F_SUB, 11, 8, 9)); emit(FPU(F_MUL, 12, 8, 9)); nops(5);
    emit(FPU(F_MAC, 10, 8, 9)); nops(5);
    a8 = real2r(m2real(xmem[1])); a9 = real2r(m2real(xmem[2]));
    r11 = real2r(r2real(a8) - r2real(a9));
    r12 = real2r(r2real(a8) * r2real(a9));
    r10 = real2r(r2real(real2r(r2real(a8) + r2real(a9))) + r2real(r12));
    emit(FPU(F_RND, 10, 10, 0)); emit(FPU(F_RND, 11, 11, 0)); emit(FPU(F_RND, 12, 12, 0)); nops(5);
    emit(OUT(10, 5)); emit(OUT(11, 5)); emit(OUT(12, 5));
    expect_out(5, real2m(r2real(r10))); expect_out(5, real2m(r2real(r11))); expect_out(5, real2m(r2real(r12)));
    // integer ALU
    emit(LDI(1, 16'h1234)); emit(LDI(2, 3)); nops(2);
    emit(ALU(A_SHL, 3, 1, 2)); emit(ALU(A_XOR, 4, 1, 2)); emit(ALUI(A_SRA, 5, 1, 2)); emit(ALUI(A_SUB, 6, 1, -5)); nops(2);
    emit(OUT(3, 6)); emit(OUT(4, 6)); emit(OUT(5, 6)); emit(OUT(6, 6));
    expect_out(6, 16'h1234 << 3); expect_out(6, 16'h1234 ^ 3); expect_out(6, 16'h1234 >> 2); expect_out(6, 16'h1234 + 5);
    // bit access: AR = 200, no modulo, BP = 0
    emit(LDI(1, 200)); emit(LDI(2, 0)); nops(2);
    emit(AROP(2, 2, 0)); emit(AROP(0, 1, 0)); emit(SETBP(2));
    allbits = {bitw[0], bitw[1], bitw[2], bitw[3], bitw[4], bitw[5]};
    bitpos = 0;
    for (int i = 0; i < 12; i++) begin
      emit(GETB(1, getn[i])); nops(2); emit(OUT(1, 7));
      expect_out(7, 16'((allbits << bitpos) >> (96 - getn[i])));
      bitpos += getn[i];
    end
    emit(RDBP(1)); emit(AROP(3, 0, 2)); nops(2); emit(OUT(1, 8)); emit(OUT(2, 8));
    expect_out(8, 16'(bitpos % 16)); expect_out(8, 16'(200 + bitpos / 16));
    // BTREE: taken (the OUT after it is flushed), then not taken
    begin
      int s0;
      s0 = prog.size();
      emit(BTREE(s0 + 4)); emit(OUT(0, 14)); nops(2);
      emit(BTREE(s0 + 8)); emit(OUT(0, 14)); nops(2);
      expect_out(14, 16'd0);
    end
    // BNZ loop, OUT in the delay slot
    emit(LDI(1, 5)); nops(2);
    loop_addr = prog.size();
    emit(ALUI(A_ADD, 1, 1, -1)); nops(2); emit(BR(2, 1, loop_addr)); emit(OUT(1, 9));
    for (int i = 4; i >= 0; i--) expect_out(9, 16'(i));
    // BZ not taken then taken
    emit(LDI(1, 1)); nops(2); emit(BR(1, 1, 0)); emit(OUT(1, 10));
    emit(BR(1, 0, prog.size() + 3)); nops(1); emit(OUT(1, 11)); emit(OUT(1, 10));
    expect_out(10, 16'd1); expect_out(10, 16'd1);
    // CALL / RET and IN
    sub_addr = prog.size() + 8;
    emit(BR(3, 0, sub_addr)); emit(OUT(0, 14));       // delay slot runs once
    expect_out(14, 16'd0);
    emit(IN(14, 3)); nops(2); emit(OUT(14, 12));
    fin = prog.size(); emit(BR(0, 0, fin)); emit(OUT(0, 15));
    while (prog.size() < sub_addr) nops(1);
    emit(LDI(13, 16'h0ABC)); nops(2); emit(OUT(13, 11)); emit(RET()); nops(1);
    expect_out(11, 16'h0ABC); expect_out(12, 16'hBEEF); expect_out(15, 16'd0);

    // ---- load memories through the loader port while in reset
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      ld_we <= 1'b1; ld_sel <= 2'd0; ld_addr <= 13'(i); ld_data <= prog[i]; @(posedge clk);
    end
    for (int i = 0; i < 4; i++) begin ld_sel <= 2'd1; ld_addr <= 13'(100 + i); ld_data <= {8'd0, xmem[i]}; @(posedge clk); end
    for (int i = 0; i < 6; i++) begin ld_sel <= 2'd1; ld_addr <= 13'(200 + i); ld_data <= {8'd0, bitw[i]}; @(posedge clk); end
    for (int i = 0; i < 2; i++) begin ld_sel <= 2'd2; ld_addr <= 13'(i); ld_data <= {1'b0, cval[i]}; @(posedge clk); end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
  end

  // ------------------------------------------------------------ checking
  int n_bt_taken = 0, n_bt_fall = 0;
  int n_wrap = 0, n_bitcross = 0, n_call = 0, n_ret = 0, n_taken = 0, n_nottaken = 0, n_maca = 0;
  int n_out = 0;
  logic done = 1'b0;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_core.u_ag.wrapped && dut.u_core.u_ag.inc) n_wrap++;
    if (dut.u_core.bit_wrap) n_bitcross++;
    if (dut.u_core.st_push) n_call++;
    if (dut.u_core.mem.btree) begin if (dut.u_core.flush) n_bt_taken++; else n_bt_fall++; end
    if (dut.u_core.st_pop) n_ret++;
    if (dut.u_core.d.br && dut.u_core.br_taken) n_taken++;
    if (dut.u_core.d.br && !dut.u_core.br_taken) n_nottaken++;
    if (dut.u_core.u_fp.in_valid && dut.u_core.u_fp.in_op == dsp_pkg::FPU_MACA) n_maca++;
    if (wb_conflict || stack_error) begin failures++; $display("FAIL conflict/stack error at cycle %0d", cycles); end
    if (io_out_we && !done) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected OUT port %0d data %h", io_out_port, io_out_data);
      end else begin
        logic [19:0] e;
        e = expq.pop_front();
        if ({io_out_port, io_out_data} !== e) begin
          failures++;
          $display("FAIL OUT #%0d: got port %0d data %h, expected port %0d data %h",
                   n_out, io_out_port, io_out_data, e[19:16], e[15:0]);
        end
      end
      n_out++;
      if (io_out_port == 4'd15) done <= 1'b1;
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("mechanism %-28s happened %0d times", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    wait (done);
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d expected OUT events missing", expq.size()); end
    need("modulo wrap of AR", n_wrap);
    need("bit access word crossing", n_bitcross);
    need("MAC with memory operand", n_maca);
    need("BTREE taken (flush)", n_bt_taken);
    need("BTREE fall-through", n_bt_fall);
    need("CALL", n_call);
    need("RET", n_ret);
    need("taken branch", n_taken);
    need("not-taken branch", n_nottaken);
    $display("program of %0d instructions ran in %0d cycles", prog.size(), cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
