// tb_dsp_kernels: runs six small firmware kernels of the kind an MP3
// decoder on this core is built from, at the default memory sizes.
//  1. Integer to float conversion by floating point subtraction: an integer
//     n in the low 16 bits gets exponent 27 (LDH), and subtracting 2^16
//     (exponent 27, mantissa 0) leaves exactly n as a float. The result is
//     checked as a rounded memory float and converted back with FINT.
//  2. A windowing dot product: NTAP samples (16-bit memory floats in a
//     32-word circular buffer, read through AR with modulo wrap) times NTAP
//     register-float coefficients from constant memory, with two
//     accumulators in a six-slot schedule that meets the latency rules
//     (two MACs and two constant loads per six instructions). The sum is
//     rounded, stored, loaded back and sent out.
//  3. A 12-point IMDCT (six outputs, the other six follow by symmetry) as
//     36 memory-operand MACs; the six inputs form a six-word circular
//     buffer, so AR returns to X[0] after each output without reloading.
//  4. Dequantisation of small values: sign(v)|v|^(4/3) for v in [-15, 15]
//     from a 31-entry constant table read with register-indirect LDC,
//     times a gain.
//  5. m^(4/3) for mantissas in [1, 2) by a fifth-order Taylor polynomial
//     around 1.5, three Horner evaluations interleaved to fill the float
//     pipeline.
//  6. Huffman decoding of a random symbol string with a four-symbol prefix
//     code, the tree held in program memory as one BTREE instruction per
//     node; the decoded symbols, the number of tree nodes visited (one per
//     bit) and the final bit position are checked.
// Every OUT value is compared with the real-number reference model bit for
// bit; kernels 3 to 5 are also held against exact real arithmetic (error at
// most 2^-10 relative), and the clock cycles between the OUTs of kernels 1
// to 5 are checked against the instruction distance: the core must issue
// one instruction per clock.
module tb_dsp_kernels;
  import fp_ref_pkg::*;

  localparam int NTAP = 24;
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
  assign io_in_data = 16'h0000;

  int checks = 0, failures = 0, cycles = 0;

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

  // expected OUT events: {slot of the OUT instruction, port, value}
  int          exp_slot [$];
  logic [19:0] exp_val [$];
  bit timed = 1'b1;   // OUTs of straight-line code: check issue rate
  function automatic void expect_out(int port, logic [15:0] v);
    exp_slot.push_back(timed ? prog.size() - 1 : -1); exp_val.push_back({4'(port), v});
  endfunction

  logic [15:0] xs [32];
  logic [22:0] cs [NTAP];
  int          ints [6];
  localparam int NSYM = 40;
  int          syms [NSYM + 1];
  logic        hbits [160];
  int          nbits, root;
  int          n_btree_taken = 0, n_btree_fall = 0;
  int          n_maca = 0, n_wrap = 0;
  localparam real PI = 3.14159265358979323846;
  function automatic real fabs(real x); return (x < 0.0) ? -x : x; endfunction
  localparam logic [22:0] RZERO_R = {1'b0, 6'b100000, 16'd0};
  logic [15:0] imx [6];                 // IMDCT inputs, memory floats
  logic [22:0] imc [36];                // IMDCT cosine table
  logic [15:0] imdct_exp [6];
  real         imdct_exact [6], imdct_mag [6];
  logic [22:0] dqt [31], dqg;           // |v|^(4/3) table and gain
  int          dqv [8];
  logic [22:0] pc [6], pm [3];          // polynomial coefficients, mantissas
  logic [15:0] poly_exp [3];
  logic [15:0] got6 [$], got7 [$], got8 [$];

  initial begin
    logic [22:0] acc [2], p, tot;
    int fin;
    for (int i = 0; i < 32; i++) xs[i] = {1'($urandom), 5'(int'($urandom_range(8)) - 4), 10'($urandom)};
    for (int i = 0; i < NTAP; i++) cs[i] = rnd_r(0, 10);
    ints = '{0, 1, 255, 32767, 40000, 65535};
    for (int k = 0; k < 6; k++) imx[k] = {1'($urandom), 5'(int'($urandom_range(4)) - 2), 10'($urandom)};
    for (int i = 0; i < 6; i++)
      for (int k = 0; k < 6; k++) imc[6 * i + k] = real2r($cos(PI / 24.0 * real'((2 * i + 7) * (2 * k + 1))));
    for (int j = 0; j < 31; j++) dqt[j] = real2r((j < 15 ? -1.0 : 1.0) * $pow(fabs(real'(j - 15)), 4.0 / 3.0));
    dqg = real2r($pow(2.0, -2.75));
    dqv = '{-15, -1, 0, 1, 7, 15, int'($urandom_range(30)) - 15, int'($urandom_range(30)) - 15};
    // Taylor coefficients of m^(4/3) around 1.5: binom(4/3, n) 1.5^(4/3 - n)
    begin
      real b;
      b = 1.0;
      for (int n = 0; n < 6; n++) begin
        pc[n] = real2r(b * $pow(1.5, 4.0 / 3.0 - real'(n)));
        b = b * (4.0 / 3.0 - real'(n)) / real'(n + 1);
      end
    end
    for (int j = 0; j < 3; j++) pm[j] = real2r(1.0 + real'($urandom_range(65535)) / 65536.0);
    pm[0] = real2r(1.0);

    // ---- kernel 1: integer to float via FSUB
    emit(LDI(2, 0)); nops(2); emit(LDH(2, 27));                  // r2 = 2^16
    foreach (ints[i]) begin
      emit(LDI(1, ints[i])); nops(2); emit(LDH(1, 27)); nops(2);
      emit(FPU(F_SUB, 3, 1, 2)); nops(5);
      emit(FPU(F_RND, 4, 3, 0)); emit(FPU(F_INT, 5, 3, 0)); nops(5);
      emit(OUT(4, 1)); expect_out(1, real2m(real'(ints[i])));
      emit(OUT(5, 2)); expect_out(2, real2int(real'(ints[i])));
    end
    // ---- kernel 2: windowing dot product
    emit(LDI(1, 500)); emit(LDI(2, 32)); emit(LDI(3, 520)); nops(2);
    emit(AROP(1, 1, 0)); emit(AROP(2, 2, 0)); emit(AROP(0, 3, 0));
    emit(LDI(4, 0)); emit(LDI(5, 0)); nops(2); emit(LDH(4, 7'b0100000)); emit(LDH(5, 7'b0100000));
    emit(MEMOP(O_LDC, 8, M_ABS, 0)); emit(MEMOP(O_LDC, 9, M_ABS, 1)); nops(2);
    for (int i = 0; i < NTAP; i += 2) begin
      emit(FPU(F_MACA, 4, 8, 0));
      if (i + 2 < NTAP) emit(MEMOP(O_LDC, 8, M_ABS, i + 2)); else nops(1);
      nops(1);
      emit(FPU(F_MACA, 5, 9, 0));
      if (i + 3 < NTAP) emit(MEMOP(O_LDC, 9, M_ABS, i + 3)); else nops(1);
      nops(1);
    end
    nops(5);
    emit(FPU(F_ADD, 6, 4, 5)); nops(5);
    emit(FPU(F_RND, 7, 6, 0)); nops(5);
    emit(MEMOP(O_ST, 7, M_ABS, 600)); emit(LDI(7, 0)); nops(2);
    emit(MEMOP(O_LD, 10, M_ABS, 600)); nops(2);
    emit(OUT(10, 3));
    acc[0] = {1'b0, 6'b100000, 16'd0}; acc[1] = acc[0];
    for (int i = 0; i < NTAP; i++) begin
      p = real2r(r2real(cs[i]) * m2real(xs[(20 + i) % 32]));
      acc[i % 2] = real2r(r2real(acc[i % 2]) + r2real(p));
    end
    tot = real2r(r2real(acc[0]) + r2real(acc[1]));
    expect_out(3, real2m(r2real(tot)));
    // ---- kernel 3: 12-point IMDCT, y[i] = sum_k X[k] cos(pi/24 (2i+7)(2k+1)),
    // six outputs of six products each (36 MACs). X sits in a six-word
    // circular buffer, so AR wraps back to X[0] after every output.
    emit(LDI(1, 800)); emit(LDI(2, 6)); nops(2);
    emit(AROP(1, 1, 0)); emit(AROP(2, 2, 0)); emit(AROP(0, 1, 0));
    for (int i = 0; i < 6; i++) begin
      logic [22:0] ae, ao;
      real exact, mag;
      emit(LDI(4, 0)); emit(LDI(5, 0)); nops(2); emit(LDH(4, 7'b0100000)); emit(LDH(5, 7'b0100000));
      emit(MEMOP(O_LDC, 8, M_ABS, 100 + 6 * i)); emit(MEMOP(O_LDC, 9, M_ABS, 101 + 6 * i)); nops(2);
      for (int k = 0; k < 6; k += 2) begin
        emit(FPU(F_MACA, 4, 8, 0));
        if (k + 2 < 6) emit(MEMOP(O_LDC, 8, M_ABS, 100 + 6 * i + k + 2)); else nops(1);
        nops(1);
        emit(FPU(F_MACA, 5, 9, 0));
        if (k + 3 < 6) emit(MEMOP(O_LDC, 9, M_ABS, 100 + 6 * i + k + 3)); else nops(1);
        nops(1);
      end
      nops(5);
      emit(FPU(F_ADD, 6, 4, 5)); nops(5);
      emit(FPU(F_RND, 7, 6, 0)); nops(5);
      emit(OUT(7, 6));
      ae = RZERO_R; ao = RZERO_R; exact = 0.0; mag = 0.0;
      for (int k = 0; k < 6; k++) begin
        p = real2r(r2real(imc[6 * i + k]) * m2real(imx[k]));
        if (k % 2 == 0) ae = real2r(r2real(ae) + r2real(p)); else ao = real2r(r2real(ao) + r2real(p));
        exact += $cos(PI / 24.0 * real'((2 * i + 7) * (2 * k + 1))) * m2real(imx[k]);
        mag += fabs(r2real(p));
      end
      imdct_exp[i] = real2m(r2real(real2r(r2real(ae) + r2real(ao))));
      imdct_exact[i] = exact; imdct_mag[i] = mag;
      expect_out(6, imdct_exp[i]);
    end
    // ---- kernel 4: dequantisation of small values, sign(v)|v|^(4/3) * gain,
    // the power taken from a 31-entry table indexed by v + 15 (register
    // indirect constant load) and the gain applied with one multiply.
    emit(LDI(13, 215)); emit(MEMOP(O_LDC, 14, M_ABS, 231)); nops(2);
    foreach (dqv[j]) begin
      emit(LDI(1, dqv[j])); nops(2);
      emit(ALU(A_ADD, 1, 1, 13)); nops(2);
      emit(MEMOP(O_LDC, 8, M_REG, 1)); nops(2);
      emit(FPU(F_MUL, 9, 8, 14)); nops(5);
      emit(FPU(F_RND, 10, 9, 0)); nops(5);
      emit(OUT(10, 8));
      expect_out(8, real2m(r2real(real2r(r2real(dqt[dqv[j] + 15]) * r2real(dqg)))));
    end
    // ---- kernel 5: m^(4/3) for three mantissas m in [1, 2) by a fifth-order
    // polynomial in t = m - 1.5 (Horner's rule), the three evaluations
    // interleaved so that each float result is used six slots later.
    for (int n = 0; n < 6; n++) emit(MEMOP(O_LDC, 10 + n, M_ABS, 300 + n));
    emit(MEMOP(O_LDC, 9, M_ABS, 306));
    for (int j = 0; j < 3; j++) emit(MEMOP(O_LDC, 1 + j, M_ABS, 310 + j));
    nops(2);
    for (int j = 0; j < 3; j++) emit(FPU(F_SUB, 1 + j, 1 + j, 9));
    nops(3);
    for (int j = 0; j < 3; j++) emit(FPU(F_MUL, 4 + j, 15, 1 + j));
    nops(3);
    for (int n = 4; n >= 0; n--) begin
      for (int j = 0; j < 3; j++) emit(FPU(F_ADD, 4 + j, 4 + j, 10 + n));
      nops(3);
      if (n > 0) begin
        for (int j = 0; j < 3; j++) emit(FPU(F_MUL, 4 + j, 4 + j, 1 + j));
        nops(3);
      end
    end
    for (int j = 0; j < 3; j++) emit(FPU(F_RND, 7 + j, 4 + j, 0));
    nops(3);
    for (int j = 0; j < 3; j++) begin
      logic [22:0] t, q;
      emit(OUT(7 + j, 7));
      t = real2r(r2real(pm[j]) - 1.5);
      q = real2r(r2real(pc[5]) * r2real(t));
      for (int n = 4; n >= 0; n--) begin
        q = real2r(r2real(q) + r2real(pc[n]));
        if (n > 0) q = real2r(r2real(q) * r2real(t));
      end
      poly_exp[j] = real2m(r2real(q));
      expect_out(7, poly_exp[j]);
    end
    // ---- kernel 6: Huffman decoding, one BTREE instruction per tree node.
    // Code: a = 0, b = 10, c = 110, end = 111. Symbols go out on port 4.
    timed = 1'b0;
    nbits = 0;
    for (int i = 0; i <= NSYM; i++) begin
      int sym;
      sym = (i == NSYM) ? 3 : int'($urandom_range(2));
      syms[i] = sym;
      case (sym)
        0: begin hbits[nbits] = 1'b0; nbits += 1; end
        1: begin hbits[nbits] = 1'b1; hbits[nbits + 1] = 1'b0; nbits += 2; end
        2: begin hbits[nbits] = 1'b1; hbits[nbits + 1] = 1'b1; hbits[nbits + 2] = 1'b0; nbits += 3; end
        default: begin hbits[nbits] = 1'b1; hbits[nbits + 1] = 1'b1; hbits[nbits + 2] = 1'b1; nbits += 3; end
      endcase
    end
    emit(LDI(1, 0)); emit(LDI(2, 700)); emit(LDI(11, 10)); emit(LDI(12, 11)); emit(LDI(13, 12)); nops(2);
    emit(AROP(2, 1, 0)); emit(AROP(0, 2, 0)); emit(SETBP(1));
    root = prog.size();
    emit(BTREE(root + 4)); emit(OUT(11, 4)); emit(BR(0, 0, root)); nops(1);      // node 0, leaf a
    emit(BTREE(root + 8)); emit(OUT(12, 4)); emit(BR(0, 0, root)); nops(1);      // node 1, leaf b
    emit(BTREE(root + 12)); emit(OUT(13, 4)); emit(BR(0, 0, root)); nops(1);     // node 2, leaf c
    emit(BR(0, 0, root + 14)); nops(1);                                          // leaf end
    for (int i = 0; i < NSYM; i++) expect_out(4, 16'(10 + syms[i]));
    emit(RDBP(1)); emit(AROP(3, 0, 2)); nops(2); emit(OUT(1, 5)); emit(OUT(2, 5));
    expect_out(5, 16'(nbits % 16)); expect_out(5, 16'(700 + nbits / 16));
    fin = prog.size(); emit(BR(0, 0, fin)); emit(OUT(0, 15)); expect_out(15, 16'd0);

    repeat (2) @(posedge clk);
    foreach (prog[i]) begin ld_we <= 1'b1; ld_sel <= 2'd0; ld_addr <= 13'(i); ld_data <= prog[i]; @(posedge clk); end
    for (int i = 0; i < 32; i++) begin ld_sel <= 2'd1; ld_addr <= 13'(500 + i); ld_data <= {8'd0, xs[i]}; @(posedge clk); end
    for (int i = 0; i < 10; i++) begin
      logic [15:0] w;
      for (int b = 0; b < 16; b++) w[15 - b] = (16 * i + b < nbits) ? hbits[16 * i + b] : 1'b0;
      ld_sel <= 2'd1; ld_addr <= 13'(700 + i); ld_data <= {8'd0, w}; @(posedge clk);
    end
    for (int i = 0; i < NTAP; i++) begin ld_sel <= 2'd2; ld_addr <= 13'(i); ld_data <= {1'b0, cs[i]}; @(posedge clk); end
    for (int i = 0; i < 6; i++) begin ld_sel <= 2'd1; ld_addr <= 13'(800 + i); ld_data <= {8'd0, imx[i]}; @(posedge clk); end
    for (int i = 0; i < 36; i++) begin ld_sel <= 2'd2; ld_addr <= 13'(100 + i); ld_data <= {1'b0, imc[i]}; @(posedge clk); end
    for (int i = 0; i < 31; i++) begin ld_sel <= 2'd2; ld_addr <= 13'(200 + i); ld_data <= {1'b0, dqt[i]}; @(posedge clk); end
    ld_sel <= 2'd2; ld_addr <= 13'd231; ld_data <= {1'b0, dqg}; @(posedge clk);
    for (int i = 0; i < 6; i++) begin ld_sel <= 2'd2; ld_addr <= 13'(300 + i); ld_data <= {1'b0, pc[i]}; @(posedge clk); end
    ld_sel <= 2'd2; ld_addr <= 13'd306; ld_data <= {1'b0, real2r(1.5)}; @(posedge clk);
    for (int i = 0; i < 3; i++) begin ld_sel <= 2'd2; ld_addr <= 13'(310 + i); ld_data <= {1'b0, pm[i]}; @(posedge clk); end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
  end

  int n_out = 0, first_cycle = -1, first_slot = -1;
  logic done = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.u_core.u_fp.in_valid && dut.u_core.u_fp.in_op == dsp_pkg::FPU_MACA) n_maca++;
    if (dut.u_core.u_ag.wrapped && dut.u_core.u_ag.inc) n_wrap++;
    if (dut.u_core.mem.btree) begin if (dut.u_core.flush) n_btree_taken++; else n_btree_fall++; end
    if (wb_conflict || stack_error) begin failures++; $display("FAIL write-back conflict or stack error"); end
    if (io_out_we && !done) begin
      checks += 2;
      if (exp_val.size() == 0) begin failures++; $display("FAIL unexpected OUT"); end
      else begin
        logic [19:0] e;
        int s;
        e = exp_val.pop_front(); s = exp_slot.pop_front();
        if ({io_out_port, io_out_data} !== e) begin
          failures++;
          $display("FAIL OUT #%0d: got port %0d %h, expected port %0d %h", n_out, io_out_port, io_out_data, e[19:16], e[15:0]);
        end
        if (first_cycle < 0) begin first_cycle = cycles; first_slot = s; end
        else if (s >= 0 && cycles - first_cycle != s - first_slot) begin
          failures++;
          $display("FAIL OUT #%0d came %0d cycles after the first, instruction distance %0d", n_out, cycles - first_cycle, s - first_slot);
        end
        if (io_out_port == 4'd15) done <= 1'b1;
        if (io_out_port == 4'd6) got6.push_back(io_out_data);
        if (io_out_port == 4'd7) got7.push_back(io_out_data);
        if (io_out_port == 4'd8) got8.push_back(io_out_data);
      end
      n_out++;
    end
  end

  initial begin
    wait (done);
    repeat (3) @(posedge clk);
    checks++; if (exp_val.size() != 0) begin failures++; $display("FAIL %0d OUTs missing", exp_val.size()); end
    checks++; if (n_maca != NTAP + 36) begin failures++; $display("FAIL %0d MACs issued, %0d expected", n_maca, NTAP + 36); end
    // accuracy against exact real arithmetic: within about one memory-float
    // rounding step of the result (2^-10 of the magnitude involved)
    checks++;
    if (got6.size() != 6) begin failures++; $display("FAIL %0d IMDCT outputs", got6.size()); end
    else foreach (got6[i])
      if (fabs(m2real(got6[i]) - imdct_exact[i]) > imdct_mag[i] * pow2(-10)) begin
        failures++; $display("FAIL IMDCT y[%0d] = %f, exact %f", i, m2real(got6[i]), imdct_exact[i]);
      end
    checks++;
    if (got8.size() != 8) begin failures++; $display("FAIL %0d dequantised outputs", got8.size()); end
    else foreach (got8[j]) begin
      real x;
      x = (dqv[j] < 0 ? -1.0 : 1.0) * $pow(fabs(real'(dqv[j])), 4.0 / 3.0) * $pow(2.0, -2.75);
      if (fabs(m2real(got8[j]) - x) > fabs(x) * pow2(-10)) begin
        failures++; $display("FAIL dequantised %0d: %f, exact %f", dqv[j], m2real(got8[j]), x);
      end
    end
    checks++;
    if (got7.size() != 3) begin failures++; $display("FAIL %0d polynomial outputs", got7.size()); end
    else foreach (got7[j]) begin
      real x;
      x = $pow(r2real(pm[j]), 4.0 / 3.0);
      if (fabs(m2real(got7[j]) - x) > x * pow2(-10)) begin
        failures++; $display("FAIL %f^(4/3): %f, exact %f", r2real(pm[j]), m2real(got7[j]), x);
      end
    end
    checks++;
    if (n_btree_taken + n_btree_fall != nbits || n_btree_taken == 0 || n_btree_fall == 0) begin
      failures++; $display("FAIL BTREE ran %0d+%0d times for %0d bits", n_btree_taken, n_btree_fall, nbits);
    end
    $display("Huffman: %0d symbols from %0d bits, %0d taken and %0d fall-through tree nodes",
             NSYM + 1, nbits, n_btree_taken, n_btree_fall);
    checks++; if (n_wrap == 0) begin failures++; $display("FAIL circular buffer never wrapped"); end
    begin
      real e6, e7, e8, x;
      e6 = 0.0; e7 = 0.0; e8 = 0.0;
      foreach (got6[i]) if (fabs(m2real(got6[i]) - imdct_exact[i]) / imdct_mag[i] > e6) e6 = fabs(m2real(got6[i]) - imdct_exact[i]) / imdct_mag[i];
      foreach (got7[j]) begin
        x = $pow(r2real(pm[j]), 4.0 / 3.0);
        if (fabs(m2real(got7[j]) - x) / x > e7) e7 = fabs(m2real(got7[j]) - x) / x;
      end
      foreach (got8[j]) if (dqv[j] != 0) begin
        x = (dqv[j] < 0 ? -1.0 : 1.0) * $pow(fabs(real'(dqv[j])), 4.0 / 3.0) * $pow(2.0, -2.75);
        if (fabs(m2real(got8[j]) - x) / fabs(x) > e8) e8 = fabs(m2real(got8[j]) - x) / fabs(x);
      end
      $display("largest relative error: IMDCT %.2e, polynomial x^(4/3) %.2e, table x^(4/3) %.2e (memory float step 2^-10 = %.2e)",
               e6, e7, e8, pow2(-10));
    end
    $display("%0d-tap dot product: %0d MACs, circular buffer wrapped %0d times; %0d instructions in %0d cycles",
             NTAP, n_maca, n_wrap, prog.size(), cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
