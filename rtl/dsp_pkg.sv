// dsp_pkg: number formats, instruction encoding and shared types of the
// floating point DSP core.
//
// Number formats (bit layout and value formulas follow the document):
//   register float, 23 bits: [22] sign, [21:16] two's complement exponent e,
//     [15:0] mantissa m; x = (-1)^s * 2^(e-11) * (1 + m/65536), e = -32 is zero.
//   memory float, 16 bits:   [15] sign, [14:10] two's complement exponent e,
//     [9:0] mantissa m;  x = (-1)^s * 2^(e-11) * (1 + m/1024),  e = -16 is zero.
//   register integer: value in [15:0], bits [22:16] unused (written as zero).
// Both formats use the same bias, so a memory exponent is widened by sign
// extension. The instruction encoding below is this design's own; the
// document gives only the word width (24 bits) and the instruction classes.
package dsp_pkg;

  // Widths and zero encodings for users of the package (testbenches and
  // firmware tools); the modules spell the widths out in their ports.
  localparam int RW  = 23;  // register width
  localparam int MW  = 16;  // memory float / data word width
  localparam int IW  = 24;  // instruction width
  localparam int AW  = 13;  // program / data address width
  localparam int CAW = 10;  // constant memory address width

  localparam logic [5:0] REXP_ZERO = 6'b100000;  // -32
  localparam logic [4:0] MEXP_ZERO = 5'b10000;   // -16
  localparam logic [22:0] RZERO    = {1'b0, REXP_ZERO, 16'h0000};
  localparam logic [15:0] MZERO    = {1'b0, MEXP_ZERO, 10'h000};

  typedef struct packed {
    logic        sign;
    logic [5:0]  exp;
    logic [15:0] man;
  } rfloat_t;

  typedef struct packed {
    logic        sign;
    logic [4:0]  exp;
    logic [9:0]  man;
  } mfloat_t;

  // Major opcodes, instruction bits [23:20].
  typedef enum logic [3:0] {
    OP_MISC = 4'h0,  // [19:18] = 0: no operation, 1: BTREE (bit branch)
    OP_LDI  = 4'h1,  // rd = {7'b0, imm16}
    OP_LDH  = 4'h2,  // rd[22:16] = imm[6:0], rd[15:0] kept
    OP_ALU  = 4'h3,  // rd = ra <fn> rb                  (fn in [3:0])
    OP_ALUI = 4'h4,  // rd = ra <fn> sext(imm8)          (fn in [11:8])
    OP_FPU  = 4'h5,  // floating point                   (fn in [3:0])
    OP_LD   = 4'h6,  // rd = zext(dmem[ea])
    OP_LDF  = 4'h7,  // rd = expand(dmem[ea])
    OP_ST   = 4'h8,  // dmem[ea] = rd[15:0]
    OP_LDC  = 4'h9,  // rd = cmem[ea]
    OP_AR   = 4'hA,  // address register access         (fn in [1:0])
    OP_BIT  = 4'hB,  // bit access                      (fn in [15:14])
    OP_BR   = 4'hC,  // JMP / BZ / BNZ / CALL           (cond in [19:18])
    OP_RET  = 4'hD,  // return from subroutine
    OP_IN   = 4'hE,  // rd = io input from port [3:0]
    OP_OUT  = 4'hF   // io output port [3:0] = ra[15:0]
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0, ALU_SUB = 4'h1, ALU_AND = 4'h2, ALU_OR  = 4'h3,
    ALU_XOR = 4'h4, ALU_SHL = 4'h5, ALU_SHR = 4'h6, ALU_SRA = 4'h7,
    ALU_MOVB = 4'h8  // y = b
  } alu_op_e;

  typedef enum logic [3:0] {
    FPU_ADD  = 4'h0,  // rd = ra + rb
    FPU_SUB  = 4'h1,  // rd = ra - rb
    FPU_MUL  = 4'h2,  // rd = ra * rb
    FPU_MAC  = 4'h3,  // rd = rd + ra * rb
    FPU_MACA = 4'h4,  // rd = rd + ra * expand(dmem[AR]), AR post-incremented
    FPU_RND  = 4'h5,  // rd = {7'b0, round(ra)}  (memory float in [15:0])
    FPU_INT  = 4'h6   // rd = {7'b0, int(ra)}
  } fpu_op_e;

  // Memory addressing modes, bits [15:14] of LD/LDF/ST/LDC.
  typedef enum logic [1:0] {
    AM_ABS  = 2'd0,  // ea = imm13 [12:0]
    AM_REG  = 2'd1,  // ea = reg[ra][12:0], ra in [3:0]
    AM_ARI  = 2'd2,  // ea = AR, then AR advances (modulo)
    AM_AR   = 2'd3   // ea = AR
  } amode_e;

  typedef enum logic [1:0] {
    BR_JMP = 2'd0, BR_BZ = 2'd1, BR_BNZ = 2'd2, BR_CALL = 2'd3
  } brcond_e;

  // Decoded instruction.
  typedef struct packed {
    logic        valid;     // not a NOP
    logic [3:0]  rd;
    logic [3:0]  ra;
    logic [3:0]  rb;
    logic [3:0]  rc;        // third read port (accumulator / store data)
    logic        int_wb;    // writes rd through the integer pipe (stage 5)
    logic        fp_op;     // goes down the floating point pipe (stage 8)
    fpu_op_e     fpu_op;
    alu_op_e     alu_op;
    logic        alu_imm;   // operand b is the sign-extended imm8
    logic [15:0] imm;
    logic        is_ldi;
    logic        is_ldh;
    logic        mem_rd;    // data memory load (LD, LDF)
    logic        mem_fp;    // LDF: expand the loaded word
    logic        mem_wr;    // ST
    logic        cmem_rd;   // LDC
    amode_e      amode;
    logic [12:0] addr;
    logic        ar_wr;     // AR/BASE/LEN write
    logic [1:0]  ar_sel;    // 0 AR, 1 BASE, 2 LEN, 3 read AR into rd
    logic        bit_get;   // GETB
    logic        bit_setbp; // set bit pointer from ra
    logic        bit_rdbp;  // rd = bit pointer
    logic        btree;     // BTREE: take one bit, branch to addr if it is 1
    logic [4:0]  bit_n;     // 1..16
    logic        br;        // branch class instruction
    brcond_e     br_cond;
    logic        ret;
    logic        io_in;
    logic        io_out;
    logic [3:0]  io_port;
  } dec_t;

endpackage
