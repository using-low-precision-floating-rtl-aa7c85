// instr_decoder: splits a 24-bit instruction word into the control fields
// of dsp_pkg::dec_t used by the decode stage and the stages after it.
// Purely combinational. The encoding (all fields below) is this design's
// own: the document gives the word width and the instruction classes (load
// and store, integer and floating point register operations, bit access,
// MAC, branch-if-zero / branch-if-not-zero, subroutine call and return, I/O)
// but not their encoding. BTREE, a branch on the next bit of the bit
// stream, makes one Huffman tree node one instruction, as the document
// describes the Huffman decoder.
//   [23:20] major opcode (dsp_pkg::opcode_e), [19:16] rd,
//   ALU/FPU: [15:12] ra, [11:8] rb, [3:0] function
//   ALUI: [15:12] ra, [11:8] function, [7:0] signed immediate
//   LDI: [15:0] immediate; LDH: [6:0] value for rd[22:16]
//   LD/LDF/ST/LDC: [15:14] addressing mode, [12:0] address, [3:0] ra
//   AR: [15:12] ra, [1:0] select; BIT: [13:12] sub-op, [11:8] ra, [3:0] n-1
//   BR: [19:18] condition, [17:14] ra, [12:0] target; IN/OUT: [3:0] port
//   MISC: [19:18] 0 = NOP (all zero word), 1 = BTREE with target [12:0]
module instr_decoder
  import dsp_pkg::*;
(
  input  logic [23:0] instr,
  output dec_t        dec
);
  opcode_e op;
  assign op = opcode_e'(instr[23:20]);

  always_comb begin
    dec         = '0;
    dec.valid   = (instr != 24'h000000);
    dec.rd      = instr[19:16];
    dec.ra      = instr[15:12];
    dec.rb      = instr[11:8];
    dec.rc      = instr[19:16];
    dec.addr    = instr[12:0];
    dec.amode   = amode_e'(instr[15:14]);
    dec.io_port = instr[3:0];
    dec.alu_op  = alu_op_e'(instr[3:0]);
    dec.fpu_op  = fpu_op_e'(instr[3:0]);
    dec.br_cond = brcond_e'(instr[19:18]);
    dec.bit_n   = {1'b0, instr[3:0]} + 5'd1;
    dec.imm     = instr[15:0];
    unique case (op)
      OP_MISC: begin
        dec.btree = (instr[19:18] == 2'd1);
        dec.bit_n = 5'd1;
        dec.valid = dec.btree;
      end
      OP_LDI: begin dec.is_ldi = 1'b1; dec.int_wb = 1'b1; end
      OP_LDH: begin dec.is_ldh = 1'b1; dec.int_wb = 1'b1; end
      OP_ALU: dec.int_wb = 1'b1;
      OP_ALUI: begin
        dec.int_wb  = 1'b1;
        dec.alu_imm = 1'b1;
        dec.alu_op  = alu_op_e'(instr[11:8]);
        dec.imm     = {{8{instr[7]}}, instr[7:0]};
      end
      OP_FPU: begin
        dec.fp_op = 1'b1;
        if (dec.fpu_op == FPU_MACA) dec.amode = AM_ARI;
      end
      OP_LD, OP_LDF: begin
        dec.mem_rd = 1'b1;
        dec.mem_fp = (op == OP_LDF);
        dec.int_wb = 1'b1;
        dec.ra     = instr[3:0];
      end
      OP_LDC: begin dec.cmem_rd = 1'b1; dec.int_wb = 1'b1; dec.ra = instr[3:0]; end
      OP_ST:  begin dec.mem_wr = 1'b1; dec.ra = instr[3:0]; end
      OP_AR: begin
        dec.ar_sel = instr[1:0];
        dec.ar_wr  = (instr[1:0] != 2'd3);
        dec.int_wb = (instr[1:0] == 2'd3);
      end
      OP_BIT: begin
        dec.ra = instr[11:8];
        unique case (instr[13:12])
          2'd0:    begin dec.bit_get = 1'b1; dec.int_wb = 1'b1; end
          2'd1:    dec.bit_setbp = 1'b1;
          2'd2:    begin dec.bit_rdbp = 1'b1; dec.int_wb = 1'b1; end
          default: dec.valid = 1'b0;
        endcase
      end
      OP_BR:  begin dec.br = 1'b1; dec.ra = instr[17:14]; end
      OP_RET: dec.ret = 1'b1;
      OP_IN:  begin dec.io_in = 1'b1; dec.int_wb = 1'b1; end
      OP_OUT: dec.io_out = 1'b1;
      default: ;
    endcase
  end
endmodule
