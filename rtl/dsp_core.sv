// dsp_core: a pipelined load-store DSP core whose registers hold 16-bit
// integers or 23-bit floats and whose data memory holds 16-bit floats.
//
// Pipelines (stage = cycle an instruction spends there):
//   integer:         IF  ID  EX  MEM  WB                   (5 stages)
//   floating point:  IF  ID  EX  MEM  F1  F2  F3  WB       (8 stages)
// IF presents the program counter to the program memory (synchronous read),
// ID decodes and reads up to three registers and resolves branches, EX does
// integer ALU work, address generation, AR/bit pointer updates, stores and
// I/O, MEM receives memory read data (expanding LDF words and extracting
// GETB bits), F1..F3 are the floating point stages (fp_pipe). Both pipes
// write through one shared register write port in WB.
//
// There is no inter-instruction dependency checking, no forwarding and no
// stall: software must leave two instructions between an integer or load
// result and its use, five after a floating point result, and must never
// let a floating point write-back (issued three instructions earlier) meet
// an integer write-back in the same cycle. If that happens the floating
// point result wins and wb_conflict is raised. Branches (JMP, BZ, BNZ,
// CALL, RET) act in ID and have one delay slot; BZ/BNZ test the integer part
// rs[15:0]; CALL pushes the address after the delay slot on the hardware
// stack.
//
// BTREE (one Huffman tree node) takes the next bit of the bit stream like
// a one-bit GETB and branches to its target when the bit is 1. The bit is
// known in MEM, so fetch runs on down the fall-through path; a taken BTREE
// flushes the three younger instructions (EX, ID, IF) and costs three
// cycles, a fall-through costs none. The instruction right after a BTREE
// must not be a CALL or RET: its stack action happens in ID, before the
// BTREE resolves.
//
// From the document: register and memory formats, 16 registers, load-store
// with separate program/data/constant memories, five and eight stage
// pipelines sharing fetch, decode and write-back, no dependency checking,
// the hardware PC stack, branch-if-zero/not-zero, bit access (one
// instruction per Huffman tree node) and MAC
// instructions using the one address register with auto-increment and
// modulo addressing, and I/O operations. The encoding, the stage
// boundaries, the delay slot, the BTREE flush and the I/O port form are
// this design's.
module dsp_core
  import dsp_pkg::*;
#(
  parameter int STACK_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // program memory
  output logic [12:0] pmem_addr,
  input  logic [23:0] pmem_rdata,
  // data memory, port A read/write, port B read
  output logic [12:0] dmem_a_addr,
  output logic        dmem_a_we,
  output logic [15:0] dmem_a_wdata,
  input  logic [15:0] dmem_a_rdata,
  output logic [12:0] dmem_b_addr,
  input  logic [15:0] dmem_b_rdata,
  // constant memory
  output logic [9:0]  cmem_addr,
  input  logic [22:0] cmem_rdata,
  // I/O
  output logic        io_in_rd,
  output logic [3:0]  io_in_port,
  input  logic [15:0] io_in_data,
  output logic        io_out_we,
  output logic [3:0]  io_out_port,
  output logic [15:0] io_out_data,
  // status
  output logic        wb_conflict,
  output logic        stack_error
);
  // ---------------------------------------------------------------- IF
  logic [12:0] pc, pc_next;
  logic        id_valid;
  logic [12:0] id_pc;
  assign pmem_addr = pc;

  // BTREE resolves in MEM: a taken one flushes the three younger
  // instructions (in EX, ID and IF) and redirects fetch.
  logic        flush;
  logic [12:0] flush_target;

  // ---------------------------------------------------------------- ID
  dec_t        d, d_raw;
  logic [22:0] qa, qb, qc;
  logic        br_taken;
  logic [12:0] br_target;
  // st_empty is left unread: a RET on an empty stack is reported as st_unf.
  logic        st_push, st_pop, st_empty, st_ovf, st_unf;
  logic [12:0] st_top;

  // write-back
  logic        wb_we;
  logic [3:0]  wb_wa;
  logic [22:0] wb_wd;

  instr_decoder u_dec (.instr(id_valid ? pmem_rdata : 24'h000000), .dec(d_raw));
  assign d = flush ? dec_t'('0) : d_raw;

  regfile #(.NREGS(16), .W(23)) u_rf (
    .clk, .rst_n, .ra(d.ra), .rb(d.rb), .rc(d.rc), .qa, .qb, .qc,
    .we(wb_we), .wa(wb_wa), .wd(wb_wd)
  );

  always_comb begin
    br_taken  = 1'b0;
    br_target = d.addr;
    if (d.br) begin
      unique case (d.br_cond)
        BR_JMP, BR_CALL: br_taken = 1'b1;
        BR_BZ:           br_taken = (qa[15:0] == 16'd0);
        BR_BNZ:          br_taken = (qa[15:0] != 16'd0);
      endcase
    end
    if (d.ret) begin
      br_taken  = 1'b1;
      br_target = st_top;
    end
  end
  assign st_push = d.br && (d.br_cond == BR_CALL);
  assign st_pop  = d.ret;

  pc_stack #(.DEPTH(STACK_DEPTH), .AW(13)) u_stack (
    .clk, .rst_n, .push(st_push), .pop(st_pop), .din(13'(id_pc + 13'd2)),
    .top(st_top), .empty(st_empty), .overflow(st_ovf), .underflow(st_unf)
  );
  assign stack_error = st_ovf | st_unf;

  assign pc_next = flush ? flush_target : br_taken ? br_target : 13'(pc + 13'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      id_pc    <= '0;
      id_valid <= 1'b0;
    end else begin
      pc       <= pc_next;
      id_pc    <= pc;
      id_valid <= !flush;
    end
  end

  // ---------------------------------------------------------------- EX
  dec_t        ex, ex_raw;
  logic [22:0] ex_a, ex_b, ex_c;
  logic [12:0] ar, ar_next;
  logic        ar_wrapped;   // modulo wrap, a status the core itself does not need
  logic [3:0]  bp;
  logic        bit_wrap;
  logic [15:0] alu_y;
  logic [22:0] ex_res;
  logic [12:0] ea;
  logic        ex_uses_ar;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_raw <= '0; ex_a <= '0; ex_b <= '0; ex_c <= '0;
    end else begin
      ex_raw <= d; ex_a <= qa; ex_b <= qb; ex_c <= qc;
    end
  end

  assign ex = flush ? dec_t'('0) : ex_raw;

  int_alu u_alu (.op(ex.alu_op), .a(ex_a[15:0]), .b(ex.alu_imm ? ex.imm : ex_b[15:0]), .y(alu_y));

  assign ex_uses_ar = (ex.mem_rd || ex.mem_wr || ex.cmem_rd ||
                       (ex.fp_op && ex.fpu_op == FPU_MACA)) &&
                      (ex.amode == AM_ARI || ex.amode == AM_AR);
  always_comb begin
    unique case (ex.amode)
      AM_ABS:  ea = ex.addr;
      AM_REG:  ea = ex_a[12:0];
      default: ea = ar;
    endcase
    if (ex.bit_get || ex.btree) ea = ar;
  end

  addr_gen #(.AW(13)) u_ag (
    .clk, .rst_n,
    .set_ar(ex.ar_wr && ex.ar_sel == 2'd0), .set_base(ex.ar_wr && ex.ar_sel == 2'd1),
    .set_len(ex.ar_wr && ex.ar_sel == 2'd2), .wdata(ex_a[12:0]),
    .inc(bit_wrap || (ex_uses_ar && ex.amode == AM_ARI)),
    .ar, .ar_next, .wrapped(ar_wrapped)
  );

  // memory ports are driven from EX; read data arrives in MEM
  assign dmem_a_addr  = ea;
  assign dmem_a_we    = ex.mem_wr;
  assign dmem_a_wdata = ex_c[15:0];
  assign dmem_b_addr  = ar_next;
  assign cmem_addr    = ea[9:0];
  assign io_in_rd     = ex.io_in;
  assign io_in_port   = ex.io_port;

  // MEM-stage side of bit access
  logic [3:0]  mem_bpoff;
  logic [4:0]  mem_bn;
  logic [15:0] bits;

  bit_access u_bits (
    .clk, .rst_n,
    .ex_get(ex.bit_get || ex.btree), .ex_n(ex.bit_n), .ex_setbp(ex.bit_setbp), .ex_bpval(ex_a[3:0]),
    .bp, .wrap(bit_wrap),
    .words({dmem_a_rdata, dmem_b_rdata}), .mem_off(mem_bpoff), .mem_n(mem_bn), .bits
  );

  always_comb begin
    ex_res = {7'd0, alu_y};
    if (ex.is_ldi)                  ex_res = {7'd0, ex.imm};
    if (ex.is_ldh)                  ex_res = {ex.imm[6:0], ex_c[15:0]};
    if (ex.ar_sel == 2'd3)          ex_res = {10'd0, ar};
    if (ex.bit_rdbp)                ex_res = {19'd0, bp};
    if (ex.io_in)                   ex_res = {7'd0, io_in_data};
  end

  // ---------------------------------------------------------------- MEM
  // The whole decoded word travels down the pipe; only the fields that MEM
  // and the later stages act on are read from it.
  dec_t        mem;
  logic [22:0] mem_a, mem_b, mem_c, mem_res;
  logic [22:0] mem_ld;
  logic [22:0] ldf_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0; mem_a <= '0; mem_b <= '0; mem_c <= '0; mem_res <= '0;
      mem_bpoff <= '0; mem_bn <= 5'd1;
      io_out_we <= 1'b0; io_out_port <= '0; io_out_data <= '0;
    end else begin
      mem <= ex; mem_a <= ex_a; mem_b <= ex_b; mem_c <= ex_c; mem_res <= ex_res;
      mem_bpoff <= bp; mem_bn <= ex.bit_n;
      io_out_we   <= ex.io_out;
      io_out_port <= ex.io_port;
      io_out_data <= ex_a[15:0];
    end
  end

  fp_expand u_exp (.a(dmem_a_rdata), .y(ldf_val));

  assign flush        = mem.btree && bits[0];
  assign flush_target = mem.addr;

  always_comb begin
    mem_ld = mem_res;
    if (mem.mem_rd)  mem_ld = mem.mem_fp ? ldf_val : {7'd0, dmem_a_rdata};
    if (mem.cmem_rd) mem_ld = cmem_rdata;
    if (mem.bit_get) mem_ld = {7'd0, bits};
  end

  // integer write-back register (stage 5)
  logic        iwb_valid;
  logic [3:0]  iwb_rd;
  logic [22:0] iwb_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iwb_valid <= 1'b0; iwb_rd <= '0; iwb_data <= '0;
    end else begin
      iwb_valid <= mem.int_wb;
      iwb_rd    <= mem.rd;
      iwb_data  <= mem_ld;
    end
  end

  // ---------------------------------------------------------------- F1..F3
  logic        fwb_valid;
  logic [3:0]  fwb_rd;
  logic [22:0] fwb_data;

  fp_pipe u_fp (
    .clk, .rst_n,
    .in_valid(mem.fp_op), .in_op(mem.fpu_op), .in_rd(mem.rd),
    .in_a(mem_a), .in_b(mem.fpu_op == FPU_MACA ? ldf_val : mem_b), .in_c(mem_c),
    .out_valid(fwb_valid), .out_rd(fwb_rd), .out_data(fwb_data)
  );

  // ---------------------------------------------------------------- WB
  assign wb_we       = iwb_valid | fwb_valid;
  assign wb_wa       = fwb_valid ? fwb_rd   : iwb_rd;
  assign wb_wd       = fwb_valid ? fwb_data : iwb_data;
  assign wb_conflict = iwb_valid & fwb_valid;

  // Scheduling rule the hardware does not enforce: one write-back per cycle.
  a_wb_conflict: assert property (@(posedge clk) disable iff (!rst_n) !wb_conflict)
    else $error("integer and floating point write-back in the same cycle");
endmodule
