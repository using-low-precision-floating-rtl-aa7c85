// dsp_top: the floating point DSP with its three memories: program memory
// (PMEM_DEPTH x 24), data memory (DMEM_DEPTH x 16, two ports) and constant
// memory (CMEM_DEPTH x 23), defaults 6800, 6100 and 900 words as in the
// document. While rst_n is low the core is held and a loader port (ld_we,
// ld_sel 0 = program, 1 = data, 2 = constant, ld_addr, ld_data) writes the
// memories, one word per cycle; after reset the core starts at address 0.
// The I/O instructions appear on the io_* ports: io_in_data is sampled in
// the cycle io_in_rd is high; io_out_we/port/data are registered outputs.
// wb_conflict flags a write-back collision (a scheduling error) and
// stack_error a return-address stack overflow or underflow.
// The loader port is this design's choice; the document does not say how
// the memories of its prototype were filled.
module dsp_top #(
  parameter int PMEM_DEPTH = 6800,
  parameter int DMEM_DEPTH = 6100,
  parameter int CMEM_DEPTH = 900
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_we,
  input  logic [1:0]  ld_sel,
  input  logic [12:0] ld_addr,
  input  logic [23:0] ld_data,
  output logic        io_in_rd,
  output logic [3:0]  io_in_port,
  input  logic [15:0] io_in_data,
  output logic        io_out_we,
  output logic [3:0]  io_out_port,
  output logic [15:0] io_out_data,
  output logic        wb_conflict,
  output logic        stack_error
);
  logic [12:0] pmem_addr;
  logic [23:0] pmem_rdata;
  logic [12:0] c_a_addr, c_b_addr, a_addr;
  logic        c_a_we, a_we;
  logic [15:0] c_a_wdata, a_wdata, a_rdata, b_rdata;
  logic [9:0]  cmem_addr;
  logic [22:0] cmem_rdata;
  logic        loading;

  // rst_n clears the core asynchronously and also, as a plain level, opens
  // the loader path: the memories are written only while reset is held.
  assign loading = !rst_n && ld_we;

  dsp_core u_core (
    .clk, .rst_n,
    .pmem_addr, .pmem_rdata,
    .dmem_a_addr(c_a_addr), .dmem_a_we(c_a_we), .dmem_a_wdata(c_a_wdata), .dmem_a_rdata(a_rdata),
    .dmem_b_addr(c_b_addr), .dmem_b_rdata(b_rdata),
    .cmem_addr, .cmem_rdata,
    .io_in_rd, .io_in_port, .io_in_data, .io_out_we, .io_out_port, .io_out_data,
    .wb_conflict, .stack_error
  );

  prog_mem #(.DEPTH(PMEM_DEPTH), .W(24), .AW(13)) u_pmem (
    .clk, .addr(pmem_addr), .rdata(pmem_rdata),
    .we(loading && ld_sel == 2'd0), .waddr(ld_addr), .wdata(ld_data)
  );

  assign a_addr  = loading ? ld_addr : c_a_addr;
  assign a_we    = loading ? (ld_sel == 2'd1) : (rst_n && c_a_we);
  assign a_wdata = loading ? ld_data[15:0] : c_a_wdata;

  data_mem #(.DEPTH(DMEM_DEPTH), .AW(13)) u_dmem (
    .clk, .a_addr, .a_we, .a_wdata, .a_rdata, .b_addr(c_b_addr), .b_rdata
  );

  const_mem #(.DEPTH(CMEM_DEPTH), .W(23), .AW(10)) u_cmem (
    .clk, .addr(cmem_addr), .rdata(cmem_rdata),
    .we(loading && ld_sel == 2'd2), .waddr(ld_addr[9:0]), .wdata(ld_data[22:0])
  );
endmodule
