// regfile: the general purpose register file, NREGS registers of W bits
// (16 x 23 in the document). Each register holds either a 16-bit integer in
// its low bits or a 23-bit register float. Three asynchronous read ports
// serve the decode stage (two operands plus the accumulator or store data of
// FMAC, ST and LDH); one write port serves the shared write-back stage. A
// register written in a cycle is seen by a read of it in the same cycle
// (write-through), so a result is usable by the instruction that decodes
// while it is written back. Registers clear on reset.
// The register count and width are the document's; the port count,
// write-through and reset are this design's choices.
module regfile #(
  parameter int NREGS = 16,
  parameter int W     = 23,
  localparam int RA   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RA-1:0] ra, rb, rc,
  output logic [W-1:0]  qa, qb, qc,
  input  logic          we,
  input  logic [RA-1:0] wa,
  input  logic [W-1:0]  wd
);
  logic [W-1:0] r [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (we) begin
      r[wa] <= wd;
    end
  end

  assign qa = (we && wa == ra) ? wd : r[ra];
  assign qb = (we && wa == rb) ? wd : r[rb];
  assign qc = (we && wa == rc) ? wd : r[rc];
endmodule
