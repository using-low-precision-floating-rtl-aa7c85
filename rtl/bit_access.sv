// bit_access: the bit pointer and bit extractor behind the GETB (get bits)
// instruction that the Huffman decoder and bit stream parser use. The bit
// stream lies in data memory, 16 bits per word, most significant bit first,
// at word AR and bit offset BP (0 = MSB). In the EX stage a GETB of n bits
// (1..16) reports the current offset (bp) and advances BP by n; when BP
// passes the end of the word it wraps (BP - 16) and 'wrap' asks the address
// generator to advance AR. In the MEM stage the two words read at AR and
// AR+1 (words) are concatenated and the n bits starting at the registered
// offset are returned right-aligned in 'bits'. BP can be written (SETBP).
// That bit access instructions exist and use AR with auto-increment is the
// document's; this field layout and two-word window are this design's.
module bit_access (
  input  logic        clk,
  input  logic        rst_n,
  // EX stage
  input  logic        ex_get,
  input  logic [4:0]  ex_n,
  input  logic        ex_setbp,
  input  logic [3:0]  ex_bpval,
  output logic [3:0]  bp,
  output logic        wrap,
  // MEM stage
  input  logic [31:0] words,
  input  logic [3:0]  mem_off,
  input  logic [4:0]  mem_n,
  output logic [15:0] bits
);
  logic [4:0] sum;
  assign sum  = {1'b0, bp} + ex_n;
  assign wrap = ex_get && sum[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        bp <= '0;
    else if (ex_setbp) bp <= ex_bpval;
    else if (ex_get)   bp <= sum[3:0];
  end

  logic [31:0] sh;   // only the upper half, the 16-bit window, is used
  always_comb begin
    sh   = words << mem_off;
    bits = 16'(sh[31:16] >> (5'd16 - mem_n));
  end
endmodule
