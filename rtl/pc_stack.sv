// pc_stack: the hardware return-address stack used by CALL and RET. A push
// stores din on top, a pop removes the top entry; top always shows the
// current top entry. Pushing onto a full stack drops the push and sets the
// sticky overflow flag; popping an empty stack sets underflow. Both flags
// clear on reset. Push and pop in the same cycle replace the top entry.
// The stack itself is the document's; its depth (16) and the error flags
// are this design's choices.
module pc_stack #(
  parameter int DEPTH = 16,
  parameter int AW    = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic          pop,
  input  logic [AW-1:0] din,
  output logic [AW-1:0] top,
  output logic          empty,
  output logic          overflow,
  output logic          underflow
);
  localparam int PW = $clog2(DEPTH + 1);
  localparam int IW = $clog2(DEPTH);
  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] cnt;
  logic [IW-1:0] tix, nix;   // index of the top entry and of the next free one

  assign empty = (cnt == '0);
  assign tix   = IW'(cnt - 1'b1);
  assign nix   = IW'(cnt);
  assign top   = empty ? '0 : mem[tix];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (push && pop) begin
      if (empty) underflow <= 1'b1;
      else       mem[tix] <= din;
    end else if (push) begin
      if (cnt == PW'(DEPTH)) overflow <= 1'b1;
      else begin
        mem[nix] <= din;
        cnt      <= cnt + 1'b1;
      end
    end else if (pop) begin
      if (empty) underflow <= 1'b1;
      else       cnt <= cnt - 1'b1;
    end
  end
endmodule
