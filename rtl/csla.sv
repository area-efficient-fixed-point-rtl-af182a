// csla: carry-select adder.
//
// The operands are cut into blocks of BLOCK bits. The lowest block is a plain
// ripple adder fed by cin. Every higher block computes two sums at once, one
// assuming a carry-in of 0 and one assuming 1, and a multiplexer picks the right
// one when the real carry from the block below arrives. The carry therefore
// passes through one multiplexer per block instead of rippling through every
// bit. Purely combinational: sum = a + b + cin, cout is the carry out of the top
// bit. The filter uses this adder in its shift-add trees and for the final
// error subtraction, in place of a plain shift-adder; the block size is this
// design's choice.
module csla #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  // carry into each block; carry[NBLK] is the carry out
  logic [NBLK:0] carry;
  assign carry[0] = cin;

  for (genvar g = 0; g < NBLK; g++) begin : g_blk
    localparam int unsigned LO = g * BLOCK;
    localparam int unsigned BW = (LO + BLOCK <= WIDTH) ? BLOCK : WIDTH - LO;

    logic [BW-1:0] ab, bb;
    assign ab = a[LO +: BW];
    assign bb = b[LO +: BW];

    if (g == 0) begin : g_ripple
      assign {carry[g+1], sum[LO +: BW]} = {1'b0, ab} + {1'b0, bb} + {{BW{1'b0}}, carry[g]};
    end else begin : g_select
      logic [BW:0] s0, s1;  // {carry out, sum} for carry-in 0 and 1
      assign s0 = {1'b0, ab} + {1'b0, bb};
      assign s1 = {1'b0, ab} + {1'b0, bb} + {{BW{1'b0}}, 1'b1};
      assign {carry[g+1], sum[LO +: BW]} = carry[g] ? s1 : s0;
    end
  end

  assign cout = carry[NBLK];

endmodule
