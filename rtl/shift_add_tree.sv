// shift_add_tree: combines radix-4 digit-position sums into one word.
//
// Input s[j] is the (signed, IW-bit) sum belonging to digit position j of a
// radix-4 multiplier, so the result is  sum_j s[j] * 4^j.  The D inputs (D a
// power of two) are merged pairwise in log2(D) levels; at level l the upper
// operand of each pair is shifted left by 2*2^l bits before the addition.
// Every addition is done by a carry-select adder (csla). Purely combinational;
// the caller registers the result. OW = IW + 2*(D-1) + 1 bits, which holds the
// exact result.
// Replacing the plain shift-adders by carry-select adders follows the filter's
// description; the pairwise arrangement is this design's choice.
module shift_add_tree #(
  parameter int unsigned D   = 4,
  parameter int unsigned IW  = 22,
  localparam int unsigned OW = IW + 2 * (D - 1) + 1
) (
  input  logic signed [IW-1:0] s   [D],
  output logic signed [OW-1:0] out
);

  localparam int unsigned LEVELS = (D > 1) ? $clog2(D) : 0;

  if ((1 << LEVELS) != D) begin : g_bad_d
    $error("shift_add_tree: D must be a power of two");
  end

  logic signed [OW-1:0] leaf [D];
  for (genvar i = 0; i < D; i++) begin : g_leaf
    assign leaf[i] = OW'(s[i]);
  end

  if (LEVELS == 0) begin : g_single
    assign out = leaf[0];
  end else begin : g_tree
    for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
      localparam int unsigned CNT = D >> (l + 1);
      localparam int unsigned SH  = 2 << l;   // 2 * 2^l bits
      logic signed [OW-1:0] node [CNT];

      for (genvar i = 0; i < CNT; i++) begin : g_node
        logic signed [OW-1:0] a, b;
        logic                 unused_cout;
        if (l == 0) begin : g_first
          assign a = leaf[2*i];
          assign b = leaf[2*i+1] <<< SH;
        end else begin : g_next
          assign a = g_tree.g_lvl[l-1].node[2*i];
          assign b = g_tree.g_lvl[l-1].node[2*i+1] <<< SH;
        end
        csla #(.WIDTH(OW)) u_add (
          .a(a), .b(b), .cin(1'b0), .sum(node[i]), .cout(unused_cout)
        );
      end
    end
    assign out = g_tree.g_lvl[LEVELS-1].node[0];
  end

endmodule
