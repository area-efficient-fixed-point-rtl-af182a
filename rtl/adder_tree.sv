// adder_tree: pipelined binary adder tree.
//
// Sums N signed IW-bit operands. The operands are added in pairs, level by
// level, log2(N) levels deep (N is padded with zeros up to a power of two).
// A pipeline register follows every REG_EVERY levels and always the last one,
// so the latency is LAT = ceil(log2(N)/REG_EVERY) cycles of 'en'; with the
// defaults (16 operands, two levels per stage) that is two cycles. The sum is
// OW = IW + log2(N) bits wide, which cannot overflow. All registers advance
// only when 'en' is high and clear on reset.
// The error-computation block uses one such tree per radix-4 digit position.
// The placement of the registers (balanced, two adder levels per stage) is
// this design's choice.
module adder_tree #(
  parameter int unsigned N         = 16,
  parameter int unsigned IW        = 18,
  parameter int unsigned REG_EVERY = 2,
  localparam int unsigned LEVELS   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned OW       = IW + LEVELS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [IW-1:0] in  [N],
  output logic signed [OW-1:0] sum
);

  localparam int unsigned NP = 1 << LEVELS;

  logic signed [OW-1:0] leaf [NP];
  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign leaf[i] = OW'(in[i]);
    end else begin : g_pad
      assign leaf[i] = '0;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned CNT = NP >> (l + 1);
    localparam bit          REG = (((l + 1) % REG_EVERY) == 0) || (l == LEVELS - 1);
    logic signed [OW-1:0] node [CNT];

    for (genvar i = 0; i < CNT; i++) begin : g_node
      logic signed [OW-1:0] a, b, s;
      if (l == 0) begin : g_first
        assign a = leaf[2*i];
        assign b = leaf[2*i+1];
      end else begin : g_next
        assign a = g_lvl[l-1].node[2*i];
        assign b = g_lvl[l-1].node[2*i+1];
      end
      assign s = a + b;

      if (REG) begin : g_reg
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)  node[i] <= '0;
          else if (en) node[i] <= s;
        end
      end else begin : g_comb
        assign node[i] = s;
      end
    end
  end

  assign sum = g_lvl[LEVELS-1].node[0];

endmodule
