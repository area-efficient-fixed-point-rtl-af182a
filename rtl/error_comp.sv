// error_comp: error-computation block of the delayed-LMS filter.
//
// Computes  y_n = sum_k w_k * x_(n-k)  and  e_n = d_n - y_n  for one new sample
// per enabled cycle, in a pipeline of N1 = 3 + LAT_TREE stages (5 with the
// defaults, 16 taps):
//   1. one partial product generator (ppg) per tap splits the sample x_(n-k)
//      into L/2 radix-4 digits and forms digit * w_k for each; the N*L/2
//      partial products are registered;
//   2. one pipelined adder tree per digit position sums that position over all
//      N taps (LAT_TREE stages, registers every REG_EVERY levels);
//   3. a shift-add tree built from carry-select adders merges the L/2 digit
//      sums into y_n, which is registered;
//   4. a carry-select adder subtracts y_n from the desired response, aligned
//      by an N1-stage delay of d, and the error is rounded down to L bits with
//      saturation and registered.
// Multiplying per digit position first and summing across taps before the
// shift-add is what lets all taps share a single shift-add tree.
//
// Interface: x_taps[k] comes from the shared tap delay line (already
// registered, taps[0] is the newest sample); d_in is the desired response given
// in the same cycle as the sample that enters the delay line; w are the
// current weights. With x and d presented together, e and y of that sample
// appear N1 enabled cycles after the delay line took it, N1 + 1 cycles after it
// was presented. Every register advances only when 'en' is high.
//
// Number formats: x, d and e are L-bit fractions (L-1 fraction bits), weights
// have WF fraction bits, y is exact with L-1+WF fraction bits. The two main
// blocks, the partial product generator, the adder trees and the carry-select
// adder follow the filter's description; word lengths, the number of pipeline
// stages and the placement of the registers are this design's choices.
module error_comp
  import lms_pkg::*;
#(
  parameter int unsigned N         = DEF_N,
  parameter int unsigned L         = DEF_L,
  parameter int unsigned WW        = DEF_WW,
  parameter int unsigned WF        = DEF_WF,
  parameter int unsigned REG_EVERY = DEF_REG_EVERY,
  localparam int unsigned D        = L / 2,
  localparam int unsigned PW       = WW + 2,
  localparam int unsigned TW       = PW + $clog2(N),
  localparam int unsigned YW       = TW + 2 * (D - 1) + 1,
  localparam int unsigned LAT_TREE = tree_latency($clog2(N), REG_EVERY),
  localparam int unsigned N1       = LAT_TREE + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [L-1:0]  x_taps [N],
  input  logic signed [WW-1:0] w      [N],
  input  logic signed [L-1:0]  d_in,
  output logic signed [L-1:0]  e,
  output logic signed [YW-1:0] y
);

  // ---------------- stage 1: partial products --------------------------------
  logic signed [PW-1:0] pp_c [N][D];  // combinational, by tap
  logic signed [PW-1:0] pp_r [D][N];  // registered, by digit position

  for (genvar k = 0; k < N; k++) begin : g_tap
    ppg #(.MW(WW), .MPW(L)) u_ppg (
      .mcand (w[k]),
      .mplier(x_taps[k]),
      .pp    (pp_c[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < D; j++)
        for (int k = 0; k < N; k++) pp_r[j][k] <= '0;
    end else if (en) begin
      for (int j = 0; j < D; j++)
        for (int k = 0; k < N; k++) pp_r[j][k] <= pp_c[k][j];
    end
  end

  // ---------------- stage 2: one adder tree per digit position ---------------
  logic signed [TW-1:0] dsum [D];
  for (genvar j = 0; j < D; j++) begin : g_tree
    adder_tree #(.N(N), .IW(PW), .REG_EVERY(REG_EVERY)) u_tree (
      .clk(clk), .rst_n(rst_n), .en(en), .in(pp_r[j]), .sum(dsum[j])
    );
  end

  // ---------------- stage 3: shift-add tree -> y -----------------------------
  logic signed [YW-1:0] y_c, y_r;
  shift_add_tree #(.D(D), .IW(TW)) u_sat (.s(dsum), .out(y_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y_r <= '0;
    else if (en) y_r <= y_c;
  end

  // ---------------- desired-response alignment ------------------------------
  logic signed [L-1:0] d_dly [N1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N1; i++) d_dly[i] <= '0;
    end else if (en) begin
      d_dly[0] <= d_in;
      for (int i = 1; i < N1; i++) d_dly[i] <= d_dly[i-1];
    end
  end

  // ---------------- stage 4: e = d - y, quantised ----------------------------
  localparam int unsigned EW = YW + 1;
  logic [EW-1:0]        sub_a, sub_b, e_full_u;
  logic signed [EW-1:0] e_full, e_q;
  logic                 unused_cout;
  logic signed [L-1:0]  e_c;

  assign sub_a = EW'(signed'(d_dly[N1-1])) << WF;
  assign sub_b = ~(EW'(y_r));
  csla #(.WIDTH(EW)) u_sub (
    .a(sub_a), .b(sub_b), .cin(1'b1), .sum(e_full_u), .cout(unused_cout)
  );

  localparam logic signed [EW-1:0] EMAX = EW'((1 << (L - 1)) - 1);
  localparam logic signed [EW-1:0] EMIN = -EW'(1 << (L - 1));

  always_comb begin
    e_full = signed'(e_full_u);
    e_q    = e_full >>> WF;          // drop the weight fraction bits (floor)
    if (e_q > EMAX)      e_c = EMAX[L-1:0];
    else if (e_q < EMIN) e_c = EMIN[L-1:0];
    else                 e_c = e_q[L-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e <= '0;
      y <= '0;
    end else if (en) begin
      e <= e_c;
      y <= y_r;
    end
  end

endmodule
