// weight_update: weight-update block of the delayed-LMS filter.
//
// For every tap k it forms the increment  mu * e * x_k  and adds it to the
// weight:  w_k <= w_k + (e * x_k) * 2^-MU_SHIFT.  Each product is built like
// those of the error-computation block: a partial product generator (ppg)
// splits the error into L/2 radix-4 digits, and a shift-add tree of
// carry-select adders merges the digit products. The step size is a power of
// two, so mu costs only a shift. The increments are registered first (one
// pipeline stage, the weight-update delay n2 = 1) and added to the weights in
// the next enabled cycle, with saturation to WW bits.
//
// Interface: e is the registered error of sample n and x_taps[k] must be the
// sample x_(n-k) that was used to compute it, i.e. the window of the shared
// delay line that lags by the error-computation latency. w[k] is the weight
// register itself. All registers advance only when 'en' is high and clear on
// reset, so the filter starts from all-zero weights.
//
// Number formats: e and x are L-bit fractions (L-1 fraction bits), so their
// product has 2(L-1) fraction bits; it is shifted right by
// MU_SHIFT + 2(L-1) - WF (floor) to give the weight increment with WF fraction
// bits. The update rule follows the filter's description; the power-of-two
// step size, the word lengths and saturation are this design's choices.
module weight_update
  import lms_pkg::*;
#(
  parameter int unsigned N        = DEF_N,
  parameter int unsigned L        = DEF_L,
  parameter int unsigned WW       = DEF_WW,
  parameter int unsigned WF       = DEF_WF,
  parameter int unsigned MU_SHIFT = DEF_MU_SHIFT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [L-1:0]  e,
  input  logic signed [L-1:0]  x_taps [N],
  output logic signed [WW-1:0] w      [N]
);

  localparam int unsigned D     = L / 2;
  localparam int unsigned PW    = L + 2;
  localparam int unsigned PRW   = PW + 2 * (D - 1) + 1;      // = 2L + 1
  localparam int unsigned SHIFT = MU_SHIFT + 2 * (L - 1) - WF;
  localparam int unsigned AW    = (PRW > WW ? PRW : WW) + 1;  // accumulator width

  localparam logic signed [AW-1:0] WMAX = AW'((1 << (WW - 1)) - 1);
  localparam logic signed [AW-1:0] WMIN = -AW'(1 << (WW - 1));

  if (WF > MU_SHIFT + 2 * (L - 1)) begin : g_bad_wf
    $error("weight_update: WF must not exceed MU_SHIFT + 2(L-1)");
  end

  logic signed [PRW-1:0] dw_r [N];   // registered increments

  for (genvar k = 0; k < N; k++) begin : g_tap
    logic signed [PW-1:0]  pp [D];
    logic signed [PRW-1:0] prod, dw_c;
    logic signed [AW-1:0]  acc;

    ppg #(.MW(L), .MPW(L)) u_ppg (.mcand(x_taps[k]), .mplier(e), .pp(pp));
    shift_add_tree #(.D(D), .IW(PW)) u_sat (.s(pp), .out(prod));

    assign dw_c = prod >>> SHIFT;

    always_comb begin
      acc = AW'(w[k]) + AW'(dw_r[k]);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dw_r[k] <= '0;
        w[k]    <= '0;
      end else if (en) begin
        dw_r[k] <= dw_c;
        if (acc > WMAX)      w[k] <= WMAX[WW-1:0];
        else if (acc < WMIN) w[k] <= WMIN[WW-1:0];
        else                 w[k] <= acc[WW-1:0];
      end
    end
  end

endmodule
