// dlms_top: fixed-point delayed-LMS (DLMS) adaptive FIR filter.
//
// The filter adapts N weights so that its output y_n = w^T x_n follows a
// desired response d_n, using the LMS rule with a delayed error:
//     e_n     = d_n - w_n^T x_n
//     w_(n+1) = w_n + mu * e_(n-m) * x_(n-m),      m = n1 + n2 (6 by default)
// The delay m is what allows both halves of the filter to be pipelined. The
// error-computation block (error_comp) needs n1 = N1 cycles (5 for 16 taps)
// from the sample in the delay line to the registered error; the
// weight-update block (weight_update) adds n2 = 1 cycle, its increment
// register. One tap delay line of N + N1 samples serves both blocks: taps
// 0..N-1 feed the filter and taps N1..N1+N-1, which hold the samples the
// current error was computed from, feed the weight update.
//
// Interface: one sample pair (x_in, d_in) is taken on every rising clock edge
// with 'en' high; with 'en' low the whole filter holds its state. The error and
// output of a sample appear on e_out and y_out N1 + 1 enabled cycles later
// (6 by default); out_valid rises once the first sample has come through.
// w_out shows the current weights. Asynchronous active-low reset clears the
// weights and all pipeline registers.
//
// Number formats: x, d and e are L-bit two's-complement fractions (L-1
// fraction bits); weights have WW bits with WF fraction bits; y_out is exact
// with L-1+WF fraction bits. mu = 2^-MU_SHIFT. The split into error
// computation and weight update, the delays n1 = 5 and n2 = 1, the 2-bit
// partial product generation and the carry-select adders follow the filter's
// description; word lengths, the step size and the handshake are this
// design's choices.
module dlms_top
  import lms_pkg::*;
#(
  parameter int unsigned N         = DEF_N,
  parameter int unsigned L         = DEF_L,
  parameter int unsigned WW        = DEF_WW,
  parameter int unsigned WF        = DEF_WF,
  parameter int unsigned MU_SHIFT  = DEF_MU_SHIFT,
  parameter int unsigned REG_EVERY = DEF_REG_EVERY,
  localparam int unsigned N1       = tree_latency($clog2(N), REG_EVERY) + 3,
  localparam int unsigned YW       = WW + L + $clog2(N) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [L-1:0]  x_in,
  input  logic signed [L-1:0]  d_in,
  output logic signed [L-1:0]  e_out,
  output logic signed [YW-1:0] y_out,
  output logic                 out_valid,
  output logic signed [WW-1:0] w_out [N]
);

  localparam int unsigned DEPTH = N + N1;

  logic signed [L-1:0]  taps   [DEPTH];
  logic signed [L-1:0]  x_filt [N];
  logic signed [L-1:0]  x_upd  [N];
  logic signed [WW-1:0] w      [N];
  logic signed [L-1:0]  e;

  tap_delay_line #(.W(L), .DEPTH(DEPTH)) u_dline (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x_in), .taps(taps)
  );

  for (genvar k = 0; k < N; k++) begin : g_win
    assign x_filt[k] = taps[k];
    assign x_upd[k]  = taps[N1 + k];
  end

  error_comp #(
    .N(N), .L(L), .WW(WW), .WF(WF), .REG_EVERY(REG_EVERY)
  ) u_err (
    .clk(clk), .rst_n(rst_n), .en(en),
    .x_taps(x_filt), .w(w), .d_in(d_in), .e(e), .y(y_out)
  );

  weight_update #(
    .N(N), .L(L), .WW(WW), .WF(WF), .MU_SHIFT(MU_SHIFT)
  ) u_wup (
    .clk(clk), .rst_n(rst_n), .en(en), .e(e), .x_taps(x_upd), .w(w)
  );

  assign e_out = e;
  assign w_out = w;

  // marks outputs that belong to a sample given after reset
  logic [N1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vld <= '0;
    else if (en) vld <= {vld[N1-1:0], 1'b1};
  end
  assign out_valid = vld[N1];

endmodule
