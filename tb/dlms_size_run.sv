// dlms_size_run: test harness that runs one dlms_top of N taps against a
// bit-exact software model of the delayed LMS recursion.
//
// Used by tb_dlms_sizes to cover the filter lengths other than the default.
// It drives S random samples (Gaussian-like input, desired response from a
// fixed random FIR system) with random stall cycles, and checks e_out and
// y_out of every sample at its expected latency N1 + 1, where
// N1 = ceil(log2(N)/2) + 3, and all weights at the end. 'done' rises when the
// run is over; 'checks' and 'failures' count the comparisons.
module dlms_size_run #(
  parameter int N = 8,
  parameter int S = 600
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int L = 8, WW = 16, WF = 14;
  localparam int LAT = ($clog2(N) + 1) / 2 + 3;
  localparam int M   = LAT + 1;
  localparam int YW  = WW + L + $clog2(N) + 1;

  logic en;
  logic signed [L-1:0]  x_in, d_in, e_out;
  logic signed [YW-1:0] y_out;
  logic                 out_valid;
  logic signed [WW-1:0] w_out [N];

  dlms_top #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .d_in(d_in),
                         .e_out(e_out), .y_out(y_out), .out_valid(out_valid), .w_out(w_out));

  longint xs [S], ds [S], ey [S], ee [S];
  longint mw [N];
  longint dw [S][N];
  longint g  [6];

  function automatic longint xat(input int i);
    return (i < 0) ? 0 : xs[i];
  endfunction

  function automatic longint sat(input longint v, input longint lo, input longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  initial begin
    longint yy, eq;
    done = 0; checks = 0; failures = 0; en = 0; x_in = '0; d_in = '0;
    for (int n = 0; n < 6; n++) g[n] = longint'($signed(6'($urandom)));
    for (int i = 0; i < S; i++)
      xs[i] = longint'($signed(6'($urandom))) + longint'($signed(6'($urandom)));
    for (int i = 0; i < S; i++) begin
      yy = 0;
      for (int n = 0; n < 6; n++) yy += g[n] * xat(i - n);
      ds[i] = sat(yy >>> 5, -128, 127);
    end
    for (int k = 0; k < N; k++) mw[k] = 0;
    for (int i = 0; i < S + LAT; i++) begin
      if (i - M - 1 >= 0 && i - M - 1 < S)
        for (int k = 0; k < N; k++) mw[k] = sat(mw[k] + dw[i-M-1][k], -32768, 32767);
      if (i < S) begin
        yy = 0;
        for (int k = 0; k < N; k++) yy += mw[k] * xat(i - k);
        eq = sat(((ds[i] <<< WF) - yy) >>> WF, -128, 127);
        ey[i] = yy; ee[i] = eq;
        for (int k = 0; k < N; k++) dw[i][k] = (eq * xat(i - k)) >>> 1;
      end
    end

    @(posedge rst_n);
    for (int c = 0; c < S + LAT; c++) begin
      @(negedge clk);
      if (c > 2 && ($urandom % 8) == 0) begin
        en = 0;
        @(posedge clk);
        c--;
        continue;
      end
      en = 1;
      x_in = (c < S) ? L'(xs[c]) : '0;
      d_in = (c < S) ? L'(ds[c]) : '0;
      @(posedge clk); #1;
      checks++;
      if (out_valid != (c >= LAT)) begin failures++; $display("FAIL N=%0d out_valid cycle %0d", N, c); end
      if (c >= LAT) begin
        automatic int i = c - LAT;
        checks += 2;
        if (longint'(e_out) != ee[i] || longint'(y_out) != ey[i]) begin
          failures++;
          if (failures < 5) $display("FAIL N=%0d sample %0d e %0d/%0d y %0d/%0d", N, i, e_out, ee[i], y_out, ey[i]);
        end
      end
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (longint'(w_out[k]) != mw[k]) begin failures++; $display("FAIL N=%0d w[%0d]", N, k); end
    end
    done = 1;
  end
endmodule
