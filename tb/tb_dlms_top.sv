// tb_dlms_top: end-to-end test of the DLMS adaptive filter at its default
// size (16 taps, 8-bit data, 16-bit weights, mu = 2^-1, n1 = 5, n2 = 1).
//
// Workload: system identification. The unknown system is a 10-tap band-pass
// FIR filter, h_n = (sin(wH(n-4.5)) - sin(wL(n-4.5))) / (pi(n-4.5)) with
// wH = 0.7pi and wL = 0.3pi, scaled so that its output has the power of its
// input. The input is Gaussian white noise (sum of 12 uniform variables) with
// standard deviation 1/4, quantised to 8 bits; the desired response is the
// unknown system's output plus white noise 70 dB below it, quantised to 8
// bits. After 2000 samples the unknown system changes to -2 times itself,
// which drives the error into saturation, and the filter has to track it for another 1000 samples. Random stall cycles ('en' low) are
// mixed in throughout.
//
// Checks:
//  * a bit-exact software model of the delayed LMS recursion
//      y_n = sum_k w_n[k] x_(n-k),  e_n = sat8((d_n*2^14 - y_n) >> 14),
//      w_(n+1)[k] = sat16(w_n[k] + ((e_(n-6) * x_(n-6-k)) >> 1))
//    must match e_out and y_out of every sample, 6 enabled cycles after the
//    sample went in (n1 + 1 with the input register), and the weights every
//    cycle; out_valid must rise exactly then;
//  * the filter must converge: the mean squared error over the last 200
//    samples of the first phase must lie at least 20 dB under that of the
//    first 200 (10 dB in the second phase, where the larger desired response
//    is clipped to 8 bits), and the weights must approach the unknown system;
//  * coverage: stalls, weight adaptation and error saturation (after the
//    change of the system) must each have happened.
module tb_dlms_top;
  localparam int N = 16, L = 8, WW = 16, WF = 14, LAT = 5, M = 6;
  localparam int P1 = 2000, P2 = 1000, S = P1 + P2;
  localparam int YW = WW + L + 4 + 1;

  int checks = 0, failures = 0;
  int n_stall = 0, n_adapt = 0, n_esat = 0;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic signed [L-1:0]  x_in, d_in, e_out;
  logic signed [YW-1:0] y_out;
  logic                 out_valid;
  logic signed [WW-1:0] w_out [N];

  dlms_top dut (.clk(clk), .rst_n(rst_n), .en(en), .x_in(x_in), .d_in(d_in),
                .e_out(e_out), .y_out(y_out), .out_valid(out_valid), .w_out(w_out));

  // stimulus and model state
  real    h [10];
  longint xs [S];
  longint ds [S];
  longint ey [S], ee [S];
  longint mw [N];
  longint dw [S][N];

  function automatic real gauss();
    real g = 0.0;
    for (int i = 0; i < 12; i++) g += real'($urandom % 65536) / 65536.0;
    return g - 6.0;
  endfunction

  function automatic longint q8(input real v);
    longint r;
    r = longint'($floor(v * 128.0 + 0.5));
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  function automatic longint xat(input int i);
    return (i < 0) ? 0 : xs[i];
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p, t, dr, mse_a, mse_b, mse_c, mse_d, werr;
    longint yy, eq, acc;

    // unknown system
    p = 0.0;
    for (int n = 0; n < 10; n++) begin
      t = real'(n) - 4.5;
      h[n] = ($sin(0.7 * 3.14159265358979 * t) - $sin(0.3 * 3.14159265358979 * t))
             / (3.14159265358979 * t);
      p += h[n] * h[n];
    end
    for (int n = 0; n < 10; n++) h[n] = h[n] / $sqrt(p);

    // input and desired response
    for (int i = 0; i < S; i++) xs[i] = q8(0.25 * gauss());
    for (int i = 0; i < S; i++) begin
      dr = 0.0;
      for (int n = 0; n < 10; n++) dr += h[n] * real'(xat(i - n)) / 128.0;
      if (i >= P1) dr = -2.0 * dr;
      dr += 0.25 * 3.16e-4 * gauss();
      ds[i] = q8(dr);
    end

    // bit-exact model
    for (int k = 0; k < N; k++) mw[k] = 0;
    for (int i = 0; i < S; i++) begin
      if (i - M - 1 >= 0)
        for (int k = 0; k < N; k++) begin
          acc = mw[k] + dw[i-M-1][k];
          if (acc > 32767) acc = 32767;
          if (acc < -32768) acc = -32768;
          mw[k] = acc;
        end
      yy = 0;
      for (int k = 0; k < N; k++) yy += mw[k] * xat(i - k);
      eq = ((ds[i] <<< WF) - yy) >>> WF;
      if (eq > 127)  begin eq = 127;  if (i >= M) n_esat++; end
      if (eq < -128) begin eq = -128; if (i >= M) n_esat++; end
      ey[i] = yy;
      ee[i] = eq;
      for (int k = 0; k < N; k++) dw[i][k] = (eq * xat(i - k)) >>> 1;
    end

    x_in = '0; d_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int c = 0; c < S + LAT; c++) begin
      @(negedge clk);
      if (c > 2 && ($urandom % 10) == 0) begin
        logic signed [L-1:0] he;
        en = 0; n_stall++; he = e_out;
        x_in = L'($urandom); d_in = L'($urandom);
        @(posedge clk); #1;
        checks++;
        if (e_out != he) begin failures++; $display("FAIL stall hold"); end
        c--;
        continue;
      end
      en = 1;
      x_in = (c < S) ? L'(xs[c]) : '0;
      d_in = (c < S) ? L'(ds[c]) : '0;
      @(posedge clk); #1;
      checks++;
      if (out_valid != (c >= LAT)) begin
        failures++; $display("FAIL out_valid at cycle %0d", c);
      end
      if (c >= LAT) begin
        automatic int i = c - LAT;
        checks += 2;
        if (longint'(e_out) != ee[i]) begin
          failures++;
          if (failures < 10) $display("FAIL e sample %0d got %0d exp %0d", i, e_out, ee[i]);
        end
        if (longint'(y_out) != ey[i]) begin
          failures++;
          if (failures < 10) $display("FAIL y sample %0d got %0d exp %0d", i, y_out, ey[i]);
        end
      end
    end

    // final weights: model after the last enabled edge
    for (int i = S; i < S + LAT; i++)
      for (int k = 0; k < N; k++)
        if (i - M - 1 >= 0 && i - M - 1 < S) begin
          acc = mw[k] + dw[i-M-1][k];
          if (acc > 32767) acc = 32767;
          if (acc < -32768) acc = -32768;
          mw[k] = acc;
        end
    werr = 0.0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (longint'(w_out[k]) != mw[k]) begin
        failures++; $display("FAIL final w[%0d] got %0d exp %0d", k, w_out[k], mw[k]);
      end
      if (w_out[k] != 0) n_adapt++;
      t = (k < 10) ? -2.0 * h[k] : 0.0;
      werr += (real'(w_out[k]) / 16384.0 - t) ** 2;
    end

    // convergence
    mse_a = 0; mse_b = 0; mse_c = 0; mse_d = 0;
    for (int i = 0; i < 200; i++) begin
      mse_a += (real'(ee[i]) / 128.0) ** 2;
      mse_b += (real'(ee[P1 - 200 + i]) / 128.0) ** 2;
      mse_c += (real'(ee[P1 + i]) / 128.0) ** 2;
      mse_d += (real'(ee[S - 200 + i]) / 128.0) ** 2;
    end
    $display("MSE first 200: %0.2f dB, samples 1800-1999: %0.2f dB", 10.0 * $log10(mse_a / 200), 10.0 * $log10(mse_b / 200 + 1e-12));
    $display("MSE after change: %0.2f dB, last 200: %0.2f dB", 10.0 * $log10(mse_c / 200), 10.0 * $log10(mse_d / 200 + 1e-12));
    $display("weight error (squared distance to unknown system): %0.6f", werr);
    checks += 3;
    if (mse_b > mse_a / 100.0) begin failures++; $display("FAIL no convergence in phase 1"); end
    if (mse_d > mse_c / 10.0) begin failures++; $display("FAIL no convergence in phase 2"); end
    if (werr > 0.01) begin failures++; $display("FAIL weights far from the unknown system"); end

    $display("coverage: stalls=%0d adapted_weights=%0d error_saturations=%0d", n_stall, n_adapt, n_esat);
    checks++;
    if (n_stall == 0 || n_adapt == 0 || n_esat == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
