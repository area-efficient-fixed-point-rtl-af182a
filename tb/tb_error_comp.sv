// tb_error_comp: self-checking test of the error-computation block at its
// default size (16 taps, 8-bit data, 16-bit weights with 14 fraction bits).
// Every enabled cycle gets a fresh random set of taps and weights, so each
// output can be checked on its own: y must equal sum_k w_k*x_k exactly and e
// must equal (d*2^14 - y) shifted down by 14 bits and saturated to 8 bits.
// The desired response of a sample is given one cycle before its taps, as the
// delay line in front of the block would do. Outputs must appear exactly
// N1 = 5 enabled cycles after the taps, and hold during stall cycles. The test
// also counts that both saturation limits and the unsaturated range occur.
module tb_error_comp;
  localparam int N = 16, L = 8, WW = 16, WF = 14, N1 = 5, YW = WW + L + 4 + 1;
  localparam int S = 600;

  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0, in_range = 0, stalls = 0;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic signed [L-1:0]  x_taps [N];
  logic signed [WW-1:0] w [N];
  logic signed [L-1:0]  d_in, e;
  logic signed [YW-1:0] y;

  error_comp dut (.clk(clk), .rst_n(rst_n), .en(en), .x_taps(x_taps), .w(w),
                  .d_in(d_in), .e(e), .y(y));

  logic signed [L-1:0]  xs [S+1][N];
  logic signed [WW-1:0] ws [S+1][N];
  logic signed [L-1:0]  ds [S+1];
  longint ey [S+1];
  longint ee [S+1];

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint yy, ef, eq;
    int mode;
    // stimulus and expected results
    for (int i = 0; i <= S; i++) begin
      mode = $urandom % 4;
      yy = 0;
      for (int k = 0; k < N; k++) begin
        xs[i][k] = L'($urandom);
        ws[i][k] = (mode == 0) ? WW'($urandom) : WW'($signed(11'($urandom)));
        yy += longint'(xs[i][k]) * longint'(ws[i][k]);
      end
      ds[i] = L'($urandom);
      ef = (longint'(ds[i]) <<< WF) - yy;
      eq = ef >>> WF;
      ey[i] = yy;
      if (eq > 127)       begin ee[i] = 127;  end
      else if (eq < -128) begin ee[i] = -128; end
      else                begin ee[i] = eq;   end
    end

    for (int k = 0; k < N; k++) begin x_taps[k] = '0; w[k] = '0; end
    d_in = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (e != 0 || y != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;

    for (int c = 0; c < S; c++) begin
      @(negedge clk);
      if (c > 8 && ($urandom % 6) == 0) begin
        logic signed [L-1:0] he;  logic signed [YW-1:0] hy;
        en = 0; stalls++; he = e; hy = y;
        d_in = L'($urandom);
        @(posedge clk); #1;
        checks++;
        if (e != he || y != hy) begin failures++; $display("FAIL stall hold"); end
        c--;
        continue;
      end
      en = 1;
      d_in = ds[c];
      for (int k = 0; k < N; k++) begin
        x_taps[k] = (c > 0) ? xs[c-1][k] : '0;
        w[k]      = (c > 0) ? ws[c-1][k] : '0;
      end
      @(posedge clk); #1;
      if (c >= N1) begin
        automatic int i = c - N1;
        checks += 2;
        if (longint'(y) != ey[i]) begin
          failures++; $display("FAIL y sample %0d got %0d exp %0d", i, y, ey[i]);
        end
        if (longint'(e) != ee[i]) begin
          failures++; $display("FAIL e sample %0d got %0d exp %0d", i, e, ee[i]);
        end
        if (ee[i] == 127) sat_hi++;
        else if (ee[i] == -128) sat_lo++;
        else in_range++;
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || in_range == 0 || stalls == 0) begin
      failures++;
      $display("FAIL coverage sat_hi=%0d sat_lo=%0d in_range=%0d stalls=%0d", sat_hi, sat_lo, in_range, stalls);
    end
    $display("coverage: sat_hi=%0d sat_lo=%0d in_range=%0d stalls=%0d", sat_hi, sat_lo, in_range, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
