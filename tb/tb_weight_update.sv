// tb_weight_update: self-checking test of the weight-update block at its
// default size (16 taps, 8-bit data, 16-bit weights with 14 fraction bits,
// mu = 2^-1). Random errors and tap windows are applied on enabled cycles with
// stalls in between. A software model keeps the increment register and the
// weights: increment = floor(e*x_k / 2), weight += previous increment,
// saturated to 16 bits. After every edge all 16 weights are compared. Runs of
// same-signed large inputs drive the weights into both saturation limits,
// which the test requires to happen.
module tb_weight_update;
  localparam int N = 16, L = 8, WW = 16;
  localparam int C = 800;

  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, stalls = 0;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic signed [L-1:0]  e;
  logic signed [L-1:0]  x_taps [N];
  logic signed [WW-1:0] w [N];

  weight_update dut (.clk(clk), .rst_n(rst_n), .en(en), .e(e), .x_taps(x_taps), .w(w));

  longint mw [N], mdw [N];

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    e = '0;
    for (int k = 0; k < N; k++) begin x_taps[k] = '0; mw[k] = 0; mdw[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < C; c++) begin
      @(negedge clk);
      en = (c < 10) || (($urandom % 5) != 0);
      if (!en) stalls++;
      // phases: random, push up, random, push down, random
      if ((c / 100) % 4 == 1) begin
        e = 8'sd100 + L'($urandom % 27);
        for (int k = 0; k < N; k++) x_taps[k] = 8'sd90 + L'($urandom % 37);
      end else if ((c / 100) % 4 == 3) begin
        e = -8'sd100 - L'($urandom % 28);
        for (int k = 0; k < N; k++) x_taps[k] = 8'sd90 + L'($urandom % 37);
      end else begin
        e = L'($urandom);
        for (int k = 0; k < N; k++) x_taps[k] = L'($urandom);
      end
      if (en) begin
        for (int k = 0; k < N; k++) begin
          acc = mw[k] + mdw[k];
          if (acc > 32767) begin acc = 32767; sat_hi++; end
          if (acc < -32768) begin acc = -32768; sat_lo++; end
          mw[k]  = acc;
          mdw[k] = (longint'(e) * longint'(x_taps[k])) >>> 1;
        end
      end
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (longint'(w[k]) != mw[k]) begin
          failures++;
          $display("FAIL w[%0d] cycle %0d got %0d exp %0d", k, c, w[k], mw[k]);
        end
      end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || stalls == 0) begin
      failures++; $display("FAIL coverage sat_hi=%0d sat_lo=%0d stalls=%0d", sat_hi, sat_lo, stalls);
    end
    $display("coverage: sat_hi=%0d sat_lo=%0d stalls=%0d", sat_hi, sat_lo, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
