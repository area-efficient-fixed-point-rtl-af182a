// tb_dlms_sizes: runs the DLMS filter at the other filter lengths its area
// comparison covers, N = 8, 32 and 64 taps (latencies n1 = 5, 6 and 6), each
// against a bit-exact model of the delayed LMS recursion (see dlms_size_run).
module tb_dlms_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d8, d32, d64;
  int c8, c32, c64, f8, f32, f64;
  int checks = 0, failures = 0;

  dlms_size_run #(.N(8))  r8  (.clk(clk), .rst_n(rst_n), .done(d8),  .checks(c8),  .failures(f8));
  dlms_size_run #(.N(32)) r32 (.clk(clk), .rst_n(rst_n), .done(d32), .checks(c32), .failures(f32));
  dlms_size_run #(.N(64)) r64 (.clk(clk), .rst_n(rst_n), .done(d64), .checks(c64), .failures(f64));

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d8 && d32 && d64);
    checks   = c8 + c32 + c64;
    failures = f8 + f32 + f64;
    $display("N=8: %0d/%0d  N=32: %0d/%0d  N=64: %0d/%0d (failures/checks)", f8, c8, f32, c32, f64, c64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
