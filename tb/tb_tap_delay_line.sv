// tb_tap_delay_line: self-checking test of the sample delay line.
// Random samples are shifted in with random stall cycles; after every edge
// all 21 taps are compared with a software copy of the history, and the reset
// value is checked to be zero.
module tb_tap_delay_line;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic signed [7:0] x;
  logic signed [7:0] taps [21];
  logic signed [7:0] hist [21];

  tap_delay_line #(.W(8), .DEPTH(21)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .taps(taps));

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    for (int k = 0; k < 21; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      x  = 8'($urandom);
      if (en) begin
        for (int k = 20; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
      end
      @(posedge clk); #1;
      for (int k = 0; k < 21; k++) begin
        checks++;
        if (taps[k] != hist[k]) begin
          failures++; $display("FAIL tap %0d cycle %0d got %0d exp %0d", k, c, taps[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
