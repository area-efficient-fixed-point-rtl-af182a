// tb_adder_tree: self-checking test of the pipelined adder tree.
// Two instances: 16 operands with a register every two levels (latency 2, the
// filter's configuration) and 5 operands with a register on every level
// (latency 3, padded tree). New random operands are given on every enabled
// cycle, with random stall cycles ('en' low) in between; after every enabled
// edge the output must equal the sum of the operands given LAT enabled cycles
// earlier, and during a stall it must hold.
module tb_adder_tree;
  int checks = 0, failures = 0, stalls = 0;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic signed [17:0] inA [16];  logic signed [21:0] sumA;
  logic signed [9:0]  inB [5];   logic signed [12:0] sumB;

  adder_tree #(.N(16), .IW(18), .REG_EVERY(2)) uA (.clk(clk), .rst_n(rst_n), .en(en), .in(inA), .sum(sumA));
  adder_tree #(.N(5),  .IW(10), .REG_EVERY(1)) uB (.clk(clk), .rst_n(rst_n), .en(en), .in(inB), .sum(sumB));

  localparam int LATA = 2, LATB = 3, CYC = 400;
  longint refA [CYC], refB [CYC];

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c = 0;
    longint holdA, holdB;
    for (int k = 0; k < 16; k++) inA[k] = '0;
    for (int k = 0; k < 5; k++)  inB[k] = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sumA != 0 || sumB != 0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    while (c < CYC) begin
      @(negedge clk);
      if (($urandom % 5) == 0 && c > 3) begin
        en = 0; stalls++;
        holdA = sumA; holdB = sumB;
        @(posedge clk); #1;
        checks++;
        if (sumA != holdA || sumB != holdB) begin failures++; $display("FAIL stall hold"); end
        continue;
      end
      en = 1;
      refA[c] = 0; refB[c] = 0;
      for (int k = 0; k < 16; k++) begin
        inA[k] = (c < 4) ? ((c[0]) ? -18'sh20000 : 18'sh1FFFF) : 18'($urandom);
        refA[c] += longint'(inA[k]);
      end
      for (int k = 0; k < 5; k++) begin
        inB[k] = 10'($urandom);
        refB[c] += longint'(inB[k]);
      end
      @(posedge clk); #1;
      if (c >= LATA - 1) begin
        checks++;
        if (longint'(sumA) != refA[c-LATA+1]) begin
          failures++; $display("FAIL treeA cycle %0d got %0d exp %0d", c, sumA, refA[c-LATA+1]);
        end
      end
      if (c >= LATB - 1) begin
        checks++;
        if (longint'(sumB) != refB[c-LATB+1]) begin
          failures++; $display("FAIL treeB cycle %0d got %0d exp %0d", c, sumB, refB[c-LATB+1]);
        end
      end
      c++;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
