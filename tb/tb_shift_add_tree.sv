// tb_shift_add_tree: self-checking test of the shift-add tree.
// Random signed digit sums, including the extreme values, are merged and the
// result compared with  sum_j s[j]*4^j  computed in 64-bit integers, for 4
// inputs (the filter's case) and for 8 inputs (three levels).
module tb_shift_add_tree;
  int checks = 0, failures = 0;

  logic signed [21:0] s4 [4];  logic signed [28:0] o4;
  logic signed [9:0]  s8 [8];  logic signed [24:0] o8;

  shift_add_tree #(.D(4), .IW(22)) u4 (.s(s4), .out(o4));
  shift_add_tree #(.D(8), .IW(10)) u8 (.s(s8), .out(o8));

  task automatic check();
    longint r4 = 0, r8 = 0;
    for (int j = 0; j < 4; j++) r4 += longint'(s4[j]) <<< (2 * j);
    for (int j = 0; j < 8; j++) r8 += longint'(s8[j]) <<< (2 * j);
    checks += 2;
    if (longint'(o4) != r4) begin
      failures++;
      $display("FAIL sat4 got %0d exp %0d", o4, r4);
    end
    if (longint'(o8) != r8) begin
      failures++;
      $display("FAIL sat8 got %0d exp %0d", o8, r8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) s4[j] = 22'sh1FFFFF;
    for (int j = 0; j < 8; j++) s8[j] = 10'sh1FF;
    #1; check();
    for (int j = 0; j < 4; j++) s4[j] = -22'sh200000;
    for (int j = 0; j < 8; j++) s8[j] = -10'sh200;
    #1; check();
    for (int i = 0; i < 3000; i++) begin
      for (int j = 0; j < 4; j++) s4[j] = 22'($urandom);
      for (int j = 0; j < 8; j++) s8[j] = 10'($urandom);
      #1; check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
