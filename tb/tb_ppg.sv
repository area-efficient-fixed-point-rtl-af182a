// tb_ppg: self-checking test of the radix-4 partial product generator.
// For random and corner-case signed operands it checks each partial product
// against digit * multiplicand (the top digit read as signed) and the
// recombined sum  sum_j pp[j]*4^j  against the integer product. Two
// configurations: 16-bit multiplicand by 8-bit multiplier (filter), and 8 by 8
// (weight update).
module tb_ppg;
  int checks = 0, failures = 0;

  logic signed [15:0] mA;  logic [7:0] qA;  logic signed [17:0] ppA [4];
  logic signed [7:0]  mB;  logic [7:0] qB;  logic signed [9:0]  ppB [4];

  logic signed [15:0] mA_corner [5] = '{16'sh7FFF, -16'sh8000, 16'sd0, 16'sd1, -16'sd1};

  ppg #(.MW(16), .MPW(8)) uA (.mcand(mA), .mplier(qA), .pp(ppA));
  ppg #(.MW(8),  .MPW(8)) uB (.mcand(mB), .mplier(qB), .pp(ppB));

  function automatic longint digit(input logic [7:0] q, input int j);
    longint v;
    v = longint'(q[2*j +: 2]);
    if (j == 3 && q[7]) v -= 4;
    return v;
  endfunction

  task automatic checkA();
    longint acc = 0;
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (longint'(ppA[j]) != digit(qA, j) * longint'(mA)) begin
        failures++;
        $display("FAIL ppgA digit %0d m=%0d q=%h pp=%0d", j, mA, qA, ppA[j]);
      end
      acc += longint'(ppA[j]) <<< (2 * j);
    end
    checks++;
    if (acc != longint'(mA) * longint'($signed(qA))) begin
      failures++;
      $display("FAIL ppgA product m=%0d q=%0d got %0d", mA, $signed(qA), acc);
    end
  endtask

  task automatic checkB();
    longint acc = 0;
    for (int j = 0; j < 4; j++) acc += longint'(ppB[j]) <<< (2 * j);
    checks++;
    if (acc != longint'(mB) * longint'($signed(qB))) begin
      failures++;
      $display("FAIL ppgB product m=%0d q=%0d got %0d", mB, $signed(qB), acc);
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
    // exhaustive multiplier with corner multiplicands
    for (int q = 0; q < 256; q++) begin
      foreach (mA_corner[i]) begin
        mA = mA_corner[i]; qA = 8'(q); mB = 8'(mA_corner[i]); qB = 8'(q);
        #1; checkA(); checkB();
      end
    end
    for (int i = 0; i < 3000; i++) begin
      mA = 16'($urandom); qA = 8'($urandom); mB = 8'($urandom); qB = 8'($urandom);
      #1; checkA(); checkB();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
