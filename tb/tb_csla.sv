// tb_csla: self-checking test of the carry-select adder.
// Two instances (16 bits in 4-bit blocks, and 23 bits in 5-bit blocks so the
// top block is short) get random operands and carry-ins plus the corner cases
// all-ones + 1 and zero + zero; sum and carry out are compared with the
// integer sum a + b + cin.
module tb_csla;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic c16, co16;
  logic [22:0] a23, b23, s23;  logic c23, co23;

  csla #(.WIDTH(16), .BLOCK(4)) u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  csla #(.WIDTH(23), .BLOCK(5)) u23 (.a(a23), .b(b23), .cin(c23), .sum(s23), .cout(co23));

  task automatic check16();
    logic [16:0] ref17;
    ref17 = {1'b0, a16} + {1'b0, b16} + {16'd0, c16};
    checks++;
    if ({co16, s16} !== ref17) begin
      failures++;
      $display("FAIL csla16 a=%h b=%h cin=%0d got %h exp %h", a16, b16, c16, {co16, s16}, ref17);
    end
  endtask

  task automatic check23();
    logic [23:0] ref24;
    ref24 = {1'b0, a23} + {1'b0, b23} + {23'd0, c23};
    checks++;
    if ({co23, s23} !== ref24) begin
      failures++;
      $display("FAIL csla23 a=%h b=%h cin=%0d got %h exp %h", a23, b23, c23, {co23, s23}, ref24);
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
    a16 = '1; b16 = '0; c16 = 1'b1; a23 = '1; b23 = '0; c23 = 1'b1; #1; check16(); check23();
    a16 = '0; b16 = '0; c16 = 1'b0; a23 = '0; b23 = '0; c23 = 1'b0; #1; check16(); check23();
    a16 = 16'h0FFF; b16 = 16'h0001; c16 = 1'b0; #1; check16();
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      a23 = 23'($urandom); b23 = 23'($urandom); c23 = 1'($urandom);
      #1; check16(); check23();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
