// tb_bk_adder: self-checking test of the Brent-Kung adder.
//
// Checks the 16-bit default instance against plain integer addition on corner
// cases (all carries rippling, zero, all ones, with and without carry in) and
// on random operands, and an 8-bit instance exhaustively. Every check compares
// both the sum and the carry out.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  logic [7:0]  a8, b8, s8;
  logic        c8, co8;

  bk_adder dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  bk_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; c16 = c;
    #1;
    exp = 17'(a) + 17'(b) + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("FAIL 16: %h + %h + %0d = %h/%0d, expected %h", a, b, c, s16, co16, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h00FF, 16'h0001, 1'b0);
    check16(16'h0FFF, 16'h0000, 1'b1);
    check16(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 16; i++) begin
      check16(16'hFFFF >> i, 16'd1, 1'b0);
      check16(16'(1) << i, 16'(1) << i, 1'b0);
    end
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(a); b8 = 8'(b); c8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8: %0d + %0d + %0d", a, b, c);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
