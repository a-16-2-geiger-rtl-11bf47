// tb_row_mux: self-checking test of the 16-bit 2-to-1 multiplexer.
//
// Drives random, distinct words on both inputs and checks that the output
// follows the select in both directions, including complementary patterns.
module tb_row_mux;
  int checks = 0, failures = 0;
  logic        sel;
  logic [15:0] in0, in1, out;

  row_mux dut (.sel, .in0, .in1, .out);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      in0 = 16'($urandom);
      in1 = (i % 4 == 0) ? ~in0 : 16'($urandom);
      sel = 1'(i);
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0d in0=%h in1=%h out=%h", sel, in0, in1, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
