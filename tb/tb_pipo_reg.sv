// tb_pipo_reg: self-checking test of the parallel-in parallel-out register.
//
// Applies random load, clear and reset sequences to the 16-bit default
// instance and compares q after every clock with a reference register kept in
// the testbench: reset and clear empty it, clear wins over load, load captures
// d, otherwise q holds.
module tb_pipo_reg;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n, clr, load;
  logic [15:0] d, q, ref_q;

  pipo_reg dut (.clk, .rst_n, .clr, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clr = 0; load = 1; d = 16'hBEEF;
    @(posedge clk); ref_q = '0;
    @(negedge clk);
    checks++;
    if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      d     = 16'($urandom);
      load  = ($urandom % 3) != 0;
      clr   = ($urandom % 8) == 0;
      rst_n = ($urandom % 50) != 0;
      @(posedge clk);
      if (!rst_n || clr) ref_q = '0;
      else if (load)     ref_q = d;
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
