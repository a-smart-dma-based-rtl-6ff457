// tb_sdma_irq: the interrupt line goes low for exactly two cycles after done
// when enabled, never when disabled; the status flag stays low until cleared.
module tb_sdma_irq;
  logic clk = 0, rst_n = 0, done = 0, int_en = 0, clr = 0, irq_n, int_flag_n;
  int checks = 0, failures = 0, low;
  sdma_irq dut (.*);
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      int_en = k[0];
      @(negedge clk); done = 1; @(negedge clk); done = 0;
      low = 0;
      for (int i = 0; i < 6; i++) begin if (!irq_n) low++; @(negedge clk); end
      chk(low == (int_en ? 2 : 0), "irq pulse length");
      chk(int_flag_n == !int_en, "status flag");
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      chk(int_flag_n, "flag cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
