// tb_sdma_fifo: random push/pop against a queue model; checks data order and
// the full (8), empty (0) and half (>= 4) flags of the 8-word channel FIFO.
module tb_sdma_fifo;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [31:0] din, dout;
  logic full, empty, half;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  sdma_fifo #(.WIDTH(32), .DEPTH(8)) dut (.*, .data_in(din), .data_out(dout));

  always #5 clk = !clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full  == (q.size() == 8), "full");
      chk(half  == (q.size() >= 4), "half");
      chk(count == q.size(), "count");
      if (q.size() > 0) chk(dout == q[0], "data");
      push = (i < 1000) ? ($urandom % 3 != 0) : ($urandom % 3 == 0);
      pop  = ($urandom % 2) != 0;
      din  = $urandom;
      @(posedge clk);
      begin
        int sz;
        sz = q.size();
        if (pop && sz > 0) void'(q.pop_front());
        if (push && sz < 8) q.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
