// tb_sdma_addr_gen: checks the address sequences of every addressing mode
// against hand-derived expected lists: increase, decrease, hold, index step,
// circular block (with offset, both directions), mirror block and
// bit-reversed order.
module tb_sdma_addr_gen;
  import sdma_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  side_cfg_t cfg;
  logic [14:0] addr;
  int checks = 0, failures = 0;

  sdma_addr_gen dut (.*);
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input string name, input int exp[]);
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    foreach (exp[i]) begin
      checks++;
      if (addr != 15'(exp[i])) begin
        failures++; $display("FAIL %s[%0d]: %0d expected %0d", name, i, addr, exp[i]);
      end
      step = 1; @(negedge clk); step = 0;
    end
  endtask

  function automatic side_cfg_t mk(int a, int blk, int off, int base, bit mir, bit inc, bit dec);
    side_cfg_t s;
    s = '0; s.addr = 15'(a); s.block = 8'(blk); s.offset = 7'(off); s.base = 8'(base);
    s.mirror = mir; s.inc = inc; s.dec = dec;
    return s;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    cfg = mk(10, 0, 0, 0, 0, 1, 0); run("inc",  '{10, 11, 12, 13, 14});
    cfg = mk(10, 0, 0, 0, 0, 0, 1); run("dec",  '{10, 9, 8, 7});
    cfg = mk(10, 0, 0, 0, 0, 0, 0); run("hold", '{10, 10, 10});
    cfg = mk(4, 0, 0, 3, 0, 1, 0);  run("index", '{4, 7, 10, 13});
    cfg = mk(100, 5, 2, 0, 0, 1, 0); run("circ_inc", '{102, 103, 104, 100, 101, 102, 103});
    cfg = mk(100, 5, 1, 0, 0, 0, 1); run("circ_dec", '{101, 100, 104, 103, 102, 101});
    cfg = mk(100, 6, 0, 2, 0, 1, 0); run("circ_idx", '{100, 102, 104, 100, 102});
    cfg = mk(200, 4, 0, 0, 1, 1, 0); run("mirror", '{200, 201, 202, 203, 203, 202, 201, 200, 200, 201});
    cfg = mk(200, 4, 2, 0, 1, 0, 1); run("mirror_dec", '{202, 201, 200, 200, 201, 202, 203, 203});
    cfg = mk(32, 8, 0, 0, 0, 1, 1); run("bitrev", '{32, 36, 34, 38, 33, 37, 35, 39, 32});
    cfg = mk(0, 32, 0, 0, 0, 1, 1); run("bitrev32", '{0, 16, 8, 24, 4, 20, 12, 28, 2});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
