// tb_sdma_apb_master: runs APB reads and writes and checks the two-phase
// timing (SETUP: PSEL high, PENABLE low; ACCESS: both high), the select line
// of the addressed peripheral, address/data, done in the ACCESS cycle and
// busy blocking over the transfer.
module tb_sdma_apb_master;
  import sdma_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, penable, pwrite;
  bus_req_t req;
  logic [31:0] rdata, pwdata, prdata;
  logic [7:0] psel, paddr;
  int checks = 0, failures = 0;

  sdma_apb_master dut (.*);
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      chk(!busy && psel == 0 && !penable, "idle");
      req = '0; req.req = 1; req.res = RES_APB; req.we = k[0]; req.per = 3'($urandom);
      req.addr = 15'($urandom); req.wdata = $urandom; start = 1;
      @(negedge clk); start = 0;
      chk(busy && psel == (8'b1 << req.per) && !penable, "setup phase");
      chk(paddr == req.addr[7:0] && pwrite == req.we && (!req.we || pwdata == req.wdata), "setup fields");
      prdata = $urandom;
      @(negedge clk);
      chk(psel == (8'b1 << req.per) && penable && done, "access phase");
      chk(rdata == prdata, "read data");
      @(negedge clk);
      chk(!done && !penable, "ended");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
