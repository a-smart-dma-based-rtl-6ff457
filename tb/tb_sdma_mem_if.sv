// tb_sdma_mem_if: checks that the processor access wins the bank, that
// otherwise the granted request for this bank drives the SRAM pins (CS high,
// WEB low only for a write, address and data), and that requests for the
// other bank or without grant leave the SRAM deselected.
module tb_sdma_mem_if;
  import sdma_pkg::*;
  logic host_cs, host_we, cs, oe, web;
  logic [8:0] host_addr, a;
  logic [31:0] host_wdata, di;
  bus_req_t req [N_REQ];
  logic [N_REQ-1:0] gnt;
  int checks = 0, failures = 0;

  sdma_mem_if #(.BANK(RES_RAM_B)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int g;
      for (int i = 0; i < N_REQ; i++) begin
        req[i] = '0; req[i].req = 1; req[i].res = res_e'($urandom % 3);
        req[i].we = ($urandom % 2) != 0; req[i].addr = 15'($urandom); req[i].wdata = $urandom;
      end
      g = $urandom % (N_REQ + 1);
      gnt = (g == N_REQ) ? '0 : N_REQ'(1) << g;
      host_cs = ($urandom % 4) == 0; host_we = ($urandom % 2) != 0;
      host_addr = 9'($urandom); host_wdata = $urandom;
      #1;
      checks++;
      if (host_cs) begin
        if (!(cs && web == !host_we && a == host_addr && di == host_wdata)) begin failures++; $display("FAIL host"); end
      end else if (g < N_REQ && req[g].res == RES_RAM_B) begin
        if (!(cs && web == !req[g].we && a == req[g].addr[8:0] && di == req[g].wdata)) begin failures++; $display("FAIL chan"); end
      end else begin
        if (cs) begin failures++; $display("FAIL idle"); end
      end
      checks++; if (!oe) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
