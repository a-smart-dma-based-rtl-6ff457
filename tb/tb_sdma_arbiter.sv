// tb_sdma_arbiter: random request patterns against a reference priority
// search: processor first on each bank, then requesters in order channel 0
// (read, operand, write) before channel 1; APB only while the master is idle.
module tb_sdma_arbiter;
  import sdma_pkg::*;
  bus_req_t req [N_REQ];
  logic [1:0] host_busy;
  logic apb_busy;
  logic [N_REQ-1:0] gnt, expg;
  logic [1:0] chsel;
  int checks = 0, failures = 0, ch1_held = 0;

  sdma_arbiter dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit used [3];
      for (int i = 0; i < N_REQ; i++) begin
        req[i] = '0;
        req[i].req = ($urandom % 2) != 0;
        req[i].res = res_e'($urandom % 3);
      end
      host_busy = 2'($urandom); apb_busy = ($urandom % 3) == 0;
      #1;
      used[0] = host_busy[0]; used[1] = host_busy[1]; used[2] = apb_busy;
      expg = '0;
      for (int i = 0; i < N_REQ; i++)
        if (req[i].req && !used[int'(req[i].res)]) begin expg[i] = 1; used[int'(req[i].res)] = 1; end
      checks++;
      if (gnt != expg) begin failures++; $display("FAIL t=%0d gnt=%b exp=%b", t, gnt, expg); end
      checks++;
      if (chsel != {|expg[5:3], |expg[2:0]}) failures++;
      for (int i = 3; i < 6; i++)
        if (req[i].req && !gnt[i]) ch1_held++;
    end
    checks++; if (ch1_held == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
