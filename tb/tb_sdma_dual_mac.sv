// tb_sdma_dual_mac: drives random operand words into the two lanes and checks
// the accumulators against an independent model: real MAC (four products per
// cycle, ACC = ACCR + ACCI), complex MAC (one per cycle, Eq. ACC += X*Y on
// {re, im} halves), the Q15 radix-2 butterfly, the overflow flags, ACC clear
// and the 16-bit preload.  It also checks the one-cycle rates: a lane loaded
// every cycle is drained every cycle in MAC and CFIR modes.
module tb_sdma_dual_mac;
  import sdma_pkg::*;
  logic clk = 0, rst_n = 0;
  func_e mode = FN_MAC;
  logic ld0 = 0, ld1 = 0, acc_clr = 0, acc_wr = 0;
  logic [31:0] c0, d0, c1, d1, y0, y1;
  logic [15:0] acc_wdata = 0;
  logic [1:0] lane_empty, lane_stream;
  logic signed [39:0] accr, acci, acc;
  logic [2:0] err;
  logic bfly_valid;
  int checks = 0, failures = 0;
  longint er, ei;

  sdma_dual_mac dut (.*);
  always #5 clk = !clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  function automatic longint sh(input logic [31:0] w); return longint'(signed'(w[31:16])); endfunction
  function automatic longint sl(input logic [31:0] w); return longint'(signed'(w[15:0]));  endfunction
  function automatic longint s16(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  task automatic clear();
    @(negedge clk); acc_clr = 1; @(negedge clk); acc_clr = 0; er = 0; ei = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // ---- real MAC: 100 cycles, both lanes loaded every cycle ----
    mode = FN_MAC; clear();
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      c0 = $urandom; d0 = $urandom; c1 = $urandom; d1 = $urandom; ld0 = 1; ld1 = (i % 3 != 0);
      er += sh(c0) * sh(d0) + sl(c0) * sl(d0);
      if (ld1) ei += sh(c1) * sh(d1) + sl(c1) * sl(d1);
    end
    @(negedge clk); ld0 = 0; ld1 = 0;
    chk(lane_stream == 2'b11, "MAC streams");
    repeat (2) @(negedge clk);
    chk(accr == 40'(er), "MAC ACCR"); chk(acci == 40'(ei), "MAC ACCI");
    chk(acc == 40'(er + ei), "MAC ACC"); chk(lane_empty == 2'b11, "MAC drained");
    // ---- complex MAC (Table 2-4 schedule): 3-tap, then 50 random taps ----
    mode = FN_CFIR; clear();
    for (int i = 0; i < 53; i++) begin
      @(negedge clk);
      c0 = $urandom; d0 = $urandom; ld0 = 1;
      er += sh(c0) * sh(d0) - sl(c0) * sl(d0);
      ei += sh(c0) * sl(d0) + sl(c0) * sh(d0);
    end
    @(negedge clk); ld0 = 0;
    @(negedge clk);
    chk(accr == 40'(er), "CFIR ACCR"); chk(acci == 40'(ei), "CFIR ACCI");
    // lane 1 in complex mode waits while lane 0 is busy, then is used
    @(negedge clk); c0 = {16'sd3, 16'sd4}; d0 = {16'sd5, -16'sd6}; c1 = {16'sd1, 16'sd2}; d1 = {16'sd7, 16'sd1};
    ld0 = 1; ld1 = 1; er += 3*5 - 4*(-6); ei += 3*(-6) + 4*5;
    @(negedge clk); ld0 = 0; ld1 = 0;
    @(negedge clk);
    chk(lane_empty == 2'b01, "CFIR lane1 waits");
    er += 1*7 - 2*1; ei += 1*1 + 2*7;
    @(negedge clk); @(negedge clk);
    chk(accr == 40'(er) && acci == 40'(ei), "CFIR lane1 result");
    // ---- butterfly ----
    mode = FN_FFT; clear();
    for (int i = 0; i < 50; i++) begin
      longint ar, ai, br, bi, wr, wi, tr, ti;
      @(negedge clk);
      c0 = $urandom; d0 = $urandom; c1 = $urandom; d1 = 0;
      if (i < 5) begin c0 = {16'sh7fff, 16'sh0}; end
      ld0 = 1; ld1 = 1;
      wr = sh(c0); wi = sl(c0); br = sh(d0); bi = sl(d0); ar = sh(c1); ai = sl(c1);
      tr = (br * wr - bi * wi + 16384) >>> 15; ti = (br * wi + bi * wr + 16384) >>> 15;
      @(negedge clk); ld0 = 0; ld1 = 0;
      @(negedge clk);
      chk(bfly_valid, "bfly valid");
      chk(y0 == {16'(s16(ar + tr)), 16'(s16(ai + ti))}, "bfly y0");
      chk(y1 == {16'(s16(ar - tr)), 16'(s16(ai - ti))}, "bfly y1");
    end
    // ---- overflow flag and preload ----
    mode = FN_MAC; clear();
    @(negedge clk); acc_wr = 1; acc_wdata = 16'hfff0; @(negedge clk); acc_wr = 0;
    chk(accr == -40'sd16, "preload");
    clear();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); c0 = {16'sh8000, 16'sh8000}; d0 = {16'sh8000, 16'sh8000}; ld0 = 1;
    end
    @(negedge clk); ld0 = 0; repeat (2) @(negedge clk);
    chk(err[0] == 1'b0, "no overflow yet");
    // 2^31 per cycle: 2^39 is reached after 256 cycles
    for (int i = 0; i < 100; i++) begin
      @(negedge clk); c0 = {16'sh8000, 16'sh8000}; d0 = {16'sh8000, 16'sh8000}; ld0 = 1;
    end
    @(negedge clk); ld0 = 0; repeat (2) @(negedge clk);
    chk(err[0] == 1'b1, "overflow flagged");
    clear(); chk(err == 0 && accr == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
