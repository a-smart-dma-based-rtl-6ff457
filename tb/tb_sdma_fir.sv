// tb_sdma_fir: filter workloads on the Smart-DMA subsystem at its default
// sizes, each output one MAC job programmed through the register bank:
//   * real FIR, 32 taps: bank A holds the taps two per word {h[2j], h[2j+1]},
//     bank B holds the samples as overlapping pairs {x[m], x[m-1]}, and output
//     n reads B downwards from pair n with index-based addressing (Base = 2),
//     so every word pair gives two taps: 16 word pairs per output, checked to
//     take at most 16 + 8 cycles from the configuration write to the interrupt;
//   * circular convolution, 32 points: A holds h sequentially, B holds x as a
//     circular block of 32 read downwards from Offset = n, which gives
//     x[(n - k) mod 32] without moving any data;
//   * complex FIR, 16 taps: {real, imaginary} taps in A, samples in B read
//     downwards, one complex tap per cycle, the result read as {ACCR, ACCI}.
// Every output is compared with an integer model of the same sum.  The use of
// circular and index-based addressing for these filters follows the original
// design; the data layouts, sizes and value ranges are this testbench's
// choices (the ranges keep the sums inside the 32-bit and 16-bit reads).
module tb_sdma_fir;
  import sdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_cen = 1, reg_wen = 1;
  logic [3:0] reg_a = 0;
  logic [15:0] reg_d = 0;
  logic [31:0] reg_q;
  logic memA_cs = 0, memA_we = 0, memB_cs = 0, memB_we = 0;
  logic [8:0] memA_addr = 0, memB_addr = 0;
  logic [31:0] memA_wdata = 0, memB_wdata = 0, memA_rdata, memB_rdata;
  logic [1:0] irq_n;
  logic i2s_rx_sck = 0, i2s_rx_ws = 0, i2s_rx_sd = 0, i2s_tx_sck = 0, i2s_tx_ws = 0, i2s_tx_sd;
  logic [7:0] ext_psel, ext_dreq = 0;
  logic ext_penable, ext_pwrite;
  logic [7:0] ext_paddr;
  logic [31:0] ext_pwdata, ext_prdata = 0;
  logic bfly_valid;
  logic [31:0] bfly_y0, bfly_y1;

  sdma_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = !clk;
  initial begin
    #20ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic wr(input int a, input logic [15:0] v);
    @(negedge clk); reg_cen = 0; reg_wen = 0; reg_a = 4'(a); reg_d = v;
    @(negedge clk); reg_cen = 1; reg_wen = 1;
  endtask
  task automatic mem_wr(input int bank, input int a, input logic [31:0] v);
    @(negedge clk);
    if (bank == 0) begin memA_cs = 1; memA_we = 1; memA_addr = 9'(a); memA_wdata = v; end
    else           begin memB_cs = 1; memB_we = 1; memB_addr = 9'(a); memB_wdata = v; end
    @(negedge clk); memA_cs = 0; memB_cs = 0; memA_we = 0; memB_we = 0;
  endtask
  task automatic wait_done(input int c, output int cycles);
    cycles = 0;
    while (irq_n[c] && cycles < 100000) begin @(negedge clk); cycles++; end
    chk(!irq_n[c], $sformatf("channel %0d interrupt", c));
  endtask

  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk); reg_cen = 0; reg_wen = 1; reg_a = 4'(a);
    @(negedge clk); reg_cen = 1; v = reg_q;
  endtask

  task automatic job(input logic [15:0] sh, sl, dh, dl, ch, ctl, cf, output int cyc);
    wr(0, sh); wr(1, sl); wr(2, dh); wr(3, dl); wr(4, ch); wr(5, ctl); wr(6, cf);
    wait_done(0, cyc);
  endtask

  localparam int K = 32;     // real FIR taps
  localparam int L = 32;     // real FIR outputs
  localparam int NC = 32;    // circular convolution length
  localparam int KC = 16;    // complex FIR taps
  initial begin
    logic signed [15:0] h [K], x [K + L], hr [KC], hi [KC], xr [KC + 8], xi [KC + 8];
    logic [31:0] v;
    longint acc, ar, ai;
    int cyc, worst;
    repeat (3) @(posedge clk); rst_n = 1;

    // real FIR: taps at A[0..15], sample pairs at B[0..K+L-1]
    for (int k = 0; k < K; k++) h[k] = 16'($urandom % 4000) - 16'sd2000;
    for (int j = 0; j < K / 2; j++) mem_wr(0, j, {h[2 * j], h[2 * j + 1]});
    for (int m = 0; m < K + L; m++) x[m] = 16'($urandom % 32000) - 16'sd16000;
    for (int m = 0; m < K + L; m++) mem_wr(1, m, {x[m], (m == 0) ? 16'h0 : x[m - 1]});
    worst = 0;
    for (int n = K - 1; n < K - 1 + L; n++) begin
      acc = 0;
      for (int k = 0; k < K; k++) acc += longint'(h[k]) * x[n - k];
      // source A[0] increasing; destination B[n] decreasing by Base = 2
      job(0, {1'b0, 15'd0}, {1'b0, 8'd2, 7'd0}, {1'b1, 15'(n)}, 0, {6'b100100, 10'(K / 2)}, 16'h4007, cyc);
      worst = (cyc > worst) ? cyc : worst;
      rd(15, v); wr(14, 0);
      chk(v == 32'(acc), $sformatf("FIR y[%0d] = %0d, expected %0d", n, signed'(v), acc));
      chk(cyc <= K / 2 + 8, $sformatf("FIR output %0d took %0d cycles", n, cyc));
    end
    $display("%0d-tap real FIR: %0d outputs, at most %0d cycles each", K, L, worst);

    // circular convolution: h at A[100..], x at B[200..] as a circular block
    for (int k = 0; k < NC; k++) begin
      h[k] = 16'($urandom % 4000) - 16'sd2000;
      x[k] = 16'($urandom % 32000) - 16'sd16000;
      mem_wr(0, 100 + k, {h[k], 16'h0});
      mem_wr(1, 200 + k, {x[k], 16'h0});
    end
    worst = 0;
    for (int n = 0; n < NC; n++) begin
      acc = 0;
      for (int k = 0; k < NC; k++) acc += longint'(h[k]) * x[(n - k + NC) % NC];
      job(0, {1'b0, 15'd100}, {1'b0, 8'd0, 7'(n)}, {1'b1, 15'd200}, {8'd0, 8'(NC)},
          {6'b100100, 10'(NC)}, 16'h4007, cyc);
      worst = (cyc > worst) ? cyc : worst;
      rd(15, v); wr(14, 0);
      chk(v == 32'(acc), $sformatf("circular convolution y[%0d] = %0d, expected %0d", n, signed'(v), acc));
      chk(cyc <= NC + 8, $sformatf("circular convolution output %0d took %0d cycles", n, cyc));
    end
    $display("%0d-point circular convolution: at most %0d cycles per output", NC, worst);

    // complex FIR: taps at A[300..], samples at B[300..]
    for (int k = 0; k < KC; k++) begin
      hr[k] = 16'($urandom % 17) - 16'sd8; hi[k] = 16'($urandom % 17) - 16'sd8;
      mem_wr(0, 300 + k, {hr[k], hi[k]});
    end
    for (int m = 0; m < KC + 8; m++) begin
      xr[m] = 16'($urandom % 129) - 16'sd64; xi[m] = 16'($urandom % 129) - 16'sd64;
      mem_wr(1, 300 + m, {xr[m], xi[m]});
    end
    worst = 0;
    for (int n = KC - 1; n < KC + 8; n++) begin
      ar = 0; ai = 0;
      for (int k = 0; k < KC; k++) begin
        ar += longint'(hr[k]) * xr[n - k] - longint'(hi[k]) * xi[n - k];
        ai += longint'(hr[k]) * xi[n - k] + longint'(hi[k]) * xr[n - k];
      end
      job(0, {1'b0, 15'd300}, 0, {1'b1, 15'(300 + n)}, 0, {6'b100100, 10'(KC)}, 16'h400B, cyc);
      worst = (cyc > worst) ? cyc : worst;
      rd(15, v); wr(14, 0);
      chk(v == {16'(ar), 16'(ai)}, $sformatf("complex FIR y[%0d] = %h, expected %0d %0d", n, v, ar, ai));
      chk(cyc <= KC + 8, $sformatf("complex FIR output %0d took %0d cycles", n, cyc));
    end
    $display("%0d-tap complex FIR: at most %0d cycles per output", KC, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
