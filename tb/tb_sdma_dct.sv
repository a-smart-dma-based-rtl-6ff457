// tb_sdma_dct: a 36-point DCT-II computed by the Smart-DMA subsystem at its
// default sizes, the way the controller is meant to do it: the samples sit
// once in bank B and are read as a mirror block (x0..x35, x35..x0), so the
// symmetric extension is never stored; the coefficients of one output,
// cos(pi (2n+1) k / 2N) for the 72 terms, halved and in Q15, are written to
// bank A by the processor model.  Each output is one real-MAC job of 72 word
// pairs (samples and coefficients in the high 16-bit halves), read back from
// the ACC register.  Checked: the exact integer sum of the same Q15 terms, one
// word pair per cycle, and the signal-to-error ratio against the exact DCT-II
// over all outputs (above 60 dB).  It runs twice: on the 36-sample test input
// of the original design's evaluation, then on random samples.  The sequential-coefficients-times-mirror-
// block method and the 36-point size follow the original design; the
// coefficient layout and Q15 scaling are this testbench's choices.
module tb_sdma_dct;
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

  localparam int N = 36;
  // the 36-sample test input of the original design's DCT evaluation
  localparam int DOC_X [N] = '{1, 1, -1, -1, 2, 2, -2, -2, -7, -7, -7, -7, 6, 6, -6, -6, 5, 5,
                               5, 5, 4, 4, 4, 4, 3, 3, 3, 3, 2, 2, 2, 2, 1, 1, 1, 1};
  initial begin
    logic signed [15:0] x [N], c [2*N];
    logic [31:0] v;
    longint acc;
    real pi, exact, sig, err, snr, got;
    int cyc, worst;
    pi = 3.14159265358979;
    repeat (3) @(posedge clk); rst_n = 1;
    // pass 0: the original test input; pass 1: random samples
    for (int pass = 0; pass < 2; pass++) begin
      sig = 0.0; err = 0.0; worst = 0;
      // samples in the high half of B[100..135], low half zero
      for (int n = 0; n < N; n++) begin
        x[n] = (pass == 0) ? 16'(DOC_X[n]) : 16'($urandom % 16000) - 16'sd8000;
        mem_wr(1, 100 + n, {x[n], 16'h0});
      end
      for (int k = 0; k < N; k++) begin
        // coefficients of output k over the mirrored sequence (2N terms), Q15, halved
        acc = 0;
        for (int n = 0; n < 2 * N; n++) begin
          c[n] = 16'($rtoi($floor(16383.5 * $cos(pi * (2 * n + 1) * k / (2.0 * N)) + 0.5)));
          mem_wr(0, n, {c[n], 16'h0});
          acc += longint'(c[n]) * x[(n < N) ? n : 2 * N - 1 - n];
        end
        // channel 0: A[0..2N-1] increasing times B[100..] read as a mirror block of N
        wr(0, 0); wr(1, {1'b0, 15'd0}); wr(2, 16'h8000); wr(3, {1'b1, 15'd100});
        wr(4, {8'd0, 8'(N)}); wr(5, {6'b101000, 10'(2 * N)}); wr(6, 16'h4007);
        wait_done(0, cyc);
        worst = (cyc > worst) ? cyc : worst;
        chk(cyc <= 2 * N + 8, $sformatf("output %0d took %0d cycles", k, cyc));
        rd(15, v);
        chk(v == 32'(acc), $sformatf("X[%0d] = %0d, expected %0d", k, signed'(v), acc));
        wr(14, 0);
        // against the exact DCT-II, X_k = sum x_n cos(pi (2n+1) k / 2N), scaled by 2^15
        exact = 0.0;
        for (int n = 0; n < N; n++) exact += $itor(x[n]) * $cos(pi * (2 * n + 1) * k / (2.0 * N));
        got = $itor(signed'(v)) / 32768.0;
        sig += exact * exact;
        err += (got - exact) * (got - exact);
        // the orthonormal scaling sqrt(1/N) for k = 0, sqrt(2/N) otherwise
        got = got * $sqrt(((k == 0) ? 1.0 : 2.0) / N);
        if (pass == 0 && k < 6) $display("test input: orthonormal X[%0d] = %f", k, got);
        if (pass == 0 && k == 0) chk(got > 5.333 && got < 5.334, $sformatf("X[0] = %f, expected 16/3", got));
      end
      snr = 10.0 * $log10(sig / err);
      $display("%0d-point DCT, %s input: %0d cycles per output at most, signal-to-error ratio %f dB",
               N, (pass == 0) ? string'("test") : string'("random"), worst, snr);
      chk(snr > 60.0, "DCT accuracy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
