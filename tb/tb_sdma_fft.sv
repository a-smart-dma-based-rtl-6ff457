// tb_sdma_fft: complex radix-2 FFTs of 32 and 256 points run on the Smart-DMA
// subsystem at its default sizes.
//
// The processor model stores the input (16-bit real and imaginary parts) in
// bank A and has the controller copy it to bank B in bit-reversed order.  For
// each of the log2(N) stages it then gathers the top operands A of the N/2
// butterflies into bank A, the bottom operands B into bank B and the twiddles W
// (Q15) into bank A.  It starts channel 0 (W, B) and channel 1 (A) in FFT mode
// and collects the results that the controller writes back in place: A + W*B
// over A and A - W*B over B.  The output is compared bit-exactly with a
// fixed-point model of the same stages, and with a floating-point DFT: the
// signal-to-error ratio over all bins must exceed 40 dB.  The stage time is checked against one butterfly every
// 6 cycles.
module tb_sdma_fft;
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
  task automatic mem_rd(input int bank, input int a, output logic [31:0] v);
    @(negedge clk);
    if (bank == 0) begin memA_cs = 1; memA_we = 0; memA_addr = 9'(a); end
    else           begin memB_cs = 1; memB_we = 0; memB_addr = 9'(a); end
    @(negedge clk); memA_cs = 0; memB_cs = 0;
    v = (bank == 0) ? memA_rdata : memB_rdata;
  endtask
  // program channel c: {dev, address} of source and destination, control low, configuration
  task automatic prog(input int c, input logic [15:0] sl, dl, ch, cl, cf);
    wr(7*c + 0, 0); wr(7*c + 1, sl); wr(7*c + 2, 0); wr(7*c + 3, dl);
    wr(7*c + 4, ch); wr(7*c + 5, cl); wr(7*c + 6, cf);
  endtask
  task automatic wait_done(input int c, output int cycles);
    cycles = 0;
    while (irq_n[c] && cycles < 100000) begin @(negedge clk); cycles++; end
    chk(!irq_n[c], $sformatf("channel %0d interrupt", c));
  endtask

  function automatic int brev(int k, int bits);
    int r; r = 0;
    for (int i = 0; i < bits; i++) if (k[i]) r |= 1 << (bits - 1 - i);
    return r;
  endfunction
  function automatic logic signed [15:0] sat(longint v);
    return (v > 32767) ? 16'sd32767 : (v < -32768) ? -16'sd32768 : 16'(v);
  endfunction

  task automatic run_fft(input int n);
    int bits, cyc, c1, worst;
    logic [31:0] x [256], work [256], model [256], v;
    real pi, re, im, sig, err, snr;
    bits = $clog2(n);
    pi = 3.14159265358979;
    worst = 0;
    // input: small random values so that no stage saturates
    for (int i = 0; i < n; i++) begin
      x[i] = {16'($urandom % 120) - 16'sd60, 16'($urandom % 120) - 16'sd60};
      mem_wr(0, 256 + i, x[i]);
    end
    // bit-reversed copy A[256..] -> B[256..] by the controller
    prog(0, {1'b0, 15'd256}, {1'b1, 15'd256}, {8'(n), 8'd0}, {6'b111000, 10'(n)}, 16'h4001);
    wait_done(0, cyc);
    for (int i = 0; i < n; i++) begin
      mem_rd(1, 256 + i, work[i]);
      chk(work[i] == x[brev(i, bits)], "bit-reversed input order");
      model[i] = x[brev(i, bits)];
    end
    wr(14, 0);
    // stages
    for (int h = 1; h < n; h *= 2) begin
      for (int j = 0; j < n / 2; j++) begin
        int top, k;
        logic signed [15:0] wr_, wi_;
        longint ar, ai, br, bi, tr, ti;
        top = (j / h) * 2 * h + (j % h);
        k = (j % h) * (n / (2 * h));
        wr_ = sat(longint'($rtoi($floor(32767.0 * $cos(2.0 * pi * k / n) + 0.5))));
        wi_ = sat(longint'($rtoi($floor(-32767.0 * $sin(2.0 * pi * k / n) + 0.5))));
        mem_wr(0, j, work[top]);            // A operands
        mem_wr(1, j, work[top + h]);        // B operands
        mem_wr(0, 256 + j, {wr_, wi_});     // twiddles
        // fixed-point model of the same butterfly
        ar = signed'(model[top][31:16]); ai = signed'(model[top][15:0]);
        br = signed'(model[top + h][31:16]); bi = signed'(model[top + h][15:0]);
        tr = (br * wr_ - bi * wi_ + 16384) >>> 15; ti = (br * wi_ + bi * wr_ + 16384) >>> 15;
        model[top] = {sat(ar + tr), sat(ai + ti)};
        model[top + h] = {sat(ar - tr), sat(ai - ti)};
      end
      prog(0, {1'b0, 15'd256}, {1'b1, 15'd0}, 16'h0, {6'b101000, 10'(n / 2)}, {1'b0, 1'b1, 6'd0, 2'b00, 1'b0, 3'b100, 2'b01});
      prog(1, {1'b0, 15'd0},   {1'b1, 15'd0}, 16'h0, {6'b101000, 10'(n / 2)}, {1'b0, 1'b1, 6'd0, 2'b00, 1'b0, 3'b100, 2'b01});
      wait_done(1, c1);
      repeat (4) @(negedge clk);
      worst = (c1 > worst) ? c1 : worst;
      chk(c1 <= 6 * (n / 2) + 20, $sformatf("stage of %0d butterflies took %0d cycles", n / 2, c1));
      wr(14, 0);
      for (int j = 0; j < n / 2; j++) begin
        int top;
        top = (j / h) * 2 * h + (j % h);
        mem_rd(0, j, work[top]);
        mem_rd(1, j, work[top + h]);
      end
    end
    // compare: bit-exact with the fixed-point model, and close to the exact DFT
    // (signal-to-error ratio over all bins, with the output's 16-bit rounding)
    sig = 0.0; err = 0.0;
    for (int m = 0; m < n; m++) begin
      logic signed [15:0] yr, yi;
      re = 0.0; im = 0.0;
      for (int i = 0; i < n; i++) begin
        logic signed [15:0] xr, xi;
        xr = x[i][31:16]; xi = x[i][15:0];
        re += $itor(xr) * $cos(2.0 * pi * i * m / n) + $itor(xi) * $sin(2.0 * pi * i * m / n);
        im += $itor(xi) * $cos(2.0 * pi * i * m / n) - $itor(xr) * $sin(2.0 * pi * i * m / n);
      end
      yr = work[m][31:16]; yi = work[m][15:0];
      chk(work[m] == model[m], $sformatf("N=%0d bin %0d: %h, fixed-point model %h", n, m, work[m], model[m]));
      sig += re * re + im * im;
      err += ($itor(yr) - re) * ($itor(yr) - re) + ($itor(yi) - im) * ($itor(yi) - im);
    end
    snr = 10.0 * $log10(sig / err);
    $display("%0d-point FFT: signal-to-error ratio against the exact DFT %f dB", n, snr);
    chk(snr > 40.0, $sformatf("N=%0d signal-to-error ratio %f dB", n, snr));
    $display("%0d-point FFT: %0d stages, longest stage %0d cycles for %0d butterflies", n, bits, worst, n / 2);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run_fft(32);
    run_fft(256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
