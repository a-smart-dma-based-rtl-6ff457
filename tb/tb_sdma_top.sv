// tb_sdma_top: end-to-end test of the Smart-DMA subsystem at its default sizes
// (two 512 x 32 banks, 8-word FIFOs).  A processor model programs the register
// bank and uses the bank ports; an I2S master model drives the receiver and
// listens to the transmitter.  It runs the two computations with published
// results (inner product: sum of i^2 for i = 1..510 = 44347135; convolution:
// sum of (510-k)*k = 22108415), both channels computing one inner product
// together, a 3-tap complex FIR, FFT butterflies written back in place, bank-to-bank and in-bank
// moves with every addressing mode, I2S peripheral-to-memory,
// memory-to-peripheral and peripheral-to-peripheral transfers, a sequence
// transfer ended by halt, and accumulator overflow.  Every mechanism is counted
// and one that never happened counts as a failure.
module tb_sdma_top;
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
  logic i2s_rx_sck, i2s_rx_ws, i2s_rx_sd, i2s_tx_sck, i2s_tx_ws, i2s_tx_sd;
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

  // ---------------- mechanism counters ----------------
  int n_ch1_held, n_host_held, n_fifo_full, n_drain, n_irq, n_apb, n_bfly, n_lane1_mac;
  int n_m2m, n_m2m_same, n_p2m, n_m2p, n_p2p, n_circ, n_mirror, n_index, n_brev, n_dec;
  int n_mac, n_cfir, n_seq_halt, n_overflow;
  always @(posedge clk) begin
    for (int i = 3; i < 6; i++)
      if (dut.u_sdmac.req[i].req && !dut.u_sdmac.gnt[i]) begin
        for (int j = 0; j < 3; j++)
          if (dut.u_sdmac.gnt[j] && dut.u_sdmac.req[j].res == dut.u_sdmac.req[i].res) n_ch1_held++;
      end
    for (int i = 0; i < 6; i++)
      if (dut.u_sdmac.req[i].req && !dut.u_sdmac.gnt[i] &&
          ((memA_cs && dut.u_sdmac.req[i].res == RES_RAM_A) || (memB_cs && dut.u_sdmac.req[i].res == RES_RAM_B)))
        n_host_held++;
    if (dut.u_sdmac.g_ch[0].u_ch.fifo_full || dut.u_sdmac.g_ch[1].u_ch.fifo_full) n_fifo_full++;
    if (dut.u_sdmac.g_ch[0].u_ch.drain_phase || dut.u_sdmac.g_ch[1].u_ch.drain_phase) n_drain++;
    if (dut.u_sdmac.penable) n_apb++;
    if (bfly_valid) n_bfly++;
    if (dut.u_sdmac.lane_ld[1] && dut.u_sdmac.mac_mode == FN_MAC) n_lane1_mac++;
  end
  int now = 0, t_bf0 = 0, t_bf7 = 0;
  always @(posedge clk) now++;
  logic [1:0] irq_q = 2'b11;
  always @(posedge clk) begin
    irq_q <= irq_n;
    for (int c = 0; c < 2; c++) if (irq_q[c] && !irq_n[c]) n_irq++;
  end

  // ---------------- processor model ----------------
  task automatic wr(input int a, input logic [15:0] v);
    @(negedge clk); reg_cen = 0; reg_wen = 0; reg_a = 4'(a); reg_d = v;
    @(negedge clk); reg_cen = 1; reg_wen = 1;
  endtask
  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk); reg_cen = 0; reg_wen = 1; reg_a = 4'(a);
    @(negedge clk); reg_cen = 1; v = reg_q;
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

  function automatic logic [15:0] hi_w(bit mir, int base, int off);
    return {mir, 8'(base), 7'(off)};
  endfunction
  function automatic logic [15:0] lo_w(int dev, int a);
    return {1'(dev), 15'(a)};
  endfunction
  function automatic logic [15:0] ctl_w(bit si, bit sd, bit di, bit dd, int size);
    return {si, sd, di, dd, 2'b00, 10'(size)};
  endfunction
  function automatic logic [15:0] cfg_w(bit halt, int sper, int dper, bit sp, bit dp, bit seq, int fn, bit aclr);
    return {halt, 1'b1, 3'(sper), 3'(dper), sp, dp, seq, 3'(fn), aclr, 1'b1};
  endfunction

  // program channel c: source, destination, control, then configuration
  task automatic prog(input int c, input logic [15:0] sh, sl, dh, dl, ch, cl, cf);
    wr(7*c + 0, sh); wr(7*c + 1, sl); wr(7*c + 2, dh); wr(7*c + 3, dl);
    wr(7*c + 4, ch); wr(7*c + 5, cl); wr(7*c + 6, cf);
  endtask
  task automatic wait_irq(input int c, output int cycles);
    cycles = 0;
    while (irq_n[c] && cycles < 200000) begin @(negedge clk); cycles++; end
    chk(!irq_n[c], $sformatf("channel %0d interrupt", c));
    @(negedge clk); chk(!irq_n[c], "interrupt holds two cycles");
    @(negedge clk); chk(irq_n[c], "interrupt released after two cycles");
  endtask

  function automatic int brev5(int k);
    int r; r = 0;
    for (int i = 0; i < 5; i++) if (k[i]) r |= 1 << (4 - i);
    return r;
  endfunction

  // ---------------- I2S master model ----------------
  logic sck = 0, ws = 1, sd_m = 0;
  assign i2s_rx_sck = sck; assign i2s_rx_ws = ws; assign i2s_rx_sd = sd_m;
  assign i2s_tx_sck = sck; assign i2s_tx_ws = ws;
  logic [31:0] sent [$], heard [$];
  initial begin
    logic [31:0] w, nxt, rx;
    w = $urandom;
    #1000;
    for (int n = 0; n < 400; n++) begin
      nxt = $urandom;
      for (int b = 0; b < 32; b++) begin
        sck = 0;
        sd_m = w[31 - b];
        ws = (b == 31) ? !n[0] : n[0];
        #40 sck = 1;
        #1 rx = {rx[30:0], i2s_tx_sd};
        #39;
      end
      sent.push_back(w);
      heard.push_back(rx);
      w = nxt;
    end
  end
  function automatic int find(ref logic [31:0] q [$], input logic [31:0] v);
    foreach (q[i]) if (q[i] == v) return i;
    return -1;
  endfunction

  // ---------------- the test ----------------
  initial begin
    logic [31:0] v, exp32;
    int cyc, k;
    repeat (3) @(posedge clk); rst_n = 1;

    // data: A[i] = B[i] = i
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      memA_cs = 1; memA_we = 1; memA_addr = 9'(i); memA_wdata = 32'(i);
      memB_cs = 1; memB_we = 1; memB_addr = 9'(i); memB_wdata = 32'(i);
    end
    @(negedge clk); memA_cs = 0; memB_cs = 0; memA_we = 0; memB_we = 0;

    // 1. inner product, Eq. (4.1): A and B increasing from 1, 510 words, real MAC
    prog(0, hi_w(0,0,0), lo_w(0,1), hi_w(0,0,0), lo_w(1,1), 16'h0, ctl_w(1,0,1,0,510), cfg_w(0,0,0,0,0,0,1,1));
    wait_irq(0, cyc);
    rd(15, v); chk(v == 32'd44347135, $sformatf("inner product %0d", v));
    chk(cyc <= 510 + 8, $sformatf("inner product cycles %0d", cyc));
    n_mac++;

    // 2. convolution, Eq. (4.2): A increasing from 1, B decreasing from 509
    prog(0, hi_w(0,0,0), lo_w(0,1), hi_w(0,0,0), lo_w(1,509), 16'h0, ctl_w(1,0,0,1,510), cfg_w(0,0,0,0,0,0,1,1));
    wait_irq(0, cyc);
    rd(15, v); chk(v == 32'd22108415, $sformatf("convolution %0d", v));
    n_dec++;

    // 3. both channels on one inner product (ch1 held off by ch0 on the banks)
    prog(0, hi_w(0,0,0), lo_w(0,1), hi_w(0,0,0), lo_w(1,1), 16'h0, ctl_w(1,0,1,0,255), cfg_w(0,0,0,0,0,0,1,1));
    prog(1, hi_w(0,0,0), lo_w(0,256), hi_w(0,0,0), lo_w(1,256), 16'h0, ctl_w(1,0,1,0,255), cfg_w(0,0,0,0,0,0,1,0));
    wait_irq(1, cyc);
    $display("two-channel inner product: %0d cycles after channel 1 started", cyc);
    chk(cyc <= 2 * 255 + 16, "two-channel inner product rate");
    repeat (3) @(negedge clk);
    rd(15, v); chk(v == 32'd44347135, $sformatf("two-channel inner product %0d", v));
    wr(14, 0);

    // 4. bank A -> bank B, 64 words, while the processor also reads bank A
    fork
      prog(0, hi_w(0,0,0), lo_w(0,0), hi_w(0,0,0), lo_w(1,300), 16'h0, ctl_w(1,0,1,0,64), cfg_w(0,0,0,0,0,0,0,0));
      begin repeat (16) @(negedge clk); for (int i = 0; i < 10; i++) mem_rd(0, 500 + i, v); end
    join
    wait_irq(0, cyc);
    for (int i = 0; i < 64; i++) begin mem_rd(1, 300 + i, v); chk(v == 32'(i), "A2B data"); end
    n_m2m++;

    // 5. inside bank A: read increasing from 0, write decreasing from 489
    prog(0, hi_w(0,0,0), lo_w(0,0), hi_w(0,0,0), lo_w(0,489), 16'h0, ctl_w(1,0,0,1,40), cfg_w(0,0,0,0,0,0,0,0));
    wait_irq(0, cyc);
    for (int i = 0; i < 40; i++) begin mem_rd(0, 489 - i, v); chk(v == 32'(i), "A2A data"); end
    n_m2m_same++;

    // 6. circular source: block of 8 at 0, first element at offset 5
    prog(1, hi_w(0,0,5), lo_w(0,0), hi_w(0,0,0), lo_w(1,100), {8'd8, 8'd0}, ctl_w(1,0,1,0,20), cfg_w(0,0,0,0,0,0,0,0));
    wait_irq(1, cyc);
    for (int i = 0; i < 20; i++) begin mem_rd(1, 100 + i, v); chk(v == 32'((5 + i) % 8), "circular"); end
    n_circ++;

    // 7. mirror source: block of 4 at 16
    prog(0, hi_w(1,0,0), lo_w(0,16), hi_w(0,0,0), lo_w(1,120), {8'd4, 8'd0}, ctl_w(1,0,1,0,12), cfg_w(0,0,0,0,0,0,0,0));
    wait_irq(0, cyc);
    begin
      int mexp [12] = '{0, 1, 2, 3, 3, 2, 1, 0, 0, 1, 2, 3};
      for (int i = 0; i < 12; i++) begin mem_rd(1, 120 + i, v); chk(v == 32'(16 + mexp[i]), "mirror"); end
    end
    n_mirror++;

    // 8. index-based source, step 3
    prog(0, hi_w(0,3,0), lo_w(0,0), hi_w(0,0,0), lo_w(1,140), 16'h0, ctl_w(1,0,1,0,10), cfg_w(0,0,0,0,0,0,0,0));
    wait_irq(0, cyc);
    for (int i = 0; i < 10; i++) begin mem_rd(1, 140 + i, v); chk(v == 32'(3 * i), "index"); end
    n_index++;

    // 9. bit-reversed source: 32 points at 32 (FFT input reordering)
    prog(1, hi_w(0,0,0), lo_w(0,32), hi_w(0,0,0), lo_w(1,160), {8'd32, 8'd0}, ctl_w(1,1,1,0,32), cfg_w(0,0,0,0,0,0,0,0));
    wait_irq(1, cyc);
    for (int i = 0; i < 32; i++) begin mem_rd(1, 160 + i, v); chk(v == 32'(32 + brev5(i)), "bit-reverse"); end
    n_brev++;

    // 10. complex 3-tap FIR (coefficients in A[0..2], samples in B[0..2])
    begin
      logic signed [15:0] cr [3], ci [3], xr [3], xi [3];
      longint er, ei;
      er = 0; ei = 0;
      for (int i = 0; i < 3; i++) begin
        cr[i] = 16'($urandom % 2000) - 16'sd1000; ci[i] = 16'($urandom % 2000) - 16'sd1000;
        xr[i] = 16'($urandom % 20) - 16'sd10;     xi[i] = 16'($urandom % 20) - 16'sd10;
        mem_wr(0, i, {cr[i], ci[i]}); mem_wr(1, i, {xr[i], xi[i]});
        er += longint'(cr[i]) * xr[i] - longint'(ci[i]) * xi[i];
        ei += longint'(cr[i]) * xi[i] + longint'(ci[i]) * xr[i];
      end
      prog(0, hi_w(0,0,0), lo_w(0,0), hi_w(0,0,0), lo_w(1,0), 16'h0, ctl_w(1,0,1,0,3), cfg_w(0,0,0,0,0,0,2,1));
      wait_irq(0, cyc);
      chk(cyc <= 3 + 8, "complex FIR cycles");
      rd(15, v); chk(v == {16'(er), 16'(ei)}, $sformatf("complex FIR %h", v));
      n_cfir++;
    end

    // 11. FFT butterflies: W in A[64..], B in B[64..] (channel 0), A in A[80..] (channel 1)
    begin
      logic [31:0] wv [8], bv [8], av [8], ey0 [8], ey1 [8];
      for (int i = 0; i < 8; i++) begin
        wv[i] = {16'($urandom % 65536), 16'($urandom % 65536)};
        bv[i] = {16'(($urandom % 8000) - 4000), 16'(($urandom % 8000) - 4000)};
        av[i] = {16'(($urandom % 8000) - 4000), 16'(($urandom % 8000) - 4000)};
        mem_wr(0, 64 + i, wv[i]); mem_wr(1, 64 + i, bv[i]); mem_wr(0, 80 + i, av[i]);
      end
      k = 0;
      fork
        begin
          prog(0, hi_w(0,0,0), lo_w(0,64), hi_w(0,0,0), lo_w(1,64), 16'h0, ctl_w(1,0,1,0,8), cfg_w(0,0,0,0,0,0,4,0));
          prog(1, hi_w(0,0,0), lo_w(0,80), hi_w(0,0,0), lo_w(1,80), 16'h0, ctl_w(1,0,1,0,8), cfg_w(0,0,0,0,0,0,4,0));
          wait_irq(1, cyc);
        end
        while (k < 8) begin
          @(posedge clk);
          if (bfly_valid) begin
            longint wr_, wi_, br_, bi_, ar_, ai_, tr, ti, y0r, y0i, y1r, y1i;
            wr_ = signed'(wv[k][31:16]); wi_ = signed'(wv[k][15:0]);
            br_ = signed'(bv[k][31:16]); bi_ = signed'(bv[k][15:0]);
            ar_ = signed'(av[k][31:16]); ai_ = signed'(av[k][15:0]);
            tr = (br_ * wr_ - bi_ * wi_ + 16384) >>> 15; ti = (br_ * wi_ + bi_ * wr_ + 16384) >>> 15;
            y0r = ar_ + tr; y0i = ai_ + ti; y1r = ar_ - tr; y1i = ai_ - ti;
            chk(bfly_y0 == {16'(y0r), 16'(y0i)} && bfly_y1 == {16'(y1r), 16'(y1i)},
                $sformatf("butterfly %0d", k));
            ey0[k] = {16'(y0r), 16'(y0i)}; ey1[k] = {16'(y1r), 16'(y1i)};
            if (k == 0) t_bf0 = now;
            if (k == 7) t_bf7 = now;
            k++;
          end
        end
      join
      // single-port banks: per butterfly each bank sees two reads and one write,
      // and a channel fetches again only after its write-back: one butterfly
      // every 6 cycles at most
      $display("butterfly interval %0d cycles", (t_bf7 - t_bf0) / 7);
      chk(t_bf7 - t_bf0 <= 7 * 6, "butterfly rate");
      repeat (20) @(negedge clk);
      // results written back in place: Y0 over A, Y1 over B
      for (int i = 0; i < 8; i++) begin
        mem_rd(0, 80 + i, v); chk(v == ey0[i], $sformatf("Y0 %0d written over A", i));
        mem_rd(1, 64 + i, v); chk(v == ey1[i], $sformatf("Y1 %0d written over B", i));
        mem_rd(0, 64 + i, v); chk(v == wv[i], "twiddle left unchanged");
      end
      wr(14, 0);
    end

    // 12. I2S: receiver -> A (ch0) and B -> transmitter (ch1) at the same time
    for (int i = 0; i < 8; i++) mem_wr(1, 200 + i, 32'hC0DE_0000 + 32'(i * 77));
    prog(0, hi_w(0,0,0), lo_w(0,0), hi_w(0,0,0), lo_w(0,200), 16'h0, ctl_w(0,0,1,0,8), cfg_w(0,0,0,1,0,0,0,0));
    prog(1, hi_w(0,0,0), lo_w(1,200), hi_w(0,0,0), lo_w(0,0), 16'h0, ctl_w(1,0,0,0,8), cfg_w(0,0,1,0,1,0,0,0));
    wait_irq(0, cyc);
    if (!irq_n[1]) ; else wait_irq(1, cyc);
    begin
      logic [31:0] got [8];
      int p;
      for (int i = 0; i < 8; i++) mem_rd(0, 200 + i, got[i]);
      p = find(sent, got[0]);
      chk(p >= 0, "P2M first word was sent");
      for (int i = 1; i < 8; i++) chk(p >= 0 && sent.size() > p + i && got[i] == sent[p + i], "P2M stream");
      n_p2m++;
      repeat (600) @(negedge clk);   // let the last words leave the transmitter
      p = find(heard, 32'hC0DE_0000);
      chk(p >= 0, "M2P first word heard");
      for (int i = 1; i < 8; i++) chk(p >= 0 && heard.size() > p + i && heard[p + i] == 32'hC0DE_0000 + 32'(i * 77), "M2P stream");
      n_m2p++;
    end
    wr(14, 0);

    // 13. I2S receiver -> transmitter directly, 6 words
    prog(0, hi_w(0,0,0), lo_w(0,0), hi_w(0,0,0), lo_w(0,0), 16'h0, ctl_w(0,0,0,0,6), cfg_w(0,0,1,1,1,0,0,0));
    wait_irq(0, cyc);
    repeat (800) @(negedge clk);
    begin
      int p, q;
      // the last word the transmitter sent came from the receiver's stream, and so did the 5 before it
      q = heard.size() - 1;
      while (q > 0 && heard[q] == 0) q--;
      p = find(sent, heard[q]);
      chk(p >= 5, "P2P last word came from the receiver");
      for (int i = 1; i < 6; i++) chk(p >= 5 && heard[q - i] == sent[p - i], "P2P stream");
      n_p2p++;
    end
    wr(14, 0);

    // 14. sequence transfer into a circular block of 4, stopped by halt
    prog(1, hi_w(0,0,0), lo_w(0,0), hi_w(0,0,0), lo_w(1,500), {8'd0, 8'd4}, ctl_w(1,0,1,0,3), cfg_w(0,0,0,0,0,1,0,0));
    repeat (200) @(negedge clk);
    rd(13, v); chk(v[0] == 1'b1, "sequence transfer still running");
    wr(13, cfg_w(1,0,0,0,0,1,0,0));
    wait_irq(1, cyc);
    rd(13, v); chk(v[0] == 1'b0, "channel closed after halt");
    n_seq_halt++;
    wr(14, 0);

    // 15. accumulator overflow: 300 products of (-32768)^2 on both halves
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      memA_cs = 1; memA_we = 1; memA_addr = 9'(i); memA_wdata = 32'h8000_8000;
      memB_cs = 1; memB_we = 1; memB_addr = 9'(i); memB_wdata = 32'h8000_8000;
    end
    @(negedge clk); memA_cs = 0; memB_cs = 0; memA_we = 0; memB_we = 0;
    prog(0, hi_w(0,0,0), lo_w(0,0), hi_w(0,0,0), lo_w(1,0), 16'h0, ctl_w(1,0,1,0,300), cfg_w(0,0,0,0,0,0,1,1));
    wait_irq(0, cyc);
    rd(14, v); chk(v[0] == 1'b1, "overflow reported in status");
    n_overflow += v[0];
    rd(14, v); chk(v[7] == 1'b0, "status interrupt bit low (pending)");
    wr(14, 0); rd(14, v); chk(v[7] == 1'b1 && v[15] == 1'b1, "status interrupt bits cleared");

    // ---------------- every mechanism happened ----------------
    $display("mechanisms: ch1_held=%0d host_held=%0d fifo_full=%0d drain=%0d irq=%0d apb=%0d bfly=%0d lane1=%0d",
             n_ch1_held, n_host_held, n_fifo_full, n_drain, n_irq, n_apb, n_bfly, n_lane1_mac);
    chk(n_ch1_held > 0, "channel 1 held by channel 0");
    chk(n_host_held > 0, "channel held by the processor");
    chk(n_fifo_full > 0, "FIFO full");
    chk(n_drain > 0, "in-bank fill/write bursts");
    chk(n_irq >= 15, "interrupts");
    chk(n_apb > 0, "APB transfers");
    chk(n_bfly == 8, "butterflies");
    chk(n_lane1_mac > 0, "MAC lane 1");
    chk(n_mac > 0 && n_dec > 0 && n_m2m > 0 && n_m2m_same > 0 && n_circ > 0 && n_mirror > 0, "modes A");
    chk(n_index > 0 && n_brev > 0 && n_cfir > 0 && n_p2m > 0 && n_m2p > 0 && n_p2p > 0, "modes B");
    chk(n_seq_halt > 0 && n_overflow > 0, "modes C");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
