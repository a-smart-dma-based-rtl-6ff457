// tb_sdma_channel: one channel controller against behavioural banks, a
// two-phase peripheral-bus model and a grant generator that can withhold
// grants at random.  Checks memory-to-memory moves between the banks (and
// their one-word-per-cycle rate), moves inside one bank (fill-then-write
// bursts), circular and index-based addressing, peripheral-to-memory,
// memory-to-peripheral and peripheral-to-peripheral moves paced by the DMA
// request lines, the MAC operand stream (both banks read in one cycle),
// sequence transfer stopped by halt, and the done pulse.
module tb_sdma_channel;
  import sdma_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  ch_cfg_t cfg;
  logic [7:0] dreq;
  bus_req_t req_rd, req_op, req_wr;
  logic gnt_rd, gnt_op, gnt_wr, apb_done;
  logic [31:0] do_a, do_b, apb_rdata, lane_c, lane_d;
  logic lane_empty = 1, lane_stream = 1, lane_ld;
  logic wb_valid = 0, wb_to_src = 0;
  logic [31:0] wb_data = 0;
  bit   fft_model = 0;
  logic busy, done, fifo_full, fifo_empty, fifo_half, drain_phase;
  logic [9:0] remaining;
  int checks = 0, failures = 0;
  int stall_pct = 0, drains = 0, lanes = 0;

  logic [31:0] ram [2][512];
  logic [31:0] per_src_cnt, per_sink [$];
  logic [31:0] lane_log_c [$], lane_log_d [$];

  sdma_channel dut (.*);
  always #5 clk = !clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // grant generator: single-port banks, one APB transfer at a time
  logic apb_busy;
  int   apb_ph;
  logic apb_we;
  always_comb begin
    logic [2:0] used;
    used = {apb_busy, 2'b00};
    gnt_rd = 0; gnt_op = 0; gnt_wr = 0;
    if (req_rd.req && !used[req_rd.res]) begin gnt_rd = 1; used[req_rd.res] = 1; end
    if (req_op.req && !used[req_op.res]) begin gnt_op = 1; used[req_op.res] = 1; end
    if (req_wr.req && !used[req_wr.res]) begin gnt_wr = 1; used[req_wr.res] = 1; end
    if (stall_hit) begin gnt_rd = 0; gnt_op = 0; gnt_wr = 0; end
  end
  logic stall_hit;
  always @(negedge clk) stall_hit = ($urandom % 100) < stall_pct;

  // banks
  always_ff @(posedge clk) begin
    if (gnt_rd && req_rd.res != RES_APB) begin
      if (req_rd.res == RES_RAM_A) do_a <= ram[0][req_rd.addr[8:0]];
      else                         do_b <= ram[1][req_rd.addr[8:0]];
    end
    if (gnt_op && req_op.res != RES_APB) begin
      if (req_op.res == RES_RAM_A) do_a <= ram[0][req_op.addr[8:0]];
      else                         do_b <= ram[1][req_op.addr[8:0]];
    end
    if (gnt_wr && req_wr.res != RES_APB) ram[req_wr.res == RES_RAM_B][req_wr.addr[8:0]] <= req_wr.wdata;
  end

  // peripheral bus: transfer = grant, setup, access(done)
  assign apb_busy = apb_ph != 0;
  assign apb_done = apb_ph == 2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin apb_ph <= 0; per_src_cnt <= 32'h1000; end
    else begin
      if (apb_ph == 2) begin
        apb_ph <= 0;
        if (!apb_we) per_src_cnt <= per_src_cnt + 1;
      end else if (apb_ph == 1) apb_ph <= 2;
      else if ((gnt_rd && req_rd.res == RES_APB) || (gnt_wr && req_wr.res == RES_APB)) begin
        apb_ph <= 1;
        apb_we <= gnt_wr && req_wr.res == RES_APB;
        if (gnt_wr && req_wr.res == RES_APB) per_sink.push_back(req_wr.wdata);
      end
    end
  end
  assign apb_rdata = per_src_cnt;
  always @(negedge clk) dreq = 8'($urandom);

  always_ff @(posedge clk) if (lane_ld) begin lane_log_c.push_back(lane_c); lane_log_d.push_back(lane_d); end
  always_ff @(posedge clk) if (drain_phase) drains++;

  // FFT lane model: a loaded word is consumed 1..3 cycles later and its result
  // (c ^ d ^ 5A5A5A5A) comes back on the write-back inputs as the lane empties
  initial begin
    logic [31:0] c, d;
    forever begin
      @(posedge clk);
      if (fft_model && lane_ld) begin
        c = lane_c; d = lane_d;
        lane_empty <= 0;
        repeat (1 + $urandom % 3) @(posedge clk);
        lane_empty <= 1; wb_valid <= 1; wb_data <= c ^ d ^ 32'h5A5A5A5A;
        @(posedge clk); wb_valid <= 0;
      end
    end
  end

  function automatic side_cfg_t side(int dev, int a, bit inc, bit dec, int blk = 0, int off = 0, int base = 0);
    side_cfg_t s; s = '0;
    s.dev = 1'(dev); s.addr = 15'(a); s.inc = inc; s.dec = dec; s.block = 8'(blk);
    s.offset = 7'(off); s.base = 8'(base);
    return s;
  endfunction

  task automatic run(output int cycles);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; if (cycles > 20000) break; end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < 512; i++) begin ram[0][i] = 32'(i) | 32'hA000_0000; ram[1][i] = 32'(i) | 32'hB000_0000; end
    cfg = '0;
    repeat (2) @(posedge clk); rst_n = 1;

    // 1. A -> B, 100 words, increasing: one word per cycle
    cfg.src = side(0, 10, 1, 0); cfg.dst = side(1, 300, 1, 0); cfg.size = 100;
    run(cyc);
    for (int i = 0; i < 100; i++) chk(ram[1][300+i] == ram[0][10+i], $sformatf("A2B %0d", i));
    chk(cyc <= 100 + 4, $sformatf("A2B rate: %0d cycles", cyc));

    // 2. A -> A, 30 words, read increasing / write decreasing, bursts
    cfg.src = side(0, 0, 1, 0); cfg.dst = side(0, 200, 0, 1); cfg.size = 30;
    drains = 0; run(cyc);
    for (int i = 0; i < 30; i++) chk(ram[0][200-i] == (32'(i) | 32'hA000_0000), $sformatf("A2A %0d", i));
    chk(drains > 0, "A2A used fill/write bursts");

    // 3. circular source block of 5 starting at offset 3, random stalls
    stall_pct = 30;
    cfg.src = side(1, 40, 1, 0, 5, 3); cfg.dst = side(0, 400, 1, 0); cfg.size = 12;
    run(cyc);
    for (int i = 0; i < 12; i++) chk(ram[0][400+i] == ram[1][40 + (3 + i) % 5], $sformatf("circ %0d", i));

    // 4. index-based destination (step 3)
    cfg.src = side(0, 0, 1, 0); cfg.dst = side(1, 100, 1, 0, 0, 0, 3); cfg.size = 10;
    run(cyc);
    for (int i = 0; i < 10; i++) chk(ram[1][100 + 3*i] == ram[0][i], $sformatf("index %0d", i));

    // 5. peripheral -> B (peripheral 4), paced by its request line
    cfg.src = side(0, 8'h10, 0, 0); cfg.dst = side(1, 450, 1, 0); cfg.size = 8;
    cfg.src_is_per = 1; cfg.src_per = 4;
    begin
      logic [31:0] first; first = per_src_cnt;
      run(cyc);
      for (int i = 0; i < 8; i++) chk(ram[1][450+i] == first + 32'(i), $sformatf("P2M %0d", i));
    end
    // 6. A -> peripheral 6
    cfg.src_is_per = 0; cfg.dst_is_per = 1; cfg.dst_per = 6;
    cfg.src = side(0, 20, 1, 0); cfg.dst = side(0, 8'h20, 0, 0); cfg.size = 6;
    per_sink.delete(); run(cyc);
    chk(per_sink.size() == 6, "M2P count");
    for (int i = 0; i < per_sink.size(); i++) chk(per_sink[i] == ram[0][20+i], $sformatf("M2P %0d", i));
    // 7. peripheral -> peripheral
    cfg.src_is_per = 1; cfg.src_per = 2; cfg.size = 5;
    begin
      logic [31:0] first; first = per_src_cnt;
      per_sink.delete(); run(cyc);
      chk(per_sink.size() == 5, "P2P count");
      for (int i = 0; i < per_sink.size(); i++) chk(per_sink[i] == first + 32'(i), $sformatf("P2P %0d", i));
    end
    cfg.src_is_per = 0; cfg.dst_is_per = 0;

    // 8. MAC operand stream: A increasing, B decreasing
    stall_pct = 0;
    cfg.func = FN_MAC; cfg.src = side(0, 1, 1, 0); cfg.dst = side(1, 50, 0, 1); cfg.size = 40;
    lane_log_c.delete(); lane_log_d.delete(); run(cyc);
    chk(lane_log_c.size() == 40, "MAC operand count");
    for (int i = 0; i < lane_log_c.size(); i++)
      chk(lane_log_c[i] == ram[0][1+i] && lane_log_d[i] == ram[1][50-i], $sformatf("MAC operands %0d", i));
    chk(cyc <= 40 + 4, "MAC operand rate");
    cfg.func = FN_NORMAL;

    // 8b. FFT: results written back in place, over the operand word, then over the source word
    for (int k = 0; k < 2; k++) begin
      logic [31:0] a0 [512], b0 [512];
      a0 = ram[0]; b0 = ram[1];
      stall_pct = 20; fft_model = 1; lane_stream = 0; wb_to_src = 1'(k);
      cfg.func = FN_FFT; cfg.src = side(0, 100, 1, 0); cfg.dst = side(1, 200, 1, 0); cfg.size = 12;
      run(cyc);
      chk(done, "FFT job ends");
      repeat (2) @(negedge clk);
      for (int i = 0; i < 12; i++) begin
        if (k == 0) chk(ram[1][200 + i] == (a0[100 + i] ^ b0[200 + i] ^ 32'h5A5A5A5A) && ram[0][100 + i] == a0[100 + i],
                        $sformatf("FFT write-back over operand %0d", i));
        else        chk(ram[0][100 + i] == (a0[100 + i] ^ b0[200 + i] ^ 32'h5A5A5A5A) && ram[1][200 + i] == b0[200 + i],
                        $sformatf("FFT write-back over source %0d", i));
      end
      fft_model = 0; lane_stream = 1; stall_pct = 0;
    end
    cfg.func = FN_NORMAL;

    // 9. sequence transfer, circular destination, stopped by halt
    cfg.seq = 1; cfg.src = side(0, 0, 1, 0); cfg.dst = side(1, 500, 1, 0, 4); cfg.size = 3;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (60) @(negedge clk);
    chk(busy, "sequence transfer keeps running");
    cfg.halt = 1; cyc = 0;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    chk(done, "halt ends the job");
    @(negedge clk); chk(!busy && fifo_empty, "halted and drained");
    cfg.halt = 0; cfg.seq = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
