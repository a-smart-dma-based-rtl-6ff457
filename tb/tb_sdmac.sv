// tb_sdmac: the controller with two 512 x 32 bank models and eight APB
// peripheral models.  Each peripheral model returns a counting sequence on
// reads, logs its writes and raises its request line at random.  The test runs
// two bank-to-bank moves in opposite directions at once, peripheral-to-memory
// and memory-to-peripheral transfers at once under random request lines, and
// an inner product of random 16-bit data checked against a reference sum.
module tb_sdmac;
  import sdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cen = 1, wen = 1;
  logic [3:0] a = 0;
  logic [15:0] d = 0;
  logic [31:0] q;
  logic hA_cs = 0, hA_we = 0, hB_cs = 0, hB_we = 0;
  logic [8:0] hA_addr = 0, hB_addr = 0;
  logic [31:0] hA_wdata = 0, hB_wdata = 0;
  logic ramA_cs, ramA_oe, ramA_web, ramB_cs, ramB_oe, ramB_web;
  logic [8:0] ramA_a, ramB_a;
  logic [31:0] ramA_di, ramB_di, ramA_do, ramB_do;
  logic [7:0] psel, dreq = 0;
  logic penable, pwrite;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;
  logic [1:0] irq_n;
  logic bfly_valid;
  logic [31:0] y0, y1;

  sdmac dut (.*);
  sram_sp #(.WORDS(512), .WIDTH(32)) u_a (.CK(clk), .CS(ramA_cs), .OE(ramA_oe), .WEB(ramA_web), .A(ramA_a), .DI(ramA_di), .DO(ramA_do));
  sram_sp #(.WORDS(512), .WIDTH(32)) u_b (.CK(clk), .CS(ramB_cs), .OE(ramB_oe), .WEB(ramB_web), .A(ramB_a), .DI(ramB_di), .DO(ramB_do));

  int checks = 0, failures = 0;
  always #5 clk = !clk;
  initial begin
    #5ms; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // APB peripheral models
  int rd_cnt [8];
  logic [31:0] wlog [8][$];
  int sel;
  always_comb begin
    sel = 0;
    for (int i = 0; i < 8; i++) if (psel[i]) sel = i;
    prdata = 32'(sel * 1000 + rd_cnt[sel]);
  end
  always @(posedge clk) begin
    if (penable) begin
      chk($onehot(psel), "one PSEL in the access phase");
      if (pwrite) wlog[sel].push_back(pwdata); else rd_cnt[sel]++;
    end
    dreq <= 8'($urandom);
  end
  int n_held;
  always @(posedge clk)
    if (dut.req[3].req && !dut.gnt[3] && dut.gnt[0]) n_held++;

  task automatic wr(input int ad, input logic [15:0] v);
    @(negedge clk); cen = 0; wen = 0; a = 4'(ad); d = v;
    @(negedge clk); cen = 1; wen = 1;
  endtask
  task automatic rdr(input int ad, output logic [31:0] v);
    @(negedge clk); cen = 0; wen = 1; a = 4'(ad);
    @(negedge clk); cen = 1; v = q;
  endtask
  task automatic prog(input int c, input logic [15:0] sl, dl, cl, cf);
    wr(7*c + 0, 0); wr(7*c + 1, sl); wr(7*c + 2, 0); wr(7*c + 3, dl);
    wr(7*c + 4, 0); wr(7*c + 5, cl); wr(7*c + 6, cf);
  endtask
  task automatic wait_irq(input int c, output int cyc);
    cyc = 0;
    while (irq_n[c] && cyc < 100000) begin @(negedge clk); cyc++; end
    chk(!irq_n[c], $sformatf("interrupt %0d", c));
  endtask

  logic [31:0] ma [512], mb [512];
  initial begin
    logic [31:0] v;
    int cyc, c0, c1;
    longint acc;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      ma[i] = $urandom; mb[i] = $urandom;
      @(negedge clk);
      hA_cs = 1; hA_we = 1; hA_addr = 9'(i); hA_wdata = ma[i];
      hB_cs = 1; hB_we = 1; hB_addr = 9'(i); hB_wdata = mb[i];
    end
    @(negedge clk); hA_cs = 0; hB_cs = 0; hA_we = 0; hB_we = 0;

    // A[0..99] -> B[300..] on channel 0 and B[0..99] -> A[300..] on channel 1
    prog(0, {1'b0, 15'd0}, {1'b1, 15'd300}, {6'b101000, 10'd100}, 16'h4001);
    prog(1, {1'b1, 15'd0}, {1'b0, 15'd300}, {6'b101000, 10'd100}, 16'h4001);
    wait_irq(0, c0);
    wait_irq(1, c1);
    chk(c0 + 8 + c1 <= 2 * 100 + 40, $sformatf("two opposite moves take %0d + %0d cycles", c0, c1));
    for (int i = 0; i < 100; i++) begin
      chk(u_b.mem[300 + i] == ma[i], "A->B data");
      chk(u_a.mem[300 + i] == mb[i], "B->A data");
    end
    chk(n_held > 0, "channel 1 waited for channel 0");
    wr(14, 0);

    // peripheral 3 -> A[400..] on channel 1, B[0..] -> peripheral 5 on channel 0
    prog(1, {1'b0, 15'd0}, {1'b0, 15'd400}, {6'b001000, 10'd20}, {1'b0, 1'b1, 3'd3, 3'd0, 2'b10, 5'b0, 1'b1});
    prog(0, {1'b1, 15'd0}, {1'b0, 15'd0},   {6'b100000, 10'd20}, {1'b0, 1'b1, 3'd0, 3'd5, 2'b01, 5'b0, 1'b1});
    wait_irq(1, c1);
    if (irq_n[0]) wait_irq(0, c0);
    for (int i = 0; i < 20; i++) chk(u_a.mem[400 + i] == 32'(3000 + i), $sformatf("peripheral 3 -> A %0d: %0d", i, u_a.mem[400 + i]));
    chk(wlog[5].size() == 20, $sformatf("peripheral 5 got %0d words, ch0 busy %b rd_left %0d wr_left %0d rd_st %0d wr_st %0d cnt %0d", wlog[5].size(), dut.g_ch[0].u_ch.busy, dut.g_ch[0].u_ch.rd_left, dut.g_ch[0].u_ch.wr_left, dut.g_ch[0].u_ch.rd_st, dut.g_ch[0].u_ch.wr_st, dut.g_ch[0].u_ch.count));
    for (int i = 0; i < 20 && i < wlog[5].size(); i++) chk(wlog[5][i] == mb[i], "B -> peripheral 5");
    wr(14, 0);

    // inner product of random words, 100 terms
    acc = 0;
    for (int i = 0; i < 100; i++)
      acc += longint'(signed'(ma[i][31:16])) * signed'(mb[i][31:16]) + longint'(signed'(ma[i][15:0])) * signed'(mb[i][15:0]);
    prog(0, {1'b0, 15'd0}, {1'b1, 15'd0}, {6'b101000, 10'd100}, 16'h4007);
    wait_irq(0, cyc);
    chk(cyc <= 100 + 8, "inner product rate");
    rdr(15, v);
    chk(v == ((acc > 64'sh7FFFFFFF) ? 32'h7FFFFFFF : (acc < -64'sh80000000) ? 32'h80000000 : 32'(acc)),
        $sformatf("inner product %h vs %0d", v, acc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
