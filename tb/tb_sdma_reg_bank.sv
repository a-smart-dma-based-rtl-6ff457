// tb_sdma_reg_bank: programs both channels through the CEN/WEN port and
// checks read-back, the decoded channel fields, the start pulse, ChEn closing
// itself on done, ACClr lasting one cycle, the remaining-count read-back, the
// status word, the 32-bit saturated ACC read and the complex ACC format.
module tb_sdma_reg_bank;
  import sdma_pkg::*;
  logic clk = 0, rst_n = 0, cen = 1, wen = 1;
  logic [3:0] a = 0;
  logic [15:0] d = 0;
  logic [31:0] q;
  ch_cfg_t cfg [N_CH];
  logic [1:0] start, ch_done = 0, ch_busy = 0;
  logic [9:0] ch_remaining [N_CH];
  logic [7:0] ch_status [N_CH];
  logic status_wr, acc_clr, acc_wr;
  logic [15:0] acc_wdata;
  func_e mac_mode = FN_MAC;
  logic signed [39:0] accr = 0, acci = 0, acc = 0;
  int checks = 0, failures = 0;
  logic [15:0] shadow [16];

  sdma_reg_bank dut (.*);
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic wr(input int ad, input logic [15:0] v);
    @(negedge clk); cen = 0; wen = 0; a = 4'(ad); d = v; @(negedge clk); cen = 1; wen = 1;
  endtask
  task automatic rd(input int ad, output logic [31:0] v);
    @(negedge clk); cen = 0; wen = 1; a = 4'(ad); @(negedge clk); cen = 1; v = q;
  endtask

  initial begin
    logic [31:0] v;
    ch_remaining[0] = 10'd77; ch_remaining[1] = 10'd5;
    ch_status[0] = 8'hA5; ch_status[1] = 8'h3C;
    repeat (2) @(posedge clk); rst_n = 1;
    // plain registers (no ChEn, no ACClr)
    for (int c = 0; c < 2; c++)
      for (int r = 0; r < 6; r++) begin
        shadow[7*c+r] = 16'($urandom); wr(7*c + r, shadow[7*c+r]);
      end
    for (int i = 0; i < 14; i++) if (i % 7 != 6) begin
      rd(i, v); chk(v == {16'h0, shadow[i]}, $sformatf("readback %0d", i));
    end
    // decoding of channel 1's fields
    wr(7, 16'b1_00000011_0000101);   // mirror, base 3, offset 5
    wr(8, 16'b1_000000100000000);    // RAM_B, addr 256
    wr(11, 16'h1004);                // block sizes 0x10 / 0x04
    wr(12, 16'b1_0_0_1_1_0_0000001010); // SrcInc, DestDec, SrcWidth, size 10
    chk(cfg[1].src.mirror && cfg[1].src.base == 3 && cfg[1].src.offset == 5, "src high fields");
    chk(cfg[1].src.dev && cfg[1].src.addr == 256, "src low fields");
    chk(cfg[1].src.block == 8'h10 && cfg[1].dst.block == 8'h04, "block sizes");
    chk(cfg[1].src.inc && !cfg[1].src.dec && !cfg[1].dst.inc && cfg[1].dst.dec, "directions");
    chk(cfg[1].src.width16 && !cfg[1].dst.width16 && cfg[1].size == 10, "width/size");
    // configuration: IntEn, SrcPer 5, DestPer 2, type 10, CFIR, ChEn
    fork
      wr(13, 16'b0_1_101_010_10_0_010_0_1);
      begin @(posedge clk); @(posedge clk); #1; chk(start == 2'b10, "start pulse"); @(posedge clk); #1; chk(start == 0, "start once"); end
    join
    chk(cfg[1].int_en && cfg[1].src_per == 5 && cfg[1].dst_per == 2, "cfg fields");
    chk(cfg[1].src_is_per && !cfg[1].dst_is_per && cfg[1].func == FN_CFIR && !cfg[1].seq, "cfg type/func");
    ch_busy = 2'b10; rd(12, v); chk(v[9:0] == 10'd5, "remaining readback"); ch_busy = 0;
    @(negedge clk); ch_done = 2'b10; @(negedge clk); ch_done = 0;
    rd(13, v); chk(v[0] == 1'b0 && v[14] == 1'b1, "ChEn closed by done");
    // ACClr lasts one cycle
    fork
      wr(6, 16'h0002);
      begin @(posedge clk); @(posedge clk); #1; chk(acc_clr, "acc_clr high"); @(posedge clk); #1; chk(!acc_clr, "acc_clr one cycle"); end
    join
    // status and ACC
    rd(14, v); chk(v == 32'h3CA5, "status");
    wr(14, 16'h0); chk(1'b1, "status write");
    acc = 40'sd123456789; mac_mode = FN_MAC; rd(15, v); chk(v == 32'd123456789, "acc read");
    acc = 40'sh7f_0000_0000; rd(15, v); chk(v == 32'h7fffffff, "acc saturates");
    acc = -40'sd5; rd(15, v); chk(v == 32'hfffffffb, "acc negative");
    mac_mode = FN_CFIR; accr = 40'sd100000; acci = -40'sd7; rd(15, v); chk(v == {16'h7fff, 16'hfff9}, "complex acc");
    fork
      wr(15, 16'h8001);
      begin @(posedge clk); @(posedge clk); #1; chk(acc_wr && acc_wdata == 16'h8001, "acc preload"); end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
