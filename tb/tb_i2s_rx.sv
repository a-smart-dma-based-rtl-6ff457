// tb_i2s_rx: an I2S master model sends random 32-bit words (left, right,
// alternately; SD and WS change on falling SCK, WS one bit before the MSB) and
// the testbench reads them over APB-style accesses when the DMA request line
// rises, checking each word, its channel tag and the overrun flag.
module tb_i2s_rx;
  logic clk = 0, rst_n = 0, sck = 0, ws = 0, sd = 0;
  logic psel = 0, penable = 0, pwrite = 0, paddr0 = 0;
  logic [31:0] pwdata = 0, prdata;
  logic dreq;
  int checks = 0, failures = 0, got = 0;
  logic [31:0] words [40];

  i2s_rx #(.WIDTH(32)) dut (.*);
  always #5 clk = !clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // I2S master: SCK period 80 ns
  initial begin
    foreach (words[i]) words[i] = $urandom;
    #200;
    for (int n = 0; n < 40; n++)
      for (int b = 0; b < 32; b++) begin
        sck = 0;
        sd  = words[n][31 - b];
        ws  = (b == 31) ? !n[0] : n[0];   // word n is left when n even
        #40 sck = 1;
        #40;
      end
    sck = 0;
  end

  task automatic apb_read(input logic ad, output logic [31:0] v);
    @(negedge clk); psel = 1; pwrite = 0; paddr0 = ad;
    @(negedge clk); penable = 1; #1 v = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] v, st;
    repeat (2) @(posedge clk); rst_n = 1;
    // the first word (n = 0) is complete at the WS change that ends it
    while (got < 39) begin
      @(negedge clk);
      if (dreq) begin
        apb_read(1'b1, st);
        apb_read(1'b0, v);
        chk(v == words[got], $sformatf("word %0d", got));
        chk(st[1] == got[0], "channel tag");
        chk(st[2] == 1'b0, "no overrun");
        got++;
      end
    end
    @(negedge clk); chk(!dreq, "request dropped after read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
