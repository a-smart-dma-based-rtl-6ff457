// tb_i2s_tx: an I2S master model provides SCK/WS and samples SD on rising SCK;
// the testbench refills the transmitter through APB-style writes whenever its
// DMA request line is high, and checks every received word against the words
// written, in order, and that no underrun occurs while it keeps up.
module tb_i2s_tx;
  logic clk = 0, rst_n = 0, sck = 0, ws = 1, sd;
  logic psel = 0, penable = 0, pwrite = 0, paddr0 = 0;
  logic [31:0] pwdata = 0, prdata;
  logic dreq;
  int checks = 0, failures = 0, sent = 0;
  logic [31:0] words [40];
  logic [31:0] rx;

  i2s_tx #(.WIDTH(32)) dut (.*);
  always #5 clk = !clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic apb_write(input logic ad, input logic [31:0] v);
    @(negedge clk); psel = 1; pwrite = 1; paddr0 = ad; pwdata = v;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  // producer: keep the holding register filled
  initial begin
    foreach (words[i]) words[i] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    while (sent < 40) begin
      @(negedge clk);
      if (dreq) begin apb_write(1'b0, words[sent]); sent++; end
    end
  end

  // I2S master / receiver: slot -1 is a lead-in frame (word -1 is not checked)
  initial begin
    #300;
    for (int n = -1; n < 39; n++) begin
      for (int b = 0; b < 32; b++) begin
        sck = 0;
        ws  = (b == 31) ? !n[0] : n[0];
        #40 sck = 1;
        #1 rx = {rx[30:0], sd};
        #39;
      end
      if (n >= 0) chk(rx == words[n], $sformatf("word %0d", n));
    end
    begin
      logic [31:0] st;
      @(negedge clk); psel = 1; pwrite = 0; paddr0 = 1;
      @(negedge clk); penable = 1; #1 st = prdata;
      @(negedge clk); psel = 0; penable = 0;
      chk(st[1] == 1'b0, "no underrun");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
