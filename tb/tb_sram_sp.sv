// tb_sram_sp: writes random words, reads them back (data one edge after the
// request), checks that a deselected cycle changes nothing and OE low gives 0.
module tb_sram_sp;
  logic clk = 0, cs = 0, oe = 1, web = 1;
  logic [8:0] a = 0;
  logic [31:0] di = 0, dout;
  logic [31:0] ref_m [512];
  int checks = 0, failures = 0;

  sram_sp #(.WORDS(512), .WIDTH(32)) dut (.CK(clk), .CS(cs), .OE(oe), .WEB(web), .A(a), .DI(di), .DO(dout));
  always #5 clk = !clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); cs = 1; web = 0; a = 9'(i); di = $urandom; ref_m[i] = di;
    end
    @(negedge clk); cs = 0; web = 0; a = 5; di = 32'hdead;   // deselected: no write
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); cs = 1; web = 1; a = 9'((i * 7) % 512);
      @(negedge clk); cs = 0;
      checks++; if (dout != ref_m[(i * 7) % 512]) begin failures++; $display("FAIL read %0d", i); end
    end
    oe = 0; #1; checks++; if (dout != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
