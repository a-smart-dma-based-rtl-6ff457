// sram_sp: synchronous single-port SRAM, the data banks RAM_A and RAM_B.
//
// WORDS x WIDTH (512 x 32 in the chip).  On a rising CK with CS high the word
// at A is written from DI when WEB is low, or read onto DO when WEB is high;
// DO holds the last read word otherwise and is forced to 0 while OE is low.
// The pins, the 512 x 32 size and the one-edge access follow the memory
// description.  The memory table lists WEB as active high while the memory
// symbol draws it with an inversion bubble; this model writes on WEB low.
module sram_sp #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     CK,
  input  logic                     CS,
  input  logic                     OE,
  input  logic                     WEB,
  input  logic [$clog2(WORDS)-1:0] A,
  input  logic [WIDTH-1:0]         DI,
  output logic [WIDTH-1:0]         DO
);
  logic [WIDTH-1:0] mem [WORDS];
  logic [WIDTH-1:0] q;

  always_ff @(posedge CK) begin
    if (CS) begin
      if (!WEB) mem[A] <= DI;
      else      q      <= mem[A];
    end
  end

  assign DO = OE ? q : '0;

endmodule
