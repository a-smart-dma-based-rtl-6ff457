// sdma_fifo: the channel buffer between the read and the write controller.
//
// A circular buffer of DEPTH words with a push pointer and a pop pointer that
// wrap to the start at the end of the array, and a counter of the stored words
// from which the state flags are decoded: empty when the counter is 0, full when
// it equals DEPTH and half when it is at least DEPTH/2 (8, 8 and 4 in the
// controller).  Push and pop in the same cycle move both pointers and leave the
// counter unchanged.  data_out shows the word at the pop pointer combinationally
// (show-ahead), so the write controller can drive it onto a bus in the cycle it
// pops.  Pointers, counter and flags follow the controller's FIFO description;
// the show-ahead read and the ignoring of a push when full / a pop when empty
// are this design's choices.
module sdma_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,     // synchronous flush
  input  logic [WIDTH-1:0]         data_in,
  input  logic                     push,
  output logic [WIDTH-1:0]         data_out,
  input  logic                     pop,
  output logic                     full,
  output logic                     empty,
  output logic                     half,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    pt_push, pt_pop;

  wire do_push = push && !full;
  wire do_pop  = pop  && !empty;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pt_push <= '0;
      pt_pop  <= '0;
      count   <= '0;
    end else if (clear) begin
      pt_push <= '0;
      pt_pop  <= '0;
      count   <= '0;
    end else begin
      if (do_push) pt_push <= next_ptr(pt_push);
      if (do_pop)  pt_pop  <= next_ptr(pt_pop);
      unique case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[pt_push] <= data_in;
  end

  assign data_out = mem[pt_pop];
  assign empty    = (count == 0);
  assign full     = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign half     = (count >= ($clog2(DEPTH+1))'(DEPTH / 2));

endmodule
