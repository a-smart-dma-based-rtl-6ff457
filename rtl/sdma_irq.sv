// sdma_irq: interrupt controller of one channel.
//
// When the channel reports that its job is finished (done) and its interrupt is
// enabled, irq_n goes low for exactly two clock cycles, and the channel's
// interrupt bit in the status register goes low (active low, like the line) and
// stays low until the processor writes the status register (clr).  The
// active-low line, its two-cycle length and the status bit follow the
// controller's description; clearing the bit by a status write is this
// design's choice.
module sdma_irq (
  input  logic clk,
  input  logic rst_n,
  input  logic done,
  input  logic int_en,
  input  logic clr,
  output logic irq_n,
  output logic int_flag_n
);
  logic [1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold       <= '0;
      int_flag_n <= 1'b1;
    end else begin
      if (done && int_en) begin
        hold       <= 2'b11;
        int_flag_n <= 1'b0;
      end else begin
        hold <= {1'b0, hold[1]};
        if (clr) int_flag_n <= 1'b1;
      end
    end
  end

  assign irq_n = !hold[0];

endmodule
