// i2s_tx: I2S serial-audio transmitter on the peripheral bus.
//
// A slave transmitter: SCK and WS come from the receiver.  Both are
// resynchronised to the system clock (two flip-flops), which must run at least
// four times faster than SCK.  SD changes after each falling SCK edge.  WS
// changes one bit before a word starts, so on the falling edge that follows a
// WS change the transmitter loads the waiting word and drives its MSB; on the
// other falling edges it shifts the next bit out.  If no word waits, zeros are
// sent and underrun is set.  The first falling edge after reset only learns
// the WS level.  Frames carry WIDTH SCK cycles per channel; words
// are sent in the order written (left, right, left, ...).
// APB registers (index paddr[0]): 0 data (write only; fills the holding
// register), 1 status {underrun, empty}; writing 1 clears underrun.  dreq, the
// DMA request line, is high while the holding register is empty.
// The shift-register transmitter, the timing of WS and SD and the two
// registers on the APB follow the I2S description; the status layout, the DMA
// request line and the oversampling of SCK are this design's choices.
module i2s_tx #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sck,
  input  logic             ws,
  output logic             sd,
  input  logic             psel,
  input  logic             penable,
  input  logic             pwrite,
  input  logic             paddr0,
  input  logic [WIDTH-1:0] pwdata,
  output logic [WIDTH-1:0] prdata,
  output logic             dreq
);
  logic [2:0]       sck_s, ws_s;
  logic [WIDTH-1:0] shreg, hold;
  logic             ws_q1, ws_q2, empty, underrun, primed;

  wire sck_fall = !sck_s[1] && sck_s[2];
  wire wr_data  = psel && penable && pwrite && !paddr0;
  wire wr_stat  = psel && penable && pwrite &&  paddr0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s <= '0; ws_s <= '0;
      shreg <= '0; hold <= '0; sd <= 1'b0;
      ws_q1 <= 1'b0; ws_q2 <= 1'b0; empty <= 1'b1; underrun <= 1'b0;
      primed <= 1'b0;
    end else begin
      sck_s <= {sck_s[1:0], sck};
      ws_s  <= {ws_s[1:0], ws};
      if (wr_data) begin
        hold  <= pwdata;
        empty <= 1'b0;
      end
      if (wr_stat && pwdata[1]) underrun <= 1'b0;
      if (sck_fall && !primed) begin
        // first falling edge after reset: learn the WS level, send nothing
        ws_q1  <= ws_s[1];
        ws_q2  <= ws_s[1];
        primed <= 1'b1;
      end else if (sck_fall) begin
        ws_q1 <= ws_s[1];
        ws_q2 <= ws_q1;
        if (ws_q1 != ws_q2) begin
          if (empty && !wr_data) begin
            sd       <= 1'b0;
            shreg    <= '0;
            underrun <= 1'b1;
          end else begin
            sd    <= hold[WIDTH-1];
            shreg <= {hold[WIDTH-2:0], 1'b0};
            empty <= 1'b1;
          end
        end else begin
          sd    <= shreg[WIDTH-1];
          shreg <= {shreg[WIDTH-2:0], 1'b0};
        end
      end
    end
  end

  assign prdata = paddr0 ? WIDTH'({underrun, empty}) : '0;
  assign dreq   = empty;

endmodule
