// i2s_rx: I2S serial-audio receiver on the peripheral bus.
//
// A slave receiver: SCK and WS come from the transmitter.  SCK, WS and SD are
// resynchronised to the system clock (two flip-flops), which must run at least
// four times faster than SCK.  On each rising SCK edge the SD bit is shifted in,
// MSB first.  WS changes one bit before a word ends, so the bit sampled on the
// first rising edge at which WS differs from its previous value is the LSB of
// the word just finished; the word (WIDTH bits) is then stored with the
// channel it belongs to (WS = 0 left, 1 right).  Frames carry WIDTH SCK cycles
// per channel.  The first rising edge after reset only learns the WS level.
// APB registers (index paddr[0]): 0 data (reading it empties the data
// register), 1 status {overrun, ws of the data word, valid}; writing 1 clears
// overrun.  dreq, the DMA request line, is high while a word waits.
// The shift-register receiver, the WS/SD timing and the two registers on the
// APB follow the I2S description; the status layout, the DMA request line and
// the oversampling of SCK are this design's choices.
module i2s_rx #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sck,
  input  logic             ws,
  input  logic             sd,
  input  logic             psel,
  input  logic             penable,
  input  logic             pwrite,
  input  logic             paddr0,
  input  logic [WIDTH-1:0] pwdata,
  output logic [WIDTH-1:0] prdata,
  output logic             dreq
);
  logic [2:0]       sck_s, ws_s, sd_s;  // synchronisers (bit 2 is the oldest)
  logic [WIDTH-1:0] shreg, data;
  logic             ws_last, data_ws, valid, overrun, primed;

  wire sck_rise = sck_s[1] && !sck_s[2];
  wire rd_data  = psel && penable && !pwrite && !paddr0;
  wire wr_stat  = psel && penable &&  pwrite &&  paddr0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s <= '0; ws_s <= '0; sd_s <= '0;
      shreg <= '0; data <= '0;
      ws_last <= 1'b0; data_ws <= 1'b0; valid <= 1'b0; overrun <= 1'b0;
      primed <= 1'b0;
    end else begin
      sck_s <= {sck_s[1:0], sck};
      ws_s  <= {ws_s[1:0], ws};
      sd_s  <= {sd_s[1:0], sd};
      if (rd_data) valid <= 1'b0;
      if (wr_stat && pwdata[2]) overrun <= 1'b0;
      if (sck_rise) begin
        shreg   <= {shreg[WIDTH-2:0], sd_s[1]};
        ws_last <= ws_s[1];
        primed  <= 1'b1;
        if (primed && ws_s[1] != ws_last) begin
          data    <= {shreg[WIDTH-2:0], sd_s[1]};
          data_ws <= ws_last;
          valid   <= 1'b1;
          if (valid && !rd_data) overrun <= 1'b1;
        end
      end
    end
  end

  assign prdata = paddr0 ? WIDTH'({overrun, data_ws, valid}) : data;
  assign dreq   = valid;

endmodule
