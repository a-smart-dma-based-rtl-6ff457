// sdma_apb_master: the controller's port onto the peripheral bus (AMBA APB).
//
// A granted channel request (start, with its bus_req_t) is latched and run as
// one APB transfer: a SETUP cycle with the peripheral's PSEL high and PENABLE
// low, then an ACCESS cycle with PENABLE high, at the end of which read data is
// sampled.  done pulses in the ACCESS cycle with rdata valid.  busy is high
// from the latching edge until the transfer ends, so the arbiter grants no other
// transfer meanwhile: a transfer that has started always finishes before the bus
// changes hands.  Eight select lines serve the eight peripherals.  The two-phase
// transfer follows the APB read-cycle timing; the one idle cycle between
// transfers and the absence of PREADY (APB of that generation) are this
// design's choices.
module sdma_apb_master
  import sdma_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  bus_req_t           req,
  output logic               busy,
  output logic               done,
  output logic [DATA_W-1:0]  rdata,
  // APB
  output logic [N_PER-1:0]   psel,
  output logic               penable,
  output logic               pwrite,
  output logic [PADDR_W-1:0] paddr,
  output logic [DATA_W-1:0]  pwdata,
  input  logic [DATA_W-1:0]  prdata
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ACCESS} state_e;
  state_e     state;
  logic [2:0] per;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      per    <= '0;
      pwrite <= 1'b0;
      paddr  <= '0;
      pwdata <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_SETUP;
          per    <= req.per;
          pwrite <= req.we;
          paddr  <= req.addr[PADDR_W-1:0];
          pwdata <= req.wdata;
        end
        S_SETUP:  state <= S_ACCESS;
        S_ACCESS: state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    psel = '0;
    if (state != S_IDLE) psel[per] = 1'b1;
  end
  assign penable = (state == S_ACCESS);
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_ACCESS);
  assign rdata   = prdata;

endmodule
