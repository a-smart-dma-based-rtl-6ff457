// sdma_mem_if: the memory interface of one data bank.
//
// Puts one access per cycle on a synchronous single-port SRAM: the processor's
// own access when it uses the bank, otherwise the channel request that the
// arbiter granted for this bank (grant vector gnt, one-hot among requests for
// this bank).  SRAM pins follow the memory symbol: CS and OE active high, WEB
// low for a write.  Read data appears on DO after the clock edge, so both the
// processor and a channel take it one cycle after their request; DO is handed
// back to everyone unchanged.  The pin set follows the memory description; the
// processor-first selection follows its bus-release rule.
module sdma_mem_if
  import sdma_pkg::*;
#(
  parameter res_e BANK = RES_RAM_A
) (
  // processor side
  input  logic              host_cs,
  input  logic              host_we,
  input  logic [RAM_AW-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  // channel side
  input  bus_req_t          req [N_REQ],
  input  logic [N_REQ-1:0]  gnt,
  // SRAM pins
  output logic              cs,
  output logic              oe,
  output logic              web,
  output logic [RAM_AW-1:0] a,
  output logic [DATA_W-1:0] di
);
  always_comb begin
    cs  = 1'b0;
    web = 1'b1;
    a   = '0;
    di  = '0;
    if (host_cs) begin
      cs  = 1'b1;
      web = !host_we;
      a   = host_addr;
      di  = host_wdata;
    end else begin
      for (int i = 0; i < N_REQ; i++) begin
        if (gnt[i] && req[i].res == BANK) begin
          cs  = 1'b1;
          web = !req[i].we;
          a   = req[i].addr[RAM_AW-1:0];
          di  = req[i].wdata;
        end
      end
    end
  end
  assign oe = 1'b1;

endmodule
