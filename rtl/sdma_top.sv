// sdma_top: the Smart-DMA subsystem of the dual-core signal processor.
//
// The controller (sdmac) with its two 512 x 32 data banks RAM_A and RAM_B and
// the I2S receiver and transmitter hanging on its peripheral bus.  The
// processor cores are outside: their access to the register bank and to the
// two banks comes in through the ports below, with priority over the
// controller on each bank.
//   Peripheral 0: I2S receiver, peripheral 1: I2S transmitter (APB select and
//   DMA request line of the same number); peripherals 2..7 are brought out.
// Ports: reg_* is the controller's register port (CEN/WEN, 16 locations,
// 32-bit read data one cycle after the request); memA_*/memB_* are the
// processor's bank ports (read data on *_rdata one cycle after the request);
// irq_n is one active-low interrupt per channel; i2s_* are the serial pins;
// ext_* is the APB for the other six peripherals; bfly_* show the FFT-mode
// butterfly results (also written back to the banks).
// The composition follows the system's bus structure (two data buses shared by
// processor and controller, the APB with I2S Rx/Tx); the peripheral numbering
// is this design's choice.
module sdma_top
  import sdma_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // processor: register bank
  input  logic                reg_cen,
  input  logic                reg_wen,
  input  logic [3:0]          reg_a,
  input  logic [15:0]         reg_d,
  output logic [31:0]         reg_q,
  // processor: data banks
  input  logic                memA_cs,
  input  logic                memA_we,
  input  logic [RAM_AW-1:0]   memA_addr,
  input  logic [DATA_W-1:0]   memA_wdata,
  output logic [DATA_W-1:0]   memA_rdata,
  input  logic                memB_cs,
  input  logic                memB_we,
  input  logic [RAM_AW-1:0]   memB_addr,
  input  logic [DATA_W-1:0]   memB_wdata,
  output logic [DATA_W-1:0]   memB_rdata,
  // interrupts
  output logic [N_CH-1:0]     irq_n,
  // I2S
  input  logic                i2s_rx_sck,
  input  logic                i2s_rx_ws,
  input  logic                i2s_rx_sd,
  input  logic                i2s_tx_sck,
  input  logic                i2s_tx_ws,
  output logic                i2s_tx_sd,
  // other peripherals (2..7)
  output logic [N_PER-1:0]    ext_psel,
  output logic                ext_penable,
  output logic                ext_pwrite,
  output logic [PADDR_W-1:0]  ext_paddr,
  output logic [DATA_W-1:0]   ext_pwdata,
  input  logic [DATA_W-1:0]   ext_prdata,
  input  logic [N_PER-1:0]    ext_dreq,
  // butterfly results
  output logic                bfly_valid,
  output logic [DATA_W-1:0]   bfly_y0,
  output logic [DATA_W-1:0]   bfly_y1
);
  logic              ramA_cs, ramA_oe, ramA_web, ramB_cs, ramB_oe, ramB_web;
  logic [RAM_AW-1:0] ramA_a, ramB_a;
  logic [DATA_W-1:0] ramA_di, ramB_di, ramA_do, ramB_do;
  logic [N_PER-1:0]  psel, dreq;
  logic              penable, pwrite;
  logic [PADDR_W-1:0] paddr;
  logic [DATA_W-1:0] pwdata, prdata, rx_prdata, tx_prdata;
  logic              rx_dreq, tx_dreq;

  sdmac u_sdmac (
    .clk, .rst_n,
    .cen(reg_cen), .wen(reg_wen), .a(reg_a), .d(reg_d), .q(reg_q),
    .hA_cs(memA_cs), .hA_we(memA_we), .hA_addr(memA_addr), .hA_wdata(memA_wdata),
    .hB_cs(memB_cs), .hB_we(memB_we), .hB_addr(memB_addr), .hB_wdata(memB_wdata),
    .ramA_cs, .ramA_oe, .ramA_web, .ramA_a, .ramA_di, .ramA_do,
    .ramB_cs, .ramB_oe, .ramB_web, .ramB_a, .ramB_di, .ramB_do,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .dreq,
    .irq_n, .bfly_valid, .y0(bfly_y0), .y1(bfly_y1)
  );

  sram_sp #(.WORDS(512), .WIDTH(DATA_W)) u_ram_a (
    .CK(clk), .CS(ramA_cs), .OE(ramA_oe), .WEB(ramA_web), .A(ramA_a), .DI(ramA_di), .DO(ramA_do)
  );
  sram_sp #(.WORDS(512), .WIDTH(DATA_W)) u_ram_b (
    .CK(clk), .CS(ramB_cs), .OE(ramB_oe), .WEB(ramB_web), .A(ramB_a), .DI(ramB_di), .DO(ramB_do)
  );

  i2s_rx #(.WIDTH(DATA_W)) u_i2s_rx (
    .clk, .rst_n, .sck(i2s_rx_sck), .ws(i2s_rx_ws), .sd(i2s_rx_sd),
    .psel(psel[0]), .penable, .pwrite, .paddr0(paddr[0]), .pwdata,
    .prdata(rx_prdata), .dreq(rx_dreq)
  );
  i2s_tx #(.WIDTH(DATA_W)) u_i2s_tx (
    .clk, .rst_n, .sck(i2s_tx_sck), .ws(i2s_tx_ws), .sd(i2s_tx_sd),
    .psel(psel[1]), .penable, .pwrite, .paddr0(paddr[0]), .pwdata,
    .prdata(tx_prdata), .dreq(tx_dreq)
  );

  assign memA_rdata  = ramA_do;
  assign memB_rdata  = ramB_do;
  assign dreq        = {ext_dreq[N_PER-1:2], tx_dreq, rx_dreq};
  assign prdata      = psel[0] ? rx_prdata : psel[1] ? tx_prdata : ext_prdata;
  assign ext_psel    = {psel[N_PER-1:2], 2'b00};
  assign ext_penable = penable;
  assign ext_pwrite  = pwrite;
  assign ext_paddr   = paddr;
  assign ext_pwdata  = pwdata;

endmodule
