// sdmac: the Smart DMA controller.
//
// Two identical channel controllers move words between the two data banks and
// the peripheral bus, with increase/decrease, circular, mirror, index-based and
// bit-reversed addressing, or feed a built-in dual-MAC that computes inner
// products, real and complex FIR sums and radix-2 butterflies while the data
// streams past.  Around them: the register bank the processor programs, the
// prioritizing arbiter (processor > channel 0 > channel 1 on each bus), one
// memory interface per data bank, the APB master and an interrupt controller
// per channel.
// Interfaces: the processor's register port (cen/wen/a/d/q) and its two bank
// ports (hA_*, hB_*: a processor access takes the bank that cycle, read data on
// the SRAM's DO one cycle later); the SRAM pins of bank A and B; the APB with
// eight selects and eight DMA request lines; irq_n per channel; the butterfly
// results of the FFT mode (bfly_valid, y0, y1).
// The block set and their connections follow the controller's architecture.
// Channel 0 feeds MAC lane 0 and channel 1 lane 1; the MAC mode is taken from
// channel 0's function field unless that is normal, then from channel 1's.
// In FFT mode channel 0 reads the twiddle W (source) and B (operand) and
// channel 1 reads A (source); each butterfly is written back in place through
// the channels' write ports, Y0 over A by channel 1 and Y1 over B by channel 0,
// and is also shown on bfly_valid/y0/y1.  The operand assignment and the
// in-place write-back are this design's choices.
module sdmac
  import sdma_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // processor: register bank
  input  logic                cen,
  input  logic                wen,
  input  logic [3:0]          a,
  input  logic [15:0]         d,
  output logic [31:0]         q,
  // processor: data banks
  input  logic                hA_cs,
  input  logic                hA_we,
  input  logic [RAM_AW-1:0]   hA_addr,
  input  logic [DATA_W-1:0]   hA_wdata,
  input  logic                hB_cs,
  input  logic                hB_we,
  input  logic [RAM_AW-1:0]   hB_addr,
  input  logic [DATA_W-1:0]   hB_wdata,
  // SRAM pins
  output logic                ramA_cs,
  output logic                ramA_oe,
  output logic                ramA_web,
  output logic [RAM_AW-1:0]   ramA_a,
  output logic [DATA_W-1:0]   ramA_di,
  input  logic [DATA_W-1:0]   ramA_do,
  output logic                ramB_cs,
  output logic                ramB_oe,
  output logic                ramB_web,
  output logic [RAM_AW-1:0]   ramB_a,
  output logic [DATA_W-1:0]   ramB_di,
  input  logic [DATA_W-1:0]   ramB_do,
  // peripheral bus
  output logic [N_PER-1:0]    psel,
  output logic                penable,
  output logic                pwrite,
  output logic [PADDR_W-1:0]  paddr,
  output logic [DATA_W-1:0]   pwdata,
  input  logic [DATA_W-1:0]   prdata,
  input  logic [N_PER-1:0]    dreq,
  // interrupts and butterfly results
  output logic [N_CH-1:0]     irq_n,
  output logic                bfly_valid,
  output logic [DATA_W-1:0]   y0,
  output logic [DATA_W-1:0]   y1
);
  ch_cfg_t          cfg [N_CH];
  logic [N_CH-1:0]  start, ch_done, ch_busy;
  logic [9:0]       ch_rem [N_CH];
  logic [7:0]       ch_status [N_CH];
  logic             status_wr, acc_clr, acc_wr;
  logic [15:0]      acc_wdata;
  bus_req_t         req [N_REQ];
  logic [N_REQ-1:0] gnt;
  logic [N_CH-1:0]  chsel;

  logic             apb_busy, apb_done, apb_start, apb_owner, apb_who;
  logic [DATA_W-1:0] apb_rdata;
  bus_req_t         apb_req;

  logic [1:0]        lane_empty, lane_stream, lane_ld;
  logic [DATA_W-1:0] lane_c [N_CH], lane_d [N_CH];
  logic signed [ACC_W-1:0] accr, acci, acc;
  logic [2:0]        err;
  func_e             mac_mode;

  logic [N_CH-1:0] f_full, f_empty, f_half, int_n;

  sdma_reg_bank u_regs (
    .clk, .rst_n, .cen, .wen, .a, .d, .q,
    .cfg, .start, .ch_done, .ch_busy, .ch_remaining(ch_rem),
    .ch_status, .status_wr,
    .acc_clr, .acc_wr, .acc_wdata, .mac_mode, .accr, .acci, .acc
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic drain_unused;
    sdma_channel u_ch (
      .clk, .rst_n, .cfg(cfg[c]), .start(start[c]), .dreq,
      .req_rd(req[3*c]), .req_op(req[3*c+1]), .req_wr(req[3*c+2]),
      .gnt_rd(gnt[3*c]), .gnt_op(gnt[3*c+1]), .gnt_wr(gnt[3*c+2]),
      .do_a(ramA_do), .do_b(ramB_do),
      .apb_done(apb_done && (apb_owner == 1'(c))), .apb_rdata,
      .lane_empty(lane_empty[c]), .lane_stream(lane_stream[c]),
      .lane_ld(lane_ld[c]), .lane_c(lane_c[c]), .lane_d(lane_d[c]),
      .wb_valid(bfly_valid), .wb_data(c == 0 ? y1 : y0), .wb_to_src(c != 0),
      .busy(ch_busy[c]), .done(ch_done[c]), .remaining(ch_rem[c]),
      .fifo_full(f_full[c]), .fifo_empty(f_empty[c]), .fifo_half(f_half[c]),
      .drain_phase(drain_unused)
    );
    sdma_irq u_irq (
      .clk, .rst_n, .done(ch_done[c]), .int_en(cfg[c].int_en), .clr(status_wr),
      .irq_n(irq_n[c]), .int_flag_n(int_n[c])
    );
    assign ch_status[c] = {int_n[c], f_full[c], f_empty[c], f_half[c], chsel[c], err};
  end

  sdma_arbiter u_arb (
    .req, .host_busy({hB_cs, hA_cs}), .apb_busy, .gnt, .chsel
  );

  sdma_mem_if #(.BANK(RES_RAM_A)) u_memA (
    .host_cs(hA_cs), .host_we(hA_we), .host_addr(hA_addr), .host_wdata(hA_wdata),
    .req, .gnt, .cs(ramA_cs), .oe(ramA_oe), .web(ramA_web), .a(ramA_a), .di(ramA_di)
  );
  sdma_mem_if #(.BANK(RES_RAM_B)) u_memB (
    .host_cs(hB_cs), .host_we(hB_we), .host_addr(hB_addr), .host_wdata(hB_wdata),
    .req, .gnt, .cs(ramB_cs), .oe(ramB_oe), .web(ramB_web), .a(ramB_a), .di(ramB_di)
  );

  // the (single) request granted the peripheral bus this cycle
  always_comb begin
    apb_start = 1'b0;
    apb_req   = '0;
    apb_who   = 1'b0;
    for (int i = 0; i < N_REQ; i++) begin
      if (gnt[i] && req[i].res == RES_APB) begin
        apb_start = 1'b1;
        apb_req   = req[i];
        apb_who   = i >= 3;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         apb_owner <= 1'b0;
    else if (apb_start) apb_owner <= apb_who;
  end

  sdma_apb_master u_apb (
    .clk, .rst_n, .start(apb_start), .req(apb_req), .busy(apb_busy), .done(apb_done),
    .rdata(apb_rdata), .psel, .penable, .pwrite, .paddr, .pwdata, .prdata
  );

  assign mac_mode = (cfg[0].func != FN_NORMAL) ? cfg[0].func : cfg[1].func;

  sdma_dual_mac u_mac (
    .clk, .rst_n, .mode(mac_mode),
    .ld0(lane_ld[0]), .c0(lane_c[0]), .d0(lane_d[0]),
    .ld1(lane_ld[1]), .c1(lane_c[1]), .d1(lane_d[1]),
    .acc_clr, .acc_wr, .acc_wdata,
    .lane_empty, .lane_stream, .accr, .acci, .acc, .err,
    .bfly_valid, .y0, .y1
  );

endmodule
