// sdma_pkg: types and constants shared by the Smart-DMA controller.
//
// The register fields mirror the controller's programming model: a source and a
// destination register (addressing mode in the high half, device and address in
// the low half), a control register (block sizes, direction bits, widths and the
// transfer size) and a 16-bit configuration register per channel.  The bus
// request type is how a channel's read and write controllers ask the arbiter for
// one of the three shared resources: data bank A, data bank B or the peripheral
// bus (APB).  Field layouts follow the controller's register tables; the
// resource encoding and the request bundle are this design's own.
package sdma_pkg;

  localparam int unsigned DATA_W     = 32;  // data path and FIFO width
  localparam int unsigned ADDR_W     = 15;  // address field of the source/destination registers
  localparam int unsigned RAM_AW     = 9;   // address lines of each data SRAM (512 words)
  localparam int unsigned FIFO_DEPTH = 8;   // words per channel FIFO
  localparam int unsigned N_PER      = 8;   // peripherals / DMA request lines on the APB
  localparam int unsigned PADDR_W    = 8;   // APB address width
  localparam int unsigned N_CH       = 2;   // channel controllers
  localparam int unsigned N_REQ      = 6;   // bus requesters: per channel read, operand, write
  localparam int unsigned ACC_W      = 40;  // accumulator width

  // Operation function of a channel (configuration register bits 4:2).
  typedef enum logic [2:0] {
    FN_NORMAL = 3'b000,
    FN_MAC    = 3'b001,
    FN_CFIR   = 3'b010,
    FN_FFT    = 3'b100
  } func_e;

  // Shared resources a request can address.
  typedef enum logic [1:0] {
    RES_RAM_A = 2'd0,
    RES_RAM_B = 2'd1,
    RES_APB   = 2'd2
  } res_e;

  // One side (source or destination) of a channel's addressing set-up.
  typedef struct packed {
    logic              mirror;  // 0: circular block, 1: mirror block
    logic [7:0]        base;    // index step (0 behaves as 1)
    logic [6:0]        offset;  // start position inside the block
    logic              dev;     // 0: RAM_A, 1: RAM_B
    logic [ADDR_W-1:0] addr;    // start address (block boundary when a block is used)
    logic [7:0]        block;   // block size, 0: no block
    logic              inc;     // increase
    logic              dec;     // decrease (inc and dec both set: bit-reversed)
    logic              width16; // 1: 16-bit data, 0: 32-bit
  } side_cfg_t;

  // Everything a channel controller needs from the register bank.
  typedef struct packed {
    side_cfg_t   src;
    side_cfg_t   dst;
    logic [9:0]  size;       // transfer size in words
    logic        halt;
    logic        int_en;
    logic [2:0]  src_per;
    logic [2:0]  dst_per;
    logic        src_is_per; // transfer type bit 7
    logic        dst_is_per; // transfer type bit 6
    logic        seq;        // sequence (endless) transfer
    func_e       func;
  } ch_cfg_t;

  // A request from one channel side to the arbiter.
  typedef struct packed {
    logic                req;
    res_e                res;
    logic                we;
    logic [ADDR_W-1:0]   addr;
    logic [2:0]          per;
    logic [DATA_W-1:0]   wdata;
  } bus_req_t;

  // Decode the configuration-register function field; unknown codes act as normal.
  function automatic func_e decode_func(input logic [2:0] f);
    unique case (f)
      3'b001:  return FN_MAC;
      3'b010:  return FN_CFIR;
      3'b100:  return FN_FFT;
      default: return FN_NORMAL;
    endcase
  endfunction

endpackage
