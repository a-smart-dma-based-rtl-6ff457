// sdma_addr_gen: address sequence of one side (source or destination) of a channel.
//
// load starts a sequence from the side's register fields, step moves to the next
// address; addr always shows the current one.  The modes:
//   * direction: inc adds the step, dec (with inc clear) subtracts it, neither
//     holds the address (used for a peripheral data register);
//   * index-based: the step is the base field (a base of 0 steps by 1);
//   * block: with a non-zero block size N the address is addr + idx, where the
//     index idx starts at the offset field and stays inside 0..N-1.  Circular
//     (mirror = 0) wraps idx around the block; mirror (mirror = 1) reflects it at
//     the block ends and reverses the direction, so the end element is repeated
//     (0,1,..,N-1,N-1,..,1,0,0,1,..) as a symmetric extension for the DCT needs;
//   * bit-reversed: inc and dec both set; a counter k runs 0,1,..,N-1 and wraps,
//     and the address is addr + bitrev(k) over log2(N) bits.  N must be a power
//     of two; a block size of 0 means 256 here.
// The four addressing types and the register fields follow the controller's
// register tables.  The repeat-the-end-element mirror rule, the use of both
// direction bits for bit-reversed mode and the step <= N limit for blocks are
// this design's own choices.  Timing: load and step take effect at the clock
// edge; addr is a register output.
module sdma_addr_gen
  import sdma_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  side_cfg_t         cfg,
  input  logic              load,
  input  logic              step,
  output logic [ADDR_W-1:0] addr
);
  logic [ADDR_W-1:0] lin;     // linear (non-block) address
  logic [8:0]        idx;     // index inside a block / bit-reverse counter
  logic              down;    // current direction of a mirror block

  wire  [8:0] n      = (cfg.block == 0) ? 9'd256 : {1'b0, cfg.block};
  wire  [8:0] stp    = (cfg.base == 0) ? 9'd1 : {1'b0, cfg.base};
  wire        brev   = cfg.inc && cfg.dec;
  wire        blk    = (cfg.block != 0) && !brev;
  wire        moving = cfg.inc || cfg.dec;
  wire        go_dn  = cfg.dec && !cfg.inc;

  // number of bits of the bit-reversed counter: log2 of the block size
  function automatic int unsigned log2n(input logic [8:0] v);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 9; i++) if (v[i]) r = i;
    return r;
  endfunction

  function automatic logic [8:0] bitrev(input logic [8:0] k, input int unsigned nb);
    logic [8:0] r;
    r = '0;
    for (int i = 0; i < 9; i++)
      if (i < nb) r[i] = k[nb - 1 - i];
    return r;
  endfunction

  // next index inside a block
  logic [8:0] idx_nx;
  logic       down_nx;
  always_comb begin
    idx_nx  = idx;
    down_nx = down;
    if (!cfg.mirror) begin
      if (go_dn) idx_nx = (idx >= stp) ? idx - stp : idx + n - stp;
      else       idx_nx = (idx + stp >= n) ? idx + stp - n : idx + stp;
    end else begin
      if (!down) begin
        if (idx + stp > n - 1) begin
          idx_nx  = 9'({n, 1'b0} - 10'd1 - (10'(idx) + 10'(stp)));
          down_nx = 1'b1;
        end else idx_nx = idx + stp;
      end else begin
        if (idx < stp) begin
          idx_nx  = stp - idx - 9'd1;
          down_nx = 1'b0;
        end else idx_nx = idx - stp;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lin  <= '0;
      idx  <= '0;
      down <= 1'b0;
    end else if (load) begin
      lin  <= cfg.addr;
      idx  <= brev ? 9'd0 : {2'b0, cfg.offset};
      down <= go_dn;
    end else if (step && moving) begin
      if (brev) begin
        idx <= (idx == n - 1) ? 9'd0 : idx + 1'b1;
      end else if (blk) begin
        idx  <= idx_nx;
        down <= down_nx;
      end else begin
        lin <= go_dn ? lin - ADDR_W'(stp) : lin + ADDR_W'(stp);
      end
    end
  end

  always_comb begin
    if (brev)     addr = lin + ADDR_W'(bitrev(idx, log2n(n)));
    else if (blk) addr = lin + ADDR_W'(idx);
    else          addr = lin;
  end

endmodule
