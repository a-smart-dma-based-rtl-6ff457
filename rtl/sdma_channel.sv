// sdma_channel: one channel controller of the Smart DMA.
//
// A reading controller and a writing controller, each a small state machine
// (IDLE -> SETUP -> ENABLE -> SETUP ... -> IDLE), share an 8-word FIFO and two
// address generators (source and destination).  start launches a job from the
// register fields in cfg; done pulses once when it is finished, after which
// the register bank closes the channel.
//
// Reading: in SETUP the reader asks the arbiter for the source (bank A, bank B
// or the peripheral bus) when the source is ready (a peripheral's DMA request
// line is high) and there is room for the word.  A bank read returns its word
// one cycle after the grant (ENABLE), and a new read can be granted in that
// same cycle, so a bank streams one word per clock.  A peripheral read waits in
// ENABLE for the two-phase APB transfer.  Writing is the mirror image: the
// writer asks for the destination while the FIFO holds data and the destination
// is ready, and pops the FIFO when granted.
//
// Source and destination in different places are read and written in the same
// cycles.  Source and destination in the same bank run in bursts: the reader
// fills the FIFO, then the writer empties it (phase flag drain).
//
// With a MAC function (MAC, CFIR, FFT) the channel feeds the dual-MAC instead
// of the FIFO: each step reads the source word and, at the destination
// address, a second operand word from the destination bank in the same cycle,
// and loads both into the channel's MAC lane one cycle later.  Both operands
// must then come from different banks (bank A and bank B).  In FFT mode the
// butterfly result for the loaded word comes back on wb_valid/wb_data and the
// write port stores it in place, over the source word (wb_to_src) or over the
// operand word; the next word is fetched only after that write.
//
// Sequence transfer never counts down, so the job runs until halt.  halt stops
// reading; the job ends when everything read has been written.
//
// The two controllers, their FSM states, the FIFO hand-off, the simultaneous
// read/write for different memories and fill-then-write for one memory, the
// halt and the sequence transfer follow the controller's description.  The
// operand-fetch scheme for the MAC functions, the FIFO-room accounting with the
// word in flight and the DMA request line as the peripheral-ready signal are
// this design's choices.
module sdma_channel
  import sdma_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  ch_cfg_t             cfg,
  input  logic                start,
  input  logic [N_PER-1:0]    dreq,
  // bus requests and grants
  output bus_req_t            req_rd,
  output bus_req_t            req_op,
  output bus_req_t            req_wr,
  input  logic                gnt_rd,
  input  logic                gnt_op,
  input  logic                gnt_wr,
  input  logic [DATA_W-1:0]   do_a,      // bank A read data
  input  logic [DATA_W-1:0]   do_b,      // bank B read data
  input  logic                apb_done,
  input  logic [DATA_W-1:0]   apb_rdata,
  // MAC lane
  input  logic                lane_empty,
  input  logic                lane_stream,
  output logic                lane_ld,
  output logic [DATA_W-1:0]   lane_c,
  output logic [DATA_W-1:0]   lane_d,
  // FFT write-back: a butterfly result for the word this channel loaded
  input  logic                wb_valid,
  input  logic [DATA_W-1:0]   wb_data,
  input  logic                wb_to_src, // 1: over the source word, 0: over the operand word
  // status
  output logic                busy,
  output logic                done,
  output logic [9:0]          remaining,
  output logic                fifo_full,
  output logic                fifo_empty,
  output logic                fifo_half,
  output logic                drain_phase
);
  typedef enum logic [1:0] {ST_IDLE, ST_SETUP, ST_ENABLE} st_e;
  st_e rd_st, wr_st;

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic              running;
  logic [9:0]        rd_left, wr_left;
  logic [ADDR_W-1:0] lane_addr, wb_addr;   // FFT write-back address
  logic [DATA_W-1:0] wb_word;
  logic              wb_pend;
  logic              rd_arr;      // a bank read word arrives this cycle
  logic              drain;
  logic [ADDR_W-1:0] src_addr, dst_addr;
  logic [CW-1:0]     count;
  logic [DATA_W-1:0] fifo_out;

  wire mac      = (cfg.func != FN_NORMAL);
  wire fft      = (cfg.func == FN_FFT);
  wire src_per  = cfg.src_is_per && !mac;
  wire dst_per  = cfg.dst_is_per && !mac;
  wire same_mem = !src_per && !dst_per && !mac && (cfg.src.dev == cfg.dst.dev);
  wire halting  = cfg.halt;

  wire res_e src_res = src_per ? RES_APB : (cfg.src.dev ? RES_RAM_B : RES_RAM_A);
  wire res_e dst_res = dst_per ? RES_APB : (cfg.dst.dev ? RES_RAM_B : RES_RAM_A);

  // ---------------- reading controller ----------------
  wire src_ok   = src_per ? dreq[cfg.src_per] : 1'b1;
  wire space_ok = (32'(count) + 32'(rd_arr)) < FIFO_DEPTH;
  // an FFT result must be written back before the next word is fetched
  wire lane_ok  = lane_stream || (lane_empty && !rd_arr && !wb_pend && !wb_valid);
  wire rd_wait_apb = (rd_st == ST_ENABLE) && src_per;

  logic want_rd;
  assign want_rd = running && !halting && (rd_left != 0) && !rd_wait_apb &&
                   (rd_st != ST_IDLE) && (!same_mem || !drain) && src_ok &&
                   (mac ? lane_ok : space_ok);

  wire issue_rd = want_rd && gnt_rd && (!mac || gnt_op);

  always_comb begin
    req_rd       = '0;
    req_rd.req   = want_rd;
    req_rd.res   = src_res;
    req_rd.addr  = src_addr;
    req_rd.per   = cfg.src_per;
    req_op       = '0;
    req_op.req   = want_rd && mac;
    req_op.res   = dst_res;
    req_op.addr  = dst_addr;
  end

  wire [DATA_W-1:0] src_word = src_per ? apb_rdata : (cfg.src.dev ? do_b : do_a);
  wire [DATA_W-1:0] op_word  = cfg.dst.dev ? do_b : do_a;
  wire              rd_word  = rd_arr || (rd_wait_apb && apb_done);
  wire [DATA_W-1:0] push_word = cfg.src.width16 ? {16'h0, src_word[15:0]} : src_word;

  assign lane_ld = rd_arr && mac;
  assign lane_c  = src_word;
  assign lane_d  = op_word;

  // ---------------- writing controller ----------------
  wire dst_ok      = dst_per ? dreq[cfg.dst_per] : 1'b1;
  wire wr_wait_apb = (wr_st == ST_ENABLE) && dst_per;

  // FFT: the address of the word in the lane, and the result waiting to be
  // written back over it (in place)

  logic want_wr;
  assign want_wr = running && (mac ? (fft && wb_pend) :
                   ((wr_left != 0) && !wr_wait_apb && (wr_st != ST_IDLE) &&
                    !fifo_empty && (!same_mem || drain) && dst_ok));

  wire issue_wr = want_wr && gnt_wr;

  always_comb begin
    req_wr       = '0;
    req_wr.req   = want_wr;
    req_wr.we    = 1'b1;
    if (mac) begin
      req_wr.res   = wb_to_src ? src_res : dst_res;
      req_wr.addr  = wb_addr;
      req_wr.wdata = wb_word;
    end else begin
      req_wr.res   = dst_res;
      req_wr.addr  = dst_addr;
      req_wr.per   = cfg.dst_per;
      req_wr.wdata = cfg.dst.width16 ? {16'h0, fifo_out[15:0]} : fifo_out;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_addr <= '0;
      wb_addr   <= '0;
      wb_word   <= '0;
      wb_pend   <= 1'b0;
    end else begin
      if (issue_rd) lane_addr <= wb_to_src ? src_addr : dst_addr;
      if (wb_valid && fft && running) begin
        wb_addr <= lane_addr;
        wb_word <= wb_data;
        wb_pend <= 1'b1;
      end else if (issue_wr && mac) begin
        wb_pend <= 1'b0;
      end
    end
  end

  // ---------------- FIFO and address generators ----------------
  sdma_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(start && !running),
    .data_in(push_word), .push(rd_word && !mac),
    .data_out(fifo_out), .pop(issue_wr && !mac),
    .full(fifo_full), .empty(fifo_empty), .half(fifo_half), .count(count)
  );

  sdma_addr_gen u_src (.clk, .rst_n, .cfg(cfg.src), .load(start && !running),
                       .step(issue_rd), .addr(src_addr));
  sdma_addr_gen u_dst (.clk, .rst_n, .cfg(cfg.dst), .load(start && !running),
                       .step((issue_wr && !mac) || (issue_rd && mac)), .addr(dst_addr));

  // ---------------- job control ----------------
  wire rd_quiet = !rd_arr && !rd_wait_apb;
  wire wr_quiet = !wr_wait_apb;
  logic finish;
  always_comb begin
    if (halting)
      finish = rd_quiet && wr_quiet && (mac ? (lane_empty && !wb_valid && !wb_pend) : fifo_empty);
    else if (mac)
      finish = (rd_left == 0) && rd_quiet && lane_empty && !wb_valid && !wb_pend;
    else
      finish = (wr_left == 0) && wr_quiet;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      rd_left <= '0;
      wr_left <= '0;
      rd_arr  <= 1'b0;
      drain   <= 1'b0;
      rd_st   <= ST_IDLE;
      wr_st   <= ST_IDLE;
      done    <= 1'b0;
    end else begin
      done   <= 1'b0;
      rd_arr <= issue_rd && !src_per;
      if (start && !running) begin
        running <= 1'b1;
        rd_left <= cfg.size;
        wr_left <= cfg.size;
        drain   <= 1'b0;
        rd_st   <= ST_SETUP;
        wr_st   <= ST_SETUP;
      end else if (running) begin
        if (issue_rd && !cfg.seq) rd_left <= rd_left - 1'b1;
        if (issue_wr && !mac && !cfg.seq) wr_left <= wr_left - 1'b1;
        // reading controller states
        unique case (rd_st)
          ST_SETUP:  if (issue_rd) rd_st <= ST_ENABLE;
          ST_ENABLE: if (src_per ? apb_done : !issue_rd) rd_st <= ST_SETUP;
          default:   rd_st <= ST_IDLE;
        endcase
        // writing controller states
        unique case (wr_st)
          ST_SETUP:  if (issue_wr) wr_st <= ST_ENABLE;
          ST_ENABLE: if (dst_per ? apb_done : !issue_wr) wr_st <= ST_SETUP;
          default:   wr_st <= ST_IDLE;
        endcase
        // fill / empty phases when source and destination share a bank
        if (!drain && (fifo_full || ((rd_left == 0 || halting) && !rd_arr && !fifo_empty)))
          drain <= 1'b1;
        else if (drain && fifo_empty)
          drain <= 1'b0;
        if (finish) begin
          running <= 1'b0;
          done    <= 1'b1;
          rd_st   <= ST_IDLE;
          wr_st   <= ST_IDLE;
        end
      end
    end
  end

  assign busy        = running;
  assign remaining   = mac ? rd_left : wr_left;
  assign drain_phase = drain && same_mem;

  // the two MAC operands come from different banks
  always_comb begin
    if (rst_n && running && mac) assert (cfg.src.dev != cfg.dst.dev);
  end

endmodule
