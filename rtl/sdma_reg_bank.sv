// sdma_reg_bank: the controller's memory-mapped register bank.
//
// The processor sees sixteen 16-bit locations through an SRAM-like port: on a
// rising clock with CEN low, WEN low writes D to location A, WEN high reads
// location A onto Q, valid after that edge.  Map (per channel c = 0, 1, base
// 7*c):
//   +0 source high      {circular/mirror, base[7:0], offset[6:0]}
//   +1 source low       {device, address[14:0]}
//   +2 destination high (as source high)
//   +3 destination low  (as source low)
//   +4 control high     {source block size[7:0], destination block size[7:0]}
//   +5 control low      {SrcInc, SrcDec, DestInc, DestDec, SrcWidth,
//                        DestWidth, TransferSize[9:0]}
//   +6 configuration    {Halt, IntEn, SrcPer[2:0], DestPer[2:0],
//                        TransferType[1:0], SeqTran, Func[2:0], ACClr, ChEn}
//   14 status           {channel 1 byte, channel 0 byte}, each
//                       {Interrupt (low active), Full, Empty, Half, ChSel,
//                        Err[2:0]}
//   15 accumulator      write: 16-bit preload; read: ACC saturated to a
//                       signed 32-bit value, or {ACCR, ACCI} each saturated
//                       to 16 bits while the MAC is in the complex mode.
// Q is 32 bits wide so that the accumulator can be read at once; other
// locations read zero-extended.  Writing a configuration word with ChEn set
// starts the channel the next cycle; the channel clears ChEn itself when its
// job ends.  ACClr clears the accumulators and drops back to 0 after one
// cycle.  While a channel runs, TransferSize reads back the words still to be
// transferred.  A status write clears both interrupt flags.
// The register fields, the 16x16 view, the CEN/WEN protocol, ChEn and ACClr
// behaviour and the 32-bit signed ACC read follow the controller's register
// description.  The order of the locations, the bit meaning of the two
// TransferType bits (bit 7: source is a peripheral, bit 6: destination is a
// peripheral) and the complex ACC read format are this design's choices.
module sdma_reg_bank
  import sdma_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // processor port
  input  logic                    cen,
  input  logic                    wen,
  input  logic [3:0]              a,
  input  logic [15:0]             d,
  output logic [31:0]             q,
  // to the channels
  output ch_cfg_t                 cfg   [N_CH],
  output logic [N_CH-1:0]         start,
  input  logic [N_CH-1:0]         ch_done,
  input  logic [N_CH-1:0]         ch_busy,
  input  logic [9:0]              ch_remaining [N_CH],
  // status sources
  input  logic [7:0]              ch_status [N_CH],
  output logic                    status_wr,
  // to the dual-MAC
  output logic                    acc_clr,
  output logic                    acc_wr,
  output logic [15:0]             acc_wdata,
  input  func_e                   mac_mode,
  input  logic signed [ACC_W-1:0] accr,
  input  logic signed [ACC_W-1:0] acci,
  input  logic signed [ACC_W-1:0] acc
);
  logic [15:0] r_src_h [N_CH], r_src_l [N_CH], r_dst_h [N_CH], r_dst_l [N_CH];
  logic [15:0] r_ctl_h [N_CH], r_ctl_l [N_CH], r_cfg [N_CH];

  wire wr = !cen && !wen;
  wire rd = !cen && wen;

  function automatic logic [31:0] sat32(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(signed'(32'sh7fffffff)))       return 32'h7fffffff;
    else if (v < ACC_W'(signed'(32'sh80000000)))  return 32'h80000000;
    else                                          return v[31:0];
  endfunction
  function automatic logic [15:0] sat16(input logic signed [ACC_W-1:0] v);
    if (v > ACC_W'(signed'(16'sh7fff)))       return 16'h7fff;
    else if (v < ACC_W'(signed'(16'sh8000)))  return 16'h8000;
    else                                      return v[15:0];
  endfunction

  function automatic side_cfg_t side(input logic [15:0] h, input logic [15:0] l,
                                     input logic [7:0] blk, input logic inc,
                                     input logic dec, input logic w16);
    side_cfg_t s;
    s.mirror  = h[15];
    s.base    = h[14:7];
    s.offset  = h[6:0];
    s.dev     = l[15];
    s.addr    = l[14:0];
    s.block   = blk;
    s.inc     = inc;
    s.dec     = dec;
    s.width16 = w16;
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        r_src_h[c] <= '0; r_src_l[c] <= '0; r_dst_h[c] <= '0; r_dst_l[c] <= '0;
        r_ctl_h[c] <= '0; r_ctl_l[c] <= '0; r_cfg[c]   <= '0;
      end
      start     <= '0;
      status_wr <= 1'b0;
      acc_wr    <= 1'b0;
      acc_wdata <= '0;
      q         <= '0;
    end else begin
      start     <= '0;
      status_wr <= 1'b0;
      acc_wr    <= 1'b0;
      for (int c = 0; c < N_CH; c++) begin
        r_cfg[c][1] <= 1'b0;                 // ACClr lasts one cycle
        if (ch_done[c]) r_cfg[c][0] <= 1'b0; // channel closes itself
      end
      if (wr) begin
        for (int c = 0; c < N_CH; c++) begin
          unique case (int'(a) - 7 * c)
            0: r_src_h[c] <= d;
            1: r_src_l[c] <= d;
            2: r_dst_h[c] <= d;
            3: r_dst_l[c] <= d;
            4: r_ctl_h[c] <= d;
            5: r_ctl_l[c] <= d;
            6: begin
              r_cfg[c] <= d;
              start[c] <= d[0];
            end
            default: ;
          endcase
        end
        if (a == 4'd14) status_wr <= 1'b1;
        if (a == 4'd15) begin
          acc_wr    <= 1'b1;
          acc_wdata <= d;
        end
      end
      if (rd) begin
        q <= '0;
        for (int c = 0; c < N_CH; c++) begin
          unique case (int'(a) - 7 * c)
            0: q[15:0] <= r_src_h[c];
            1: q[15:0] <= r_src_l[c];
            2: q[15:0] <= r_dst_h[c];
            3: q[15:0] <= r_dst_l[c];
            4: q[15:0] <= r_ctl_h[c];
            5: q[15:0] <= ch_busy[c] ? {r_ctl_l[c][15:10], ch_remaining[c]} : r_ctl_l[c];
            6: q[15:0] <= r_cfg[c];
            default: ;
          endcase
        end
        if (a == 4'd14) q[15:0] <= {ch_status[1], ch_status[0]};
        if (a == 4'd15) q <= (mac_mode == FN_CFIR) ? {sat16(accr), sat16(acci)} : sat32(acc);
      end
    end
  end

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      cfg[c].src        = side(r_src_h[c], r_src_l[c], r_ctl_h[c][15:8],
                               r_ctl_l[c][15], r_ctl_l[c][14], r_ctl_l[c][11]);
      cfg[c].dst        = side(r_dst_h[c], r_dst_l[c], r_ctl_h[c][7:0],
                               r_ctl_l[c][13], r_ctl_l[c][12], r_ctl_l[c][10]);
      cfg[c].size       = r_ctl_l[c][9:0];
      cfg[c].halt       = r_cfg[c][15];
      cfg[c].int_en     = r_cfg[c][14];
      cfg[c].src_per    = r_cfg[c][13:11];
      cfg[c].dst_per    = r_cfg[c][10:8];
      cfg[c].src_is_per = r_cfg[c][7];
      cfg[c].dst_is_per = r_cfg[c][6];
      cfg[c].seq        = r_cfg[c][5];
      cfg[c].func       = decode_func(r_cfg[c][4:2]);
    end
  end

  assign acc_clr = r_cfg[0][1] || r_cfg[1][1];

endmodule
