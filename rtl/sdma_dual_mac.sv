// sdma_dual_mac: the controller's built-in arithmetic unit.
//
// Four 16x16 signed multipliers whose operands are chosen by multiplexers from
// two operand lanes, two 40-bit accumulators ACCR and ACCI and a third, ACC,
// that adds them.  Lane 0 holds the words C = {CH, CL} and D = {DH, DL} fetched
// by channel 0, lane 1 the words A1 = {AH1, AL1} and B1 = {BH1, BL1} fetched by
// channel 1; each 32-bit word carries a high and a low 16-bit half (the real and
// imaginary part of a complex sample).  Per cycle, on the lane registers:
//   MAC  (real): ACCR += CH*DH + CL*DL (lane 0), ACCI += AH1*BH1 + AL1*BL1
//                (lane 1), and ACC <= ACCR + ACCI: four real MACs per cycle.
//   CFIR (complex): on one lane (lane 0 first) P0 = CR*XR, P1 = CI*XI,
//                P2 = CR*XI, P3 = CI*XR; ACCR += P0 - P1, ACCI += P2 + P3:
//                one complex MAC per cycle.  ACC is not used.
//   FFT  (radix-2 butterfly): with W = lane 0 C, B = lane 0 D and A = lane 1 A1,
//                T = (B*W + 2^14) >> 15 and y0 = A + T, y1 = A - T (16-bit halves,
//                saturated), one butterfly per cycle once both lanes are full.
//   NORMAL: lanes are emptied and nothing is computed.
// The multiplier count, the product schedule of the complex mode, the
// accumulator names and widths and the one-cycle complex MAC and butterfly
// follow the controller's description.  The lane registers with their
// empty/stream handshake, the Q15 butterfly scaling with rounding to nearest
// and saturation, the sticky
// overflow bits err = {ACC, ACCI, ACCR} and the 16-bit ACC preload (into ACCR)
// are this design's choices.
// Interface: ld0/ld1 write a lane register at the clock edge; lane_empty says a
// lane is free, lane_stream that the mode drains it every cycle (a channel may
// then load it back to back).  acc_clr clears the accumulators and errors.
module sdma_dual_mac
  import sdma_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  func_e                   mode,
  input  logic                    ld0,
  input  logic [DATA_W-1:0]       c0,
  input  logic [DATA_W-1:0]       d0,
  input  logic                    ld1,
  input  logic [DATA_W-1:0]       c1,
  input  logic [DATA_W-1:0]       d1,
  input  logic                    acc_clr,
  input  logic                    acc_wr,
  input  logic [15:0]             acc_wdata,
  output logic [1:0]              lane_empty,
  output logic [1:0]              lane_stream,
  output logic signed [ACC_W-1:0] accr,
  output logic signed [ACC_W-1:0] acci,
  output logic signed [ACC_W-1:0] acc,
  output logic [2:0]              err,
  output logic                    bfly_valid,
  output logic [DATA_W-1:0]       y0,
  output logic [DATA_W-1:0]       y1
);
  // operand registers (the MAC's own register bank)
  logic [DATA_W-1:0] rc0, rd0, rc1, rd1;
  logic              v0, v1;

  function automatic logic signed [15:0] hi(input logic [31:0] w); return w[31:16]; endfunction
  function automatic logic signed [15:0] lo(input logic [31:0] w); return w[15:0];  endfunction

  function automatic logic signed [15:0] sat16(input logic signed [18:0] v);
    if (v > 19'sd32767)       return 16'sh7fff;
    else if (v < -19'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  // add with overflow detection at ACC_W bits
  function automatic logic [ACC_W:0] add_ov(input logic signed [ACC_W-1:0] x,
                                            input logic signed [ACC_W-1:0] y);
    logic signed [ACC_W-1:0] s;
    s = x + y;
    return {(x[ACC_W-1] == y[ACC_W-1]) && (s[ACC_W-1] != x[ACC_W-1]), s};
  endfunction

  // which lane the complex mode uses this cycle
  wire use1 = !v0 && v1;

  // operand multiplexers in front of the four multipliers
  logic signed [15:0] ma0, mb0, ma1, mb1, ma2, mb2, ma3, mb3;
  logic [DATA_W-1:0]  cx, dx;
  always_comb begin
    cx = use1 ? rc1 : rc0;
    dx = use1 ? rd1 : rd0;
    if (mode == FN_MAC) begin
      ma0 = hi(rc0); mb0 = hi(rd0);
      ma1 = lo(rc0); mb1 = lo(rd0);
      ma2 = hi(rc1); mb2 = hi(rd1);
      ma3 = lo(rc1); mb3 = lo(rd1);
    end else begin
      if (mode == FN_FFT) begin
        cx = rc0;
        dx = rd0;
      end
      ma0 = hi(cx); mb0 = hi(dx);   // CR*XR
      ma1 = lo(cx); mb1 = lo(dx);   // CI*XI
      ma2 = hi(cx); mb2 = lo(dx);   // CR*XI
      ma3 = lo(cx); mb3 = hi(dx);   // CI*XR
    end
  end

  logic signed [31:0] p0, p1, p2, p3;
  assign p0 = ma0 * mb0;
  assign p1 = ma1 * mb1;
  assign p2 = ma2 * mb2;
  assign p3 = ma3 * mb3;

  // adders of the two accumulator paths
  logic signed [32:0] sum_r, sum_i;
  always_comb begin
    if (mode == FN_MAC) begin
      sum_r = v0 ? (33'(p0) + 33'(p1)) : '0;
      sum_i = v1 ? (33'(p2) + 33'(p3)) : '0;
    end else begin
      sum_r = 33'(p0) - 33'(p1);
      sum_i = 33'(p2) + 33'(p3);
    end
  end

  // butterfly outputs
  logic signed [17:0] tr, ti;
  assign tr = 18'((34'(sum_r) + 34'sd16384) >>> 15);   // Q15, rounded to nearest
  assign ti = 18'((34'(sum_i) + 34'sd16384) >>> 15);
  logic [DATA_W-1:0] by0, by1;
  assign by0 = {sat16(19'(hi(rc1)) + 19'(tr)), sat16(19'(lo(rc1)) + 19'(ti))};
  assign by1 = {sat16(19'(hi(rc1)) - 19'(tr)), sat16(19'(lo(rc1)) - 19'(ti))};

  // what is consumed / accumulated this cycle
  logic take0, take1, acc_en_r, acc_en_i, fire_bf;
  always_comb begin
    take0 = 1'b0; take1 = 1'b0; acc_en_r = 1'b0; acc_en_i = 1'b0; fire_bf = 1'b0;
    unique case (mode)
      FN_MAC: begin
        take0 = v0; take1 = v1;
        acc_en_r = v0; acc_en_i = v1;
      end
      FN_CFIR: begin
        take0 = v0; take1 = use1;
        acc_en_r = v0 || v1; acc_en_i = v0 || v1;
      end
      FN_FFT: begin
        fire_bf = v0 && v1;
        take0 = fire_bf; take1 = fire_bf;
      end
      default: begin
        take0 = v0; take1 = v1;
      end
    endcase
  end

  logic [ACC_W:0] nr, ni, na;
  assign nr = add_ov(accr, ACC_W'(sum_r));
  assign ni = add_ov(acci, ACC_W'(sum_i));
  assign na = add_ov(accr, acci);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0;
      rc0 <= '0; rd0 <= '0; rc1 <= '0; rd1 <= '0;
      accr <= '0; acci <= '0; acc <= '0; err <= '0;
      bfly_valid <= 1'b0; y0 <= '0; y1 <= '0;
    end else begin
      // lane registers
      if (ld0) begin rc0 <= c0; rd0 <= d0; end
      if (ld1) begin rc1 <= c1; rd1 <= d1; end
      v0 <= ld0 || (v0 && !take0);
      v1 <= ld1 || (v1 && !take1);
      // butterfly
      bfly_valid <= fire_bf;
      if (fire_bf) begin y0 <= by0; y1 <= by1; end
      // accumulators
      if (acc_clr) begin
        accr <= '0; acci <= '0; acc <= '0; err <= '0;
      end else if (acc_wr) begin
        accr <= ACC_W'(signed'(acc_wdata));
        acci <= '0;
        acc  <= ACC_W'(signed'(acc_wdata));
      end else begin
        if (acc_en_r) begin accr <= nr[ACC_W-1:0]; if (nr[ACC_W]) err[0] <= 1'b1; end
        if (acc_en_i) begin acci <= ni[ACC_W-1:0]; if (ni[ACC_W]) err[1] <= 1'b1; end
        if (mode == FN_MAC) begin
          acc <= na[ACC_W-1:0];
          if (na[ACC_W]) err[2] <= 1'b1;
        end
      end
    end
  end

  assign lane_empty = {!v1, !v0};
  always_comb begin
    unique case (mode)
      FN_MAC:  lane_stream = 2'b11;
      FN_CFIR: lane_stream = 2'b01;
      FN_FFT:  lane_stream = 2'b00;
      default: lane_stream = 2'b11;
    endcase
  end

endmodule
