// cdsp_mac: the sub-word-parallel multiply-accumulator of the CDSP.
//
// Combinational; the result is written to an accumulator at the end of
// the execute stage. Structure, after the published MAC block diagram:
//   * four 8x8 multipliers. The left pair forms X.hi*Y.hi and X.lo*Y.lo,
//     the right pair X.hi*Y.lo and X.lo*Y.hi, and a 16-bit adder sums the
//     right pair. Each multiplier treats its bytes as signed or unsigned,
//     so the four together make a signed 16x16 product, and in 8-bit mode
//     they are four independent signed 8x8 products;
//   * a crossbar that routes the products (or zero) to
//   * a middle adder of 32 bits whose carry between its two 16-bit halves
//     can be cut, and
//   * a final 40-bit accumulator adder whose carry between bit 15 and bit
//     16 can be cut, giving a 24-bit and a 16-bit adder/subtractor.
// Operations:
//   MPY/MAC/MSU  16x16 signed: dout = [din +/-] X*Y
//   CMPY/CMAC    complex 8-bit: X = {I,Q}, Y = {I,Q};
//                re = Xi*Yi - Xq*Yq, im = Xi*Yq + Xq*Yi;
//                dout = {sext24(re), im} or din + that, fields added apart
//   DMAC         dual 8x8 (FIR): dout = din + X.hi*Y.hi + X.lo*Y.lo
//   ACS          multipliers bypassed: upper 24 bits din - bin,
//                lower 16 bits din + bin (second half of the dual ACS)
//   NONE         dout = din
// Complex results are kept to 16 bits per field, which holds any product
// of 8-bit operands exactly. Accumulation wraps modulo 2^40 (or 2^24 and
// 2^16 per field in split mode). The operand bytes, the adder structure
// and the split widths follow the published diagram; the exact crossbar
// routing per operation is this design's reading of it.
module cdsp_mac
  import cdsp_pkg::*;
(
  input  mac_op_e      op,
  input  logic [15:0]  x,
  input  logic [15:0]  y,
  input  logic [39:0]  din,   // accumulator input (Din)
  input  logic [39:0]  bin,   // second operand in ACS bypass mode
  output logic [39:0]  dout
);
  // ---- multipliers: 9x9 signed, the ninth bit selects signed/unsigned
  logic        s16;                  // 16x16 mode: low bytes unsigned
  logic signed [17:0] p_hh, p_ll, p_hl, p_lh;
  logic signed [17:0] p_x;          // right pair, summed

  function automatic logic signed [8:0] ext8(input logic [7:0] v, input logic sgn);
    return {sgn & v[7], v};
  endfunction

  always_comb begin
    s16   = (op == MAC_MPY) || (op == MAC_MAC) || (op == MAC_MSU);
    p_hh  = ext8(x[15:8], 1'b1) * ext8(y[15:8], 1'b1);
    p_ll  = ext8(x[7:0], !s16)  * ext8(y[7:0], !s16);
    p_hl  = ext8(x[15:8], 1'b1) * ext8(y[7:0], !s16);
    p_lh  = ext8(x[7:0], !s16)  * ext8(y[15:8], 1'b1);
    p_x = p_hl + p_lh;
  end

  // ---- crossbar, middle adder, final adder
  logic [31:0] mid_a, mid_b, mid;
  logic        mid_split, mid_sub_hi;
  logic [39:0] fin_a, fin_b, fin;
  logic        fin_split, fin_sub_hi, fin_sub_lo;
  logic [15:0] mid_hi, mid_lo;

  always_comb begin
    mid_a = '0; mid_b = '0; mid_split = 1'b0; mid_sub_hi = 1'b0;
    unique case (op)
      MAC_MPY, MAC_MAC, MAC_MSU: begin
        // {hh, ll} + (hl + lh) << 8 : full 32-bit signed product
        mid_a = {p_hh[15:0], p_ll[15:0]};
        mid_b = {{6{p_x[17]}}, p_x, 8'd0};
      end
      MAC_CMPY, MAC_CMAC: begin
        // upper half: re = hh - ll ; lower half: im = 0 + p_x
        mid_split  = 1'b1;
        mid_sub_hi = 1'b1;
        mid_a = {p_hh[15:0], 16'd0};
        mid_b = {p_ll[15:0], p_x[15:0]};
      end
      MAC_DMAC: begin
        mid_a = {{14{p_hh[17]}}, p_hh};
        mid_b = {{14{p_ll[17]}}, p_ll};
      end
      default: ;
    endcase
    mid_hi = mid_sub_hi ? (mid_a[31:16] - mid_b[31:16]) : (mid_a[31:16] + mid_b[31:16]);
    mid_lo = mid_a[15:0] + mid_b[15:0];
    if (mid_split)
      mid = {mid_hi, mid_lo};
    else
      mid = mid_a + mid_b;

    fin_a = din; fin_b = '0; fin_split = 1'b0; fin_sub_hi = 1'b0; fin_sub_lo = 1'b0;
    unique case (op)
      MAC_MPY:  begin fin_a = '0; fin_b = {{8{mid[31]}}, mid}; end
      MAC_MAC:  fin_b = {{8{mid[31]}}, mid};
      MAC_MSU:  begin fin_b = {{8{mid[31]}}, mid}; fin_sub_hi = 1'b1; fin_sub_lo = 1'b1; end
      MAC_CMPY: begin fin_a = '0; fin_b = {{8{mid[31]}}, mid}; fin_split = 1'b1; end
      MAC_CMAC: begin fin_b = {{8{mid[31]}}, mid}; fin_split = 1'b1; end
      MAC_DMAC: fin_b = {{8{mid[31]}}, mid};
      MAC_ACS:  begin fin_b = bin; fin_split = 1'b1; fin_sub_hi = 1'b1; end
      default: ;
    endcase
    if (fin_split)
      fin = {fin_sub_hi ? (fin_a[39:16] - fin_b[39:16]) : (fin_a[39:16] + fin_b[39:16]),
             fin_sub_lo ? (fin_a[15:0]  - fin_b[15:0])  : (fin_a[15:0]  + fin_b[15:0])};
    else
      fin = fin_sub_hi ? (fin_a - fin_b) : (fin_a + fin_b);
    dout = fin;
  end
endmodule
