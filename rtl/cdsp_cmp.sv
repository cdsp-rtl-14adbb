// cdsp_cmp: the comparator unit of the CDSP datapath.
//
// Combinational. In the dual add-compare-select (ACS) operation it takes
// the two accumulators produced by the previous ACS instruction, each
// holding two candidate path metrics in split form (bits 39:16 as a
// signed 24-bit field, bits 15:0 as a signed 16-bit field), and selects
// the smaller metric in each field: new metric of state j from the upper
// fields, of state j+1 from the lower fields. The two selected metrics are
// the 16-bit words written back to DM0 and DM1. 'dec' gives the decision
// of each select (1 = the candidate from D1 won), used for the trace back.
// It also provides the 40-bit signed minimum and maximum of its inputs for
// the MINE/MAXE instructions. A tie selects D0. The published architecture
// gives the CMP's role in the ACS data flow; tie rule and decision bits are
// this design's choice.
module cdsp_cmp #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] a,        // D0 (or destination accumulator)
  input  logic [W-1:0] b,        // D1 (or the other accumulator)
  output logic [15:0]  sel_hi,   // min of the upper fields, low 16 bits
  output logic [15:0]  sel_lo,   // min of the lower fields
  output logic [1:0]   dec,      // {upper, lower}: 1 = b's field selected
  output logic [W-1:0] min_ab,
  output logic [W-1:0] max_ab
);
  logic b_hi_less, b_lo_less, b_less;
  always_comb begin
    b_hi_less = $signed(b[W-1:16]) < $signed(a[W-1:16]);
    b_lo_less = $signed(b[15:0])   < $signed(a[15:0]);
    b_less    = $signed(b) < $signed(a);
    sel_hi    = b_hi_less ? b[31:16] : a[31:16];
    sel_lo    = b_lo_less ? b[15:0]  : a[15:0];
    dec       = {b_hi_less, b_lo_less};
    min_ab    = b_less ? b : a;
    max_ab    = b_less ? a : b;
  end
endmodule
