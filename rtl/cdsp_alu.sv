// cdsp_alu: the 40-bit arithmetic logic unit of the CDSP datapath.
//
// Combinational; the result is written to an accumulator at the end of the
// execute stage. Operand A is the destination accumulator, operand B is a
// sign-extended memory word, the other accumulator or a packed pair.
// Besides the usual add, subtract, logic, absolute value and negate, the
// ALU has the split mode used by the dual add-compare-select (ACS)
// instruction: the carry chain is cut between bit 15 and bit 16, and the
// upper 24 bits add while the lower 16 bits subtract, so one operation
// forms both candidate path metrics leaving one trellis state
// (A.hi + B.hi and A.lo - B.lo). That split follows the published
// architecture; the rest of the operation list is this design's choice.
// Results wrap modulo 2^40 (no saturation).
module cdsp_alu
  import cdsp_pkg::*;
#(
  parameter int unsigned W = 40
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);
  logic [W-17:0] hi_sum;
  logic [15:0]   lo_dif;

  always_comb begin
    hi_sum = a[W-1:16] + b[W-1:16];
    lo_dif = a[15:0] - b[15:0];
    unique case (op)
      ALU_PASSB: y = b;
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_ABS:   y = a[W-1] ? (~a + 1'b1) : a;
      ALU_NEG:   y = ~a + 1'b1;
      ALU_ACS:   y = {hi_sum, lo_dif};
      default:   y = a;
    endcase
  end
endmodule
