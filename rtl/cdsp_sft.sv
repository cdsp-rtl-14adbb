// cdsp_sft: the 40-bit barrel shifter of the CDSP datapath.
//
// Combinational. The shift amount is a signed 6-bit number: positive
// values shift left, negative values shift right, arithmetically (sign
// fill) unless 'logical' is set, in which case zeros are shifted in.
// Amounts from -32 to +31 are accepted. The published architecture names
// the barrel shifter and its 40-bit input width; the amount encoding and
// the right-shift modes are this design's choice.
module cdsp_sft #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] d,
  input  logic [5:0]   amt,      // signed, + = left
  input  logic         logical,  // right shifts fill with zeros
  output logic [W-1:0] y
);
  logic [5:0] mag;
  always_comb begin
    mag = amt[5] ? (~amt + 6'd1) : amt;
    if (!amt[5])
      y = d << mag;
    else if (logical)
      y = d >> mag;
    else
      y = $signed(d) >>> mag;
  end
endmodule
