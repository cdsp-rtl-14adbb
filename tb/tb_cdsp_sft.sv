// tb_cdsp_sft: self-checking test of the 40-bit barrel shifter.
// Random data and every shift amount from -32 to +31, arithmetic and
// logical, compared with a bit-by-bit reference shift.
module tb_cdsp_sft;
  logic [39:0] d, y, e;
  logic [5:0]  amt;
  logic        logical;
  int checks = 0, failures = 0;

  cdsp_sft dut (.d, .amt, .logical, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] ref_sft(logic [39:0] v, int n, logic lg);
    logic [39:0] r;
    r = v;
    for (int k = 0; k < ((n < 0) ? -n : n); k++)
      if (n > 0) r = {r[38:0], 1'b0};
      else       r = {lg ? 1'b0 : r[39], r[39:1]};
    return r;
  endfunction

  initial begin
    for (int n = -32; n < 32; n++)
      for (int rep = 0; rep < 4; rep++) begin
        d = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
        if (rep == 1) d[39] = 1'b1;
        amt = 6'(n);
        logical = rep[1];
        #1;
        e = ref_sft(d, n, logical);
        checks++;
        if (y !== e) begin
          failures++;
          $display("SFT mismatch d=%h n=%0d lg=%0d y=%h exp=%h", d, n, logical, y, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
