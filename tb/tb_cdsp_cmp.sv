// tb_cdsp_cmp: self-checking test of the comparator.
// Random split-format accumulator pairs: the per-field minimum, the
// decision bits and the 40-bit signed min/max are checked against a
// reference written with integer comparisons.
module tb_cdsp_cmp;
  logic [39:0] a, b, mn, mx;
  logic [15:0] sh, sl;
  logic [1:0]  dec;
  int checks = 0, failures = 0;

  cdsp_cmp dut (.a, .b, .sel_hi(sh), .sel_lo(sl), .dec, .min_ab(mn), .max_ab(mx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ah, bh, al, bl;
    longint la, lb;
    for (int i = 0; i < 500; i++) begin
      ah = $urandom_range(0, 2000) - 1000;  bh = $urandom_range(0, 2000) - 1000;
      al = $urandom_range(0, 2000) - 1000;  bl = $urandom_range(0, 2000) - 1000;
      if (i % 7 == 0) bh = ah;
      a = {24'(ah), 16'(al)};
      b = {24'(bh), 16'(bl)};
      #1;
      checks++;
      if (sh !== 16'((bh < ah) ? bh : ah) || sl !== 16'((bl < al) ? bl : al) ||
          dec !== {bh < ah, bl < al}) begin
        failures++;
        $display("ACS select mismatch a=%h b=%h got %h %h %b", a, b, sh, sl, dec);
      end
      la = longint'($signed(a)); lb = longint'($signed(b));
      checks++;
      if (mn !== ((lb < la) ? b : a) || mx !== ((lb < la) ? a : b)) begin
        failures++;
        $display("min/max mismatch a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
