// cdsp_asm_pkg: instruction encoders for CDSP test programs.
// Each function returns one 28-bit instruction word in the format
// described in cdsp_pkg.
package cdsp_asm_pkg;
  import cdsp_pkg::*;

  // datapath instruction
  function automatic logic [27:0] dp(dp_op_e op,
      int xr = 0, int xm = 0, int yr = 0, int ym = 0,
      int wxr = 0, int wxm = 0, int wyr = 0, int wym = 0,
      int we0 = 0, int we1 = 0, int dst = 0, int rsw = 0, int wsw = 0, int lds = 0);
    return {1'b0, op, 3'(xr), 1'(xm), 3'(yr), 1'(ym), 3'(wxr), 1'(wxm), 3'(wyr), 1'(wym),
            1'(we0), 1'(we1), 1'(dst), 1'(rsw), 1'(wsw), 1'(lds)};
  endfunction

  function automatic logic [27:0] ctl(c_op_e op, logic [21:0] f);
    return {1'b1, op, f};
  endfunction

  function automatic logic [27:0] ldi(int dst, int imm);
    return ctl(C_LDI, {1'(dst), 5'd0, 16'(imm)});
  endfunction
  function automatic logic [27:0] ldih(int dst, int imm);
    return ctl(C_LDIH, {1'(dst), 5'd0, 16'(imm)});
  endfunction
  // field: 0 I, 1 M, 2 L, 3 B
  function automatic logic [27:0] setag(int ag, int field, int r, int imm);
    return ctl(C_SETAG, {1'(ag), 2'(field), 3'(r), 16'(imm)});
  endfunction
  function automatic logic [27:0] sft(int dst, int amt, int logical = 0);
    return ctl(C_SFT, {1'(dst), 14'd0, 1'(logical), 6'(amt)});
  endfunction
  function automatic logic [27:0] ldld(int lsel, int dst);
    return ctl(C_LDLD, {1'(dst), 1'(lsel), 20'd0});
  endfunction
  function automatic logic [27:0] jmp(int a);
    return ctl(C_JMP, {6'd0, 16'(a)});
  endfunction
  function automatic logic [27:0] bcc(int dst, cc_e c, int a);
    return ctl(C_BCC, {1'(dst), c, 2'd0, 16'(a)});
  endfunction
  // repeat the next 'len' instructions 'cnt' times
  function automatic logic [27:0] loop(int len, int cnt);
    return ctl(C_LOOP, {10'(len), 12'(cnt)});
  endfunction
  function automatic logic [27:0] inp(int dst);
    return ctl(C_IN, {1'(dst), 21'd0});
  endfunction
  function automatic logic [27:0] outp(int dst);
    return ctl(C_OUT, {1'(dst), 21'd0});
  endfunction
  function automatic logic [27:0] idl();
    return ctl(C_IDLE, 22'd0);
  endfunction
  function automatic logic [27:0] ei(int imr);
    return ctl(C_EI, 22'(imr));
  endfunction
  function automatic logic [27:0] di();
    return ctl(C_DI, 22'd0);
  endfunction
  function automatic logic [27:0] reti();
    return ctl(C_RETI, 22'd0);
  endfunction
  function automatic logic [27:0] rdtrn(int dst);
    return ctl(C_RDTRN, {1'(dst), 21'd0});
  endfunction
  function automatic logic [27:0] nop();
    return ctl(C_NOP, 22'd0);
  endfunction
endpackage
