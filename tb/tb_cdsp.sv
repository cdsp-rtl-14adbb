// tb_cdsp: end-to-end test of the CDSP core at its default sizes.
//
// The testbench loads one program and its data through the host port,
// starts the core, and afterwards reads the data memories back through
// the host port. The program, built with cdsp_asm_pkg, runs:
//   1. channel estimation: an 8-symbol complex MAC of received I/Q
//      samples with conjugated pilots, plus one complex multiply;
//   2. a 24-tap FIR output as 12 dual 8x8 MACs, the samples read through
//      an 8-word circular buffer (modulo addressing wraps once);
//   3. one full trellis stage of a K=9 Viterbi metric update: 256 states
//      as 128 dual-ACS instructions over the split metric layout of DM0 and
//      DM1, followed by a read of the decision register;
//   4. memory writes read back by the next and the next-but-one
//      instruction (forwarding);
//   5. a conditional-branch count-down loop with the parallel input port,
//      the barrel shifter and an interrupt arriving while it runs;
//   6. idle mode, left by a second interrupt.
// Every result is compared with values computed here from the same input
// data. The cycle counts of the complex MAC (one per symbol), the FIR
// (N/2 cycles for N taps) and the ACS stage (two ACS per cycle) are
// checked from the times of output-port strobes, and each mechanism must
// have occurred at least once.
module tb_cdsp;
  import cdsp_pkg::*;
  import cdsp_asm_pkg::*;

  logic        clk = 0, rst_n = 0, run = 0;
  logic [1:0]  host_sel = 0;
  logic        host_we = 0;
  logic [15:0] host_addr = 0;
  logic [27:0] host_wdata = 0, host_rdata;
  logic [4:0]  irq = 0;
  logic [15:0] pio_in = 16'd5, pio_out;
  logic        pio_out_stb, pio_in_ack, idle;

  cdsp dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h), expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  // ---------------- program image
  logic [27:0] prog [1024];
  int pc = 0;
  function automatic void emit(logic [27:0] w);
    prog[pc] = w;
    pc++;
  endfunction

  // ---------------- data
  localparam int OLD = 'h100, NEW = 'h200;
  logic [15:0] dm0 [2048], dm1 [2048];
  int rxi[8], rxq[8], pli[8], plq[8];
  int fx[8][2], fc[12][2];
  int met[256], l0v = 5, l1v = -3;

  function automatic int s8(int v); return (v & 8'hFF) > 127 ? (v & 8'hFF) - 256 : (v & 8'hFF); endfunction
  function automatic int s16(int v); return (v & 16'hFFFF) > 32767 ? (v & 16'hFFFF) - 65536 : (v & 16'hFFFF); endfunction
  function automatic int mem_of(int m); return ((m < 128) == (m % 2 == 0)) ? 0 : 1; endfunction

  // ---------------- event monitors
  int outs_v[$], outs_t[$];
  int n_loop = 0, n_irq = 0, n_idle = 0, n_bcc = 0, n_hold = 0, n_fwd1 = 0, n_fwd2 = 0;
  int n_acs = 0, n_cmac = 0, n_cmpy = 0, n_dmac = 0, n_in = 0;
  always @(posedge clk) if (run) begin
    if (pio_out_stb) begin outs_v.push_back(int'(pio_out)); outs_t.push_back(cyc); end
    if (dut.loop_back) n_loop++;
    if (dut.irq_taken) n_irq++;
    if (idle) n_idle++;
    if (dut.ex_br) n_bcc++;
    if (dut.id_hold) n_hold++;
    if (pio_in_ack) n_in++;
    if (dut.ex_q.valid && dut.ex_q.re0 && dut.wb_we0 && dut.wb_wa0[10:0] == dut.ex_q.ra0[10:0]) n_fwd1++;
    if (dut.or_q.valid && dut.or_q.re0 && dut.wb_we0 && dut.wb_wa0[10:0] == dut.or_q.ra0[10:0]) n_fwd2++;
    if (dut.ex_q.valid && dut.ex_q.is_dp) begin
      if (dut.ex_q.dp_op == DP_ACS)  n_acs++;
      if (dut.ex_q.dp_op == DP_CMAC) n_cmac++;
      if (dut.ex_q.dp_op == DP_CMPY) n_cmpy++;
      if (dut.ex_q.dp_op == DP_DMAC) n_dmac++;
    end
  end

  // the first interrupt arrives while the count-down loop runs
  initial begin
    wait (outs_v.size() >= 9);
    repeat (3) @(posedge clk);
    @(negedge clk) irq[0] = 1;
    @(negedge clk) irq[0] = 0;
    wait (idle);
    repeat (20) @(posedge clk);
    @(negedge clk) irq[1] = 1;
    @(negedge clk) irq[1] = 0;
  end

  task automatic host_write(int sel, int a, logic [27:0] d);
    @(negedge clk);
    host_sel = 2'(sel); host_we = 1; host_addr = 16'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(int sel, int a, output int d);
    @(negedge clk);
    host_sel = 2'(sel); host_addr = 16'(a);
    @(negedge clk);
    d = int'(host_rdata[15:0]);
  endtask

  int p_isr0, p_isr1, p_main, p_top, p_end;

  initial begin
    int v, re, im, acc, t0, t1;
    int newm[256], dec_hi[128], dec_lo[128], trn_exp;

    // ---- data
    for (int a = 0; a < 2048; a++) begin dm0[a] = 0; dm1[a] = 0; end
    for (int k = 0; k < 8; k++) begin
      rxi[k] = $urandom_range(0, 63) - 32; rxq[k] = $urandom_range(0, 63) - 32;
      pli[k] = $urandom_range(0, 1) ? 1 : -1; plq[k] = $urandom_range(0, 1) ? 1 : -1;
      dm0[k] = {8'(rxi[k]), 8'(rxq[k])};
      dm1[k] = {8'(pli[k]), 8'(-plq[k])};       // conjugated pilot
      fx[k][0] = $urandom_range(0, 63) - 32; fx[k][1] = $urandom_range(0, 63) - 32;
      dm0['h80 + k] = {8'(fx[k][0]), 8'(fx[k][1])};
    end
    for (int t = 0; t < 12; t++) begin
      fc[t][0] = $urandom_range(0, 255) - 128; fc[t][1] = $urandom_range(0, 255) - 128;
      dm1['h80 + t] = {8'(fc[t][0]), 8'(fc[t][1])};
    end
    for (int m = 0; m < 256; m++) begin
      met[m] = $urandom_range(0, 1000);
      if (mem_of(m) == 0) dm0[OLD + m / 2] = 16'(met[m]);
      else                dm1[OLD + m / 2] = 16'(met[m]);
    end
    dm0['h3F0] = 16'd1;

    // ---- program
    for (int a = 0; a < 1024; a++) prog[a] = nop();
    pc = 0;
    emit(jmp(0));                      // 0: patched below
    emit(jmp(0));                      // 1: vector irq[0], patched
    emit(jmp(0));                      // 2: vector irq[1], patched
    emit(reti()); emit(reti()); emit(reti());
    p_isr0 = pc; emit(nop()); emit(reti());
    p_isr1 = pc; emit(reti());
    p_main = pc;
    prog[0] = jmp(p_main); prog[1] = jmp(p_isr0); prog[2] = jmp(p_isr1);

    // AG set-up: circular buffers off (L = 0), step 1
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < 8; r++) emit(setag(g, 1, r, 1));
    emit(setag(0, 0, 0, 0));     emit(setag(1, 0, 0, 0));       // I0: CE inputs
    emit(setag(0, 0, 1, 'h40));  emit(setag(1, 0, 1, 'h40));    // I1: results
    emit(setag(0, 0, 2, 'h80));  emit(setag(1, 0, 2, 'h80));    // I2: FIR
    emit(setag(0, 3, 2, 'h80));  emit(setag(0, 2, 2, 8));       // AG0 I2 circular, 8 words
    emit(setag(0, 0, 3, 'h3F0)); emit(setag(0, 1, 3, 0));       // AG0 I3: constant 1
    emit(setag(0, 0, 4, OLD));      emit(setag(1, 0, 4, OLD));       // I4: even/odd reads
    emit(setag(0, 0, 5, OLD + 64)); emit(setag(1, 0, 5, OLD + 64));  // I5
    emit(setag(0, 0, 6, NEW));      emit(setag(1, 0, 6, NEW));       // I6: metric writes
    emit(setag(0, 0, 7, 'h300));    emit(setag(1, 0, 7, 'h300));     // I7: scratch
    emit(setag(0, 1, 7, 0));        emit(setag(1, 1, 7, 0));
    emit(ei(5'b00001));

    // 1. channel estimation
    emit(ldi(0, 1)); emit(outp(0));                                       // marker 1
    emit(ldi(0, 0));
    emit(loop(1, 8));
    emit(dp(DP_CMAC, .xr(0), .xm(1), .yr(0), .ym(1), .dst(0)));
    emit(outp(0));                                                        // marker 2
    emit(dp(DP_NOP, .wxr(1), .wxm(1), .wyr(1), .wym(1), .we0(1), .we1(1), .dst(0)));
    emit(setag(0, 0, 0, 0)); emit(setag(1, 0, 0, 0));
    emit(dp(DP_CMPY, .xr(0), .yr(0), .dst(1)));
    emit(dp(DP_NOP, .wxr(1), .wxm(1), .wyr(1), .wym(1), .we0(1), .we1(1), .dst(1)));

    // 2. FIR: 24 taps as 12 dual MACs
    emit(ldi(0, 0)); emit(outp(0));                                       // marker 3
    emit(loop(1, 12));
    emit(dp(DP_DMAC, .xr(2), .xm(1), .yr(2), .ym(1), .dst(0)));
    emit(outp(0));                                                        // marker 4
    emit(dp(DP_NOP, .wxr(1), .wxm(1), .wyr(1), .wym(1), .we0(1), .we1(1), .dst(0)));

    // 3. Viterbi metric update, one K=9 stage
    emit(ldi(0, l0v)); emit(ldld(0, 0));
    emit(ldi(0, l1v)); emit(ldld(1, 0));
    emit(outp(0));                                                        // marker 5
    emit(dp(DP_ACS, .xr(4), .xm(1), .yr(5), .ym(1), .lds(0)));            // k = 0, no write
    emit(loop(2, 32));                                                    // k = 1 .. 64
    emit(dp(DP_ACS, .xr(5), .xm(1), .yr(4), .ym(1), .rsw(1), .lds(1),
            .wxr(6), .wxm(1), .wyr(6), .wym(1), .we0(1), .we1(1)));
    emit(dp(DP_ACS, .xr(4), .xm(1), .yr(5), .ym(1), .lds(0),
            .wxr(6), .wxm(1), .wyr(6), .wym(1), .we0(1), .we1(1)));
    emit(loop(2, 31));                                                    // k = 65 .. 126
    emit(dp(DP_ACS, .xr(5), .xm(1), .yr(4), .ym(1), .rsw(1), .lds(1),
            .wxr(6), .wxm(1), .wyr(6), .wym(1), .we0(1), .we1(1), .wsw(1)));
    emit(dp(DP_ACS, .xr(4), .xm(1), .yr(5), .ym(1), .lds(0),
            .wxr(6), .wxm(1), .wyr(6), .wym(1), .we0(1), .we1(1), .wsw(1)));
    emit(dp(DP_ACS, .xr(5), .xm(1), .yr(4), .ym(1), .rsw(1), .lds(1),    // k = 127
            .wxr(6), .wxm(1), .wyr(6), .wym(1), .we0(1), .we1(1), .wsw(1)));
    emit(dp(DP_ACS, .wxr(6), .wxm(1), .wyr(6), .wym(1), .we0(1), .we1(1), .wsw(1))); // drain
    emit(outp(0));                                                        // marker 6
    emit(rdtrn(0));
    emit(dp(DP_STL, .wyr(7), .we1(1), .dst(0)));                          // DM1[0x300] = TRN

    // 4. forwarding
    emit(ldi(0, 'h1234));
    emit(dp(DP_STL, .wxr(7), .we0(1), .dst(0)));                          // DM0[0x300]
    emit(dp(DP_LDX, .xr(7), .dst(1)));                                    // next instruction
    emit(ldi(0, 'h0055));
    emit(dp(DP_STL, .wxr(7), .we0(1), .dst(0)));
    emit(nop());
    emit(dp(DP_ADDX, .xr(7), .dst(1)));                                   // next but one
    emit(outp(1));                                                        // marker 7: 0x1289
    emit(dp(DP_STL, .xr(7), .wxr(7), .we0(1), .dst(1)));

    // 5. count-down loop: D1 = 1 << pio_in
    emit(ldi(1, 1));
    emit(inp(0));
    emit(outp(0));                                                        // marker 8: 5
    emit(outp(0));                                                        // marker 9: 5
    p_top = pc;
    emit(sft(1, 1));
    emit(dp(DP_SUBX, .xr(3), .dst(0)));
    emit(bcc(0, CC_NE, p_top));
    emit(outp(1));                                                        // marker 10: 32
    emit(sft(1, -3));
    emit(outp(1));                                                        // marker 11: 4

    // 6. idle until the second interrupt
    emit(ei(5'b00011));
    emit(idl());
    emit(ldi(0, 'h7E57)); emit(outp(0));                                  // marker 12
    p_end = pc;
    emit(jmp(p_end));

    // ---- load and run
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < pc; a++) host_write(0, a, prog[a]);
    for (int a = 0; a < 'h400; a++) begin
      if (dm0[a] != 0) host_write(1, a, {12'd0, dm0[a]});
      if (dm1[a] != 0) host_write(2, a, {12'd0, dm1[a]});
    end
    host_write(1, 'h300, 0); host_write(2, 'h300, 0);
    @(negedge clk) run = 1;
    wait (outs_v.size() >= 12);
    repeat (5) @(posedge clk);
    @(negedge clk) run = 0;

    // ---- outputs
    check("marker count", outs_v.size(), 12);
    check("complex MAC: one cycle per symbol", outs_t[1] - outs_t[0], 8 + 3);
    check("FIR: 24 taps in 12 cycles", outs_t[3] - outs_t[2], 12 + 2);
    check("ACS stage: 256 states in 131 cycles", outs_t[5] - outs_t[4], 131 + 1);
    check("forwarded sum", outs_v[6], 'h1289);
    check("pio_in read", outs_v[7], 5);
    check("shift loop", outs_v[9], 32);
    check("right shift", outs_v[10], 4);
    check("after idle", outs_v[11], 'h7E57);

    // ---- channel estimate
    re = 0; im = 0;
    for (int k = 0; k < 8; k++) begin
      re += rxi[k] * pli[k] + rxq[k] * plq[k];
      im += rxq[k] * pli[k] - rxi[k] * plq[k];
    end
    host_read(1, 'h40, v); check("channel estimate re", v, re & 16'hFFFF);
    host_read(2, 'h40, v); check("channel estimate im", v, im & 16'hFFFF);
    host_read(1, 'h41, v); check("complex mult re", v, (rxi[0] * pli[0] + rxq[0] * plq[0]) & 16'hFFFF);
    host_read(2, 'h41, v); check("complex mult im", v, (rxq[0] * pli[0] - rxi[0] * plq[0]) & 16'hFFFF);

    // ---- FIR
    acc = 0;
    for (int t = 0; t < 12; t++) acc += fx[t % 8][0] * fc[t][0] + fx[t % 8][1] * fc[t][1];
    host_read(1, 'h42, v); re = v;
    host_read(2, 'h42, v);
    check("FIR output", int'((re << 16) | v), acc);

    // ---- Viterbi metrics
    for (int k = 0; k < 128; k++) begin
      int ld, a0, a1, b0, b1;
      ld = (k % 2 == 0) ? l0v : l1v;
      a0 = met[k] + ld; a1 = met[k + 128] - ld;
      b0 = met[k] - ld; b1 = met[k + 128] + ld;
      newm[2 * k]     = (a1 < a0) ? a1 : a0;
      newm[2 * k + 1] = (b1 < b0) ? b1 : b0;
      dec_hi[k] = (a1 < a0); dec_lo[k] = (b1 < b0);
    end
    for (int m = 0; m < 256; m++) begin
      host_read(mem_of(m) + 1, NEW + m / 2, v);
      check($sformatf("metric %0d", m), s16(v), newm[m]);
    end
    trn_exp = 0;
    for (int k = 120; k < 128; k++) trn_exp = ((trn_exp << 2) | (dec_hi[k] << 1) | dec_lo[k]) & 16'hFFFF;
    host_read(2, 'h300, v); check("decision bits", v, trn_exp);
    host_read(1, 'h300, v); check("forwarded store", v, 'h1289);

    // ---- mechanisms
    $display("loop-backs %0d, interrupts %0d, idle cycles %0d, branches %0d, holds %0d",
             n_loop, n_irq, n_idle, n_bcc, n_hold);
    $display("forwards from WB %0d, write-first reads %0d, ACS %0d, CMAC %0d, CMPY %0d, DMAC %0d",
             n_fwd1, n_fwd2, n_acs, n_cmac, n_cmpy, n_dmac);
    check("zero-overhead loop used", n_loop > 0, 1);
    check("interrupts taken", n_irq, 2);
    check("idle mode entered", n_idle > 0, 1);
    check("conditional branches taken", n_bcc, 4);
    check("branch hold", n_hold > 0, 1);
    check("forward from write-back", n_fwd1 > 0, 1);
    check("write-first read", n_fwd2 > 0, 1);
    check("dual ACS count", n_acs, 129);
    check("complex MAC count", n_cmac, 8);
    check("complex MUL count", n_cmpy, 1);
    check("dual MAC count", n_dmac, 12);
    check("parallel input read", n_in, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
