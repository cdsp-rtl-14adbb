// tb_cdsp_viterbi: Viterbi metric-update workload on the CDSP core.
//
// Runs the path-metric update of a rate-1/2 convolutional decoder for
// constraint length K = 5 (16 states, as in GSM) and K = 9 (256 states,
// as in IS-95 and WCDMA), STAGES trellis stages each, at the core's
// default sizes. Metrics use the split layout over DM0 and DM1 (metric m
// is in DM0 when m < N/2 and m is even, or m >= N/2 and m is odd; its
// address is base + m/2). Two metric regions are used in turn; their
// index registers are circular buffers, so they return to the region
// start by themselves after each stage. Per stage the program loads the
// two local distances from a table, runs N/2 dual-ACS instructions plus
// one to drain the select stage, and stores the decision register.
// Every metric after the last stage, and for K = 5 every stage's decision
// word, is compared with a reference computed here. The cycle count per
// two stages is checked against the instruction count of the program:
// 2*(N/2) + 24 cycles, i.e. N/2 + 12 cycles per decoded bit.
module tb_cdsp_viterbi;
  import cdsp_pkg::*;
  import cdsp_asm_pkg::*;

  localparam int STAGES = 6;            // even
  localparam int RA = 'h100, RB = 'h300, BMT = 'h500, DEC = 'h600;

  logic        clk = 0, rst_n = 0, run = 0;
  logic [1:0]  host_sel = 0;
  logic        host_we = 0;
  logic [15:0] host_addr = 0;
  logic [27:0] host_wdata = 0, host_rdata;
  logic [4:0]  irq = 0;
  logic [15:0] pio_in = 0, pio_out;
  logic        pio_out_stb, pio_in_ack, idle;

  cdsp dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int outs_t[$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (run && pio_out_stb) outs_t.push_back(cyc);
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp);
    end
  endtask

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

  function automatic int mem_of(int m, int n);
    return ((m < n / 2) == (m % 2 == 0)) ? 0 : 1;
  endfunction
  function automatic int s16(int v);
    return (v & 16'hFFFF) > 32767 ? (v & 16'hFFFF) - 65536 : (v & 16'hFFFF);
  endfunction

  logic [27:0] prog [1024];
  int pc;
  function automatic void emit(logic [27:0] w);
    prog[pc] = w;
    pc++;
  endfunction

  // one trellis stage; e/o: AG0 registers for even/odd k reads, which are
  // AG1's odd/even registers; w: write register of both AGs
  function automatic void stage(int h, int e, int o, int w);
    emit(dp(DP_LDY, .yr(3), .ym(1), .dst(0))); emit(ldld(0, 0));
    emit(dp(DP_LDY, .yr(3), .ym(1), .dst(0))); emit(ldld(1, 0));
    emit(dp(DP_ACS, .xr(e), .xm(1), .yr(o), .ym(1), .lds(0)));
    emit(loop(2, h / 4));
    emit(dp(DP_ACS, .xr(o), .xm(1), .yr(e), .ym(1), .rsw(1), .lds(1),
            .wxr(w), .wxm(1), .wyr(w), .wym(1), .we0(1), .we1(1)));
    emit(dp(DP_ACS, .xr(e), .xm(1), .yr(o), .ym(1), .lds(0),
            .wxr(w), .wxm(1), .wyr(w), .wym(1), .we0(1), .we1(1)));
    emit(loop(2, h / 4 - 1));
    emit(dp(DP_ACS, .xr(o), .xm(1), .yr(e), .ym(1), .rsw(1), .lds(1),
            .wxr(w), .wxm(1), .wyr(w), .wym(1), .we0(1), .we1(1), .wsw(1)));
    emit(dp(DP_ACS, .xr(e), .xm(1), .yr(o), .ym(1), .lds(0),
            .wxr(w), .wxm(1), .wyr(w), .wym(1), .we0(1), .we1(1), .wsw(1)));
    emit(dp(DP_ACS, .xr(o), .xm(1), .yr(e), .ym(1), .rsw(1), .lds(1),
            .wxr(w), .wxm(1), .wyr(w), .wym(1), .we0(1), .we1(1), .wsw(1)));
    emit(dp(DP_ACS, .wxr(w), .wxm(1), .wyr(w), .wym(1), .we0(1), .we1(1), .wsw(1)));
    emit(rdtrn(0));
    emit(dp(DP_STL, .wyr(7), .wym(1), .we1(1), .dst(0)));
  endfunction

  // circular index register r of AG g over [base, base+len)
  function automatic void circ(int g, int r, int base, int len);
    emit(setag(g, 3, r, base)); emit(setag(g, 2, r, len));
    emit(setag(g, 1, r, 1));    emit(setag(g, 0, r, base));
  endfunction

  task automatic run_k(int k);
    int n, h, v, top;
    int met[256], nm[256], lv[STAGES][2], decw[STAGES];
    n = 1 << (k - 1);
    h = n / 2;
    outs_t.delete();
    // ---- data and reference
    for (int m = 0; m < n; m++) met[m] = $urandom_range(0, 200);
    for (int s = 0; s < STAGES; s++) begin
      lv[s][0] = $urandom_range(0, 40) - 20;
      lv[s][1] = $urandom_range(0, 40) - 20;
    end
    @(negedge clk) run = 0;
    for (int m = 0; m < n; m++) host_write(mem_of(m, n) + 1, RA + m / 2, 28'(met[m] & 16'hFFFF));
    for (int s = 0; s < STAGES; s++) begin
      host_write(2, BMT + 2 * s, 28'(lv[s][0] & 16'hFFFF));
      host_write(2, BMT + 2 * s + 1, 28'(lv[s][1] & 16'hFFFF));
    end
    host_write(1, 'h7F0, 28'd1);
    for (int s = 0; s < STAGES; s++) begin
      int dw;
      dw = 0;
      for (int b = 0; b < h; b++) begin
        int l, a0, a1, b0, b1;
        l  = lv[s][b % 2];
        a0 = met[b] + l; a1 = met[b + h] - l;
        b0 = met[b] - l; b1 = met[b + h] + l;
        nm[2 * b]     = (a1 < a0) ? a1 : a0;
        nm[2 * b + 1] = (b1 < b0) ? b1 : b0;
        if (b >= h - 8) dw = ((dw << 2) | ((a1 < a0) << 1) | (b1 < b0)) & 16'hFFFF;
      end
      decw[s] = dw;
      for (int m = 0; m < n; m++) met[m] = nm[m];
    end
    // ---- program
    for (int a = 0; a < 1024; a++) prog[a] = nop();
    pc = 0;
    circ(0, 4, RA, h / 2); circ(0, 5, RA + h / 2, h / 2); circ(0, 6, RB, h);
    circ(1, 4, RA, h / 2); circ(1, 5, RA + h / 2, h / 2); circ(1, 6, RB, h);
    circ(0, 0, RB, h / 2); circ(0, 1, RB + h / 2, h / 2); circ(0, 2, RA, h);
    circ(1, 0, RB, h / 2); circ(1, 1, RB + h / 2, h / 2); circ(1, 2, RA, h);
    emit(setag(1, 0, 3, BMT)); emit(setag(1, 1, 3, 1));
    emit(setag(1, 0, 7, DEC)); emit(setag(1, 1, 7, 1));
    emit(setag(0, 0, 3, 'h7F0)); emit(setag(0, 1, 3, 0));
    emit(ldi(1, STAGES / 2));
    top = pc;
    emit(outp(1));
    stage(h, 4, 5, 6);
    stage(h, 0, 1, 2);
    emit(dp(DP_SUBX, .xr(3), .dst(1)));
    emit(bcc(1, CC_NE, top));
    emit(outp(1));
    emit(jmp(pc));
    for (int a = 0; a < pc; a++) host_write(0, a, prog[a]);
    @(negedge clk) run = 1;
    wait (outs_t.size() >= STAGES / 2 + 1);
    repeat (5) @(posedge clk);
    @(negedge clk) run = 0;
    // ---- results
    for (int i = 1; i < outs_t.size(); i++)
      check($sformatf("K=%0d cycles per two stages", k), outs_t[i] - outs_t[i - 1], 2 * h + 24);
    $display("K=%0d: %0d cycles per decoded bit", k, (outs_t[1] - outs_t[0]) / 2);
    for (int m = 0; m < n; m++) begin
      host_read(mem_of(m, n) + 1, RA + m / 2, v);
      check($sformatf("K=%0d metric %0d", k, m), s16(v), met[m]);
    end
    for (int s = 0; s < STAGES; s++) begin
      host_read(2, DEC + s, v);
      check($sformatf("K=%0d decisions of stage %0d", k, s), v, decw[s]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_k(5);
    run_k(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
