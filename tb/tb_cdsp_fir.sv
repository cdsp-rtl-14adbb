// tb_cdsp_fir: FIR filtering workload on the CDSP core.
//
// Samples are stored two per word in DM0 ({X(2i), X(2i+1)}, 8 bits each)
// and the coefficients two per word in DM1 in overlapping rows
// {a(r-1), a(r)} with a(-1) = a(T) = 0, r = 0..T. One dual 8x8 MAC per
// cycle multiplies a sample pair with a coefficient row, high byte by
// high byte and low by low. Output d is
//   Y(d) = sum over t of a(t) * X(t + d)
// and takes the rows of one parity: odd rows starting at 1 for even d,
// even rows starting at 0 for odd d, so the row pointer steps by two
// (AG1 step 2) while the sample pointer steps by one. A T-tap output takes
// T/2 dual MACs (T/2 + 1 for odd d). The testbench computes OUTS outputs of
// a T-tap filter, compares each 32-bit result with a direct sum, and
// checks that the MAC loop of every output runs one cycle per two taps.
// The packed sample and coefficient layout and the N/2-cycle rate follow
// the published design; the program (one unrolled block of SETAG, clear,
// LOOP, DMAC and store per output) is this testbench's own.
module tb_cdsp_fir;
  import cdsp_pkg::*;
  import cdsp_asm_pkg::*;

  localparam int T = 16, OUTS = 10, NX = 2 * (T / 2 + OUTS) + 2;
  localparam int XB = 'h000, AB = 'h000, YB = 'h400;

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

  int checks = 0, failures = 0, cyc = 0, dmac_run = 0;
  int outs_t[$], runs[$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (run && pio_out_stb) outs_t.push_back(cyc);
    // length of each uninterrupted run of DMAC instructions in EX
    if (run && dut.ex_q.valid && dut.ex_q.is_dp && dut.ex_q.dp_op == DP_DMAC)
      dmac_run <= dmac_run + 1;
    else if (dmac_run != 0) begin
      runs.push_back(dmac_run);
      dmac_run <= 0;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  logic [27:0] prog [1024];
  int pc;
  function automatic void emit(logic [27:0] w);
    prog[pc] = w;
    pc++;
  endfunction

  function automatic int coef(int a[T], int t);
    return (t < 0 || t >= T) ? 0 : a[t];
  endfunction

  initial begin
    int x[NX], a[T], y, hi, lo;
    for (int i = 0; i < NX; i++) x[i] = $urandom_range(0, 255) - 128;
    for (int t = 0; t < T; t++) a[t] = $urandom_range(0, 255) - 128;

    // ---- program: one block per output
    for (int i = 0; i < 1024; i++) prog[i] = nop();
    pc = 0;
    emit(setag(0, 1, 2, 1)); emit(setag(1, 1, 2, 2));     // steps: samples 1, rows 2
    emit(setag(0, 0, 1, YB)); emit(setag(1, 0, 1, YB));
    emit(setag(0, 1, 1, 1)); emit(setag(1, 1, 1, 1));
    emit(outp(0));
    for (int d = 0; d < OUTS; d++) begin
      emit(setag(0, 0, 2, XB + d / 2));
      emit(setag(1, 0, 2, AB + ((d % 2 == 0) ? 1 : 0)));
      emit(ldi(0, 0));
      emit(loop(1, (d % 2 == 0) ? T / 2 : T / 2 + 1));
      emit(dp(DP_DMAC, .xr(2), .xm(1), .yr(2), .ym(1), .dst(0)));
      emit(dp(DP_NOP, .wxr(1), .wxm(1), .wyr(1), .wym(1), .we0(1), .we1(1), .dst(0)));
    end
    emit(outp(0));
    emit(jmp(pc));

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < pc; i++) host_write(0, i, prog[i]);
    for (int i = 0; i < NX / 2; i++) host_write(1, XB + i, 28'({8'(x[2 * i]), 8'(x[2 * i + 1])}));
    for (int r = 0; r <= T; r++) host_write(2, AB + r, 28'({8'(coef(a, r - 1)), 8'(coef(a, r))}));
    @(negedge clk) run = 1;
    wait (outs_t.size() >= 2);
    repeat (5) @(posedge clk);
    @(negedge clk) run = 0;

    for (int d = 0; d < OUTS; d++) begin
      y = 0;
      for (int t = 0; t < T; t++) y += a[t] * x[t + d];
      host_read(1, YB + d, hi);
      host_read(2, YB + d, lo);
      check($sformatf("Y(%0d)", d), (hi << 16) | lo, y);
    end
    check("MAC runs", runs.size(), OUTS);
    for (int d = 0; d < OUTS && d < runs.size(); d++)
      check($sformatf("cycles for Y(%0d)", d), runs[d], (d % 2 == 0) ? T / 2 : T / 2 + 1);
    check("total cycles", outs_t[1] - outs_t[0], OUTS * 5 + OUTS / 2 + OUTS * (T / 2) + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
