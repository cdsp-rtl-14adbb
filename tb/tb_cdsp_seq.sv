// tb_cdsp_seq: self-checking test of the program sequencer.
// The testbench plays the decode and execute stages around the sequencer:
// a small table says what kind of control instruction sits at each address,
// and a two-stage shift register stands for operand read and execute so
// that a conditional branch resolves two cycles after decode. The list of
// addresses that pass decode is compared with the expected program order,
// which exercises a jump, a three-pass zero-overhead loop (checked to run
// back-to-back with no lost cycle), idle mode with wake-up by an
// interrupt, the interrupt vector and return, and a taken conditional
// branch with the hold of the instruction behind it.
module tb_cdsp_seq;
  typedef enum int {K_NOP, K_JMP, K_LOOP, K_EI, K_IDLE, K_RETI, K_BCC} kind_e;
  logic        clk = 0, rst_n = 0, run = 0;
  logic [15:0] pm_addr, id_pc, id_target, ex_target;
  logic        pm_re, id_valid, id_jmp, id_reti, id_idle, id_loop, id_ei, id_di, id_hold, ex_br;
  logic [9:0]  id_loop_off;
  logic [11:0] id_loop_cnt;
  logic [4:0]  id_imr, irq = 0;
  logic        irq_block, idle, irq_taken, loop_back, loop_active;
  kind_e       prog [64];
  logic [15:0] targ [64];
  kind_e       k, or_k, ex_k;
  logic [15:0] or_t, ex_t;
  int checks = 0, failures = 0;
  int trace[$];
  int ttime[$];
  int cyc = 0, idle_cycles = 0;

  cdsp_seq dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin prog[a] = K_NOP; targ[a] = 0; end
    prog[0]  = K_JMP;  targ[0]  = 10;
    prog[1]  = K_JMP;  targ[1]  = 40;   // vector of irq[0]
    prog[10] = K_EI;
    prog[11] = K_LOOP;                  // body 12..13, three passes
    prog[15] = K_IDLE;
    prog[17] = K_JMP;  targ[17] = 30;
    prog[31] = K_BCC;  targ[31] = 50;
    prog[41] = K_RETI;
  end

  always_comb begin
    k           = id_valid ? prog[id_pc[5:0]] : K_NOP;
    ex_br       = (ex_k == K_BCC);
    ex_target   = ex_t;
    id_hold     = id_valid && (or_k == K_BCC || ex_k == K_BCC);
    id_jmp      = (k == K_JMP);
    id_target   = targ[id_pc[5:0]];
    id_reti     = (k == K_RETI);
    id_idle     = (k == K_IDLE);
    id_loop     = (k == K_LOOP);
    id_loop_off = 10'd2;
    id_loop_cnt = 12'd3;
    id_ei       = (k == K_EI);
    id_di       = 1'b0;
    id_imr      = 5'b00001;
    irq_block   = (k != K_NOP) || or_k == K_BCC || ex_k == K_BCC;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (idle) idle_cycles <= idle_cycles + 1;
    if (rst_n && run && id_valid && !id_hold && !ex_br) begin
      trace.push_back(int'(id_pc));
      ttime.push_back(cyc);
    end
    or_k <= (id_valid && !id_hold && !ex_br) ? k : K_NOP;
    or_t <= id_target;
    ex_k <= ex_br ? K_NOP : or_k;
    ex_t <= or_t;
  end

  initial begin
    static int expv[$] = '{0, 10, 11, 12, 13, 12, 13, 12, 13, 14, 15, 1, 40, 41, 16, 17, 30, 31, 50, 51, 52};
    int i12;
    or_k = K_NOP; ex_k = K_NOP; or_t = 0; ex_t = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    wait (idle);
    repeat (10) @(posedge clk);
    @(negedge clk) irq[0] = 1;
    @(negedge clk) irq[0] = 0;
    wait (trace.size() >= expv.size());
    for (int i = 0; i < expv.size(); i++) begin
      checks++;
      if (trace[i] != expv[i]) begin
        failures++;
        $display("trace[%0d] = %0d, expected %0d", i, trace[i], expv[i]);
      end
    end
    // zero-overhead loop: the six body instructions and the one after it
    // pass decode on consecutive cycles
    i12 = 3;
    checks++;
    if (ttime[i12 + 6] - ttime[i12] != 6) begin
      failures++;
      $display("loop not zero-overhead: %0d cycles", ttime[i12 + 6] - ttime[i12]);
    end
    // taken branch: three lost cycles between the branch and its target
    checks++;
    if (ttime[18] - ttime[17] != 4) begin
      failures++;
      $display("branch penalty %0d", ttime[18] - ttime[17]);
    end
    checks++;
    if (idle_cycles < 10) begin failures++; $display("idle too short: %0d", idle_cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
