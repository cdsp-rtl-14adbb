// cdsp_seq: program sequencer of the CDSP (instruction fetch stage).
//
// Holds the fetch address and delivers one instruction address per cycle
// to the program memory; the fetched word reaches the decode stage one
// cycle later together with id_valid and id_pc. Next-address priority:
//   1. run low: fetch address 0, nothing valid;
//   2. a conditional branch taken in the execute stage (ex_br): fetch the
//      target; the instructions then in decode and operand read are
//      cancelled by the core (three-cycle penalty), and an active loop is
//      cancelled too;
//   3. a jump or return-from-interrupt decoded in the decode stage: fetch
//      the target (one-cycle penalty);
//   3a. id_hold: the core holds a sequencer-control instruction in decode
//      while a conditional branch ahead of it is unresolved; fetch waits;
//   4. an idle instruction in decode: stop fetching until an interrupt
//      that is unmasked in IMR is pending (idle mode);
//   5. an interrupt: rising edges on irq[k] set pending bits; when
//      interrupts are enabled and no control instruction is in flight
//      (irq_block) the lowest pending unmasked line k is taken: the fetch
//      address is saved in the return register, interrupts are disabled
//      and fetching continues at vector address VEC_BASE + k;
//   6. the zero-overhead loop: when the fetch address equals the loop end
//      and the remaining count is above one, fetching continues at the
//      loop start without a cycle lost; at the last pass it falls through;
//   7. otherwise the next sequential address.
// A loop instruction in decode (id_loop) sets start = its address + 1,
// end = its address + loop_off and the count; a loop whose end is the
// very next instruction is recognised in the same cycle. One loop level is
// supported; a count of 0 runs the body once. Interrupts (which may not
// use the loop) see the loop count frozen while they run.
// The five interrupt vectors, the zero-overhead loop and idle mode follow
// the published architecture; their encoding, the vector addresses and the
// pipeline penalties are this design's choice.
module cdsp_seq #(
  parameter int unsigned N_IRQ    = 5,
  parameter logic [15:0] VEC_BASE = 16'd1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  // fetch
  output logic [15:0]      pm_addr,
  output logic             pm_re,
  output logic             id_valid,
  output logic [15:0]      id_pc,
  // from the decode stage (valid instructions only)
  input  logic             id_jmp,
  input  logic [15:0]      id_target,
  input  logic             id_reti,
  input  logic             id_idle,
  input  logic             id_loop,
  input  logic [9:0]       id_loop_off,
  input  logic [11:0]      id_loop_cnt,
  input  logic             id_ei,
  input  logic             id_di,
  input  logic [N_IRQ-1:0] id_imr,
  input  logic             id_hold,   // keep the decode-stage instruction
  // from the execute stage
  input  logic             ex_br,
  input  logic [15:0]      ex_target,
  // interrupts
  input  logic [N_IRQ-1:0] irq,
  input  logic             irq_block,
  // status
  output logic             idle,
  output logic             irq_taken,
  output logic             loop_back,
  output logic             loop_active
);
  logic [15:0]      pc;          // address fetched this cycle
  logic [15:0]      irpc;        // return address
  logic             ie;
  logic [N_IRQ-1:0] imr, pend, irq_q;
  logic [15:0]      lp_start, lp_end;
  logic [11:0]      lp_cnt;

  // decode-stage requests are void when an older branch is taken
  logic d_jmp, d_reti, d_idle, d_loop, d_ei, d_di;
  logic go;
  assign go     = !ex_br && !id_hold;
  assign d_jmp  = id_jmp  && go;
  assign d_reti = id_reti && go;
  assign d_idle = id_idle && go;
  assign d_loop = id_loop && go;
  assign d_ei   = id_ei   && go;
  assign d_di   = id_di   && go;

  // effective loop registers, including a loop instruction now in decode
  logic [15:0] e_start, e_end;
  logic [11:0] e_cnt;
  logic        e_act;
  always_comb begin
    if (d_loop) begin
      e_start = id_pc + 16'd1;
      e_end   = id_pc + {6'd0, id_loop_off};
      e_cnt   = id_loop_cnt;
      e_act   = 1'b1;
    end else begin
      e_start = lp_start;
      e_end   = lp_end;
      e_cnt   = lp_cnt;
      e_act   = loop_active;
    end
  end

  // interrupt selection
  logic [N_IRQ-1:0] req;
  logic             take;
  logic [15:0]      vec;
  assign req = pend & imr;
  always_comb begin
    vec = VEC_BASE;
    for (int k = N_IRQ - 1; k >= 0; k--)
      if (req[k]) vec = VEC_BASE + 16'(k);
  end

  typedef enum logic [2:0] {F_STOP, F_BRANCH, F_HOLD, F_IDLE, F_IRQ, F_SEQ} fmode_e;
  fmode_e mode;
  always_comb begin
    if (!run)                              mode = F_STOP;
    else if (ex_br || d_jmp || d_reti)     mode = F_BRANCH;
    else if (id_hold)                      mode = F_HOLD;
    else if (idle || d_idle)               mode = F_IDLE;
    else if (ie && (req != '0) && !irq_block) mode = F_IRQ;
    else                                   mode = F_SEQ;
  end
  assign take      = (mode == F_IRQ);
  assign irq_taken = take;
  assign loop_back = (mode == F_SEQ) && e_act && (pc == e_end) && (e_cnt > 12'd1);

  assign pm_addr = pc;
  assign pm_re   = (mode == F_SEQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; irpc <= '0; ie <= 1'b0; imr <= '0; pend <= '0; irq_q <= '0;
      lp_start <= '0; lp_end <= '0; lp_cnt <= '0; loop_active <= 1'b0;
      idle <= 1'b0; id_valid <= 1'b0; id_pc <= '0;
    end else begin
      irq_q <= irq;
      pend  <= (pend | (irq & ~irq_q)) & ~((take) ? (req & ~(req - 1'b1)) : '0);
      if (d_ei) begin ie <= 1'b1; imr <= id_imr; end
      if (d_di) ie <= 1'b0;
      if (d_loop) begin
        lp_start <= e_start; lp_end <= e_end; lp_cnt <= e_cnt; loop_active <= 1'b1;
      end
      if (mode != F_HOLD) begin
        id_valid <= (mode == F_SEQ);
        id_pc    <= pc;
      end
      unique case (mode)
        F_STOP: begin
          pc <= '0; idle <= 1'b0; loop_active <= 1'b0; ie <= 1'b0; pend <= '0;
        end
        F_BRANCH: begin
          if (ex_br) begin pc <= ex_target; idle <= 1'b0; loop_active <= 1'b0; end
          else if (d_jmp)  pc <= id_target;
          else begin       pc <= irpc; ie <= 1'b1; end
        end
        F_HOLD: ;
        F_IDLE: begin
          // wake on any unmasked pending interrupt, enabled or not
          if (idle && (req != '0)) idle <= 1'b0;
          else                     idle <= 1'b1;
        end
        F_IRQ: begin
          irpc <= pc;
          ie   <= 1'b0;
          pc   <= vec;
        end
        default: begin
          if (e_act && pc == e_end) begin
            if (e_cnt > 12'd1) begin
              pc     <= e_start;
              lp_cnt <= e_cnt - 12'd1;
            end else begin
              pc          <= pc + 16'd1;
              loop_active <= 1'b0;
            end
          end else begin
            pc <= pc + 16'd1;
          end
        end
      endcase
    end
  end
endmodule
