// cdsp: top level of the CDSP application-specific DSP core.
//
// A 16-bit DSP for symbol-rate WCDMA baseband work (channel estimation,
// RAKE combining, Viterbi decoding, FIR filtering). Modified Harvard
// architecture: a 1K x 28 program memory and two 2K x 16 two-port data
// memories DM0 and DM1, each with its own address generator (AG0, AG1).
// The datapath has four units working on 40-bit accumulators D0 and D1:
// ALU, MAC (sub-word parallel, four 8x8 multipliers), CMP (comparator) and
// SFT (barrel shifter). Each 16-bit data word can hold an I/Q pair of
// 8-bit samples (I in bits 15:8, Q in bits 7:0).
//
// Pipeline (one instruction per cycle):
//   IF  cdsp_seq presents the fetch address to the program memory.
//   ID  the instruction is decoded; the AGs hand out the two read and two
//       write addresses and post-modify their index registers; jumps,
//       loops, interrupt enable/disable and idle act here.
//   OR  the read addresses go to DM0 and DM1 (synchronous read).
//   EX  the operands X and Y arrive; one datapath operation runs and its
//       result is written into D0/D1 at the end of the stage, so the next
//       instruction already sees it. Conditional branches resolve here.
//   WB  the one or two 16-bit result words W0, W1 are written to DM0/DM1.
// Memory results are forwarded: an operand read by the instruction right
// after a writer (from the WB stage) or two after it (write-first memory)
// gets the new word, so there is no memory hazard. An instruction in ID
// waits while a conditional branch is in OR or EX (two cycles), so nothing
// after a branch changes state before the branch resolves; a taken branch
// cancels the instructions behind it and any active loop.
//
// Dual ACS (Viterbi metric update), one instruction per two butterflies'
// worth of add-compare-select: with X = metric(j/2), Y = metric(j/2+128)
// and L the local distance register, the ALU writes D0 = {X+L, X-L} and
// the MAC writes D1 = {Y-L, Y+L} (24-bit and 16-bit fields), while the CMP
// takes the D0/D1 left by the previous ACS, writes min of the upper fields
// (new metric j) as W0 and min of the lower fields (metric j+1) as W1, and
// shifts the two decision bits into the 16-bit TRN register.
//
// Host port: while run is low the core is held at address 0 and the host
// reads and writes the program memory and both data memories; the read
// data appear one cycle after the address. Interrupt requests are taken on
// rising edges. pio_in/pio_out form the parallel I/O port.
//
// The memory sizes, word widths, unit set, five-stage pipeline, two-port
// memories, SWP formats, dual-ACS data flow, eight index registers per AG
// with modulo addressing, zero-overhead loop, five interrupt vectors,
// idle mode and parallel I/O follow the published architecture. The
// instruction set and encoding (see cdsp_pkg), the forwarding and branch
// rules, the host port and the interrupt details are this design's own.
module cdsp
  import cdsp_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 1024,
  parameter int unsigned DM_DEPTH = 2048
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [1:0]        host_sel,    // 0 PM, 1 DM0, 2 DM1
  input  logic              host_we,
  input  logic [15:0]       host_addr,
  input  logic [IW-1:0]     host_wdata,
  output logic [IW-1:0]     host_rdata,
  input  logic [N_IRQ-1:0]  irq,
  input  logic [15:0]       pio_in,
  output logic [15:0]       pio_out,
  output logic              pio_out_stb,
  output logic              pio_in_ack,
  output logic              idle
);
  // ------------------------------------------------------------------
  // instruction fetch
  logic [15:0]   pm_addr_seq, id_pc, ex_target;
  logic          pm_re_seq, id_valid, id_hold, ex_br, irq_block;
  logic [IW-1:0] pm_rdata;
  logic          irq_taken, loop_back, loop_active;

  // decode-stage fields
  logic          id_dp;
  dp_op_e        id_dp_op;
  c_op_e         id_c_op;
  logic          id_go;

  cdsp_seq #(.N_IRQ(N_IRQ)) u_seq (
    .clk, .rst_n, .run,
    .pm_addr(pm_addr_seq), .pm_re(pm_re_seq), .id_valid, .id_pc,
    .id_jmp (id_go && !id_dp && id_c_op == C_JMP),
    .id_target(pm_rdata[15:0]),
    .id_reti(id_go && !id_dp && id_c_op == C_RETI),
    .id_idle(id_go && !id_dp && id_c_op == C_IDLE),
    .id_loop(id_go && !id_dp && id_c_op == C_LOOP),
    .id_loop_off(pm_rdata[21:12]),
    .id_loop_cnt(pm_rdata[11:0]),
    .id_ei  (id_go && !id_dp && id_c_op == C_EI),
    .id_di  (id_go && !id_dp && id_c_op == C_DI),
    .id_imr (pm_rdata[N_IRQ-1:0]),
    .id_hold,
    .ex_br, .ex_target,
    .irq, .irq_block,
    .idle, .irq_taken, .loop_back, .loop_active
  );

  cdsp_pmem #(.DEPTH(PM_DEPTH), .W(IW)) u_pm (
    .clk,
    .re   (run ? pm_re_seq : 1'b1),
    .raddr(run ? pm_addr_seq : host_addr),
    .rdata(pm_rdata),
    .we   (!run && host_we && host_sel == 2'd0),
    .waddr(host_addr),
    .wdata(host_wdata)
  );

  // ------------------------------------------------------------------
  // decode
  dinst_t id_d, or_q, ex_q;
  logic   or_bcc, ex_bcc;

  assign id_dp    = !pm_rdata[27];
  assign id_dp_op = dp_op_e'(pm_rdata[26:22]);
  assign id_c_op  = c_op_e'(pm_rdata[26:22]);
  assign or_bcc   = or_q.valid && !or_q.is_dp && or_q.c_op == C_BCC;
  assign ex_bcc   = ex_q.valid && !ex_q.is_dp && ex_q.c_op == C_BCC;
  assign id_hold  = run && id_valid && (or_bcc || ex_bcc);
  assign id_go    = run && id_valid && !id_hold && !ex_br;
  assign irq_block = (id_valid && !id_dp &&
                      (id_c_op inside {C_JMP, C_BCC, C_LOOP, C_EI, C_DI, C_RETI, C_IDLE}))
                     || or_bcc || ex_bcc;

  // address generators
  logic [15:0] ag0_ra, ag0_wa, ag1_ra, ag1_wa;
  logic        setag;
  assign setag = id_go && !id_dp && id_c_op == C_SETAG;

  cdsp_ag u_ag0 (
    .clk, .rst_n,
    .cfg_we(setag && !pm_rdata[21]), .cfg_field(pm_rdata[20:19]),
    .cfg_reg(pm_rdata[18:16]), .cfg_data(pm_rdata[15:0]),
    .rd_en(id_go && id_dp), .rd_reg(pm_rdata[21:19]), .rd_mod(pm_rdata[18]), .rd_addr(ag0_ra),
    .wr_en(id_go && id_dp && pm_rdata[5]), .wr_reg(pm_rdata[13:11]), .wr_mod(pm_rdata[10]),
    .wr_addr(ag0_wa)
  );
  cdsp_ag u_ag1 (
    .clk, .rst_n,
    .cfg_we(setag && pm_rdata[21]), .cfg_field(pm_rdata[20:19]),
    .cfg_reg(pm_rdata[18:16]), .cfg_data(pm_rdata[15:0]),
    .rd_en(id_go && id_dp), .rd_reg(pm_rdata[17:15]), .rd_mod(pm_rdata[14]), .rd_addr(ag1_ra),
    .wr_en(id_go && id_dp && pm_rdata[4]), .wr_reg(pm_rdata[9:7]), .wr_mod(pm_rdata[6]),
    .wr_addr(ag1_wa)
  );

  always_comb begin
    id_d       = '0;
    id_d.valid = id_go;
    id_d.is_dp = id_dp;
    id_d.dp_op = id_dp ? id_dp_op : DP_NOP;
    id_d.c_op  = id_dp ? C_NOP : id_c_op;
    id_d.dst   = id_dp ? pm_rdata[3] : pm_rdata[21];
    id_d.rsw   = id_dp && pm_rdata[2];
    id_d.wsw   = id_dp && pm_rdata[1];
    id_d.lds   = id_dp && pm_rdata[0];
    id_d.re0   = id_dp;
    id_d.re1   = id_dp;
    id_d.we0   = id_dp && pm_rdata[5];
    id_d.we1   = id_dp && pm_rdata[4];
    id_d.ra0   = ag0_ra;
    id_d.ra1   = ag1_ra;
    id_d.wa0   = ag0_wa;
    id_d.wa1   = ag1_wa;
    id_d.fld   = pm_rdata[21:0];
    id_d.pc    = id_pc;
  end

  // ------------------------------------------------------------------
  // pipeline registers ID -> OR -> EX
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      or_q <= '0;
      ex_q <= '0;
    end else begin
      or_q <= id_d;
      if (!run || ex_br) or_q.valid <= 1'b0;
      ex_q <= or_q;
      if (!run || ex_br) ex_q.valid <= 1'b0;
    end
  end

  // ------------------------------------------------------------------
  // data memories
  logic [15:0] dm0_rdata, dm1_rdata;
  logic        wb_we0, wb_we1;
  logic [15:0] wb_wa0, wb_wa1, wb_wd0, wb_wd1;

  cdsp_dmem #(.DEPTH(DM_DEPTH)) u_dm0 (
    .clk,
    .re   (run ? (or_q.valid && or_q.re0) : 1'b1),
    .raddr(run ? or_q.ra0 : host_addr),
    .rdata(dm0_rdata),
    .we   (run ? wb_we0 : (host_we && host_sel == 2'd1)),
    .waddr(run ? wb_wa0 : host_addr),
    .wdata(run ? wb_wd0 : host_wdata[15:0])
  );
  cdsp_dmem #(.DEPTH(DM_DEPTH)) u_dm1 (
    .clk,
    .re   (run ? (or_q.valid && or_q.re1) : 1'b1),
    .raddr(run ? or_q.ra1 : host_addr),
    .rdata(dm1_rdata),
    .we   (run ? wb_we1 : (host_we && host_sel == 2'd2)),
    .waddr(run ? wb_wa1 : host_addr),
    .wdata(run ? wb_wd1 : host_wdata[15:0])
  );

  logic [1:0] host_sel_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) host_sel_q <= '0;
    else        host_sel_q <= host_sel;
  always_comb
    unique case (host_sel_q)
      2'd0:    host_rdata = pm_rdata;
      2'd1:    host_rdata = {{(IW-16){1'b0}}, dm0_rdata};
      default: host_rdata = {{(IW-16){1'b0}}, dm1_rdata};
    endcase

  // ------------------------------------------------------------------
  // execute
  localparam int unsigned AB = $clog2(DM_DEPTH);
  logic [AW-1:0] d0, d1, dd, de;
  logic [15:0]   l0, l1, lreg, trn;
  logic [15:0]   op0, op1, x, y;

  // forwarding from the write-back stage (the instruction just ahead)
  assign op0 = (wb_we0 && wb_wa0[AB-1:0] == ex_q.ra0[AB-1:0]) ? wb_wd0 : dm0_rdata;
  assign op1 = (wb_we1 && wb_wa1[AB-1:0] == ex_q.ra1[AB-1:0]) ? wb_wd1 : dm1_rdata;
  assign x    = ex_q.rsw ? op1 : op0;
  assign y    = ex_q.rsw ? op0 : op1;
  assign dd   = ex_q.dst ? d1 : d0;
  assign de   = ex_q.dst ? d0 : d1;
  assign lreg = ex_q.lds ? l1 : l0;

  logic          is_acs;
  alu_op_e       alu_op;
  mac_op_e       mac_op;
  logic [AW-1:0] alu_a, alu_b, alu_y, mac_din, mac_bin, mac_y, sft_y;
  logic [AW-1:0] cmp_a, cmp_b, cmp_min, cmp_max, lsplit;
  logic [15:0]   cmp_hi, cmp_lo;
  logic [1:0]    cmp_dec;

  assign is_acs = ex_q.valid && ex_q.is_dp && ex_q.dp_op == DP_ACS;
  assign lsplit = {{8{lreg[15]}}, lreg, lreg};

  always_comb begin
    alu_op  = ALU_PASSB;
    alu_a   = dd;
    alu_b   = sext16(x);
    mac_op  = MAC_NONE;
    mac_din = dd;
    mac_bin = lsplit;
    unique case (ex_q.dp_op)
      DP_LDY:  alu_b = sext16(y);
      DP_LDXY: alu_b = {{8{x[15]}}, x, y};
      DP_ADDX: alu_op = ALU_ADD;
      DP_SUBX: alu_op = ALU_SUB;
      DP_ADDY: begin alu_op = ALU_ADD; alu_b = sext16(y); end
      DP_SUBY: begin alu_op = ALU_SUB; alu_b = sext16(y); end
      DP_ADDE: begin alu_op = ALU_ADD; alu_b = de; end
      DP_SUBE: begin alu_op = ALU_SUB; alu_b = de; end
      DP_ANDX: begin alu_op = ALU_AND; alu_b = {{(AW-16){1'b0}}, x}; end
      DP_ORX:  begin alu_op = ALU_OR;  alu_b = {{(AW-16){1'b0}}, x}; end
      DP_XORX: begin alu_op = ALU_XOR; alu_b = {{(AW-16){1'b0}}, x}; end
      DP_MOVE: alu_b = de;
      DP_ABS:  alu_op = ALU_ABS;
      DP_NEG:  alu_op = ALU_NEG;
      DP_MPY:  mac_op = MAC_MPY;
      DP_MAC:  mac_op = MAC_MAC;
      DP_MSU:  mac_op = MAC_MSU;
      DP_CMPY: mac_op = MAC_CMPY;
      DP_CMAC: mac_op = MAC_CMAC;
      DP_DMAC: mac_op = MAC_DMAC;
      DP_ACS: begin
        alu_op  = ALU_ACS;
        alu_a   = {{8{x[15]}}, x, x};
        alu_b   = lsplit;
        mac_op  = MAC_ACS;
        mac_din = {{8{y[15]}}, y, y};
      end
      default: ;
    endcase
    cmp_a = is_acs ? d0 : dd;
    cmp_b = is_acs ? d1 : de;
  end

  cdsp_alu u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y));
  cdsp_mac u_mac (.op(mac_op), .x(x), .y(y), .din(mac_din), .bin(mac_bin), .dout(mac_y));
  cdsp_cmp u_cmp (.a(cmp_a), .b(cmp_b), .sel_hi(cmp_hi), .sel_lo(cmp_lo), .dec(cmp_dec),
                  .min_ab(cmp_min), .max_ab(cmp_max));
  cdsp_sft u_sft (.d(dd), .amt(ex_q.fld[5:0]), .logical(ex_q.fld[6]), .y(sft_y));

  // result selection
  logic          acc_we;
  logic [AW-1:0] res;
  logic [15:0]   w0, w1;
  always_comb begin
    acc_we = 1'b0;
    res    = dd;
    if (ex_q.is_dp) begin
      unique case (ex_q.dp_op)
        DP_NOP, DP_STL, DP_STH, DP_ACS: acc_we = 1'b0;
        DP_MPY, DP_MAC, DP_MSU, DP_CMPY, DP_CMAC, DP_DMAC: begin acc_we = 1'b1; res = mac_y; end
        DP_MAXE: begin acc_we = 1'b1; res = cmp_max; end
        DP_MINE: begin acc_we = 1'b1; res = cmp_min; end
        default: begin acc_we = 1'b1; res = alu_y; end
      endcase
    end else begin
      unique case (ex_q.c_op)
        C_LDI:   begin acc_we = 1'b1; res = sext16(ex_q.fld[15:0]); end
        C_LDIH:  begin acc_we = 1'b1; res = {{8{ex_q.fld[15]}}, ex_q.fld[15:0], dd[15:0]}; end
        C_SFT:   begin acc_we = 1'b1; res = sft_y; end
        C_IN:    begin acc_we = 1'b1; res = sext16(pio_in); end
        C_RDTRN: begin acc_we = 1'b1; res = {{(AW-16){1'b0}}, trn}; end
        default: acc_we = 1'b0;
      endcase
    end
    unique case (ex_q.dp_op)
      DP_ACS:  begin w0 = cmp_hi;     w1 = cmp_lo;     end
      DP_STL:  begin w0 = dd[15:0];   w1 = dd[15:0];   end
      DP_STH:  begin w0 = dd[31:16];  w1 = dd[31:16];  end
      default: begin w0 = res[31:16]; w1 = res[15:0];  end
    endcase
  end

  assign ex_br     = run && ex_bcc && cc_true(cc_e'(ex_q.fld[20:18]), dd);
  assign ex_target = ex_q.fld[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d0 <= '0; d1 <= '0; l0 <= '0; l1 <= '0; trn <= '0;
      pio_out <= '0; pio_out_stb <= 1'b0; pio_in_ack <= 1'b0;
      wb_we0 <= 1'b0; wb_we1 <= 1'b0;
      wb_wa0 <= '0; wb_wa1 <= '0; wb_wd0 <= '0; wb_wd1 <= '0;
    end else begin
      pio_out_stb <= 1'b0;
      pio_in_ack  <= 1'b0;
      wb_we0 <= run && ex_q.valid && ex_q.we0;
      wb_we1 <= run && ex_q.valid && ex_q.we1;
      wb_wa0 <= ex_q.wa0;
      wb_wa1 <= ex_q.wa1;
      wb_wd0 <= ex_q.wsw ? w1 : w0;
      wb_wd1 <= ex_q.wsw ? w0 : w1;
      if (run && ex_q.valid) begin
        if (is_acs) begin
          d0  <= alu_y;
          d1  <= mac_y;
          trn <= {trn[13:0], cmp_dec};
        end else if (acc_we) begin
          if (ex_q.dst) d1 <= res;
          else          d0 <= res;
        end
        if (!ex_q.is_dp) begin
          if (ex_q.c_op == C_LDLD) begin
            if (ex_q.fld[20]) l1 <= dd[15:0];
            else              l0 <= dd[15:0];
          end
          if (ex_q.c_op == C_OUT) begin
            pio_out     <= dd[15:0];
            pio_out_stb <= 1'b1;
          end
          if (ex_q.c_op == C_IN) pio_in_ack <= 1'b1;
        end
      end
    end
  end

  // the host may write the memories only while the core is stopped
  host_write_when_stopped: assert property (@(posedge clk) disable iff (!rst_n)
    host_we |-> !run);
endmodule
