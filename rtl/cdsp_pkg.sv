// cdsp_pkg: types and constants shared by the CDSP core.
//
// The CDSP is a 16-bit fixed-point DSP with 40-bit accumulators, a 28-bit
// instruction word, one program memory and two data memories (DM0, DM1).
// The word sizes follow the published architecture. The instruction
// encoding below is this implementation's own: the architecture
// description lists the operations (complex MUL/MAC, dual ACS, dual 8x8
// FIR MAC, zero-overhead loop, idle) but no bit-level format.
//
// Instruction formats (bit 27 selects the format):
//   Datapath (bit27 = 0): one datapath operation with two memory reads and
//   up to two memory writes in the same instruction.
//     [26:22] dp_op   operation (dp_op_e)
//     [21:19] xr      AG0 index register used for the DM0 read address
//     [18]    xm      post-modify that index register
//     [17:15] yr      AG1 index register used for the DM1 read address
//     [14]    ym      post-modify that index register
//     [13:11] wxr     AG0 index register used for the DM0 write address
//     [10]    wxm     post-modify it
//     [9:7]   wyr     AG1 index register used for the DM1 write address
//     [6]     wym     post-modify it
//     [5]     we0     write word W0 to DM0
//     [4]     we1     write word W1 to DM1
//     [3]     dst     destination accumulator (0: D0, 1: D1)
//     [2]     rsw     swap the read operands (X <- DM1, Y <- DM0)
//     [1]     wsw     swap the write words (DM0 <- W1, DM1 <- W0)
//     [0]     lds     local-distance register used by ACS (L0 or L1)
//   Control (bit27 = 1):
//     [26:22] c_op    operation (c_op_e)
//     [21:0]  operand field; [21] names the accumulator where one is used
//             and the other fields are listed with c_op_e
package cdsp_pkg;

  localparam int unsigned IW = 28;   // instruction word
  localparam int unsigned AW = 40;   // accumulator
  localparam int unsigned N_IRQ = 5; // interrupt vectors

  // Datapath operations. X and Y are the 16-bit words read from DM0 and
  // DM1 (swapped when rsw=1); D is the destination accumulator, E the other.
  typedef enum logic [4:0] {
    DP_NOP   = 5'd0,
    DP_LDX   = 5'd1,   // D <- sext(X)
    DP_LDY   = 5'd2,   // D <- sext(Y)
    DP_LDXY  = 5'd3,   // D <- {sext24(X), Y} (split pair)
    DP_ADDX  = 5'd4,   // D <- D + sext(X)
    DP_SUBX  = 5'd5,   // D <- D - sext(X)
    DP_ADDY  = 5'd6,   // D <- D + sext(Y)
    DP_SUBY  = 5'd7,   // D <- D - sext(Y)
    DP_ADDE  = 5'd8,   // D <- D + E
    DP_SUBE  = 5'd9,   // D <- D - E
    DP_ANDX  = 5'd10,  // D <- D & zext(X)
    DP_ORX   = 5'd11,  // D <- D | zext(X)
    DP_XORX  = 5'd12,  // D <- D ^ zext(X)
    DP_MOVE  = 5'd13,  // D <- E
    DP_MPY   = 5'd14,  // D <- X*Y          (16x16 signed)
    DP_MAC   = 5'd15,  // D <- D + X*Y
    DP_MSU   = 5'd16,  // D <- D - X*Y
    DP_CMPY  = 5'd17,  // D <- {re, im} of X*Y, 8-bit I/Q operands
    DP_CMAC  = 5'd18,  // D <- D + {re, im} of X*Y (split accumulate)
    DP_DMAC  = 5'd21,  // D <- D + X.hi*Y.hi + X.lo*Y.lo (FIR, 8-bit)
    DP_ACS   = 5'd22,  // dual add-compare-select (see cdsp.sv)
    DP_MAXE  = 5'd23,  // D <- max(D, E)
    DP_MINE  = 5'd24,  // D <- min(D, E)
    DP_ABS   = 5'd25,  // D <- |D|
    DP_NEG   = 5'd26,  // D <- -D
    DP_STL   = 5'd27,  // W0 = W1 = D[15:0], D unchanged
    DP_STH   = 5'd28   // W0 = W1 = D[31:16], D unchanged
  } dp_op_e;

  // Control operations.
  typedef enum logic [4:0] {
    C_NOP   = 5'd0,
    C_LDI   = 5'd1,   // D <- sext(imm16[15:0])
    C_SFT   = 5'd2,   // D <- D shifted by [5:0] (signed, + = left); [6]=1 logical right
    C_SETAG = 5'd3,   // AG[21] reg[18:16].field[20:19] <- imm[15:0]; field 0 I,1 M,2 L,3 B
    C_LDLD  = 5'd4,   // L[20] <- D[15:0]
    C_JMP   = 5'd5,   // PC <- [15:0]
    C_BCC   = 5'd6,   // if cond[20:18](D) PC <- [15:0]
    C_LOOP  = 5'd7,   // repeat PC+1 .. PC+[21:12] count [11:0] times
    C_IN    = 5'd8,   // D <- sext(pio_in)
    C_OUT   = 5'd9,   // pio_out <- D[15:0]
    C_IDLE  = 5'd10,  // enter idle mode until an enabled interrupt
    C_EI    = 5'd11,  // interrupt enable on, IMR <- [4:0]
    C_DI    = 5'd12,  // interrupt enable off
    C_RETI  = 5'd13,  // return from interrupt
    C_RDTRN = 5'd14,  // D <- zext(TRN) (Viterbi decision bits)
    C_LDIH  = 5'd15   // D[31:16] <- imm16, D[15:0] kept, D[39:32] sign of imm
  } c_op_e;

  // Branch conditions on the accumulator D.
  typedef enum logic [2:0] {
    CC_ALWAYS = 3'd0, CC_EQ = 3'd1, CC_NE = 3'd2, CC_LT = 3'd3,
    CC_GE = 3'd4, CC_GT = 3'd5, CC_LE = 3'd6, CC_NEVER = 3'd7
  } cc_e;

  // SWP adder/multiplier modes, shared by ALU and MAC.
  typedef enum logic [3:0] {
    ALU_PASSB = 4'd0, ALU_ADD = 4'd1, ALU_SUB = 4'd2, ALU_AND = 4'd3,
    ALU_OR    = 4'd4, ALU_XOR = 4'd5, ALU_ABS = 4'd6, ALU_NEG = 4'd7,
    ALU_ACS   = 4'd8   // hi 24 bits: A + B ; lo 16 bits: A - B (carry chain cut)
  } alu_op_e;

  typedef enum logic [3:0] {
    MAC_NONE  = 4'd0,  // output = accumulator input (no operation)
    MAC_MPY   = 4'd1, MAC_MAC  = 4'd2, MAC_MSU = 4'd3,
    MAC_CMPY  = 4'd4, MAC_CMAC = 4'd5,
    MAC_DMAC  = 4'd8,
    MAC_ACS   = 4'd9   // multipliers bypassed: hi 24 bits: A - B ; lo 16: A + B
  } mac_op_e;

  // Decoded instruction as it travels down the pipeline.
  typedef struct packed {
    logic        valid;
    logic        is_dp;      // datapath format
    dp_op_e      dp_op;
    c_op_e       c_op;
    logic        dst;
    logic        rsw, wsw, lds;
    logic        re0, re1;   // memory reads needed
    logic        we0, we1;   // memory writes
    logic [15:0] ra0, ra1;   // read addresses (from the AGs)
    logic [15:0] wa0, wa1;   // write addresses (from the AGs)
    logic [21:0] fld;        // control-format operand field
    logic [15:0] pc;         // address of this instruction
  } dinst_t;

  // Sign-extend a 16-bit word to 40 bits.
  function automatic logic [AW-1:0] sext16(input logic [15:0] v);
    return {{(AW-16){v[15]}}, v};
  endfunction

  // Branch condition test on a 40-bit accumulator.
  function automatic logic cc_true(input cc_e c, input logic [AW-1:0] d);
    logic z, n;
    z = (d == '0);
    n = d[AW-1];
    case (c)
      CC_ALWAYS: return 1'b1;
      CC_EQ:     return z;
      CC_NE:     return !z;
      CC_LT:     return n;
      CC_GE:     return !n;
      CC_GT:     return !n && !z;
      CC_LE:     return n || z;
      default:   return 1'b0;
    endcase
  endfunction

endpackage
