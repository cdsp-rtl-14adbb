// cdsp_ag: address generator of one CDSP data memory.
//
// Each data memory has its own generator with NREG index registers
// (I0..I7). Every index register has a step register M, a buffer length
// register L and a base register B. An access uses the current value of an
// index register as the address and may post-modify it: I <- I + M, and
// when L is non-zero the result is wrapped into the circular buffer
// [B, B+L) by adding or subtracting L (modulo addressing; |M| <= L
// assumed). L = 0 gives plain linear addressing.
// Two accesses are served per cycle, one for the read port and one for the
// write port of the two-port data memory. If both post-modify the same
// index register in one cycle, the register advances once.
// Addresses come out combinationally in the decode stage; register
// updates take effect at the next clock edge. Configuration writes
// (cfg_we) load one of I, M, L or B and are not combined with accesses in
// the same cycle. All registers reset to zero.
// Eight index registers and modulo addressing follow the published
// architecture; the M/L/B register set and its encoding are this design's.
module cdsp_ag #(
  parameter int unsigned NREG = 8,
  parameter int unsigned AW   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    cfg_we,
  input  logic [1:0]              cfg_field,   // 0 I, 1 M, 2 L, 3 B
  input  logic [$clog2(NREG)-1:0] cfg_reg,
  input  logic [AW-1:0]           cfg_data,
  // read-port access
  input  logic                    rd_en,
  input  logic [$clog2(NREG)-1:0] rd_reg,
  input  logic                    rd_mod,
  output logic [AW-1:0]           rd_addr,
  // write-port access
  input  logic                    wr_en,
  input  logic [$clog2(NREG)-1:0] wr_reg,
  input  logic                    wr_mod,
  output logic [AW-1:0]           wr_addr
);
  logic [AW-1:0] idx [NREG];
  logic [AW-1:0] stp [NREG];
  logic [AW-1:0] len [NREG];
  logic [AW-1:0] bas [NREG];

  // post-modified value of index register r
  function automatic logic [AW-1:0] next_idx(input logic [AW-1:0] i, input logic [AW-1:0] m,
                                             input logic [AW-1:0] l, input logic [AW-1:0] b);
    logic signed [AW+1:0] sum, lo, hi;
    sum = $signed({2'b00, i}) + $signed({{2{m[AW-1]}}, m});   // signed step
    lo  = $signed({2'b00, b});
    hi  = $signed({2'b00, b}) + $signed({2'b00, l});
    if (l == '0)
      return sum[AW-1:0];
    else if (sum >= hi)
      return sum[AW-1:0] - l;
    else if (sum < lo)
      return sum[AW-1:0] + l;
    else
      return sum[AW-1:0];
  endfunction

  assign rd_addr = idx[rd_reg];
  assign wr_addr = idx[wr_reg];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        idx[r] <= '0; stp[r] <= '0; len[r] <= '0; bas[r] <= '0;
      end
    end else if (cfg_we) begin
      unique case (cfg_field)
        2'd0: idx[cfg_reg] <= cfg_data;
        2'd1: stp[cfg_reg] <= cfg_data;
        2'd2: len[cfg_reg] <= cfg_data;
        default: bas[cfg_reg] <= cfg_data;
      endcase
    end else begin
      if (wr_en && wr_mod)
        idx[wr_reg] <= next_idx(idx[wr_reg], stp[wr_reg], len[wr_reg], bas[wr_reg]);
      if (rd_en && rd_mod)
        idx[rd_reg] <= next_idx(idx[rd_reg], stp[rd_reg], len[rd_reg], bas[rd_reg]);
    end
  end
endmodule
