// cdsp_pmem: the CDSP program memory.
//
// DEPTH instruction words of W bits. The read port delivers one
// instruction per cycle to the decode stage: rdata holds the word at the
// address sampled on the previous clock edge. The write port loads the
// program from the host interface while the core is stopped. Only the low
// $clog2(DEPTH) bits of the 16-bit program address are used.
// Size (1K x 28) follows the published chip; the host write port is this
// design's choice. Contents are not reset.
module cdsp_pmem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 28
) (
  input  logic         clk,
  input  logic         re,
  input  logic [15:0]  raddr,
  output logic [W-1:0] rdata,
  input  logic         we,
  input  logic [15:0]  waddr,
  input  logic [W-1:0] wdata
);
  localparam int unsigned AB = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr[AB-1:0]] <= wdata;
    if (re)
      rdata <= mem[raddr[AB-1:0]];
  end
endmodule
