// cdsp_dmem: one two-port CDSP data memory (DM0 or DM1).
//
// DEPTH words of W bits with one read port and one write port, both
// synchronous, so the datapath can read an operand and write a result in
// the same cycle. The read data appear on rdata after the clock edge that
// samples raddr (the operand-read stage). When a read and a write hit the
// same word in the same cycle the new data are returned (write-first).
// The address space seen by the core is 16 bits; only the low
// $clog2(DEPTH) bits are used, so the memory repeats across it.
// Size (2K x 16) and the two-port organisation follow the published chip;
// write-first behaviour is this design's choice. Contents are not reset.
module cdsp_dmem #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 16
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
      rdata <= (we && waddr[AB-1:0] == raddr[AB-1:0]) ? wdata : mem[raddr[AB-1:0]];
  end
endmodule
