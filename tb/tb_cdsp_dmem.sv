// tb_cdsp_dmem: self-checking test of a two-port data memory.
// Random simultaneous reads and writes against a reference array, including
// reads of the word being written in the same cycle (write-first), and a
// check that the read data appear one clock after the address.
module tb_cdsp_dmem;
  localparam int DEPTH = 2048;
  logic        clk = 0;
  logic        re = 0, we = 0;
  logic [15:0] raddr = 0, waddr = 0, wdata = 0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  cdsp_dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_q;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      re = 1; raddr = 16'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1);
      waddr = (i % 4 == 0) ? raddr : 16'($urandom_range(0, DEPTH - 1));
      wdata = 16'($urandom);
      exp_q = (we && waddr == raddr) ? wdata : model[raddr];
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("DMEM mismatch addr=%0d got %h exp %h", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
