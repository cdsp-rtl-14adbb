// tb_cdsp_pmem: self-checking test of the program memory.
// Loads every word with a pseudo-random 28-bit pattern, reads all back,
// and checks that the read data hold while the read enable is low.
module tb_cdsp_pmem;
  localparam int DEPTH = 1024;
  logic        clk = 0;
  logic        re = 0, we = 0;
  logic [15:0] raddr = 0, waddr = 0;
  logic [27:0] wdata = 0, rdata;
  logic [27:0] model [DEPTH];
  int checks = 0, failures = 0;

  cdsp_pmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = 28'({$urandom} ^ (a * 32'h9E3779B1)); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      @(negedge clk); re = 1; raddr = 16'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("PMEM mismatch addr=%0d got %h exp %h", a, rdata, model[a]);
      end
    end
    @(negedge clk); re = 0; raddr = 16'd5;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (rdata !== model[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
