// tb_cdsp_ag: self-checking test of the address generator.
// Sets up circular buffers in several index registers (positive and
// negative steps, linear mode with L = 0), then issues random read and
// write accesses and compares each address and each post-modify with a
// reference model that wraps with explicit modulo arithmetic.
module tb_cdsp_ag;
  logic        clk = 0, rst_n = 0;
  logic        cfg_we = 0;
  logic [1:0]  cfg_field = 0;
  logic [2:0]  cfg_reg = 0, rd_reg = 0, wr_reg = 0;
  logic [15:0] cfg_data = 0, rd_addr, wr_addr;
  logic        rd_en = 0, rd_mod = 0, wr_en = 0, wr_mod = 0;
  int checks = 0, failures = 0, wraps = 0;
  int mi[8], ms[8], ml[8], mb[8];

  cdsp_ag dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(int r, int f, int v);
    @(negedge clk);
    cfg_we = 1; cfg_reg = 3'(r); cfg_field = 2'(f); cfg_data = 16'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic int nxt(int r);
    int s;
    s = mi[r] + ms[r];
    if (ml[r] != 0) begin
      if (s >= mb[r] + ml[r]) s -= ml[r];
      else if (s < mb[r]) s += ml[r];
    end
    return s & 16'hFFFF;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      mb[r] = 100 * r + 10;
      ml[r] = (r == 7) ? 0 : 3 + r;
      ms[r] = (r == 2) ? -1 : ((r == 5) ? -2 : ((r == 3) ? 2 : 1));
      mi[r] = mb[r] + r % 3;
      cfg(r, 3, mb[r]); cfg(r, 2, ml[r]); cfg(r, 1, ms[r]); cfg(r, 0, mi[r]);
    end
    for (int i = 0; i < 600; i++) begin
      int rr, wr, nr, nw;
      @(negedge clk);
      rr = $urandom_range(0, 7); wr = $urandom_range(0, 7);
      rd_en = 1; rd_reg = 3'(rr); rd_mod = ($urandom_range(0, 3) != 0);
      wr_en = $urandom_range(0, 1); wr_reg = 3'(wr); wr_mod = $urandom_range(0, 1);
      #1;
      checks++;
      if (rd_addr !== 16'(mi[rr]) || wr_addr !== 16'(mi[wr])) begin
        failures++;
        $display("AG address mismatch r%0d=%h (exp %h) w%0d=%h (exp %h)", rr, rd_addr, mi[rr], wr, wr_addr, mi[wr]);
      end
      nr = nxt(rr); nw = nxt(wr);
      if (wr_en && wr_mod) begin if (nw < mi[wr] && ms[wr] > 0) wraps++; mi[wr] = nw; end
      if (rd_mod) begin if (nr < mi[rr] && ms[rr] > 0) wraps++; mi[rr] = nr; end
    end
    @(negedge clk); rd_en = 0; wr_en = 0;
    checks++;
    if (wraps == 0) begin failures++; $display("no buffer wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
