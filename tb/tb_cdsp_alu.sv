// tb_cdsp_alu: self-checking test of the 40-bit ALU.
// Drives random operands through every operation and compares with
// reference arithmetic written out here, including the split ACS mode
// (upper 24 bits add, lower 16 bits subtract with no carry between them).
module tb_cdsp_alu;
  import cdsp_pkg::*;
  alu_op_e     op;
  logic [39:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  cdsp_alu dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [39:0] ref_alu(alu_op_e o, logic [39:0] ra, logic [39:0] rb);
    logic [23:0] h; logic [15:0] l;
    case (o)
      ALU_PASSB: return rb;
      ALU_ADD:   return ra + rb;
      ALU_SUB:   return ra - rb;
      ALU_AND:   return ra & rb;
      ALU_OR:    return ra | rb;
      ALU_XOR:   return ra ^ rb;
      ALU_ABS:   return ($signed(ra) < 0) ? 40'(-$signed(ra)) : ra;
      ALU_NEG:   return 40'(-$signed(ra));
      ALU_ACS: begin
        h = ra[39:16] + rb[39:16];
        l = ra[15:0] - rb[15:0];
        return {h, l};
      end
      default:   return ra;
    endcase
  endfunction

  initial begin
    alu_op_e ops[9] = '{ALU_PASSB, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_ABS, ALU_NEG, ALU_ACS};
    for (int i = 0; i < 400; i++) begin
      op = ops[i % 9];
      a  = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
      b  = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
      if (i % 3 == 0) b[15:0] = a[15:0] + 16'd1;   // forces a borrow in the low field
      #1;
      exp_y = ref_alu(op, a, b);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("ALU mismatch op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp_y);
      end
    end
    // a directed ACS case: metric 100, local distance 7 -> {107, 93}
    op = ALU_ACS; a = {24'd100, 16'd100}; b = {24'd7, 16'd7}; #1;
    checks++; if (y !== {24'd107, 16'd93}) failures++;
    // borrow in low field must not reach the upper field
    a = {24'd5, 16'd0}; b = {24'd1, 16'd1}; #1;
    checks++; if (y !== {24'd6, 16'hFFFF}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
