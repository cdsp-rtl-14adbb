// tb_cdsp_mac: self-checking test of the sub-word-parallel MAC.
// Random operands for each mode: 16x16 MPY/MAC/MSU against integer
// products, complex 8-bit MUL/MAC against the textbook formulas for the
// real and imaginary parts (fields accumulated separately), the dual 8x8
// FIR MAC, and the ACS bypass (upper field subtracts, lower adds).
module tb_cdsp_mac;
  import cdsp_pkg::*;
  mac_op_e     op;
  logic [15:0] x, y;
  logic [39:0] din, bin, dout, e;
  int checks = 0, failures = 0;

  cdsp_mac dut (.op, .x, .y, .din, .bin, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sb(logic [7:0] v);
    return int'($signed(v));
  endfunction

  function automatic logic [39:0] ref_mac(mac_op_e o, logic [15:0] rx, logic [15:0] ry,
                                          logic [39:0] d, logic [39:0] bb);
    longint p, acc;
    int re, im;
    acc = longint'($signed(d));
    p   = longint'($signed(rx)) * longint'($signed(ry));
    re  = sb(rx[15:8]) * sb(ry[15:8]) - sb(rx[7:0]) * sb(ry[7:0]);
    im  = sb(rx[15:8]) * sb(ry[7:0]) + sb(rx[7:0]) * sb(ry[15:8]);
    case (o)
      MAC_MPY:  return 40'(p);
      MAC_MAC:  return 40'(acc + p);
      MAC_MSU:  return 40'(acc - p);
      MAC_CMPY: return {24'(re), 16'(im)};
      MAC_CMAC: return {24'(d[39:16] + 24'(re)), 16'(d[15:0] + 16'(im))};
      MAC_DMAC: return 40'(acc + sb(rx[15:8]) * sb(ry[15:8]) + sb(rx[7:0]) * sb(ry[7:0]));
      MAC_ACS:  return {24'(d[39:16] - bb[39:16]), 16'(d[15:0] + bb[15:0])};
      default:  return d;
    endcase
  endfunction

  initial begin
    mac_op_e ops[8] = '{MAC_NONE, MAC_MPY, MAC_MAC, MAC_MSU, MAC_CMPY, MAC_CMAC, MAC_DMAC, MAC_ACS};
    for (int i = 0; i < 800; i++) begin
      op  = ops[i % 8];
      x   = 16'($urandom);
      y   = 16'($urandom);
      din = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
      bin = {$urandom, $urandom} & 40'hFF_FFFF_FFFF;
      if (i % 5 == 0) begin x = 16'h8080; y = 16'h8080; end  // extreme bytes
      #1;
      e = ref_mac(op, x, y, din, bin);
      checks++;
      if (dout !== e) begin
        failures++;
        $display("MAC mismatch op=%s x=%h y=%h din=%h dout=%h exp=%h", op.name(), x, y, din, dout, e);
      end
    end
    // directed complex product: (3+4j)(2-1j) = 10 + 5j
    op = MAC_CMPY; x = {8'd3, 8'd4}; y = {8'd2, 8'hFF}; din = '0; #1;
    checks++; if (dout !== {24'd10, 16'd5}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
