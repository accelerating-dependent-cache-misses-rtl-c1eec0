// tb_emc_alu: self-checking test of the EMC integer ALU.
// Drives random operands through every operation and compares with a
// reference written independently with plain SystemVerilog operators.
module tb_emc_alu;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  op_e op; logic [63:0] a, b, r; logic bv, t;
  emc_alu dut (.op(op), .a(a), .b(b), .b_vld(bv), .result(r), .taken(t));

  function automatic logic [64:0] ref_model(op_e o, logic [63:0] x, logic [63:0] y, logic yv);
    logic [63:0] res; logic tk;
    res = 0; tk = 0;
    case (o)
      OP_ADD: res = x + y;
      OP_SUB: res = x - y;
      OP_MOV: res = x;
      OP_AND: res = x & y;
      OP_OR:  res = x | y;
      OP_XOR: res = x ^ y;
      OP_NOT: res = ~x;
      OP_SHL: res = x << (y % 64);
      OP_SHR: res = x >> (y % 64);
      OP_SAR: res = 64'($signed(x) >>> (y % 64));
      OP_SEXT: res = (y[1:0] == 0) ? 64'(signed'(x[7:0])) : (y[1:0] == 1) ? 64'(signed'(x[15:0])) : 64'(signed'(x[31:0]));
      OP_LD:  res = yv ? x + y : x;
      OP_ST:  res = x;
      OP_BEQ: tk = (x == y);
      OP_BNE: tk = (x != y);
      default: ;
    endcase
    return {tk, res};
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = op_e'($urandom_range(0, 15));
      a = {$urandom, $urandom};
      b = (i % 3 == 0) ? a : {$urandom, $urandom};
      if (op inside {OP_SHL, OP_SHR, OP_SAR}) b = 64'($urandom_range(0, 63));
      bv = $urandom_range(0, 1);
      #1;
      checks++;
      if ({t, r} !== ref_model(op, a, b, bv)) begin
        failures++;
        if (failures < 5) $display("FAIL op=%s a=%h b=%h r=%h t=%b", op.name(), a, b, r, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
