// emc_alu: one of the two integer ALUs of the EMC back end.
//
// Executes the integer subset the EMC supports: add, subtract, move, and, or,
// xor, not, shifts and sign-extension. For loads and stores it generates the
// address (src1 + src2 for a load when src2 is present, src1 for a store),
// and for a branch it computes the direction so the engine can compare it with
// the core's prediction. Purely combinational; the engine registers the result
// and broadcasts it on the common data bus in the following cycle.
// The operation list follows the document; the encodings, the sign-extend
// width selection and the two branch conditions are this design's choices.
module emc_alu
  import emc_pkg::*;
(
  input  op_e             op,
  input  logic [XLEN-1:0] a,        // source 1 value
  input  logic [XLEN-1:0] b,        // source 2 value
  input  logic            b_vld,    // source 2 present
  output logic [XLEN-1:0] result,   // ALU result or memory address
  output logic            taken     // branch outcome
);
  always_comb begin
    result = '0;
    taken  = 1'b0;
    unique case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_MOV:  result = a;
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_NOT:  result = ~a;
      OP_SHL:  result = a << b[5:0];
      OP_SHR:  result = a >> b[5:0];
      OP_SAR:  result = $signed(a) >>> b[5:0];
      OP_SEXT: begin
        unique case (b[1:0])
          2'd0:    result = {{(XLEN-8){a[7]}},  a[7:0]};
          2'd1:    result = {{(XLEN-16){a[15]}}, a[15:0]};
          default: result = {{(XLEN-32){a[31]}}, a[31:0]};
        endcase
      end
      OP_LD:   result = b_vld ? a + b : a;
      OP_ST:   result = a;
      OP_BEQ:  taken  = (a == b);
      OP_BNE:  taken  = (a != b);
      default: result = '0;
    endcase
  end
endmodule
