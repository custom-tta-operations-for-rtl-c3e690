// tta_alu: 64-bit arithmetic-logic functional unit (ALU64, and ALU64_1 when REDUCED=1).
//
// Operand port o1 holds in1; the trigger port t carries in2 and the opcode. The result
// in1 <op> in2 is registered and readable from the cycle after the trigger
// (latency 1). An operand written in the same cycle as the trigger is used by it.
// Operations: add, sub, and, ior, xor, shl, shr (arithmetic), shru, eq, gt, gtu;
// compares return 0 or 1. The source design names only typical operations (add, or,
// xor, shift ...) and says the second ALU holds a subset of the frequent ones: the
// exact operation list, and the REDUCED subset (add, sub, and, ior, xor, shl, shru),
// are this design's choice. Opcodes a unit does not implement return 0.
module tta_alu
  import tta_pkg::*;
#(
  parameter bit REDUCED = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  o1_we,
  input  word_t o1_d,
  input  logic  t_we,
  input  logic [3:0] t_op,
  input  word_t t_d,
  output word_t r
);
  word_t o1_q, in1, res;
  logic  supported;

  assign in1 = o1_we ? o1_d : o1_q;

  always_comb begin
    unique case (alu_op_e'(t_op))
      ALU_ADD, ALU_SUB, ALU_AND, ALU_IOR, ALU_XOR, ALU_SHL, ALU_SHRU: supported = 1'b1;
      ALU_SHR, ALU_EQ, ALU_GT, ALU_GTU: supported = !REDUCED;
      default: supported = 1'b0;
    endcase
  end

  always_comb begin
    unique case (alu_op_e'(t_op))
      ALU_ADD:  res = in1 + t_d;
      ALU_SUB:  res = in1 - t_d;
      ALU_AND:  res = in1 & t_d;
      ALU_IOR:  res = in1 | t_d;
      ALU_XOR:  res = in1 ^ t_d;
      ALU_SHL:  res = in1 << t_d[5:0];
      ALU_SHR:  res = word_t'($signed(in1) >>> t_d[5:0]);
      ALU_SHRU: res = in1 >> t_d[5:0];
      ALU_EQ:   res = word_t'(in1 == t_d);
      ALU_GT:   res = word_t'($signed(in1) > $signed(t_d));
      ALU_GTU:  res = word_t'(in1 > t_d);
      default:  res = '0;
    endcase
    if (!supported) res = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q <= '0;
      r    <= '0;
    end else begin
      if (o1_we) o1_q <= o1_d;
      if (t_we)  r    <= res;
    end
  end
endmodule
