// ascon_fu: the ASCON functional unit, holding the four custom Ascon operations.
//
//   ROTR64  : O = I1 rotated right by (I2 & 63)               (linear layer)
//   KSBOX   : O = I1 ^ (~I2 & I3)                            (substitution layer)
//   GETBYTE : O = byte I2 of I1, byte 0 = most significant, zero-extended
//   SETBYTE : O = I1 << (56 - 8*I2)                           (byte load/store/clear)
//
// The operations and their 1-cycle latency follow the source design. Port roles are
// this design's choice: I1 and I3 are operand registers (o1, o3), I2 is the trigger
// port (t), which also carries the opcode. Writing the trigger starts the operation;
// an operand written in the same cycle as the trigger is used by it. The result
// register r holds the value from the cycle after the trigger until the next trigger.
// Only I2[2:0] is used by GETBYTE/SETBYTE; SETBYTE shifts all of I1, unmasked.
module ascon_fu
  import tta_pkg::*;
#(
  parameter int unsigned LATENCY = 1  // fixed at 1 (Table of custom operations)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  o1_we,
  input  word_t o1_d,
  input  logic  o3_we,
  input  word_t o3_d,
  input  logic  t_we,
  input  logic [3:0] t_op,
  input  word_t t_d,
  output word_t r
);
  word_t o1_q, o3_q, in1, in3, res;
  logic [5:0] sh;

  assign in1 = o1_we ? o1_d : o1_q;
  assign in3 = o3_we ? o3_d : o3_q;

  always_comb begin
    sh = 6'd56 - {t_d[2:0], 3'b000};
    unique case (asc_op_e'(t_op))
      ASC_ROTR64:  res = (in1 >> t_d[5:0]) | (in1 << ((~t_d[5:0] + 6'd1) & 6'd63));
      ASC_KSBOX:   res = in1 ^ (~t_d & in3);
      ASC_GETBYTE: res = {56'd0, 8'(in1 >> sh)};
      ASC_SETBYTE: res = in1 << sh;
      default:     res = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q <= '0;
      o3_q <= '0;
      r    <= '0;
    end else begin
      if (o1_we) o1_q <= o1_d;
      if (o3_we) o3_q <= o3_d;
      if (t_we)  r    <= res;
    end
  end

  initial assert (LATENCY == 1) else $error("ascon_fu: only LATENCY=1 is built");
endmodule
