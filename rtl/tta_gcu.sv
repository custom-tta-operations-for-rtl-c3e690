// tta_gcu: global control unit. Holds the program counter and the run state. A start
// pulse while idle begins execution at address 0. Each cycle while running, the
// instruction at pc executes and pc advances by one, unless a move triggers the GCU:
//   jump (op 0): pc <= t_d                        (no delay slots)
//   call (op 1): ra <= pc + 1, pc <= t_d           (return = move ra to jump)
//   halt (op 2): stop; running falls after this instruction
// The operation set, zero delay slots and halt are this design's choice; the source
// design names the unit only.
module tta_gcu
  import tta_pkg::*;
#(
  parameter int unsigned IAW = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           t_we,
  input  logic [3:0]     t_op,
  input  word_t          t_d,
  output logic [IAW-1:0] pc,
  output word_t          ra,
  output logic           running
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      ra      <= '0;
      running <= 1'b0;
    end else if (!running) begin
      if (start) begin
        pc      <= '0;
        running <= 1'b1;
      end
    end else begin
      pc <= pc + 1'b1;
      if (t_we) begin
        unique case (gcu_op_e'(t_op))
          GCU_JUMP: pc <= t_d[IAW-1:0];
          GCU_CALL: begin
            pc <= t_d[IAW-1:0];
            ra <= {{(W-IAW){1'b0}}, pc + 1'b1};
          end
          GCU_HALT: running <= 1'b0;
          default: ;
        endcase
      end
    end
  end
endmodule
