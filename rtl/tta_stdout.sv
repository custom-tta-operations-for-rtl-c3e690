// tta_stdout: output functional unit behind printf. A move to its trigger port emits
// the value on the output port in the next cycle: op 0 a 64-bit word, op 1 a
// character (low 8 bits). out_valid is high for exactly one cycle per trigger. A
// registered output strobe is this design's choice; the source design only says
// the core has an FU for printf.
module tta_stdout
  import tta_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      t_we,
  input  logic [3:0] t_op,
  input  word_t     t_d,
  output logic      out_valid,
  output logic      out_char,
  output word_t     out_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_char  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= t_we;
      if (t_we) begin
        out_char <= (out_op_e'(t_op) == OUT_CHAR);
        out_data <= (out_op_e'(t_op) == OUT_CHAR) ? {56'd0, t_d[7:0]} : t_d;
      end
    end
  end
endmodule
