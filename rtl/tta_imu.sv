// tta_imu: immediate unit holding long immediates. A move slot whose guard field
// selects the long-immediate form carries a full 64-bit constant instead of a move;
// the interconnect passes it here with the target register index, and it is
// readable as a bus source from the next instruction on. Short (32-bit) immediates
// do not pass through this unit. The slot form and NREG are this design's choice;
// the source design only names the unit. Highest-numbered slot wins a conflict.
module tta_imu
  import tta_pkg::*;
#(
  parameter int unsigned NREG = 2,
  parameter int unsigned NWR  = 4,
  localparam int unsigned AW  = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NWR-1:0] we,
  input  logic [AW-1:0]  idx [NWR],
  input  word_t          d   [NWR],
  output word_t          q   [NREG]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) q[i] <= '0;
    end else begin
      for (int p = 0; p < NWR; p++)
        if (we[p]) q[idx[p]] <= d[p];
    end
  end
endmodule
