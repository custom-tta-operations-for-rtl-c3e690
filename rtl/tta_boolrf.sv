// tta_boolrf: boolean register file (2 x 1 bit in the source design). Each of the NWR
// write ports stores bit 0 of a bus value at the clock edge; the registers are read
// in parallel by the move guards, so a boolean written in cycle t guards moves from
// cycle t+1. Highest-numbered port wins a same-register conflict. Reset to zero.
module tta_boolrf #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned NWR   = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NWR-1:0]  we,
  input  logic [AW-1:0]   waddr [NWR],
  input  logic [NWR-1:0]  wdata,
  output logic [DEPTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else
      for (int p = 0; p < NWR; p++)
        if (we[p]) q[waddr[p]] <= wdata[p];
  end
endmodule
