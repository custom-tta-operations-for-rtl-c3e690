// tta_rf: general-purpose register file, DEPTH x W (32 x 64 bits as in the source
// design). NRD combinational read ports serve bus sources; NWR write ports take moves
// to the register file and update it at the clock edge, so a value written in cycle t
// is readable in cycle t+1. The port counts (one of each per transport bus) are this
// design's choice; when several ports write the same register in one cycle the
// highest-numbered port wins. Registers reset to zero.
module tta_rf #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 64,
  parameter int unsigned NRD   = 4,
  parameter int unsigned NWR   = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NWR-1:0] we,
  input  logic [AW-1:0] waddr [NWR],
  input  logic [W-1:0]  wdata [NWR],
  input  logic [AW-1:0] raddr [NRD],
  output logic [W-1:0]  rdata [NRD]
);
  logic [W-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < NWR; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++) rdata[p] = regs[raddr[p]];
endmodule
