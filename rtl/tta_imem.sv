// tta_imem: instruction memory of DEPTH long instruction words of IW bits (NBUS move
// slots of 75 bits). The host writes it through we/waddr/wdata; the fetch port reads
// combinationally, so the word at raddr executes in the same cycle. Depth is this
// design's choice.
module tta_imem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned IW    = 300,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
