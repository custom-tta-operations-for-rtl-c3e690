// tta_dmem: data memory of DEPTH 64-bit words with per-byte write enables and two
// synchronous ports: port A serves the load-store unit, port B the host (program
// data in, results out). A read (en with no byte enable) returns the word in the
// next cycle and the read register holds it until the next read on that port; a
// write updates the addressed bytes at the clock edge. Writes of both ports to the
// same word in one cycle are not allowed. Size and the host port are this design's
// choice; the source design gives no memory sizes.
module tta_dmem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic [7:0]    a_be,
  input  logic [AW-1:0] a_addr,
  input  logic [63:0]   a_wdata,
  output logic [63:0]   a_rdata,
  input  logic          b_en,
  input  logic [7:0]    b_be,
  input  logic [AW-1:0] b_addr,
  input  logic [63:0]   b_wdata,
  output logic [63:0]   b_rdata
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int i = 0; i < 8; i++)
        if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      if (a_be == '0) a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      for (int i = 0; i < 8; i++)
        if (b_be[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
      if (b_be == '0) b_rdata <= mem[b_addr];
    end
  end

  always_ff @(posedge clk)
    assert (!(a_en && b_en && a_addr == b_addr && |a_be && |b_be))
      else $error("tta_dmem: both ports write word %0d", a_addr);
endmodule
