// tta_socket: input socket of one unit port. It watches all NBUS transport buses and
// raises hit when an active move's destination matches ID under MASK (MASK = 8'hFF
// for an operand or register port, 8'hF0 for a trigger port whose low four
// destination bits are the opcode). data and op come from the matching bus. Two
// moves to one port in one instruction are a program error (asserted); the
// highest-numbered bus then wins. Full bus connectivity is this design's choice.
module tta_socket
  import tta_pkg::*;
#(
  parameter int unsigned NBUS = 4,
  parameter logic [7:0]  ID   = 8'h00,
  parameter logic [7:0]  MASK = 8'hFF
) (
  input  logic [NBUS-1:0] bus_en,
  input  logic [7:0]      bus_dst [NBUS],
  input  word_t           bus_val [NBUS],
  output logic            hit,
  output logic [3:0]      op,
  output word_t           data
);
  logic [NBUS-1:0] m;

  always_comb begin
    hit  = 1'b0;
    op   = '0;
    data = '0;
    for (int b = 0; b < NBUS; b++) begin
      m[b] = bus_en[b] && ((bus_dst[b] & MASK) == ID);
      if (m[b]) begin
        hit  = 1'b1;
        op   = bus_dst[b][3:0];
        data = bus_val[b];
      end
    end
  end

  always_comb assert (!(|(m & (m - 1'b1)))) else $error("tta_socket %h: two moves in one cycle", ID);
endmodule
