// tta_interconnect: the transport buses. For each of the NBUS 75-bit move slots of
// the executing instruction it evaluates the guard against the boolean registers,
// and drives the bus with the source value: a sign-extended 32-bit short immediate,
// a register-file read port (one per bus, address = source id), or a unit output
// socket selected from src_val by source id. bus_en is high for a move that
// executes; a slot in the long-immediate form instead raises limm_we and hands its
// 64-bit payload to the immediate unit. Everything is combinational: moves are
// committed at the next clock edge by the units. Slot layout: see tta_pkg.
module tta_interconnect
  import tta_pkg::*;
#(
  parameter int unsigned NBUS = 4
) (
  input  logic [NBUS*SLOT_W-1:0] instr,
  input  logic                   valid,
  input  logic [1:0]             bool_q,
  input  word_t                  src_val [NSRC],
  output logic [4:0]             rf_raddr [NBUS],
  input  word_t                  rf_rdata [NBUS],
  output logic [NBUS-1:0]        bus_en,
  output logic [7:0]             bus_dst [NBUS],
  output word_t                  bus_val [NBUS],
  output logic [NBUS-1:0]        limm_we,
  output logic                   limm_idx [NBUS],
  output word_t                  limm_d [NBUS]
);
  slot_t s [NBUS];

  // register-file read addresses kept apart from the bus drive below
  always_comb
    for (int b = 0; b < NBUS; b++) rf_raddr[b] = instr[b*SLOT_W +: 5];

  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      s[b]        = slot_t'(instr[b*SLOT_W +: SLOT_W]);
      bus_dst[b]  = s[b].dst;
      limm_idx[b] = s[b].dst[0];
      limm_d[b]   = {s[b].imm, s[b].src};
      limm_we[b]  = valid && (s[b].guard == G_LIMM);
      unique case (s[b].guard)
        G_ALWAYS: bus_en[b] = valid;
        G_B0:     bus_en[b] = valid &&  bool_q[0];
        G_NB0:    bus_en[b] = valid && !bool_q[0];
        G_B1:     bus_en[b] = valid &&  bool_q[1];
        G_NB1:    bus_en[b] = valid && !bool_q[1];
        default:  bus_en[b] = 1'b0;
      endcase
      if (s[b].imm)
        bus_val[b] = {{32{s[b].src[31]}}, s[b].src[31:0]};
      else if (s[b].src[5] == 1'b0)
        bus_val[b] = rf_rdata[b];
      else
        bus_val[b] = src_val[s[b].src[5:0]];
    end
  end
endmodule
