// tta_pkg: shared widths, move-slot layout, unit address map and opcodes of the
// Ascon-TTA64 transport-triggered core.
//
// A TTA instruction is NBUS move slots of SLOT_W = 75 bits, one per transport bus
// (the 75-bit-per-bus instruction width follows the source design; the field layout
// below is this design's own):
//   [74:72] guard  : 0 always, 1 b0, 2 !b0, 3 b1, 4 !b1, 5/6 never (nop),
//                    7 long immediate (the slot writes [63:0] into IMU register [64])
//   [71:64] dst    : destination port id
//   [63]    imm    : source is a short immediate
//   [62:0]  src    : source id in [5:0], or a 32-bit short immediate in [31:0]
//                    (sign-extended)
// Destination ids: 0x00-0x1F RF write, 0x20-0x21 boolean RF write, 0x40.. operand
// ports, 0x80 | unit<<4 | opcode trigger ports.
package tta_pkg;
  localparam int unsigned W      = 64;
  localparam int unsigned SLOT_W = 75;
  localparam int unsigned NSRC   = 64;

  typedef logic [W-1:0] word_t;

  typedef enum logic [2:0] {
    G_ALWAYS = 3'd0, G_B0 = 3'd1, G_NB0 = 3'd2, G_B1 = 3'd3, G_NB1 = 3'd4,
    G_NEV5 = 3'd5, G_NOP = 3'd6, G_LIMM = 3'd7
  } guard_e;

  typedef struct packed {
    guard_e      guard;
    logic [7:0]  dst;
    logic        imm;
    logic [62:0] src;
  } slot_t;

  // source ids
  localparam logic [5:0] S_RF0   = 6'h00;  // 0x00..0x1F registers
  localparam logic [5:0] S_B0    = 6'h20;
  localparam logic [5:0] S_B1    = 6'h21;
  localparam logic [5:0] S_ALU0  = 6'h28;
  localparam logic [5:0] S_ALU1  = 6'h29;
  localparam logic [5:0] S_ASCON = 6'h2A;
  localparam logic [5:0] S_LSU   = 6'h2B;
  localparam logic [5:0] S_RA    = 6'h2C;
  localparam logic [5:0] S_IMU0  = 6'h30;
  localparam logic [5:0] S_IMU1  = 6'h31;

  // destination ids
  localparam logic [7:0] D_RF0     = 8'h00;
  localparam logic [7:0] D_B0      = 8'h20;
  localparam logic [7:0] D_B1      = 8'h21;
  localparam logic [7:0] D_ALU0_O1 = 8'h40;
  localparam logic [7:0] D_ALU1_O1 = 8'h41;
  localparam logic [7:0] D_ASC_O1  = 8'h42;
  localparam logic [7:0] D_ASC_O3  = 8'h43;
  localparam logic [7:0] D_LSU_O2  = 8'h44;
  localparam logic [7:0] D_ALU0_T  = 8'h80;
  localparam logic [7:0] D_ALU1_T  = 8'h90;
  localparam logic [7:0] D_ASC_T   = 8'hA0;
  localparam logic [7:0] D_LSU_T   = 8'hB0;
  localparam logic [7:0] D_GCU_T   = 8'hC0;
  localparam logic [7:0] D_OUT_T   = 8'hD0;
  localparam logic [7:0] TRIG_MASK = 8'hF0;
  localparam logic [7:0] D_NONE    = 8'hFF;

  // ALU opcodes
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_AND = 4'd2, ALU_IOR = 4'd3, ALU_XOR = 4'd4,
    ALU_SHL = 4'd5, ALU_SHR = 4'd6, ALU_SHRU = 4'd7, ALU_EQ = 4'd8, ALU_GT = 4'd9,
    ALU_GTU = 4'd10
  } alu_op_e;

  // ASCON FU opcodes
  typedef enum logic [3:0] {
    ASC_ROTR64 = 4'd0, ASC_KSBOX = 4'd1, ASC_GETBYTE = 4'd2, ASC_SETBYTE = 4'd3
  } asc_op_e;

  // LSU opcodes
  typedef enum logic [3:0] {
    LSU_LD64 = 4'd0, LSU_ST64 = 4'd1, LSU_LD8U = 4'd2, LSU_ST8 = 4'd3
  } lsu_op_e;

  // GCU opcodes
  typedef enum logic [3:0] {
    GCU_JUMP = 4'd0, GCU_CALL = 4'd1, GCU_HALT = 4'd2
  } gcu_op_e;

  // stdout opcodes
  typedef enum logic [3:0] {
    OUT_WORD = 4'd0, OUT_CHAR = 4'd1
  } out_op_e;
endpackage
