// ascon_tta64: the Ascon-TTA64 core, a 64-bit transport-triggered processor whose
// multiplier unit is replaced by the ASCON functional unit (ROTR64, KSBOX, GETBYTE,
// SETBYTE). Default configuration: 4 transport buses, dual ALU (ALU64 + ALU64_1),
// 32 x 64-bit register file, 2 x 1-bit boolean registers, LSU, GCU, immediate unit
// and a printf output unit, as in the source design's dual-ALU core.
//
// Execution: the host loads instructions (NBUS x 75 bits) through imem_*, data through
// the host port of the data memory, and pulses start. From then on one instruction
// executes per cycle, with no stalls: every move of the instruction reads its source
// (register, unit result, immediate) and writes a unit port at the clock edge. A move
// to a trigger port starts that unit's operation; its result is readable one cycle
// later. Results can be moved straight from one unit to another without passing the
// register file (software bypass). A halt move ends the run; running then falls.
// The instruction encoding, address map and unit operation sets are this design's
// own (see tta_pkg); the custom operations and the unit mix follow the source design.
module ascon_tta64
  import tta_pkg::*;
#(
  parameter int unsigned NBUS        = 4,
  parameter bit          DUAL_ALU    = 1'b1,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned DMEM_DEPTH  = 1024,
  localparam int unsigned IW         = NBUS * SLOT_W,
  localparam int unsigned IAW        = $clog2(IMEM_DEPTH),
  localparam int unsigned DAW        = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // program load
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_addr,
  input  logic [IW-1:0]  imem_wdata,
  // host port of the data memory
  input  logic           dmem_en,
  input  logic [7:0]     dmem_be,
  input  logic [DAW-1:0] dmem_addr,
  input  logic [63:0]    dmem_wdata,
  output logic [63:0]    dmem_rdata,
  // run control
  input  logic           start,
  output logic           running,
  output logic [IAW-1:0] pc,
  // printf output
  output logic           out_valid,
  output logic           out_char,
  output logic [63:0]    out_data
);
  logic [IW-1:0]    instr;
  logic [1:0]       bool_q;
  word_t            src_val [NSRC];
  logic [4:0]       rf_raddr [NBUS];
  word_t            rf_rdata [NBUS];
  logic [NBUS-1:0]  bus_en;
  logic [7:0]       bus_dst [NBUS];
  word_t            bus_val [NBUS];
  logic [NBUS-1:0]  limm_we;
  logic             limm_idx [NBUS];
  word_t            limm_d [NBUS];

  word_t alu0_r, alu1_r, asc_r, lsu_r, ra;
  word_t imu_q [2];

  // ---------------- fetch ----------------
  tta_imem #(.DEPTH(IMEM_DEPTH), .IW(IW)) u_imem (
    .clk, .we(imem_we), .waddr(imem_addr), .wdata(imem_wdata), .raddr(pc), .rdata(instr));

  // ---------------- transport buses ----------------
  always_comb begin
    for (int i = 0; i < NSRC; i++) src_val[i] = '0;
    src_val[S_B0]    = word_t'(bool_q[0]);
    src_val[S_B1]    = word_t'(bool_q[1]);
    src_val[S_ALU0]  = alu0_r;
    src_val[S_ALU1]  = alu1_r;
    src_val[S_ASCON] = asc_r;
    src_val[S_LSU]   = lsu_r;
    src_val[S_RA]    = ra;
    src_val[S_IMU0]  = imu_q[0];
    src_val[S_IMU1]  = imu_q[1];
  end

  tta_interconnect #(.NBUS(NBUS)) u_ic (
    .instr, .valid(running), .bool_q, .src_val, .rf_raddr, .rf_rdata,
    .bus_en, .bus_dst, .bus_val, .limm_we, .limm_idx, .limm_d);

  // ---------------- register files and immediate unit ----------------
  logic [NBUS-1:0] rf_we, b_we;
  logic [4:0]      rf_waddr [NBUS];
  logic            b_waddr  [NBUS];
  logic [NBUS-1:0] b_wdata;

  always_comb
    for (int b = 0; b < NBUS; b++) begin
      rf_we[b]    = bus_en[b] && (bus_dst[b][7:5] == 3'b000);
      rf_waddr[b] = bus_dst[b][4:0];
      b_we[b]     = bus_en[b] && (bus_dst[b][7:1] == D_B0[7:1]);
      b_waddr[b]  = bus_dst[b][0];
      b_wdata[b]  = bus_val[b][0];
    end

  tta_rf #(.DEPTH(32), .W(64), .NRD(NBUS), .NWR(NBUS)) u_rf (
    .clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(bus_val), .raddr(rf_raddr), .rdata(rf_rdata));

  tta_boolrf #(.DEPTH(2), .NWR(NBUS)) u_bool (
    .clk, .rst_n, .we(b_we), .waddr(b_waddr), .wdata(b_wdata), .q(bool_q));

  tta_imu #(.NREG(2), .NWR(NBUS)) u_imu (
    .clk, .rst_n, .we(limm_we), .idx(limm_idx), .d(limm_d), .q(imu_q));

  // ---------------- input sockets ----------------
  logic  alu0_o1_we, alu0_t_we, alu1_o1_we, alu1_t_we;
  logic  asc_o1_we, asc_o3_we, asc_t_we, lsu_o2_we, lsu_t_we, gcu_t_we, out_t_we;
  logic [3:0] alu0_op, alu1_op, asc_op, lsu_op, gcu_op, out_op, unused_op [7];
  word_t alu0_o1_d, alu0_t_d, alu1_o1_d, alu1_t_d, asc_o1_d, asc_o3_d, asc_t_d;
  word_t lsu_o2_d, lsu_t_d, gcu_t_d, out_t_d;

  tta_socket #(.NBUS(NBUS), .ID(D_ALU0_O1)) s_alu0_o1 (.bus_en, .bus_dst, .bus_val, .hit(alu0_o1_we), .op(unused_op[0]), .data(alu0_o1_d));
  tta_socket #(.NBUS(NBUS), .ID(D_ALU1_O1)) s_alu1_o1 (.bus_en, .bus_dst, .bus_val, .hit(alu1_o1_we), .op(unused_op[1]), .data(alu1_o1_d));
  tta_socket #(.NBUS(NBUS), .ID(D_ASC_O1))  s_asc_o1  (.bus_en, .bus_dst, .bus_val, .hit(asc_o1_we),  .op(unused_op[2]), .data(asc_o1_d));
  tta_socket #(.NBUS(NBUS), .ID(D_ASC_O3))  s_asc_o3  (.bus_en, .bus_dst, .bus_val, .hit(asc_o3_we),  .op(unused_op[3]), .data(asc_o3_d));
  tta_socket #(.NBUS(NBUS), .ID(D_LSU_O2))  s_lsu_o2  (.bus_en, .bus_dst, .bus_val, .hit(lsu_o2_we),  .op(unused_op[4]), .data(lsu_o2_d));
  tta_socket #(.NBUS(NBUS), .ID(D_ALU0_T), .MASK(TRIG_MASK)) s_alu0_t (.bus_en, .bus_dst, .bus_val, .hit(alu0_t_we), .op(alu0_op), .data(alu0_t_d));
  tta_socket #(.NBUS(NBUS), .ID(D_ALU1_T), .MASK(TRIG_MASK)) s_alu1_t (.bus_en, .bus_dst, .bus_val, .hit(alu1_t_we), .op(alu1_op), .data(alu1_t_d));
  tta_socket #(.NBUS(NBUS), .ID(D_ASC_T),  .MASK(TRIG_MASK)) s_asc_t  (.bus_en, .bus_dst, .bus_val, .hit(asc_t_we),  .op(asc_op),  .data(asc_t_d));
  tta_socket #(.NBUS(NBUS), .ID(D_LSU_T),  .MASK(TRIG_MASK)) s_lsu_t  (.bus_en, .bus_dst, .bus_val, .hit(lsu_t_we),  .op(lsu_op),  .data(lsu_t_d));
  tta_socket #(.NBUS(NBUS), .ID(D_GCU_T),  .MASK(TRIG_MASK)) s_gcu_t  (.bus_en, .bus_dst, .bus_val, .hit(gcu_t_we),  .op(gcu_op),  .data(gcu_t_d));
  tta_socket #(.NBUS(NBUS), .ID(D_OUT_T),  .MASK(TRIG_MASK)) s_out_t  (.bus_en, .bus_dst, .bus_val, .hit(out_t_we),  .op(out_op),  .data(out_t_d));

  // ---------------- functional units ----------------
  tta_alu #(.REDUCED(1'b0)) u_alu0 (
    .clk, .rst_n, .o1_we(alu0_o1_we), .o1_d(alu0_o1_d), .t_we(alu0_t_we), .t_op(alu0_op), .t_d(alu0_t_d), .r(alu0_r));

  if (DUAL_ALU) begin : g_alu1
    tta_alu #(.REDUCED(1'b1)) u_alu1 (
      .clk, .rst_n, .o1_we(alu1_o1_we), .o1_d(alu1_o1_d), .t_we(alu1_t_we), .t_op(alu1_op), .t_d(alu1_t_d), .r(alu1_r));
  end else begin : g_no_alu1
    assign alu1_r = '0;
  end

  ascon_fu u_ascon (
    .clk, .rst_n, .o1_we(asc_o1_we), .o1_d(asc_o1_d), .o3_we(asc_o3_we), .o3_d(asc_o3_d),
    .t_we(asc_t_we), .t_op(asc_op), .t_d(asc_t_d), .r(asc_r));

  logic              lsu_mem_en;
  logic [7:0]        lsu_mem_be;
  logic [DAW-1:0]    lsu_mem_addr;
  logic [63:0]       lsu_mem_wdata, lsu_mem_rdata;

  tta_lsu #(.AW(DAW + 3)) u_lsu (
    .clk, .rst_n, .o2_we(lsu_o2_we), .o2_d(lsu_o2_d), .t_we(lsu_t_we), .t_op(lsu_op), .t_d(lsu_t_d), .r(lsu_r),
    .mem_en(lsu_mem_en), .mem_be(lsu_mem_be), .mem_addr(lsu_mem_addr), .mem_wdata(lsu_mem_wdata), .mem_rdata(lsu_mem_rdata));

  tta_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .a_en(lsu_mem_en), .a_be(lsu_mem_be), .a_addr(lsu_mem_addr), .a_wdata(lsu_mem_wdata), .a_rdata(lsu_mem_rdata),
    .b_en(dmem_en), .b_be(dmem_be), .b_addr(dmem_addr), .b_wdata(dmem_wdata), .b_rdata(dmem_rdata));

  tta_gcu #(.IAW(IAW)) u_gcu (
    .clk, .rst_n, .start, .t_we(gcu_t_we), .t_op(gcu_op), .t_d(gcu_t_d), .pc, .ra, .running);

  tta_stdout u_out (
    .clk, .rst_n, .t_we(out_t_we), .t_op(out_op), .t_d(out_t_d), .out_valid, .out_char, .out_data);
endmodule
