// tta_lsu: load-store unit. The trigger port t carries the byte address and the
// opcode; operand port o2 carries store data (an operand written in the trigger's
// cycle is used). Operations: ld64, st64 (address bits 2:0 ignored), ld8u, st8, with
// little-endian byte lanes (byte address a selects bits 8*(a%8) +: 8). A load
// triggered in cycle t has its result on r in cycle t+1 (one synchronous memory
// read, latency 1); r holds it until the next load. The operation set, byte order
// and latency are this design's choice: the source design only calls it a classic LSU.
module tta_lsu
  import tta_pkg::*;
#(
  parameter int unsigned AW = 13,            // byte address width
  localparam int unsigned WAW = AW - 3       // word address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           o2_we,
  input  word_t          o2_d,
  input  logic           t_we,
  input  logic [3:0]     t_op,
  input  word_t          t_d,
  output word_t          r,
  output logic           mem_en,
  output logic [7:0]     mem_be,
  output logic [WAW-1:0] mem_addr,
  output logic [63:0]    mem_wdata,
  input  logic [63:0]    mem_rdata
);
  word_t o2_q, sdata;
  logic  byte_ld_q;
  logic [2:0] lane_q;

  assign sdata     = o2_we ? o2_d : o2_q;
  assign mem_en    = t_we;
  assign mem_addr  = t_d[AW-1:3];

  always_comb begin
    mem_be    = '0;
    mem_wdata = sdata;
    unique case (lsu_op_e'(t_op))
      LSU_ST64: mem_be = 8'hFF;
      LSU_ST8: begin
        mem_be    = 8'b1 << t_d[2:0];
        mem_wdata = {8{sdata[7:0]}};
      end
      default: mem_be = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o2_q      <= '0;
      byte_ld_q <= 1'b0;
      lane_q    <= '0;
    end else begin
      if (o2_we) o2_q <= o2_d;
      if (t_we && (lsu_op_e'(t_op) == LSU_LD64 || lsu_op_e'(t_op) == LSU_LD8U)) begin
        byte_ld_q <= (lsu_op_e'(t_op) == LSU_LD8U);
        lane_q    <= t_d[2:0];
      end
    end
  end

  assign r = byte_ld_q ? {56'd0, mem_rdata[8*lane_q +: 8]} : mem_rdata;
endmodule
