// tb_tta_interconnect: self-checking test of the transport-bus decode. Random
// 4-slot instructions with every guard form, register, unit and immediate sources,
// random boolean registers and valid; bus enables, destinations, values and
// long-immediate writes are compared with a model written from the slot layout.
module tb_tta_interconnect;
  import tta_pkg::*;
  localparam int NB = 4;
  logic [NB*SLOT_W-1:0] instr;
  logic valid;
  logic [1:0] bool_q;
  word_t src_val [NSRC];
  logic [4:0] rf_raddr [NB];
  word_t rf_rdata [NB];
  logic [NB-1:0] bus_en, limm_we;
  logic [7:0] bus_dst [NB];
  word_t bus_val [NB];
  logic limm_idx [NB];
  word_t limm_d [NB];
  word_t regs [32];
  int checks = 0, failures = 0;

  tta_interconnect #(.NBUS(NB)) dut (.*);

  // register file model answering the read addresses
  always_comb for (int b = 0; b < NB; b++) rf_rdata[b] = regs[rf_raddr[b]];

  initial begin
    #200000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SLOT_W-1:0] s;
    logic [2:0] g;
    bit en;
    word_t v;
    for (int i = 0; i < 32; i++) regs[i] = {$urandom, $urandom};
    for (int i = 0; i < NSRC; i++) src_val[i] = {$urandom, $urandom};
    for (int k = 0; k < 4000; k++) begin
      valid = ($urandom_range(0, 7) != 0);
      bool_q = 2'($urandom);
      for (int b = 0; b < NB; b++) begin
        for (int j = 0; j < SLOT_W; j += 25) s[j +: 25] = 25'($urandom);
        instr[b*SLOT_W +: SLOT_W] = s;
      end
      #1;
      for (int b = 0; b < NB; b++) begin
        s = instr[b*SLOT_W +: SLOT_W];
        g = s[74:72];
        case (g)
          3'd0: en = 1;
          3'd1: en = bool_q[0];
          3'd2: en = !bool_q[0];
          3'd3: en = bool_q[1];
          3'd4: en = !bool_q[1];
          default: en = 0;
        endcase
        en = en && valid;
        if (s[63]) v = {{32{s[31]}}, s[31:0]};
        else if (s[5]) v = src_val[s[5:0]];
        else v = regs[s[4:0]];
        checks++;
        if (bus_en[b] !== en || bus_dst[b] !== s[71:64] || (en && bus_val[b] !== v)) begin
          failures++; $display("FAIL bus %0d: en %b/%b dst %h/%h val %h/%h", b, bus_en[b], en, bus_dst[b], s[71:64], bus_val[b], v);
        end
        checks++;
        if (limm_we[b] !== (valid && g == 3'd7) || (g == 3'd7 && (limm_d[b] !== s[63:0] || limm_idx[b] !== s[64]))) begin
          failures++; $display("FAIL long immediate slot %0d", b);
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
