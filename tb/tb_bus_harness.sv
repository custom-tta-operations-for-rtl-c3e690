// tb_bus_harness: runs the Ascon permutation (12 rounds, fully unrolled) on one
// configuration of the Ascon-TTA64 core, NB transport buses with or without the
// second ALU, and reports the cycle count. Used by tb_ascon_bus_sweep.
//
// The program is produced by a greedy in-order list scheduler in this file. Each
// operation (unit, opcode, sources, destination register) gets the earliest trigger
// cycle at which there is a free bus for its trigger move, its operand moves (each in
// a cycle after the unit's previous trigger and no later than its own), and its
// result move one cycle after the trigger. Register true, anti and output
// dependences are tracked by cycle. XORs go to whichever ALU can start them first.
// Sources are registers and short immediates only: no unit-to-unit bypass, so the
// schedule is conservative. The harness checks the final state in data memory
// against a reference permutation and the run length against the schedule.
//
// With CUSTOM cleared the same permutation is built from general ALU operations only,
// as on a core without the ASCON unit: KSBOX becomes xor with all ones, and, xor
// (three operations) and ROTR64 becomes shru, shl, ior (three operations). The
// ASCON unit then stays idle. This measures what the custom operations save.
module tb_bus_harness #(
  parameter int NB   = 4,
  parameter bit DUAL = 1'b1,
  parameter bit CUSTOM = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles
);
  import tta_pkg::*;
  localparam int IW   = NB * SLOT_W;
  localparam int MAXC = 4096;
  localparam int AW   = $clog2(MAXC);

  logic imem_we;
  logic [AW-1:0] imem_addr;
  logic [IW-1:0] imem_wdata;
  logic dmem_en;
  logic [7:0] dmem_be;
  logic [9:0] dmem_addr;
  logic [63:0] dmem_wdata, dmem_rdata;
  logic start, running, out_valid, out_char;
  logic [AW-1:0] pc;
  logic [63:0] out_data;

  ascon_tta64 #(.NBUS(NB), .DUAL_ALU(DUAL), .IMEM_DEPTH(MAXC)) dut (.*);

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL NB=%0d DUAL=%0d CUSTOM=%0d %s: got %h exp %h", NB, DUAL, CUSTOM, what, got, exp); end
  endtask

  // ------------------------------------------------------------ assembler
  typedef logic [SLOT_W-1:0] s_t;
  logic [IW-1:0] prog [$];

  function automatic s_t nop();
    return {G_NOP, D_NONE, 1'b0, 63'd0};
  endfunction
  function automatic s_t gmv(guard_e g, logic [5:0] src, logic [7:0] dst);
    return {g, dst, 1'b0, 57'd0, src};
  endfunction
  function automatic s_t mv(logic [5:0] src, logic [7:0] dst);
    return gmv(G_ALWAYS, src, dst);
  endfunction
  function automatic s_t gmi(guard_e g, int imm, logic [7:0] dst);
    return {g, dst, 1'b1, 31'd0, imm};
  endfunction
  function automatic s_t mi(int imm, logic [7:0] dst);
    return gmi(G_ALWAYS, imm, dst);
  endfunction
  function automatic s_t li(bit idx, logic [63:0] v);
    return {G_LIMM, 7'd0, idx, v};
  endfunction
  function automatic logic [5:0] R(int n);  return 6'(n); endfunction
  function automatic logic [7:0] RD(int n); return 8'(n); endfunction
  function automatic logic [7:0] T(logic [7:0] unit, logic [3:0] op); return unit | {4'd0, op}; endfunction
  // ------------------------------------------------------------ reference
  typedef logic [63:0] st_t [5];
  localparam logic [4:0] SBOX [32] = '{5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
                                       5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
                                       5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
                                       5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17};
  function automatic logic [63:0] ror(logic [63:0] x, int n);
    return (x >> n) | (x << (64 - n));
  endfunction
  function automatic void ref_perm(ref st_t x, input int rounds);
    logic [4:0] col;
    for (int r = 12 - rounds; r < 12; r++) begin
      x[2] ^= 64'(((15 - r) << 4) | r);
      for (int b = 0; b < 64; b++) begin
        col = SBOX[{x[0][b], x[1][b], x[2][b], x[3][b], x[4][b]}];
        {x[0][b], x[1][b], x[2][b], x[3][b], x[4][b]} = col;
      end
      x[0] ^= ror(x[0], 19) ^ ror(x[0], 28);
      x[1] ^= ror(x[1], 61) ^ ror(x[1], 39);
      x[2] ^= ror(x[2], 1)  ^ ror(x[2], 6);
      x[3] ^= ror(x[3], 10) ^ ror(x[3], 17);
      x[4] ^= ror(x[4], 7)  ^ ror(x[4], 41);
    end
  endfunction

  // ------------------------------------------------------------ scheduler
  typedef struct { bit imm; int v; } src_t;
  s_t sched [MAXC][NB];
  int nused [MAXC];
  int reg_ready [32], reg_last_read [32], reg_last_write [32];
  int unit_last_trig [4];
  int last_cycle;

  function automatic src_t RG(int r);  src_t s; s.imm = 0; s.v = r; return s; endfunction
  function automatic src_t IM(int v);  src_t s; s.imm = 1; s.v = v; return s; endfunction
  function automatic int rdy(src_t s); return s.imm ? 0 : reg_ready[s.v]; endfunction
  function automatic s_t smove(src_t s, logic [7:0] dst);
    return s.imm ? mi(s.v, dst) : mv(R(s.v), dst);
  endfunction
  function automatic void note_read(src_t s, int c);
    if (!s.imm && c > reg_last_read[s.v]) reg_last_read[s.v] = c;
  endfunction
  function automatic void put(int c, s_t s);
    sched[c][nused[c]] = s;
    nused[c]++;
    if (c > last_cycle) last_cycle = c;
  endfunction

  // earliest trigger cycle of an operation on unit u (0 ALU64, 1 ALU64_1, 2 ASCON,
  // 3 LSU); with commit set, the moves are placed
  function automatic int place(bit commit, int u, logic [3:0] opc, bit has_a, src_t a, src_t b,
                               bit has_c, src_t c, int dst);
    logic [7:0] d_a, d_c, d_t;
    logic [5:0] s_r;
    int t, ca, cc, w;
    case (u)
      0: begin d_a = D_ALU0_O1; d_t = D_ALU0_T; s_r = S_ALU0; d_c = D_NONE; end
      1: begin d_a = D_ALU1_O1; d_t = D_ALU1_T; s_r = S_ALU1; d_c = D_NONE; end
      2: begin d_a = D_ASC_O1;  d_t = D_ASC_T;  s_r = S_ASCON; d_c = D_ASC_O3; end
      default: begin d_a = D_LSU_O2; d_t = D_LSU_T; s_r = S_LSU; d_c = D_NONE; end
    endcase
    t = unit_last_trig[u] + 1;
    if (rdy(b) > t) t = rdy(b);
    for (;; t++) begin
      if (nused[t] >= NB) continue;
      ca = -1; cc = -1;
      if (has_a) begin
        for (int k = t; k > unit_last_trig[u] && k >= rdy(a); k--)
          if (nused[k] + (k == t ? 1 : 0) < NB) begin ca = k; break; end
        if (ca < 0) continue;
      end
      if (has_c) begin
        for (int k = t; k > unit_last_trig[u] && k >= rdy(c); k--)
          if (nused[k] + (k == t ? 1 : 0) + (k == ca ? 1 : 0) < NB) begin cc = k; break; end
        if (cc < 0) continue;
      end
      if (dst >= 0) begin
        w = t + 1;
        if (nused[w] >= NB || reg_last_read[dst] > w || reg_last_write[dst] >= w) continue;
      end
      break;
    end
    if (commit) begin
      put(t, smove(b, d_t | {4'd0, opc}));
      note_read(b, t);
      if (has_a) begin put(ca, smove(a, d_a)); note_read(a, ca); end
      if (has_c) begin put(cc, smove(c, d_c)); note_read(c, cc); end
      if (dst >= 0) begin
        put(t + 1, mv(s_r, RD(dst)));
        reg_last_write[dst] = t + 1;
        reg_ready[dst] = t + 2;
      end
      unit_last_trig[u] = t;
    end
    return t;
  endfunction

  function automatic void alu(logic [3:0] opc, src_t a, src_t b, int dst);
    int t0, t1;
    t0 = place(1'b0, 0, opc, 1'b1, a, b, 1'b0, a, dst);
    t1 = DUAL ? place(1'b0, 1, opc, 1'b1, a, b, 1'b0, a, dst) : MAXC;
    void'(place(1'b1, (t1 < t0) ? 1 : 0, opc, 1'b1, a, b, 1'b0, a, dst));
  endfunction
  function automatic void asc(logic [3:0] opc, src_t a, src_t b, bit has_c, src_t c, int dst);
    void'(place(1'b1, 2, opc, 1'b1, a, b, has_c, c, dst));
  endfunction

  // t = a ^ (~b & c), from general operations; n is a scratch register
  function automatic void ksbox(int a, int b, int c, int n, int t);
    alu(ALU_XOR, RG(b), IM(-1), n);
    alu(ALU_AND, RG(n), RG(c), n);
    alu(ALU_XOR, RG(a), RG(n), t);
  endfunction
  // d = rotate right of s by k, from general operations; n is a scratch register
  function automatic void rotr(int s, int k, int n, int d);
    alu(ALU_SHRU, RG(s), IM(k), d);
    alu(ALU_SHL, RG(s), IM(64 - k), n);
    alu(ALU_IOR, RG(d), RG(n), d);
  endfunction

  // registers: x0..x4 = r0..r4, t0..t4 = r5..r9, rotation results r10..r19,
  // scratch registers of the generic build r20..r29
  localparam int ROT [5][2] = '{'{19, 28}, '{61, 39}, '{1, 6}, '{10, 17}, '{7, 41}};
  function automatic int build();
    for (int c = 0; c < MAXC; c++) nused[c] = 0;
    for (int r = 0; r < 32; r++) begin reg_ready[r] = 0; reg_last_read[r] = -1; reg_last_write[r] = -1; end
    for (int u = 0; u < 4; u++) unit_last_trig[u] = -1;
    last_cycle = 0;
    for (int i = 0; i < 5; i++) void'(place(1'b1, 3, LSU_LD64, 1'b0, IM(0), IM(8 * i), 1'b0, IM(0), i));
    for (int r = 0; r < 12; r++) begin
      alu(ALU_XOR, RG(2), IM(((15 - r) << 4) | r), 2);
      alu(ALU_XOR, RG(0), RG(4), 0);
      alu(ALU_XOR, RG(4), RG(3), 4);
      alu(ALU_XOR, RG(2), RG(1), 2);
      for (int i = 0; i < 5; i++)
        if (CUSTOM) asc(ASC_KSBOX, RG(i), RG((i + 1) % 5), 1'b1, RG((i + 2) % 5), 5 + i);
        else ksbox(i, (i + 1) % 5, (i + 2) % 5, 20 + i, 5 + i);
      alu(ALU_XOR, RG(6), RG(5), 6);
      alu(ALU_XOR, RG(5), RG(9), 5);
      alu(ALU_XOR, RG(8), RG(7), 8);
      alu(ALU_XOR, RG(7), IM(-1), 7);
      for (int i = 0; i < 5; i++) begin
        if (CUSTOM) begin
          asc(ASC_ROTR64, RG(5 + i), IM(ROT[i][0]), 1'b0, IM(0), 10 + 2 * i);
          asc(ASC_ROTR64, RG(5 + i), IM(ROT[i][1]), 1'b0, IM(0), 11 + 2 * i);
        end else begin
          rotr(5 + i, ROT[i][0], 20 + i, 10 + 2 * i);
          rotr(5 + i, ROT[i][1], 25 + i, 11 + 2 * i);
        end
        alu(ALU_XOR, RG(5 + i), RG(10 + 2 * i), i);
        alu(ALU_XOR, RG(i), RG(11 + 2 * i), i);
      end
    end
    for (int i = 0; i < 5; i++) void'(place(1'b1, 3, LSU_ST64, 1'b1, RG(i), IM(8 * i), 1'b0, IM(0), -1));
    if (nused[last_cycle] >= NB) last_cycle++;
    put(last_cycle, mi(0, T(D_GCU_T, GCU_HALT)));
    return last_cycle + 1;
  endfunction

  // ------------------------------------------------------------ run
  int run_cycles = 0;
  always @(posedge clk) if (rst_n && running) run_cycles <= run_cycles + 1;

  initial begin
    st_t x, e;
    logic [63:0] v;
    logic [IW-1:0] word;
    int len;
    done = 0; checks = 0; failures = 0; cycles = 0;
    imem_we = 0; imem_addr = 0; imem_wdata = '0; start = 0;
    dmem_en = 0; dmem_be = 0; dmem_addr = 0; dmem_wdata = 0;
    len = build();
    if (len > MAXC - 2) begin
      $display("FAIL NB=%0d DUAL=%0d CUSTOM=%0d: program of %0d words does not fit", NB, DUAL, CUSTOM, len);
      failures++; done = 1;
    end
    wait (go && rst_n && !done);
    for (int c = 0; c < len; c++) begin
      for (int b = 0; b < NB; b++) word[b*SLOT_W +: SLOT_W] = (b < nused[c]) ? sched[c][b] : nop();
      @(negedge clk); imem_we = 1; imem_addr = AW'(c); imem_wdata = word;
    end
    @(negedge clk); imem_we = 0;
    for (int i = 0; i < 5; i++) begin
      x[i] = {$urandom, $urandom};
      @(negedge clk); dmem_en = 1; dmem_be = 8'hFF; dmem_addr = 10'(i); dmem_wdata = x[i];
    end
    @(negedge clk); dmem_en = 0; dmem_be = 0;
    e = x;
    ref_perm(e, 12);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (!running);
    repeat (2) @(negedge clk);
    check("cycle count equals schedule length", 64'(run_cycles), 64'(len));
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); dmem_en = 1; dmem_be = 0; dmem_addr = 10'(i);
      @(negedge clk); dmem_en = 0; v = dmem_rdata;
      check($sformatf("x%0d", i), v, e[i]);
    end
    cycles = run_cycles;
    done = 1;
  end
endmodule
