// tb_ascon_tta64: end-to-end test of the Ascon-TTA64 core at its default
// parameters (4 buses, dual ALU). A small assembler in the testbench builds a
// hand-scheduled TTA program that
//   - loads a 320-bit Ascon state and a round count from data memory (LSU),
//   - runs the Ascon permutation in a loop: round constant and XORs on ALU64 and
//     ALU64_1, the substitution layer with KSBOX, the linear layer with ROTR64,
//     results moved unit-to-unit without the register file wherever possible,
//   - closes the loop with a compare into a boolean register and a guarded jump,
//   - stores the state back, and exercises SETBYTE, GETBYTE, a long immediate,
//     byte store/load, printf output, a guarded output, call/return and halt.
// The host checks the stored state against a reference permutation built from the
// Ascon 5-bit S-box table (itself cross-checked against the bitsliced formulas),
// the printed values, and the exact cycle count (no stalls: 24 + 28 * rounds
// instructions). It runs p12, p8 and p6 on random states and counts how often each
// mechanism of the core happened; a mechanism that never happened is a failure.
module tb_ascon_tta64;
  import tta_pkg::*;
  localparam int NB = 4;
  localparam int IW = NB * SLOT_W;

  logic clk = 0, rst_n = 0;
  logic imem_we;
  logic [9:0] imem_addr;
  logic [IW-1:0] imem_wdata;
  logic dmem_en;
  logic [7:0] dmem_be;
  logic [9:0] dmem_addr;
  logic [63:0] dmem_wdata, dmem_rdata;
  logic start, running, out_valid, out_char;
  logic [9:0] pc;
  logic [63:0] out_data;
  int checks = 0, failures = 0;

  ascon_tta64 dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
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
  task automatic I(s_t s0 = nop(), s_t s1 = nop(), s_t s2 = nop(), s_t s3 = nop());
    prog.push_back({s3, s2, s1, s0});
  endtask

  localparam int L = 8;     // loop start
  localparam int SUB = 50;  // subroutine

  task automatic build_program();
    // load state x0..x4 and round count
    I(mi(0, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(0)), mi(8,  T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(1)), mi(16, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(2)), mi(24, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(3)), mi(32, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(4)), mi(40, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(11)), mi(12, D_ALU0_O1), mv(S_LSU, T(D_ALU0_T, ALU_SUB)));  // i = 12 - rounds
    I(mv(S_ALU0, RD(10)));
    // ---- round loop (address L) ----
    I(mi(15, D_ALU0_O1), mv(R(10), T(D_ALU0_T, ALU_SUB)));                      // 15 - i
    I(mv(S_ALU0, D_ALU0_O1), mi(4, T(D_ALU0_T, ALU_SHL)));                      // << 4
    I(mv(S_ALU0, D_ALU0_O1), mv(R(10), T(D_ALU0_T, ALU_IOR)));                  // | i
    I(mv(S_ALU0, D_ALU0_O1), mv(R(2), T(D_ALU0_T, ALU_XOR)));                   // x2 ^ c
    I(mv(S_ALU0, D_ALU0_O1), mv(R(1), T(D_ALU0_T, ALU_XOR)),                    // x2 ^= x1
      mv(R(0), D_ALU1_O1), mv(R(4), T(D_ALU1_T, ALU_XOR)));                     // x0 ^= x4
    I(mv(S_ALU0, RD(2)), mv(S_ALU1, RD(0)), mv(R(4), D_ALU1_O1), mv(R(3), T(D_ALU1_T, ALU_XOR)));  // x4 ^= x3
    I(mv(S_ALU1, RD(4)), mv(R(0), D_ASC_O1), mv(R(1), T(D_ASC_T, ASC_KSBOX)), mv(R(2), D_ASC_O3)); // t0
    I(mv(S_ASCON, RD(5)), mv(R(1), D_ASC_O1), mv(R(2), T(D_ASC_T, ASC_KSBOX)), mv(R(3), D_ASC_O3)); // t1
    I(mv(S_ASCON, RD(6)), mv(R(2), D_ASC_O1), mv(R(3), T(D_ASC_T, ASC_KSBOX)), mv(R(4), D_ASC_O3)); // t2
    I(mv(S_ASCON, RD(7)), mv(R(3), D_ASC_O1), mv(R(4), T(D_ASC_T, ASC_KSBOX)), mv(R(0), D_ASC_O3)); // t3
    I(mv(S_ASCON, RD(8)), mv(R(4), D_ASC_O1), mv(R(0), T(D_ASC_T, ASC_KSBOX)), mv(R(1), D_ASC_O3)); // t4
    I(mv(S_ASCON, RD(9)), mv(R(5), D_ALU1_O1), mv(S_ASCON, T(D_ALU1_T, ALU_XOR)), mv(R(6), D_ALU0_O1)); // t0 ^ t4
    I(mv(S_ALU1, RD(5)), mv(R(5), T(D_ALU0_T, ALU_XOR)), mv(R(8), D_ALU1_O1), mv(R(7), T(D_ALU1_T, ALU_XOR))); // t1^=t0, t3^=t2
    I(mv(S_ALU0, RD(6)), mv(S_ALU1, RD(8)), mv(R(7), D_ALU0_O1), mi(-1, T(D_ALU0_T, ALU_XOR)));  // t2 = ~t2
    I(mv(S_ALU0, RD(7)), mv(R(5), D_ASC_O1), mi(19, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ASCON, D_ALU0_O1), mv(R(5), T(D_ALU0_T, ALU_XOR)), mi(28, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ASCON, D_ALU0_O1), mv(S_ALU0, T(D_ALU0_T, ALU_XOR)), mv(R(6), D_ASC_O1), mi(61, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ALU0, RD(0)), mv(S_ASCON, D_ALU1_O1), mv(R(6), T(D_ALU1_T, ALU_XOR)), mi(39, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ASCON, D_ALU1_O1), mv(S_ALU1, T(D_ALU1_T, ALU_XOR)), mv(R(7), D_ASC_O1), mi(1, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ALU1, RD(1)), mv(S_ASCON, D_ALU0_O1), mv(R(7), T(D_ALU0_T, ALU_XOR)), mi(6, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ASCON, D_ALU0_O1), mv(S_ALU0, T(D_ALU0_T, ALU_XOR)), mv(R(8), D_ASC_O1), mi(10, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ALU0, RD(2)), mv(S_ASCON, D_ALU1_O1), mv(R(8), T(D_ALU1_T, ALU_XOR)), mi(17, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ASCON, D_ALU1_O1), mv(S_ALU1, T(D_ALU1_T, ALU_XOR)), mv(R(9), D_ASC_O1), mi(7, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ALU1, RD(3)), mv(S_ASCON, D_ALU0_O1), mv(R(9), T(D_ALU0_T, ALU_XOR)), mi(41, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ASCON, D_ALU0_O1), mv(S_ALU0, T(D_ALU0_T, ALU_XOR)), mv(R(10), D_ALU1_O1), mi(1, T(D_ALU1_T, ALU_ADD)));
    I(mv(S_ALU0, RD(4)), mv(S_ALU1, RD(10)), mv(S_ALU1, D_ALU0_O1), mi(12, T(D_ALU0_T, ALU_EQ)));
    I(mv(S_ALU0, D_B0));
    I(gmi(G_NB0, L, T(D_GCU_T, GCU_JUMP)));
    // ---- store state and exercise the remaining operations ----
    I(mv(R(0), D_LSU_O2), mi(0,  T(D_LSU_T, LSU_ST64)));
    I(mv(R(1), D_LSU_O2), mi(8,  T(D_LSU_T, LSU_ST64)));
    I(mv(R(2), D_LSU_O2), mi(16, T(D_LSU_T, LSU_ST64)));
    I(mv(R(3), D_LSU_O2), mi(24, T(D_LSU_T, LSU_ST64)));
    I(mv(R(4), D_LSU_O2), mi(32, T(D_LSU_T, LSU_ST64)));
    I(mi(8'h80, D_ASC_O1), mi(0, T(D_ASC_T, ASC_SETBYTE)), li(1'b0, 64'h0123_4567_89AB_CDEF));
    I(mv(S_ASCON, D_LSU_O2), mi(48, T(D_LSU_T, LSU_ST64)));
    I(mv(S_IMU0, D_LSU_O2), mi(56, T(D_LSU_T, LSU_ST64)));
    I(mv(R(0), D_ASC_O1), mi(0, T(D_ASC_T, ASC_GETBYTE)));
    I(mv(S_ASCON, D_LSU_O2), mi(67, T(D_LSU_T, LSU_ST8)));
    I(mi(67, T(D_LSU_T, LSU_LD8U)));
    I(mv(S_LSU, T(D_OUT_T, OUT_CHAR)));
    I(mi(SUB, T(D_GCU_T, GCU_CALL)), gmv(G_B0, R(3), T(D_OUT_T, OUT_WORD)), gmv(G_B1, R(2), T(D_OUT_T, OUT_WORD)));
    I(mi(0, T(D_GCU_T, GCU_HALT)));
    // ---- subroutine (address SUB) ----
    I(mv(R(4), T(D_OUT_T, OUT_WORD)));
    I(mv(S_RA, T(D_GCU_T, GCU_JUMP)));
  endtask

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
  // bitsliced S-box (as the program computes it), to cross-check the table
  function automatic logic [4:0] sbox_bits(logic [4:0] v);
    logic x0, x1, x2, x3, x4, t0, t1, t2, t3, t4;
    {x0, x1, x2, x3, x4} = v;
    x0 ^= x4; x4 ^= x3; x2 ^= x1;
    t0 = x0 ^ (~x1 & x2); t1 = x1 ^ (~x2 & x3); t2 = x2 ^ (~x3 & x4);
    t3 = x3 ^ (~x4 & x0); t4 = x4 ^ (~x0 & x1);
    t1 ^= t0; t0 ^= t4; t3 ^= t2; t2 = ~t2;
    return {t0, t1, t2, t3, t4};
  endfunction

  // ------------------------------------------------------------ host port
  task automatic host_write(int word, logic [63:0] v);
    @(negedge clk); dmem_en = 1; dmem_be = 8'hFF; dmem_addr = 10'(word); dmem_wdata = v;
    @(negedge clk); dmem_en = 0; dmem_be = 0;
  endtask
  task automatic host_read(int word, output logic [63:0] v);
    @(negedge clk); dmem_en = 1; dmem_be = 0; dmem_addr = 10'(word);
    @(negedge clk); dmem_en = 0; v = dmem_rdata;
  endtask

  // ------------------------------------------------------------ monitors
  int n_parallel = 0, n_bypass = 0, n_squash = 0, n_guard_taken = 0, n_limm = 0;
  int n_jump = 0, n_call = 0, n_ret = 0, n_ld = 0, n_st = 0, n_print = 0, n_bool = 0;
  int n_op [4] = '{0, 0, 0, 0};
  int cycles = 0;
  logic [63:0] printed [$];
  bit printed_char [$];

  always @(posedge clk) if (running) begin
    slot_t s;
    cycles++;
    if ($countones(dut.bus_en) > 1) n_parallel++;
    for (int b = 0; b < NB; b++) begin
      s = slot_t'(dut.instr[b*SLOT_W +: SLOT_W]);
      if (s.guard inside {G_B0, G_NB0, G_B1, G_NB1}) begin
        if (dut.bus_en[b]) n_guard_taken++; else n_squash++;
      end
      if (s.guard == G_LIMM) n_limm++;
      if (dut.bus_en[b] && !s.imm && s.src[5:0] inside {S_ALU0, S_ALU1, S_ASCON, S_LSU} && s.dst[7:6] != 2'b00) n_bypass++;
      if (dut.bus_en[b] && !s.imm && s.src[5:0] == S_RA && s.dst == T(D_GCU_T, GCU_JUMP)) n_ret++;
    end
    if (dut.asc_t_we) n_op[dut.asc_op[1:0]]++;
    if (dut.gcu_t_we && dut.gcu_op == 4'(GCU_JUMP)) n_jump++;
    if (dut.gcu_t_we && dut.gcu_op == 4'(GCU_CALL)) n_call++;
    if (dut.lsu_t_we && dut.lsu_op inside {4'(LSU_LD64), 4'(LSU_LD8U)}) n_ld++;
    if (dut.lsu_t_we && dut.lsu_op inside {4'(LSU_ST64), 4'(LSU_ST8)}) n_st++;
    if (|dut.b_we) n_bool++;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    printed.push_back(out_data); printed_char.push_back(out_char); n_print++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t x, e;
    logic [63:0] v;
    int rounds_list [3] = '{12, 8, 6};
    int c0;
    imem_we = 0; imem_addr = 0; imem_wdata = '0; start = 0;
    dmem_en = 0; dmem_be = 0; dmem_addr = 0; dmem_wdata = 0;
    // S-box table against the bitsliced formulas
    for (int i = 0; i < 32; i++) check($sformatf("sbox %0d", i), 64'(sbox_bits(5'(i))), 64'(SBOX[i]));
    build_program();
    check("subroutine address", 64'(prog.size()), 64'(SUB + 2));
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    foreach (rounds_list[k]) begin
      for (int i = 0; i < 5; i++) begin
        x[i] = {$urandom, $urandom};
        if (k == 0) x[i] = 64'(i) * 64'h0101_0101_0101_0101;
        host_write(i, x[i]);
      end
      host_write(5, 64'(rounds_list[k]));
      e = x;
      ref_perm(e, rounds_list[k]);
      printed.delete(); printed_char.delete();
      c0 = cycles;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (!running);
      repeat (3) @(negedge clk);
      check($sformatf("p%0d cycle count", rounds_list[k]), 64'(cycles - c0), 64'(24 + 28 * rounds_list[k]));
      for (int i = 0; i < 5; i++) begin
        host_read(i, v);
        check($sformatf("p%0d x%0d", rounds_list[k], i), v, e[i]);
      end
      host_read(6, v); check("SETBYTE result", v, 64'h8000_0000_0000_0000);
      host_read(7, v); check("long immediate", v, 64'h0123_4567_89AB_CDEF);
      host_read(8, v); check("byte store lane", 64'(v[31:24]), 64'(e[0][63:56]));
      check("prints", 64'(printed.size()), 3);
      if (printed.size() == 3) begin
        check("print char", {63'd0, printed_char[0]}, 1);
        check("print GETBYTE char", printed[0], 64'(e[0][63:56]));
        check("guarded print x3", printed[1], e[3]);
        check("subroutine print x4", printed[2], e[4]);
      end
    end
    $display("parallel=%0d bypass=%0d squashed=%0d guarded_taken=%0d limm=%0d jump=%0d call=%0d ret=%0d",
             n_parallel, n_bypass, n_squash, n_guard_taken, n_limm, n_jump, n_call, n_ret);
    $display("rotr=%0d ksbox=%0d getbyte=%0d setbyte=%0d loads=%0d stores=%0d prints=%0d boolwrites=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_ld, n_st, n_print, n_bool);
    foreach (n_op[i]) begin checks++; if (n_op[i] == 0) begin failures++; $display("FAIL custom op %0d never used", i); end end
    checks++; if (n_parallel == 0 || n_bypass == 0 || n_squash == 0 || n_guard_taken == 0 || n_limm == 0 ||
                  n_jump == 0 || n_call == 0 || n_ret == 0 || n_ld == 0 || n_st == 0 || n_print == 0 || n_bool == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
