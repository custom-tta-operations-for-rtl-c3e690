// tb_ascon_aead: runs Ascon-128 authenticated encryption and decryption (the Ascon
// v1.2 parameter set of the reference software: 64-bit rate, 12/6-round
// permutations, big-endian byte order) as a program on the Ascon-TTA64 core at its
// default parameters.
//
// The program, built by the in-testbench assembler, keeps the state in r0-r4 and
// has three subroutines: PERM (the permutation, start round in r10), LOAD (gather
// r13 bytes at byte address r12 into r14 with ld8u + SETBYTE + ior) and STORE
// (scatter r13 bytes of r14 with GETBYTE + st8). Main code does initialisation,
// associated data absorption with padding, domain separation, the message phase
// (mode word 0 encrypts, 1 decrypts; the last partial block is padded, and in
// decryption its ciphertext bytes replace the state bytes through a mask) and the
// finalisation, stores the tag and prints it through the printf unit.
//
// The host writes key, nonce, lengths, mode and data into data memory, starts the
// core and compares ciphertext, tag and recovered plaintext with a reference
// Ascon-128 model in the testbench, including the published known-answer vector
// for empty data. It also checks the number of permutation calls per run and
// reports the cycle count of each run.
module tb_ascon_aead;
  import tta_pkg::*;
  localparam int NB = 4;
  localparam int IW = NB * SLOT_W;
  localparam logic [63:0] IV = 64'h8040_0c06_0000_0000;
  localparam int AD_BASE = 'h100, IN_BASE = 'h200, OUT_BASE = 'h300;

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
  int lbl [string];
  function automatic int lab(string n);
    return lbl.exists(n) ? lbl[n] : 0;
  endfunction
  function automatic void L(string n);
    lbl[n] = prog.size();
  endfunction
  function automatic logic [7:0] CALLT(); return T(D_GCU_T, GCU_CALL); endfunction
  function automatic logic [7:0] JMPT();  return T(D_GCU_T, GCU_JUMP); endfunction

  // pointer/length update shared by both message loops: r17 += 8, r19 -= 8, r18 += 8
  task automatic advance(string loop_label);
    I(mv(R(17), D_ALU0_O1), mi(8, T(D_ALU0_T, ALU_ADD)), mv(R(19), D_ALU1_O1), mi(8, T(D_ALU1_T, ALU_SUB)));
    I(mv(S_ALU0, RD(17)), mv(S_ALU1, RD(19)), mv(R(18), D_ALU0_O1), mi(8, T(D_ALU0_T, ALU_ADD)));
    I(mv(S_ALU0, RD(18)), mi(lab(loop_label), JMPT()));
  endtask
  // x0 ^= PAD(r19) = 0x80 << (56 - 8*r19)
  task automatic pad_x0();
    I(mi(8'h80, D_ASC_O1), mv(R(19), T(D_ASC_T, ASC_SETBYTE)), mv(R(0), D_ALU0_O1));
    I(mv(S_ASCON, T(D_ALU0_T, ALU_XOR)));
  endtask

  task automatic build_program();
    prog.delete();
    // ---------------- initialisation ----------------
    I(mi(0, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(15)), mv(S_LSU, RD(1)), mi(8, T(D_LSU_T, LSU_LD64)));       // K0
    I(mv(S_LSU, RD(16)), mv(S_LSU, RD(2)), mi(16, T(D_LSU_T, LSU_LD64)));      // K1
    I(mv(S_LSU, RD(3)), mi(24, T(D_LSU_T, LSU_LD64)));                         // N0
    I(mv(S_LSU, RD(4)), mi(48, T(D_LSU_T, LSU_LD64)));                         // N1
    I(mv(S_LSU, RD(20)), li(1'b0, IV));                                        // mode
    I(mv(S_IMU0, RD(0)), mi(0, RD(10)), mi(lab("PERM"), CALLT()));             // p12
    I(mv(R(3), D_ALU0_O1), mv(R(15), T(D_ALU0_T, ALU_XOR)), mv(R(4), D_ALU1_O1), mv(R(16), T(D_ALU1_T, ALU_XOR)));
    I(mv(S_ALU0, RD(3)), mv(S_ALU1, RD(4)), mi(32, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, RD(19)), mi(AD_BASE, RD(17)), mi(0, D_ALU0_O1), mv(S_LSU, T(D_ALU0_T, ALU_EQ)));
    I(mv(S_ALU0, D_B0));
    I(gmi(G_B0, lab("ADDONE"), JMPT()));
    // ---------------- associated data ----------------
    L("ADL");
    I(mv(R(19), D_ALU0_O1), mi(7, T(D_ALU0_T, ALU_GTU)));
    I(mv(S_ALU0, D_B0));
    I(gmi(G_NB0, lab("ADLAST"), JMPT()), mv(R(17), RD(12)), mi(8, RD(13)));
    I(mi(lab("LOAD"), CALLT()));
    I(mv(R(0), D_ALU0_O1), mv(R(14), T(D_ALU0_T, ALU_XOR)), mi(6, RD(10)));
    I(mv(S_ALU0, RD(0)), mi(lab("PERM"), CALLT()));
    I(mv(R(17), D_ALU0_O1), mi(8, T(D_ALU0_T, ALU_ADD)), mv(R(19), D_ALU1_O1), mi(8, T(D_ALU1_T, ALU_SUB)));
    I(mv(S_ALU0, RD(17)), mv(S_ALU1, RD(19)), mi(lab("ADL"), JMPT()));
    L("ADLAST");
    I(mv(R(17), RD(12)), mv(R(19), RD(13)), mi(lab("LOAD"), CALLT()));
    I(mi(8'h80, D_ASC_O1), mv(R(19), T(D_ASC_T, ASC_SETBYTE)), mv(R(0), D_ALU0_O1), mv(R(14), T(D_ALU0_T, ALU_XOR)));
    I(mv(S_ASCON, D_ALU0_O1), mv(S_ALU0, T(D_ALU0_T, ALU_XOR)), mi(6, RD(10)));
    I(mv(S_ALU0, RD(0)), mi(lab("PERM"), CALLT()));
    L("ADDONE");
    I(mv(R(4), D_ALU0_O1), mi(1, T(D_ALU0_T, ALU_XOR)));                      // domain separation
    I(mv(S_ALU0, RD(4)), mi(40, T(D_LSU_T, LSU_LD64)), mi(IN_BASE, RD(17)), mi(OUT_BASE, RD(18)));
    I(mv(S_LSU, RD(19)), mv(R(20), D_B0));
    I(gmi(G_B0, lab("DL"), JMPT()));
    // ---------------- encryption ----------------
    L("EL");
    I(mv(R(19), D_ALU0_O1), mi(7, T(D_ALU0_T, ALU_GTU)));
    I(mv(S_ALU0, D_B0));
    I(gmi(G_NB0, lab("ELAST"), JMPT()), mv(R(17), RD(12)), mi(8, RD(13)));
    I(mi(lab("LOAD"), CALLT()));
    I(mv(R(0), D_ALU0_O1), mv(R(14), T(D_ALU0_T, ALU_XOR)));
    I(mv(S_ALU0, RD(0)), mv(S_ALU0, RD(14)), mv(R(18), RD(12)));
    I(mi(lab("STORE"), CALLT()));
    I(mi(6, RD(10)), mi(lab("PERM"), CALLT()));
    advance("EL");
    L("ELAST");
    I(mv(R(17), RD(12)), mv(R(19), RD(13)), mi(lab("LOAD"), CALLT()));
    I(mv(R(0), D_ALU0_O1), mv(R(14), T(D_ALU0_T, ALU_XOR)));
    I(mv(S_ALU0, RD(0)), mv(S_ALU0, RD(14)), mv(R(18), RD(12)));
    I(mi(lab("STORE"), CALLT()));
    pad_x0();
    I(mv(S_ALU0, RD(0)), mi(lab("FINAL"), JMPT()));
    // ---------------- decryption ----------------
    L("DL");
    I(mv(R(19), D_ALU0_O1), mi(7, T(D_ALU0_T, ALU_GTU)));
    I(mv(S_ALU0, D_B0));
    I(gmi(G_NB0, lab("DLAST"), JMPT()), mv(R(17), RD(12)), mi(8, RD(13)));
    I(mi(lab("LOAD"), CALLT()));
    I(mv(R(0), D_ALU0_O1), mv(R(14), T(D_ALU0_T, ALU_XOR)), mv(R(14), RD(0)));  // P = x0 ^ C, x0 = C
    I(mv(S_ALU0, RD(14)), mv(R(18), RD(12)));
    I(mi(lab("STORE"), CALLT()));
    I(mi(6, RD(10)), mi(lab("PERM"), CALLT()));
    advance("DL");
    L("DLAST");
    I(mv(R(17), RD(12)), mv(R(19), RD(13)), mi(lab("LOAD"), CALLT()));
    I(mv(R(19), D_ALU0_O1), mi(3, T(D_ALU0_T, ALU_SHL)));                      // 8 * n
    I(mi(-1, D_ALU1_O1), mv(S_ALU0, T(D_ALU1_T, ALU_SHRU)));
    I(mv(S_ALU1, D_ALU1_O1), mi(-1, T(D_ALU1_T, ALU_XOR)), mv(R(0), D_ALU0_O1), mv(R(14), T(D_ALU0_T, ALU_XOR)));
    I(mv(S_ALU1, D_ALU0_O1), mv(S_ALU0, T(D_ALU0_T, ALU_AND)));               // P = (x0 ^ C) & mask
    I(mv(S_ALU0, RD(14)), mv(S_ALU0, D_ALU0_O1), mv(R(0), T(D_ALU0_T, ALU_XOR)), mv(R(18), RD(12)));
    I(mv(S_ALU0, RD(0)), mi(lab("STORE"), CALLT()));                           // x0 ^= P
    pad_x0();
    I(mv(S_ALU0, RD(0)));
    // ---------------- finalisation ----------------
    L("FINAL");
    I(mv(R(1), D_ALU0_O1), mv(R(15), T(D_ALU0_T, ALU_XOR)), mv(R(2), D_ALU1_O1), mv(R(16), T(D_ALU1_T, ALU_XOR)));
    I(mv(S_ALU0, RD(1)), mv(S_ALU1, RD(2)), mi(0, RD(10)));
    I(mi(lab("PERM"), CALLT()));
    I(mv(R(3), D_ALU0_O1), mv(R(15), T(D_ALU0_T, ALU_XOR)), mv(R(4), D_ALU1_O1), mv(R(16), T(D_ALU1_T, ALU_XOR)));
    I(mv(S_ALU0, D_LSU_O2), mi(56, T(D_LSU_T, LSU_ST64)), mv(S_ALU0, T(D_OUT_T, OUT_WORD)));
    I(mv(S_ALU1, D_LSU_O2), mi(64, T(D_LSU_T, LSU_ST64)), mv(S_ALU1, T(D_OUT_T, OUT_WORD)));
    I(mi(0, T(D_GCU_T, GCU_HALT)));
    // ---------------- LOAD: r14 = bytes [r12, r12 + r13) ----------------
    L("LOAD");
    I(mi(0, RD(14)), mi(0, RD(21)));
    L("LL");
    I(mv(R(13), D_ALU0_O1), mv(R(21), T(D_ALU0_T, ALU_GTU)), mv(R(12), D_ALU1_O1), mv(R(21), T(D_ALU1_T, ALU_ADD)));
    I(mv(S_ALU0, D_B1), mv(S_ALU1, T(D_LSU_T, LSU_LD8U)));
    I(gmv(G_NB1, S_RA, JMPT()), mv(S_LSU, D_ASC_O1), mv(R(21), T(D_ASC_T, ASC_SETBYTE)));
    I(mv(S_ASCON, D_ALU0_O1), mv(R(14), T(D_ALU0_T, ALU_IOR)), mv(R(21), D_ALU1_O1), mi(1, T(D_ALU1_T, ALU_ADD)));
    I(mv(S_ALU0, RD(14)), mv(S_ALU1, RD(21)), mi(lab("LL"), JMPT()));
    // ---------------- STORE: bytes of r14 to [r12, r12 + r13) ----------------
    L("STORE");
    I(mi(0, RD(21)));
    L("SL");
    I(mv(R(13), D_ALU0_O1), mv(R(21), T(D_ALU0_T, ALU_GTU)), mv(R(12), D_ALU1_O1), mv(R(21), T(D_ALU1_T, ALU_ADD)));
    I(mv(S_ALU0, D_B1), mv(R(14), D_ASC_O1), mv(R(21), T(D_ASC_T, ASC_GETBYTE)));
    I(gmv(G_NB1, S_RA, JMPT()), gmv(G_B1, S_ASCON, D_LSU_O2), gmv(G_B1, S_ALU1, T(D_LSU_T, LSU_ST8)));
    I(mv(R(21), D_ALU1_O1), mi(1, T(D_ALU1_T, ALU_ADD)));
    I(mv(S_ALU1, RD(21)), mi(lab("SL"), JMPT()));
    // ---------------- PERM: rounds r10 .. 11 ----------------
    L("PERM");
    I(mi(15, D_ALU0_O1), mv(R(10), T(D_ALU0_T, ALU_SUB)));
    I(mv(S_ALU0, D_ALU0_O1), mi(4, T(D_ALU0_T, ALU_SHL)));
    I(mv(S_ALU0, D_ALU0_O1), mv(R(10), T(D_ALU0_T, ALU_IOR)));
    I(mv(S_ALU0, D_ALU0_O1), mv(R(2), T(D_ALU0_T, ALU_XOR)));
    I(mv(S_ALU0, D_ALU0_O1), mv(R(1), T(D_ALU0_T, ALU_XOR)), mv(R(0), D_ALU1_O1), mv(R(4), T(D_ALU1_T, ALU_XOR)));
    I(mv(S_ALU0, RD(2)), mv(S_ALU1, RD(0)), mv(R(4), D_ALU1_O1), mv(R(3), T(D_ALU1_T, ALU_XOR)));
    I(mv(S_ALU1, RD(4)), mv(R(0), D_ASC_O1), mv(R(1), T(D_ASC_T, ASC_KSBOX)), mv(R(2), D_ASC_O3));
    I(mv(S_ASCON, RD(5)), mv(R(1), D_ASC_O1), mv(R(2), T(D_ASC_T, ASC_KSBOX)), mv(R(3), D_ASC_O3));
    I(mv(S_ASCON, RD(6)), mv(R(2), D_ASC_O1), mv(R(3), T(D_ASC_T, ASC_KSBOX)), mv(R(4), D_ASC_O3));
    I(mv(S_ASCON, RD(7)), mv(R(3), D_ASC_O1), mv(R(4), T(D_ASC_T, ASC_KSBOX)), mv(R(0), D_ASC_O3));
    I(mv(S_ASCON, RD(8)), mv(R(4), D_ASC_O1), mv(R(0), T(D_ASC_T, ASC_KSBOX)), mv(R(1), D_ASC_O3));
    I(mv(S_ASCON, RD(9)), mv(R(5), D_ALU1_O1), mv(S_ASCON, T(D_ALU1_T, ALU_XOR)), mv(R(6), D_ALU0_O1));
    I(mv(S_ALU1, RD(5)), mv(R(5), T(D_ALU0_T, ALU_XOR)), mv(R(8), D_ALU1_O1), mv(R(7), T(D_ALU1_T, ALU_XOR)));
    I(mv(S_ALU0, RD(6)), mv(S_ALU1, RD(8)), mv(R(7), D_ALU0_O1), mi(-1, T(D_ALU0_T, ALU_XOR)));
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
    I(gmi(G_NB0, lab("PERM"), JMPT()), gmv(G_B0, S_RA, JMPT()));
  endtask

  // ------------------------------------------------------------ reference Ascon-128
  function automatic logic [63:0] load_be(const ref logic [7:0] b [$], input int off, input int n);
    logic [63:0] w = '0;
    for (int i = 0; i < n; i++) w[63 - 8*i -: 8] = b[off + i];
    return w;
  endfunction
  function automatic logic [63:0] pad(int n);
    return 64'h80 << (56 - 8 * n);
  endfunction
  function automatic void ref_aead(input logic [63:0] k0, k1, n0, n1, const ref logic [7:0] ad [$],
                                   const ref logic [7:0] din [$], input bit dec,
                                   ref logic [7:0] dout [$], output logic [63:0] t0, t1);
    st_t x;
    int i, n;
    logic [63:0] w, m;
    x[0] = IV; x[1] = k0; x[2] = k1; x[3] = n0; x[4] = n1;
    ref_perm(x, 12);
    x[3] ^= k0; x[4] ^= k1;
    if (ad.size() > 0) begin
      for (i = 0; i + 8 <= ad.size(); i += 8) begin x[0] ^= load_be(ad, i, 8); ref_perm(x, 6); end
      x[0] ^= load_be(ad, i, ad.size() - i) ^ pad(ad.size() - i);
      ref_perm(x, 6);
    end
    x[4] ^= 64'd1;
    dout.delete();
    for (i = 0; i + 8 <= din.size(); i += 8) begin
      w = load_be(din, i, 8);
      for (int j = 0; j < 8; j++) dout.push_back(x[0][63 - 8*j -: 8] ^ w[63 - 8*j -: 8]);
      x[0] = dec ? w : (x[0] ^ w);
      ref_perm(x, 6);
    end
    n = din.size() - i;
    w = load_be(din, i, n);
    m = ~(64'hFFFF_FFFF_FFFF_FFFF >> (8 * n));
    if (n == 0) m = '0;
    for (int j = 0; j < n; j++) dout.push_back(x[0][63 - 8*j -: 8] ^ w[63 - 8*j -: 8]);
    x[0] = dec ? ((x[0] & ~m) | w) : (x[0] ^ w);
    x[0] ^= pad(n);
    x[1] ^= k0; x[2] ^= k1;
    ref_perm(x, 12);
    t0 = x[3] ^ k0; t1 = x[4] ^ k1;
  endfunction

  // ------------------------------------------------------------ host
  task automatic host_write(int word, logic [63:0] v, logic [7:0] be = 8'hFF);
    @(negedge clk); dmem_en = 1; dmem_be = be; dmem_addr = 10'(word); dmem_wdata = v;
    @(negedge clk); dmem_en = 0; dmem_be = 0;
  endtask
  task automatic host_read(int word, output logic [63:0] v);
    @(negedge clk); dmem_en = 1; dmem_be = 0; dmem_addr = 10'(word);
    @(negedge clk); dmem_en = 0; v = dmem_rdata;
  endtask
  task automatic host_write_bytes(int base, const ref logic [7:0] b [$]);
    foreach (b[i]) host_write((base + i) / 8, {8{b[i]}}, 8'b1 << ((base + i) % 8));
  endtask
  task automatic host_read_bytes(int base, int n, ref logic [7:0] b [$]);
    logic [63:0] v;
    b.delete();
    for (int i = 0; i < n; i++) begin
      host_read((base + i) / 8, v);
      b.push_back(v[8 * ((base + i) % 8) +: 8]);
    end
  endtask

  int perm_calls = 0, cycles = 0;
  logic [63:0] printed [$];
  always @(posedge clk) if (running) begin
    cycles++;
    if (dut.gcu_t_we && dut.gcu_op == 4'(GCU_CALL) && dut.gcu_t_d == 64'(lab("PERM"))) perm_calls++;
  end
  always @(posedge clk) if (rst_n && out_valid) printed.push_back(out_data);

  // one run of the program; returns output bytes and tag
  task automatic run(input logic [63:0] k0, k1, n0, n1, const ref logic [7:0] ad [$],
                     const ref logic [7:0] din [$], input bit dec,
                     ref logic [7:0] dout [$], output logic [63:0] t0, t1, output int ncyc, nperm);
    int c0, p0;
    host_write(0, k0); host_write(1, k1); host_write(2, n0); host_write(3, n1);
    host_write(4, 64'(ad.size())); host_write(5, 64'(din.size())); host_write(6, 64'(dec));
    host_write_bytes(AD_BASE, ad);
    host_write_bytes(IN_BASE, din);
    printed.delete();
    c0 = cycles; p0 = perm_calls;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (!running);
    repeat (2) @(negedge clk);
    ncyc = cycles - c0; nperm = perm_calls - p0;
    host_read_bytes(OUT_BASE, din.size(), dout);
    host_read(7, t0); host_read(8, t1);
    check("printed tag words", 64'(printed.size()), 2);
    if (printed.size() == 2) begin check("printed tag0", printed[0], t0); check("printed tag1", printed[1], t1); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ad [$], pt [$], ct [$], rt [$], ect [$], ept [$];
    logic [63:0] k0, k1, n0, n1, t0, t1, et0, et1, dt0, dt1;
    int ncyc, nperm, adl, ml;
    int cases_ad [6] = '{0, 0, 3, 8, 13, 32};
    int cases_m  [6] = '{0, 7, 5, 16, 21, 32};
    imem_we = 0; imem_addr = 0; imem_wdata = '0; start = 0;
    dmem_en = 0; dmem_be = 0; dmem_addr = 0; dmem_wdata = 0;
    build_program();
    build_program();  // second pass resolves forward labels
    $display("program: %0d instructions", prog.size());
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    foreach (cases_ad[c]) begin
      adl = cases_ad[c]; ml = cases_m[c];
      ad.delete(); pt.delete();
      if (c == 0) begin
        k0 = 64'h0001_0203_0405_0607; k1 = 64'h0809_0a0b_0c0d_0e0f; n0 = k0; n1 = k1;
      end else begin
        k0 = {$urandom, $urandom}; k1 = {$urandom, $urandom}; n0 = {$urandom, $urandom}; n1 = {$urandom, $urandom};
      end
      for (int i = 0; i < adl; i++) ad.push_back(8'(c == 1 ? i : $urandom));
      for (int i = 0; i < ml; i++) pt.push_back(8'(c == 1 ? i : $urandom));
      ref_aead(k0, k1, n0, n1, ad, pt, 1'b0, ect, et0, et1);
      if (c == 0) begin  // published known-answer vector, empty AD and message
        check("KAT reference tag0", et0, 64'hE355_159F_2929_11F7);
        check("KAT reference tag1", et1, 64'h94CB_1432_A010_3A8A);
      end
      // encryption
      run(k0, k1, n0, n1, ad, pt, 1'b0, ct, t0, t1, ncyc, nperm);
      $display("encrypt ad=%0d msg=%0d: %0d cycles, %0d permutation calls", adl, ml, ncyc, nperm);
      check("enc tag0", t0, et0); check("enc tag1", t1, et1);
      check("ct length", 64'(ct.size()), 64'(ml));
      foreach (ect[i]) check($sformatf("ct byte %0d", i), 64'(ct[i]), 64'(ect[i]));
      check("enc permutation calls", 64'(nperm), 64'(2 + (adl > 0 ? adl / 8 + 1 : 0) + ml / 8));
      // decryption of the reference ciphertext
      run(k0, k1, n0, n1, ad, ect, 1'b1, rt, dt0, dt1, ncyc, nperm);
      $display("decrypt ad=%0d msg=%0d: %0d cycles", adl, ml, ncyc);
      check("dec tag0", dt0, et0); check("dec tag1", dt1, et1);
      foreach (pt[i]) check($sformatf("pt byte %0d", i), 64'(rt[i]), 64'(pt[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
