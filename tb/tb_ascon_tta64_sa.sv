// tb_ascon_tta64_sa: test of the single-ALU, 2-bus configuration of the core
// (NBUS = 2, DUAL_ALU = 0; 150-bit instructions). A short 2-slot program loads three
// words, computes KSBOX and a ROTR64-based linear-layer term on the ASCON unit and
// ALU64, stores the results, and stores the (absent) second ALU's result, which
// must read as zero. Results and the exact cycle count are checked.
module tb_ascon_tta64_sa;
  import tta_pkg::*;
  localparam int NB = 2;
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
  int checks = 0, failures = 0, cycles = 0;

  ascon_tta64 #(.NBUS(NB), .DUAL_ALU(1'b0)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (running) cycles++;

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
  task automatic I(s_t s0 = nop(), s_t s1 = nop());
    prog.push_back({s1, s0});
  endtask


  task automatic host_write(int word, logic [63:0] v);
    @(negedge clk); dmem_en = 1; dmem_be = 8'hFF; dmem_addr = 10'(word); dmem_wdata = v;
    @(negedge clk); dmem_en = 0; dmem_be = 0;
  endtask
  task automatic host_read(int word, output logic [63:0] v);
    @(negedge clk); dmem_en = 1; dmem_be = 0; dmem_addr = 10'(word);
    @(negedge clk); dmem_en = 0; v = dmem_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] a, b, c, ks, v;
    int c0;
    imem_we = 0; imem_addr = 0; imem_wdata = '0; start = 0;
    dmem_en = 0; dmem_be = 0; dmem_addr = 0; dmem_wdata = 0;
    I(mi(0, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, D_ASC_O1), mi(8, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, D_ASC_O3), mi(16, T(D_LSU_T, LSU_LD64)));
    I(mv(S_LSU, T(D_ASC_T, ASC_KSBOX)));
    I(mv(S_ASCON, RD(1)), mv(S_ASCON, D_ASC_O1));
    I(mi(19, T(D_ASC_T, ASC_ROTR64)));
    I(mv(S_ASCON, D_ALU0_O1), mv(R(1), T(D_ALU0_T, ALU_XOR)));
    I(mv(S_ALU0, D_LSU_O2), mi(24, T(D_LSU_T, LSU_ST64)));
    I(mv(S_ALU1, D_LSU_O2), mi(32, T(D_LSU_T, LSU_ST64)));
    I(mi(0, T(D_GCU_T, GCU_HALT)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = 10'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    for (int k = 0; k < 20; k++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      host_write(0, a); host_write(1, c); host_write(2, b); host_write(4, ~64'd0);
      ks = a ^ (~b & c);
      c0 = cycles;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (!running);
      repeat (2) @(negedge clk);
      check("cycles", 64'(cycles - c0), 10);
      host_read(3, v); check("ksbox ^ rotr19", v, ks ^ ((ks >> 19) | (ks << 45)));
      host_read(4, v); check("no second ALU", v, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
