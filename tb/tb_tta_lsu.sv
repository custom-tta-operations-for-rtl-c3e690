// tb_tta_lsu: self-checking test of the load-store unit connected to a 64-word data
// memory. Random ld64/st64/ld8u/st8 operations at random byte addresses against a
// byte-array model (little-endian lanes); a load's result is checked in the cycle
// after its trigger (latency 1) and to hold through a following store.
module tb_tta_lsu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  logic o2_we, t_we;
  logic [3:0] t_op;
  word_t o2_d, t_d, r;
  logic mem_en;
  logic [7:0] mem_be;
  logic [5:0] mem_addr;
  logic [63:0] mem_wdata, mem_rdata, unused_b;
  logic [7:0] bytes [512];
  int checks = 0, failures = 0;

  tta_lsu #(.AW(9)) dut (.*);
  tta_dmem #(.DEPTH(64)) mem (.clk, .a_en(mem_en), .a_be(mem_be), .a_addr(mem_addr), .a_wdata(mem_wdata),
    .a_rdata(mem_rdata), .b_en(1'b0), .b_be(8'h0), .b_addr(6'h0), .b_wdata(64'h0), .b_rdata(unused_b));
  always #5 clk = ~clk;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int op, a;
    word_t v, e;
    {o2_we, t_we, t_op, o2_d, t_d} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin  // initialise with st64
      v = {$urandom, $urandom};
      @(negedge clk); o2_we = 1; o2_d = v; t_we = 1; t_op = 4'(LSU_ST64); t_d = word_t'(8 * i);
      for (int j = 0; j < 8; j++) bytes[8 * i + j] = v[8*j +: 8];
    end
    @(negedge clk); {o2_we, t_we} = '0;
    for (int k = 0; k < 4000; k++) begin
      op = $urandom_range(0, 3); a = $urandom_range(0, 511); v = {$urandom, $urandom};
      @(negedge clk);
      o2_we = 1; o2_d = v; t_we = 1; t_op = 4'(op); t_d = word_t'(a);
      @(negedge clk);
      {o2_we, t_we} = '0;
      case (op)
        0: begin
          for (int j = 0; j < 8; j++) e[8*j +: 8] = bytes[(a & ~7) + j];
          check("ld64", r, e);
          o2_we = 1; o2_d = ~v; t_we = 1; t_op = 4'(LSU_ST64); t_d = word_t'(32'((a + 8) % 512));
          for (int j = 0; j < 8; j++) bytes[((a + 8) % 512 & ~7) + j] = ~v[8*j +: 8];
          @(negedge clk); {o2_we, t_we} = '0;
          check("ld64 held over store", r, e);
        end
        1: for (int j = 0; j < 8; j++) bytes[(a & ~7) + j] = v[8*j +: 8];
        2: check("ld8u", r, word_t'(bytes[a]));
        default: bytes[a] = v[7:0];
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
