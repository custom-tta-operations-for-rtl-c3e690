// tb_ascon_fu: self-checking test of the ASCON FU. Drives random operands through
// all four operations (with operand written prev_r or together with the trigger),
// compares with bit-level reference models written independently of the RTL, and
// checks the 1-cycle latency: the result is absent prev_r the clock edge that
// follows the trigger and present right after it.
module tb_ascon_fu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  logic o1_we, o3_we, t_we;
  logic [3:0] t_op;
  word_t o1_d, o3_d, t_d, r;
  int checks = 0, failures = 0;

  ascon_fu dut (.*);
  always #5 clk = ~clk;

  function automatic word_t ref_rotr(word_t x, int n);
    word_t y;
    for (int i = 0; i < 64; i++) y[i] = x[(i + n) % 64];
    return y;
  endfunction
  function automatic word_t ref_op(int op, word_t a, word_t b, word_t c);
    int k;
    case (op)
      0: return ref_rotr(a, int'(b[5:0]));
      1: begin word_t y; for (int i = 0; i < 64; i++) y[i] = a[i] ^ ((!b[i]) & c[i]); return y; end
      2: begin k = 7 - int'(b[2:0]); return word_t'(a[8*k +: 8]); end
      default: begin
        word_t y = '0; k = 56 - 8 * int'(b[2:0]);
        for (int i = 0; i + k < 64; i++) y[i + k] = a[i];
        return y;
      end
    endcase
  endfunction
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, b, c, prev_r;
    int op;
    bit same;
    {o1_we, o3_we, t_we, t_op, o1_d, o3_d, t_d} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: the Ascon rotations, every byte index
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); o1_we = 1; o1_d = 64'h0123_4567_89AB_CDEF; t_we = 1; t_op = 0; t_d = word_t'(n);
      @(negedge clk); o1_we = 0; t_we = 0;
      check($sformatf("rotr %0d", n), r, ref_rotr(64'h0123_4567_89AB_CDEF, n));
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); o1_we = 1; o1_d = 64'h0011_2233_4455_6677; t_we = 1; t_op = 2; t_d = word_t'(i);
      @(negedge clk); o1_we = 0; t_we = 0;
      check($sformatf("getbyte %0d", i), r, word_t'(8'(17 * i)));
      @(negedge clk); o1_we = 1; o1_d = 64'h80; t_we = 1; t_op = 3;
      @(negedge clk); o1_we = 0; t_we = 0;
      check($sformatf("setbyte %0d", i), r, 64'h8000_0000_0000_0000 >> (8 * i));
    end
    // random, operands sometimes written a cycle ahead of the trigger
    for (int k = 0; k < 3000; k++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      op = $urandom_range(0, 3); same = 1'($urandom_range(0, 1));
      @(negedge clk);
      o1_we = 1; o1_d = a; o3_we = 1; o3_d = c;
      if (!same) begin
        @(negedge clk); o1_we = 0; o3_we = 0;
        o1_d = ~a; o3_d = ~c;  // not written, must not be used
      end
      prev_r = r;
      t_we = 1; t_op = 4'(op); t_d = b;
      #1 check("no result before edge", r, prev_r);
      @(negedge clk);
      {o1_we, o3_we, t_we} = '0;
      check($sformatf("op %0d", op), r, ref_op(op, a, b, c));
      @(negedge clk);
      check("result held", r, ref_op(op, a, b, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
