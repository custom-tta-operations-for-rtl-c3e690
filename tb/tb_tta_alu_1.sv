// tb_tta_alu: self-checking test of the reduced ALU64_1 (REDUCED = 1). Random operands
// for every opcode, reference results computed independently in the testbench,
// latency 1 checked (result changes only at the edge after the trigger), operand
// bypass checked (operand written with the trigger is used), and opcodes outside
// the unit's set checked to return 0.
module tb_tta_alu_1;
  import tta_pkg::*;
  localparam bit RED = 1'b1;
  logic clk = 0, rst_n = 0;
  logic o1_we, t_we;
  logic [3:0] t_op;
  word_t o1_d, t_d, r;
  int checks = 0, failures = 0;

  tta_alu #(.REDUCED(RED)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t ref_op(int op, word_t a, word_t b);
    longint sa = a, sb = b;
    int n = int'(b[5:0]);
    bit ok = (op <= 5) || (op == 7) || (!RED && op <= 10);
    word_t y;
    if (!ok) return '0;
    case (op)
      0: y = a + b;
      1: y = a + ~b + 1;
      2: y = a & b;
      3: y = a | b;
      4: y = a ^ b;
      5: begin y = '0; for (int i = n; i < 64; i++) y[i] = a[i - n]; end
      6: begin for (int i = 0; i < 64; i++) y[i] = (i + n < 64) ? a[i + n] : a[63]; end
      7: begin y = '0; for (int i = 0; i + n < 64; i++) y[i] = a[i + n]; end
      8: y = (a == b) ? 1 : 0;
      9: y = (sa > sb) ? 1 : 0;
      10: y = ({1'b0, a} > {1'b0, b}) ? 1 : 0;
      default: y = '0;
    endcase
    return y;
  endfunction
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a, b, prev_r;
    int op;
    {o1_we, t_we, t_op, o1_d, t_d} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      op = $urandom_range(0, 15);
      if ($urandom_range(0, 3) == 0) b = word_t'($urandom_range(0, 63));
      if ($urandom_range(0, 7) == 0) b = a;
      if ($urandom_range(0, 7) == 0) b = ~b + 1;
      @(negedge clk);
      o1_we = 1; o1_d = a;
      if (k % 2 == 1) begin @(negedge clk); o1_we = 0; o1_d = ~a; end
      prev_r = r;
      t_we = 1; t_op = 4'(op); t_d = b;
      #1 check("no result before edge", r, prev_r);
      @(negedge clk);
      {o1_we, t_we} = '0;
      check($sformatf("op %0d a=%h b=%h", op, a, b), r, ref_op(op, a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
