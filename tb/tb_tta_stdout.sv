// tb_tta_stdout: self-checking test of the printf output unit: every trigger gives
// exactly one out_valid pulse in the next cycle with the word, or the low byte for
// a character, and no pulse without a trigger.
module tb_tta_stdout;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0, t_we, out_valid, out_char;
  logic [3:0] t_op;
  word_t t_d, out_data;
  int checks = 0, failures = 0;

  tta_stdout dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pw, pc;
    word_t pd;
    t_we = 0; t_op = '0; t_d = '0; pw = 0; pc = 0; pd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== pw || (pw && (out_char !== pc || out_data !== pd))) begin
        failures++; $display("FAIL k=%0d valid=%b/%b data=%h/%h", k, out_valid, pw, out_data, pd);
      end
      t_we = 1'($urandom); t_op = 4'($urandom_range(0, 1)); t_d = {$urandom, $urandom};
      pw = t_we; pc = (t_op == 1); pd = pc ? {56'd0, t_d[7:0]} : t_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
