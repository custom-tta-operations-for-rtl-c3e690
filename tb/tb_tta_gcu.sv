// tb_tta_gcu: self-checking test of the global control unit against a cycle model:
// start from idle, sequential pc advance, jump (target executes next cycle, no
// delay slot), call (ra = caller + 1), halt (running falls, pc frozen), restart,
// and start ignored while running.
module tb_tta_gcu;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0, start, t_we, running;
  logic [3:0] t_op;
  word_t t_d, ra;
  logic [9:0] pc;
  logic [9:0] m_pc;
  word_t m_ra;
  bit m_run;
  int checks = 0, failures = 0, jumps = 0, calls = 0, halts = 0;

  tta_gcu #(.IAW(10)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; t_we = 0; t_op = '0; t_d = '0;
    m_pc = 0; m_ra = 0; m_run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      checks++;
      if (pc !== m_pc || running !== m_run || ra !== m_ra) begin
        failures++; $display("FAIL k=%0d pc=%0d/%0d run=%b/%b ra=%0d/%0d", k, pc, m_pc, running, m_run, ra, m_ra);
      end
      start = ($urandom_range(0, 3) == 0);
      t_we = ($urandom_range(0, 4) == 0);
      t_op = 4'($urandom_range(0, 2));
      if ($urandom_range(0, 9) == 0) t_op = 4'($urandom_range(3, 15));
      if (t_op == 4'(GCU_HALT) && $urandom_range(0, 3) != 0) t_op = 4'(GCU_JUMP);
      t_d = {$urandom, $urandom};
      @(posedge clk);
      if (!m_run) begin
        if (start) begin m_pc = 0; m_run = 1; end
      end else if (t_we && t_op == 4'(GCU_JUMP)) begin m_pc = t_d[9:0]; jumps++; end
      else if (t_we && t_op == 4'(GCU_CALL)) begin m_ra = word_t'(m_pc) + 1; m_ra[63:10] = '0; m_pc = t_d[9:0]; calls++; end
      else if (t_we && t_op == 4'(GCU_HALT)) begin m_run = 0; m_pc = m_pc + 1; halts++; end
      else m_pc = m_pc + 1;
    end
    checks++;
    if (jumps == 0 || calls == 0 || halts == 0) begin failures++; $display("FAIL coverage"); end
    $display("jumps=%0d calls=%0d halts=%0d", jumps, calls, halts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
