// tb_tta_imu: self-checking test of the immediate unit: random long-immediate
// writes from 4 slots into 2 registers against a model, checked every cycle.
module tb_tta_imu;
  import tta_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] we;
  logic  idx [NP];
  word_t d [NP];
  word_t q [2];
  word_t model [2];
  int checks = 0, failures = 0;

  tta_imu #(.NREG(2), .NWR(NP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; model[0] = '0; model[1] = '0;
    for (int p = 0; p < NP; p++) begin idx[p] = 0; d[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (q[i] !== model[i]) begin failures++; $display("FAIL imu%0d %h exp %h", i, q[i], model[i]); end
      end
      we = (k % 3 == 0) ? NP'($urandom) : '0;
      for (int p = 0; p < NP; p++) begin idx[p] = 1'($urandom); d[p] = {$urandom, $urandom}; end
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p]) model[idx[p]] = d[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
