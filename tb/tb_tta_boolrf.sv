// tb_tta_boolrf: self-checking test of the 2 x 1-bit boolean register file with 4
// write ports: random writes against a model, checked every cycle, values appear
// only after the clock edge, highest port wins a conflict.
module tb_tta_boolrf;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] we, wdata;
  logic waddr [NP];
  logic [1:0] q, model;
  int checks = 0, failures = 0;

  tta_boolrf #(.DEPTH(2), .NWR(NP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; wdata = '0; model = '0;
    for (int p = 0; p < NP; p++) waddr[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%b exp %b", q, model); end
      we = NP'($urandom); wdata = NP'($urandom);
      for (int p = 0; p < NP; p++) waddr[p] = 1'($urandom);
      #1 checks++;
      if (q !== model) begin failures++; $display("FAIL changed before edge"); end
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
