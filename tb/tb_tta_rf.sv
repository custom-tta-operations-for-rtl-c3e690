// tb_tta_rf: self-checking test of the 32 x 64 register file with 4 read and 4 write
// ports. Random writes on random ports are mirrored in a testbench model; every
// read port is checked every cycle, a write is checked to appear only after the
// clock edge, and a same-register conflict is checked to go to the highest port.
module tb_tta_rf;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] we;
  logic [4:0]  waddr [NP];
  logic [63:0] wdata [NP];
  logic [4:0]  raddr [NP];
  logic [63:0] rdata [NP];
  logic [63:0] model [32];
  int checks = 0, failures = 0;

  tta_rf #(.DEPTH(32), .W(64), .NRD(NP), .NWR(NP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0;
    for (int p = 0; p < NP; p++) begin waddr[p] = '0; wdata[p] = '0; raddr[p] = '0; end
    for (int i = 0; i < 32; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        we[p]    = 1'($urandom_range(0, 1));
        waddr[p] = 5'($urandom_range(0, 31));
        wdata[p] = {$urandom, $urandom};
        raddr[p] = (p == 0) ? waddr[0] : 5'($urandom_range(0, 31));
      end
      if (k % 10 == 0) begin we[1] = 1; we[3] = 1; waddr[3] = waddr[1]; end
      #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++; $display("FAIL read port %0d reg %0d: %h exp %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
