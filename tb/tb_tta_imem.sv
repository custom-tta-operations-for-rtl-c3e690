// tb_tta_imem: self-checking test of the instruction memory (64 x 300 bits): the
// host writes random words, and every word is read back combinationally.
module tb_tta_imem;
  localparam int IW = 300;
  logic clk = 0, we;
  logic [5:0] waddr, raddr;
  logic [IW-1:0] wdata, rdata;
  logic [IW-1:0] model [64];
  int checks = 0, failures = 0;

  tta_imem #(.DEPTH(64), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); we = 1; waddr = 6'(i);
        for (int j = 0; j < IW; j += 32) wdata[j +: 32] = $urandom;
        model[i] = wdata;
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 64; i++) begin
        raddr = 6'(63 - i); #1;
        checks++;
        if (rdata !== model[63 - i]) begin failures++; $display("FAIL word %0d", 63 - i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
