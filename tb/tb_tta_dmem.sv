// tb_tta_dmem: self-checking test of the dual-port data memory (reduced to 64
// words). Random byte-masked writes and reads on both ports against a model;
// read data is checked one cycle after the read and checked to hold over
// following writes on the same port.
module tb_tta_dmem;
  localparam int D = 64;
  logic clk = 0;
  logic a_en, b_en;
  logic [7:0] a_be, b_be;
  logic [5:0] a_addr, b_addr;
  logic [63:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [63:0] model [D];
  logic [63:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  tta_dmem #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit rd_a, rd_b;
    {a_en, b_en, a_be, b_be, a_addr, b_addr, a_wdata, b_wdata} = '0;
    // fill through port B
    for (int i = 0; i < D; i++) begin
      @(negedge clk); b_en = 1; b_be = 8'hFF; b_addr = 6'(i); b_wdata = {$urandom, $urandom};
      model[i] = b_wdata;
    end
    @(negedge clk); b_en = 0;
    rd_a = 0; rd_b = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (rd_a) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("FAIL A %h exp %h", a_rdata, exp_a); end end
      if (rd_b) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("FAIL B %h exp %h", b_rdata, exp_b); end end
      a_en = 1'($urandom); b_en = 1'($urandom);
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      a_be = ($urandom_range(0, 1) == 1) ? 8'($urandom) : 8'h00;
      b_be = ($urandom_range(0, 1) == 1) ? 8'($urandom) : 8'h00;
      if (a_addr == b_addr) b_be = '0;
      a_wdata = {$urandom, $urandom}; b_wdata = {$urandom, $urandom};
      if (a_en && a_be == 0) begin exp_a = model[a_addr]; rd_a = 1; end
      if (b_en && b_be == 0) begin exp_b = model[b_addr]; rd_b = 1; end
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        if (a_en && a_be[i]) model[a_addr][8*i +: 8] = a_wdata[8*i +: 8];
        if (b_en && b_be[i]) model[b_addr][8*i +: 8] = b_wdata[8*i +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
