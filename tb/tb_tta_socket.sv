// tb_tta_socket: self-checking test of the input socket, one instance for an operand
// port (exact id) and one for a trigger port (id under mask 0xF0, opcode in the low
// bits). Random bus traffic with at most one move to each port per cycle.
module tb_tta_socket;
  import tta_pkg::*;
  localparam int NB = 4;
  logic [NB-1:0] bus_en;
  logic [7:0] bus_dst [NB];
  word_t bus_val [NB];
  logic hit_o, hit_t;
  logic [3:0] op_o, op_t;
  word_t d_o, d_t;
  int checks = 0, failures = 0, hits = 0;

  tta_socket #(.NBUS(NB), .ID(D_ASC_O3)) s_o (.bus_en, .bus_dst, .bus_val, .hit(hit_o), .op(op_o), .data(d_o));
  tta_socket #(.NBUS(NB), .ID(D_ASC_T), .MASK(TRIG_MASK)) s_t (.bus_en, .bus_dst, .bus_val, .hit(hit_t), .op(op_t), .data(d_t));

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bo, bt;
    logic [3:0] eo;
    for (int k = 0; k < 4000; k++) begin
      bo = $urandom_range(0, 2 * NB - 1);  // bus carrying the operand move, >= NB: none
      bt = $urandom_range(0, 2 * NB - 1);
      if (bt == bo) bt = NB;
      eo = 4'($urandom);
      for (int b = 0; b < NB; b++) begin
        bus_en[b] = 1'($urandom);
        bus_val[b] = {$urandom, $urandom};
        do bus_dst[b] = 8'($urandom); while (bus_dst[b] == D_ASC_O3 || bus_dst[b][7:4] == D_ASC_T[7:4]);
        if (b == bo) begin bus_en[b] = 1'b1; bus_dst[b] = D_ASC_O3; end
        if (b == bt) begin bus_en[b] = 1'b1; bus_dst[b] = D_ASC_T | 8'(eo); end
      end
      if (k % 7 == 0 && bo < NB) bus_en[bo] = 1'b0;
      #1;
      checks += 2;
      if (bo < NB && bus_en[bo]) begin
        hits++;
        if (!hit_o || d_o !== bus_val[bo]) begin failures++; $display("FAIL operand socket bus %0d", bo); end
      end else if (hit_o) begin failures++; $display("FAIL operand socket false hit"); end
      if (bt < NB) begin
        if (!hit_t || d_t !== bus_val[bt] || op_t !== eo) begin failures++; $display("FAIL trigger socket bus %0d", bt); end
      end else if (hit_t) begin failures++; $display("FAIL trigger socket false hit"); end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
