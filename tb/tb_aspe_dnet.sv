// tb_aspe_dnet: self-checking test of the data network crossbar. Each
// source carries a distinct random word; random select patterns (including
// unused codes, which must give zero) are applied and every sink is
// compared with the source its field names.
module tb_aspe_dnet;
  import aspe_pkg::*;

  dnet_ctrl_t ctrl;
  simd_t src [NSRC];
  simd_t snk [NSNK];
  simd_t e;

  aspe_dnet dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int s = 0; s < NSRC; s++) src[s] = simd_t'({$urandom, $urandom});
      ctrl = '0;
      for (int k = 0; k < NSNK; k++) ctrl.sel[k] = 4'($urandom);
      #1;
      for (int k = 0; k < NSNK; k++) begin
        e = (int'(ctrl.sel[k]) < NSRC) ? src[ctrl.sel[k]] : '0;
        checks++;
        if (snk[k] !== e) begin
          failures++;
          if (failures < 10) $display("sink %0d sel %0d: dut %h expected %h", k, ctrl.sel[k], snk[k], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
