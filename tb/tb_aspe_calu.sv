// tb_aspe_calu: self-checking test of the complex ALU. Every operation
// with random operands over the full 16-bit range (so saturation occurs),
// checked one cycle after issue against a 32-bit integer model; also
// checks that the output holds when en or ce is low.
module tb_aspe_calu;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  calu_ctrl_t ctrl;
  simd_t a, b, y;

  aspe_calu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] s16(int v);
    if (v > 32767)  v = 32767;
    if (v < -32768) v = -32768;
    return W'(v);
  endfunction

  function automatic simd_t model(calu_op_e op, simd_t aa, simd_t bb);
    simd_t r;
    for (int l = 0; l < LANES; l++) begin
      int ar = int'(aa[l].re), ai = int'(aa[l].im), br = int'(bb[l].re), bi = int'(bb[l].im);
      case (op)
        CALU_ADD:     begin r[l].re = s16(ar + br); r[l].im = s16(ai + bi); end
        CALU_SUB:     begin r[l].re = s16(ar - br); r[l].im = s16(ai - bi); end
        CALU_NEG:     begin r[l].re = s16(-ar);     r[l].im = s16(-ai);     end
        CALU_CONJ:    begin r[l].re = s16(ar);      r[l].im = s16(-ai);     end
        CALU_NEGCONJ: begin r[l].re = s16(-ar);     r[l].im = s16(ai);      end
        default:      begin r[l].re = s16(ar);      r[l].im = s16(ai);      end
      endcase
    end
    return r;
  endfunction

  initial begin
    simd_t e = '0;
    ce = 1'b0; ctrl = '0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      ce = ($urandom_range(0, 7) != 0);
      ctrl = '0;
      ctrl.en = ($urandom_range(0, 5) != 0);
      ctrl.op = calu_op_e'($urandom_range(0, 5));
      a = simd_t'({$urandom, $urandom});
      b = simd_t'({$urandom, $urandom});
      if (i % 4 == 0) begin a[0].re = 16'h8000; a[1].im = 16'h8000; end
      if (ce && ctrl.en) e = model(ctrl.op, a, b);
      @(negedge clk);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("i=%0d op=%0d dut %h expected %h", i, ctrl.op, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
