// tb_aspe_cmac: self-checking test of the complex MAC unit. Random
// operands (full 16-bit range, so saturation occurs), random
// multiply/accumulate/negate/conjugate options, random issue and random
// clock-enable gaps. A cycle-level model using 64-bit integer arithmetic
// predicts the output register, which is compared in every cycle. Also
// checks the two-cycle issue-to-result latency with a directed case.
module tb_aspe_cmac;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  cmac_ctrl_t ctrl;
  simd_t a, b, y;

  aspe_cmac dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // model state
  longint     m_acc_re [LANES], m_acc_im [LANES];
  bit         m_v1;
  cmac_ctrl_t m_c1;
  simd_t      m_a1, m_b1, m_y;

  function automatic logic [W-1:0] rnd_sat(longint v);
    longint r;
    r = (v + (longint'(1) << (FRAC-1))) >>> FRAC;
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return W'(r);
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      m_v1 = 0; m_y = '0;
      for (int l = 0; l < LANES; l++) begin m_acc_re[l] = 0; m_acc_im[l] = 0; end
    end else if (ce) begin
      if (m_v1) begin
        for (int l = 0; l < LANES; l++) begin
          longint ar, ai, br, bi, pr, pi;
          ar = longint'(m_a1[l].re); ai = longint'(m_a1[l].im);
          br = longint'(m_b1[l].re); bi = longint'(m_b1[l].im);
          if (m_c1.conj_a) ai = -ai;
          if (m_c1.conj_b) bi = -bi;
          pr = ar*br - ai*bi;
          pi = ar*bi + ai*br;
          if (m_c1.neg) begin pr = -pr; pi = -pi; end
          m_acc_re[l] = (m_c1.acc ? m_acc_re[l] : 0) + pr;
          m_acc_im[l] = (m_c1.acc ? m_acc_im[l] : 0) + pi;
          m_y[l].re = rnd_sat(m_acc_re[l]);
          m_y[l].im = rnd_sat(m_acc_im[l]);
        end
      end
      m_v1 = ctrl.en;
      if (ctrl.en) begin m_c1 = ctrl; m_a1 = a; m_b1 = b; end
    end
  end

  function automatic logic [W-1:0] rnd16(int mode);
    // mode 0: small values, 1: full range
    if (mode == 0) return W'($urandom_range(0, 8191)) - W'(4096);
    return W'($urandom);
  endfunction

  initial begin
    ce = 1'b0; ctrl = '0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed latency check: (1+2j)*(3-1j) in Q.FRAC = 5+5j, visible 2 cycles after issue
    @(negedge clk);
    ce = 1'b1;
    ctrl = '0; ctrl.en = 1'b1;
    for (int l = 0; l < LANES; l++) begin
      a[l].re = W'(1 << FRAC); a[l].im = W'(2 << FRAC);
      b[l].re = W'(3 << FRAC); b[l].im = W'(-(1 << FRAC));
    end
    @(negedge clk); ctrl = '0;
    checks++;
    if (y[0].re == W'(5 << FRAC)) begin failures++; $display("result visible after 1 cycle"); end
    @(negedge clk);
    checks++;
    if (y[0].re != W'(5 << FRAC) || y[0].im != W'(5 << FRAC) || y[1] != y[0]) begin
      failures++; $display("directed product wrong: %h", y);
    end
    // random
    for (int i = 0; i < 20000; i++) begin
      ce   = ($urandom_range(0, 9) != 0);
      ctrl = '0;
      ctrl.en     = ($urandom_range(0, 7) != 0);
      ctrl.acc    = $urandom_range(0, 1);
      ctrl.neg    = $urandom_range(0, 1);
      ctrl.conj_a = $urandom_range(0, 1);
      ctrl.conj_b = $urandom_range(0, 1);
      for (int l = 0; l < LANES; l++) begin
        int mode = (i > 15000) ? 1 : 0;
        a[l].re = rnd16(mode); a[l].im = rnd16(mode);
        b[l].re = rnd16(mode); b[l].im = rnd16(mode);
      end
      @(negedge clk);
      checks++;
      if (y !== m_y) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: dut %h model %h", i, y, m_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
