// tb_aspe_div: self-checking test of the reciprocal unit. Issues one
// operation per cycle with random positive operands (plus zero, negative
// and tiny values that must saturate) and compares each result, DIV_LAT
// cycles after issue, with floor(2^(2*FRAC)/x) worked out in 64-bit
// integers. A second phase inserts clock-enable gaps and checks that the
// pipeline freezes and the output holds between results.
module tb_aspe_div;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  div_ctrl_t ctrl;
  simd_t x, y;

  aspe_div dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] recip(logic signed [W-1:0] v);
    longint q;
    if (v <= 0) return 16'h7fff;
    q = (longint'(1) << (2*FRAC)) / longint'(v);
    if (q > 32767) q = 32767;
    return W'(q);
  endfunction

  function automatic logic signed [W-1:0] pick(int i);
    case (i % 8)
      0:       return '0;
      1:       return W'(-$urandom_range(1, 30000));
      2:       return W'($urandom_range(1, 200));
      default: return W'($urandom_range(1, 32767));
    endcase
  endfunction

  simd_t exp_q [$];
  int    exp_t [$];
  int    cyc = 0;
  simd_t e_new, e_got;

  initial begin
    ce = 1'b0; ctrl = '0; x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: continuous issue, result at issue + DIV_LAT
    for (int i = 0; i < 4000 + DIV_LAT; i++) begin
      if (exp_t.size() > 0 && exp_t[0] == cyc) begin
        e_got = exp_q.pop_front();
        void'(exp_t.pop_front());
        checks++;
        if (y !== e_got) begin
          failures++;
          if (failures < 10) $display("cycle %0d: dut %h expected %h", cyc, y, e_got);
        end
      end
      ce = 1'b1;
      ctrl = '0;
      if (i < 4000) begin
        ctrl.en = 1'b1;
        for (int l = 0; l < LANES; l++) begin
          x[l].re = pick($urandom);
          x[l].im = W'($urandom);
          e_new[l].re = recip(x[l].re);
          e_new[l].im = '0;
        end
        exp_q.push_back(e_new);
        exp_t.push_back(cyc + DIV_LAT);
      end
      @(negedge clk);
      cyc++;
    end
    // phase 2: single op with ce gaps, output must not change y_old DIV_LAT enabled cycles
    begin
      simd_t y_old, e;
      int en_cycles;
      y_old = y;
      ce = 1'b1; ctrl.en = 1'b1;
      x[0].re = 16'd1000; x[1].re = 16'd3;
      e[0].re = recip(16'd1000); e[0].im = '0;
      e[1].re = recip(16'd3);    e[1].im = '0;
      @(negedge clk);
      ctrl.en = 1'b0;
      en_cycles = 1;
      for (int k = 0; k < 20; k++) begin
        ce = (k % 3 == 0);
        if (en_cycles < DIV_LAT) begin
          checks++;
          if (y !== y_old) begin failures++; $display("output changed early"); end
        end
        @(negedge clk);
        if (ce) en_cycles++;
      end
      checks++;
      if (y !== e) begin failures++; $display("frozen op: dut %h expected %h", y, e); end
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
