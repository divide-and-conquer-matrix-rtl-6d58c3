// tb_aspe_regfile: self-checking test of the register file. Random writes
// with random lane enables and clock-enable gaps against a shadow array;
// the combinational read port is compared in every cycle, including a
// read of the register written in the previous cycle.
module tb_aspe_regfile;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  reg_ctrl_t ctrl;
  simd_t wdata, rdata;
  simd_t shadow [8];

  aspe_regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 8; i++) shadow[i] = '0;
    ce = 1'b0; ctrl = '0; wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      ce = ($urandom_range(0, 7) != 0);
      ctrl = '0;
      ctrl.we      = $urandom_range(0, 1);
      ctrl.lane_we = 2'($urandom);
      ctrl.waddr   = 3'($urandom);
      ctrl.raddr   = (i % 5 == 0) ? 3'($urandom) : ctrl.waddr;
      wdata = simd_t'({$urandom, $urandom});
      #1;
      checks++;
      if (rdata !== shadow[ctrl.raddr]) begin
        failures++;
        if (failures < 10) $display("i=%0d r%0d dut %h expected %h", i, ctrl.raddr, rdata, shadow[ctrl.raddr]);
      end
      @(posedge clk);
      if (ce && ctrl.we)
        for (int l = 0; l < LANES; l++) if (ctrl.lane_we[l]) shadow[ctrl.waddr][l] = wdata[l];
      @(negedge clk);
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
