// tb_aspe_ram: self-checking test of a 256-word storage unit. Fills every
// address with a known pattern and reads it back, then runs random
// lane-masked writes, reads and clock-enable gaps against a shadow array,
// checking the one-cycle read latency, read-old-data on a same-address
// write, and that the read register holds between reads.
module tb_aspe_ram;
  import aspe_pkg::*;

  localparam int DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0, ce;
  ram_ctrl_t ctrl;
  simd_t wdata, rdata, exp_r;
  simd_t shadow [DEPTH];

  aspe_ram dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(string what);
    checks++;
    if (rdata !== exp_r) begin
      failures++;
      if (failures < 10) $display("%s: dut %h expected %h", what, rdata, exp_r);
    end
  endtask

  initial begin
    ce = 1'b1; ctrl = '0; wdata = '0; exp_r = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      ctrl = '0; ctrl.we = 1'b1; ctrl.lane_we = 2'b11; ctrl.addr = 8'(i);
      wdata = simd_t'({32'(i * 7919), 32'(~i)});
      shadow[i] = wdata;
      @(negedge clk);
    end
    // read back
    for (int i = 0; i < DEPTH; i++) begin
      ctrl = '0; ctrl.re = 1'b1; ctrl.addr = 8'(DEPTH - 1 - i);
      @(negedge clk);
      exp_r = shadow[DEPTH - 1 - i];
      check("readback");
    end
    // random
    for (int i = 0; i < 5000; i++) begin
      ce = ($urandom_range(0, 7) != 0);
      ctrl = '0;
      ctrl.we      = $urandom_range(0, 1);
      ctrl.re      = $urandom_range(0, 1);
      ctrl.lane_we = 2'($urandom);
      ctrl.addr    = 8'($urandom_range(0, 15));
      wdata = simd_t'({$urandom, $urandom});
      @(posedge clk);
      if (ce && ctrl.re) exp_r = shadow[ctrl.addr];
      if (ce && ctrl.we)
        for (int l = 0; l < LANES; l++) if (ctrl.lane_we[l]) shadow[ctrl.addr][l] = wdata[l];
      @(negedge clk);
      check("random");
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
