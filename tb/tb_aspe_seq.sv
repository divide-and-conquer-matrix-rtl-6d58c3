// tb_aspe_seq: self-checking test of the sequencer. Loads a compressed
// program (index memory pointing into a dictionary; two program addresses
// share one dictionary word) that uses LOOP, DJNZ, JUMP and HALT, runs it
// twice with random stalls, and compares pc and the expanded VLIW in every
// issued cycle with a trace worked out by hand. Also checks that the core
// issues nothing while stalled or idle, that done pulses once, and the
// cycle count of the run without stalls.
module tb_aspe_seq;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic idx_we, dict_we, start, stall, busy, done, issue;
  logic [7:0] idx_addr, pc;
  logic [7:0] idx_wdata, dict_addr;
  vliw_t dict_wdata, instr;

  aspe_seq dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // program: pc -> dictionary index
  int    prog_idx [6] = '{1, 2, 3, 4, 2, 5};
  vliw_t dict [6];
  // expected pc trace of one run
  int    trace [9] = '{0, 1, 2, 1, 2, 1, 2, 3, 5};

  function automatic vliw_t mk(seq_op_e op, int imm, int tag);
    vliw_t v = '0;
    v.seq.op  = op;
    v.seq.imm = 8'(imm);
    v.cmac0   = cmac_ctrl_t'(16'(tag * 1111));
    v.ram[2].addr = 8'(tag);
    return v;
  endfunction

  task automatic run(bit with_stalls, output int cycles);
    int n = 0, dones = 0;
    cycles = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) begin
      stall = with_stalls && ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (issue != !stall) begin failures++; $display("issue wrong"); end
      if (!stall) begin
        checks++;
        if (n >= 9 || pc != 8'(trace[n]) || instr !== dict[prog_idx[trace[n]]]) begin
          failures++;
          if (failures < 10) $display("step %0d: pc %0d instr %h", n, pc, instr);
        end
        n++;
      end
      cycles++;
      @(negedge clk);
      if (done) dones++;
      if (cycles > 100) break;
    end
    checks++;
    if (n != 9 || dones != 1 || instr !== '0) begin
      failures++; $display("run end: steps %0d dones %0d", n, dones);
    end
  endtask

  initial begin
    int cyc;
    dict[0] = '0;
    dict[1] = mk(SEQ_LOOP, 2, 1);
    dict[2] = mk(SEQ_NEXT, 0, 2);
    dict[3] = mk(SEQ_DJNZ, 1, 3);
    dict[4] = mk(SEQ_JUMP, 5, 4);
    dict[5] = mk(SEQ_HALT, 0, 5);
    idx_we = 1'b0; dict_we = 1'b0; start = 1'b0; stall = 1'b0;
    idx_addr = '0; idx_wdata = '0; dict_addr = '0; dict_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || instr !== '0) begin failures++; $display("not idle after reset"); end
    for (int i = 0; i < 6; i++) begin
      dict_we = 1'b1; dict_addr = 8'(i); dict_wdata = dict[i];
      idx_we = 1'b1; idx_addr = 8'(i); idx_wdata = 8'(prog_idx[i]);
      @(negedge clk);
    end
    idx_we = 1'b0; dict_we = 1'b0;
    run(1'b0, cyc);
    checks++;
    if (cyc != 9) begin failures++; $display("cycles %0d, expected 9", cyc); end
    run(1'b1, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
