// tb_aspe_ibuf: self-checking test of the input buffer. A random producer
// (in_valid) and a random consumer that pops only when the buffer is not
// empty (as the stalling core does) exchange 3000 words; order and
// contents are checked against a queue, the head word must appear on both
// lanes, and in_ready must drop exactly when 32 words are held and none
// leaves in the same cycle.
module tb_aspe_ibuf;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, pop, empty;
  cplx_t in_data;
  simd_t rdata;
  cplx_t q [$];

  aspe_ibuf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, sent = 0, got = 0, full_seen = 0;

  initial begin
    in_valid = 1'b0; in_data = '0; pop = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (got < 3000) begin
      // phases: producer fast, then consumer fast
      in_valid = (sent < 3000) && ($urandom_range(0, 9) < ((got / 500) % 2 ? 3 : 9));
      in_data  = cplx_t'($urandom);
      pop      = !empty && ($urandom_range(0, 9) < ((got / 500) % 2 ? 9 : 3));
      #1;
      checks++;
      if (empty != (q.size() == 0) || in_ready != (q.size() < 32 || pop)) begin
        failures++;
        if (failures < 10) $display("status: empty=%b ready=%b held=%0d", empty, in_ready, q.size());
      end
      if (q.size() == 32) full_seen++;
      if (pop) begin
        checks++;
        if (rdata[0] !== q[0] || rdata[1] !== q[0]) begin
          failures++;
          if (failures < 10) $display("word %0d: dut %h expected %h", got, rdata, q[0]);
        end
      end
      @(posedge clk);
      if (pop) begin void'(q.pop_front()); got++; end
      if (in_valid && in_ready) begin q.push_back(in_data); sent++; end
      @(negedge clk);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("buffer never filled"); end
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
