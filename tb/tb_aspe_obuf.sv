// tb_aspe_obuf: self-checking test of the output buffer. A random core
// side pushes one selected lane of random SIMD words only when 'full' is
// low (as the stalling core does); a random external consumer drains it.
// Order and contents are checked against a queue, and 'full' must be high
// exactly when 32 words are held.
module tb_aspe_obuf;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, lane, full, out_valid, out_ready;
  simd_t wdata;
  cplx_t out_data;
  cplx_t q [$];

  aspe_obuf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, sent = 0, got = 0, full_seen = 0;

  initial begin
    push = 1'b0; lane = 1'b0; wdata = '0; out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (got < 3000) begin
      push      = !full && (sent < 3000) && ($urandom_range(0, 9) < ((got / 500) % 2 ? 3 : 9));
      lane      = $urandom_range(0, 1);
      wdata     = simd_t'({$urandom, $urandom});
      out_ready = ($urandom_range(0, 9) < ((got / 500) % 2 ? 9 : 3));
      #1;
      checks++;
      if (full != (q.size() == 32) || out_valid != (q.size() != 0)) begin
        failures++;
        if (failures < 10) $display("status: full=%b valid=%b held=%0d", full, out_valid, q.size());
      end
      if (q.size() == 32) full_seen++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== q[0]) begin
          failures++;
          if (failures < 10) $display("word %0d: dut %h expected %h", got, out_data, q[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) begin void'(q.pop_front()); got++; end
      if (push) begin q.push_back(wdata[lane]); sent++; end
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
