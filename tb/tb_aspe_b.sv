// tb_aspe_b: end-to-end test of ASPE B at its default parameters. A
// program for 2x2 direct inversion of Hermitian positive-definite
// matrices
//     [a b; b* c]^-1 = 1/(ac - |b|^2) [c -b; -b* a]
// is assembled here, compressed into index and dictionary words and loaded
// through the program port. Each loop iteration reads two matrices from
// the input buffer (one per SIMD lane: a0 b0 c0 a1 b1 c1), computes
// r2 = a*c - b*conj(b) in CMAC0 (multiply, then accumulate-subtract),
// r3 = 1/r2 in DIV, x = r3*c and z = r3*a in CMAC0, y = -r3*b in CMAC1,
// parks x and z in REG and writes x0 x1 y0 y1 z0 z1 to the output buffer.
//
// Checks: every output word against a bit-exact integer model of the
// arithmetic, F * F^-1 close to the identity in real arithmetic, the cycle
// count of a stall-free run (2 + 23 per matrix pair), and that each
// mechanism happened: stalls on an empty input buffer, stalls on a full
// output buffer, loop iterations, shared dictionary words and two
// different matrices in the two SIMD lanes.
module tb_aspe_b;
  import aspe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic idx_we, dict_we, start, busy, done, stall;
  logic [7:0] idx_addr;
  logic [7:0] idx_wdata, dict_addr;
  vliw_t dict_wdata;
  logic in_valid, in_ready, out_valid, out_ready;
  cplx_t in_data, out_data;

  aspe_b dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ assembler
  localparam int BODY = 23;
  vliw_t body [BODY];
  vliw_t prog [$];
  vliw_t dict [$];
  int    pidx [$];

  function automatic void route(int t, int sink, src_e s);
    body[t].dnet.sel[sink] = s;
  endfunction

  function automatic void ram_wr(int t, int u, int addr, logic [1:0] lanes);
    body[t].ram[u].we = 1'b1; body[t].ram[u].lane_we = lanes; body[t].ram[u].addr = 8'(addr);
    route(t, SNK_RAM0 + u, SRC_IBUF);
    body[t].ibuf.pop = 1'b1;
  endfunction

  function automatic void push(int t, src_e s, bit lane);
    body[t].obuf.push = 1'b1; body[t].obuf.lane = lane;
    route(t, SNK_OBUF, s);
  endfunction

  function automatic void assemble(int pairs);
    vliw_t v;
    for (int t = 0; t < BODY; t++) body[t] = '0;
    // load a, b, c of both matrices: a -> RAM0, c -> RAM1, b -> RAM2
    ram_wr(0, 0, 0, 2'b01); ram_wr(1, 2, 0, 2'b01); ram_wr(2, 1, 0, 2'b01);
    ram_wr(3, 0, 0, 2'b10); ram_wr(4, 2, 0, 2'b10); ram_wr(5, 1, 0, 2'b10);
    for (int u = 0; u < 3; u++) begin body[6].ram[u].re = 1'b1; body[6].ram[u].addr = 8'd0; end
    // r2 = a*c - b*conj(b)
    body[7].cmac0.en = 1'b1; route(7, SNK_CMAC0_A, SRC_RAM0); route(7, SNK_CMAC0_B, SRC_RAM1);
    body[8].cmac0.en = 1'b1; body[8].cmac0.acc = 1'b1; body[8].cmac0.neg = 1'b1; body[8].cmac0.conj_b = 1'b1;
    route(8, SNK_CMAC0_A, SRC_RAM2); route(8, SNK_CMAC0_B, SRC_RAM2);
    // r3 = 1/r2 (r2 on CMAC0 from t = 8 + CMAC_LAT)
    body[10].div.en = 1'b1; route(10, SNK_DIV, SRC_CMAC0);
    // x = r3*c, y = -r3*b, z = r3*a (r3 on DIV from t = 10 + DIV_LAT)
    body[14].cmac0.en = 1'b1; route(14, SNK_CMAC0_A, SRC_DIV); route(14, SNK_CMAC0_B, SRC_RAM1);
    body[14].cmac1.en = 1'b1; body[14].cmac1.neg = 1'b1;
    route(14, SNK_CMAC1_A, SRC_DIV); route(14, SNK_CMAC1_B, SRC_RAM2);
    body[15].cmac0.en = 1'b1; route(15, SNK_CMAC0_A, SRC_DIV); route(15, SNK_CMAC0_B, SRC_RAM0);
    // x -> r0, z -> r1
    body[16].rf.we = 1'b1; body[16].rf.lane_we = 2'b11; body[16].rf.waddr = 3'd0; route(16, SNK_REG, SRC_CMAC0);
    body[17].rf.we = 1'b1; body[17].rf.lane_we = 2'b11; body[17].rf.waddr = 3'd1; route(17, SNK_REG, SRC_CMAC0);
    // output x0 x1 y0 y1 z0 z1
    body[17].rf.raddr = 3'd0; push(17, SRC_REG, 1'b0);
    body[18].rf.raddr = 3'd0; push(18, SRC_REG, 1'b1);
    push(19, SRC_CMAC1, 1'b0);
    push(20, SRC_CMAC1, 1'b1);
    body[21].rf.raddr = 3'd1; push(21, SRC_REG, 1'b0);
    body[22].rf.raddr = 3'd1; push(22, SRC_REG, 1'b1);
    body[22].seq.op = SEQ_DJNZ; body[22].seq.imm = 8'd1;
    // program: LOOP pairs-1, body, HALT
    prog.delete();
    v = '0; v.seq.op = SEQ_LOOP; v.seq.imm = 8'(pairs - 1);
    prog.push_back(v);
    for (int t = 0; t < BODY; t++) prog.push_back(body[t]);
    v = '0; v.seq.op = SEQ_HALT;
    prog.push_back(v);
    // dictionary compression
    dict.delete(); pidx.delete();
    foreach (prog[i]) begin
      int found = -1;
      foreach (dict[j]) if (dict[j] == prog[i]) found = j;
      if (found < 0) begin dict.push_back(prog[i]); found = dict.size() - 1; end
      pidx.push_back(found);
    end
  endfunction

  task automatic load_program();
    foreach (dict[j]) begin
      dict_we = 1'b1; dict_addr = 8'(j); dict_wdata = dict[j];
      @(negedge clk);
    end
    dict_we = 1'b0;
    foreach (pidx[i]) begin
      idx_we = 1'b1; idx_addr = 8'(i); idx_wdata = 8'(pidx[i]);
      @(negedge clk);
    end
    idx_we = 1'b0;
  endtask

  // ------------------------------------------------------ reference model
  function automatic longint rnd(longint v);
    longint r = (v + (longint'(1) << (FRAC-1))) >>> FRAC;
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  // expected x, y, z of one matrix (a, c real; b complex), integer words
  function automatic void inv2(input int a, int br, int bi, int c,
                               output cplx_t x, output cplx_t y, output cplx_t z);
    longint r2, r3;
    r2 = rnd(longint'(a) * c - (longint'(br) * br + longint'(bi) * bi));
    r3 = (r2 <= 0) ? 32767 : (longint'(1) << (2*FRAC)) / r2;
    if (r3 > 32767) r3 = 32767;
    x.re = W'(rnd(r3 * c));  x.im = '0;
    y.re = W'(rnd(-r3 * br)); y.im = W'(rnd(-r3 * bi));
    z.re = W'(rnd(r3 * a));  z.im = '0;
  endfunction

  // ------------------------------------------------------------- stimulus
  localparam int MAXM = 64;
  int    ma [MAXM], mbr [MAXM], mbi [MAXM], mc [MAXM];
  cplx_t in_words [$];
  cplx_t out_words [$];
  int    stall_in = 0, stall_out = 0, loops = 0, in_gap_pct = 0, out_gap_pct = 0;
  bit    hold_out = 1'b0;

  function automatic void make_matrices(int n);
    in_words.delete();
    for (int m = 0; m < n; m++) begin
      real ar, cr, lim, mag, ph;
      cplx_t w;
      ar  = 0.5 + 2.0 * $urandom_range(0, 1000) / 1000.0;
      cr  = 0.5 + 2.0 * $urandom_range(0, 1000) / 1000.0;
      lim = 0.9 * $sqrt(ar * cr);
      mag = lim * $urandom_range(0, 1000) / 1000.0;
      ph  = 6.283185 * $urandom_range(0, 1000) / 1000.0;
      ma[m]  = int'(ar * (1 << FRAC));
      mc[m]  = int'(cr * (1 << FRAC));
      mbr[m] = int'(mag * $cos(ph) * (1 << FRAC));
      mbi[m] = int'(mag * $sin(ph) * (1 << FRAC));
    end
    for (int p = 0; p < n / 2; p++)
      for (int l = 0; l < 2; l++) begin
        int m = 2 * p + l;
        cplx_t w;
        w.re = W'(ma[m]);  w.im = '0;        in_words.push_back(w);
        w.re = W'(mbr[m]); w.im = W'(mbi[m]); in_words.push_back(w);
        w.re = W'(mc[m]);  w.im = '0;        in_words.push_back(w);
      end
  endfunction

  // input driver: the handshake is sampled at the rising edge, the queue
  // and the gap pattern change at the falling edge
  logic in_gap = 1'b0, in_fire = 1'b0;
  always @(posedge clk) in_fire <= in_valid && in_ready;
  always @(negedge clk) begin
    if (in_fire) void'(in_words.pop_front());
    in_gap = ($urandom_range(0, 99) < in_gap_pct);
  end
  assign in_valid = (in_words.size() > 0) && !in_gap;
  assign in_data  = (in_words.size() > 0) ? in_words[0] : '0;

  // output collector
  always @(posedge clk) begin
    out_ready <= !hold_out && ($urandom_range(0, 99) >= out_gap_pct);
    if (rst_n && out_valid && out_ready) out_words.push_back(out_data);
    if (busy && stall && dut.instr.ibuf.pop)  stall_in++;
    if (busy && stall && dut.instr.obuf.push) stall_out++;
    if (busy && !stall && dut.instr.seq.op == SEQ_DJNZ && dut.u_seq.loop_cnt != 0) loops++;
  end

  task automatic check_results(int n);
    for (int p = 0; p < n / 2; p++) begin
      cplx_t ex [2], ey [2], ez [2], got;
      for (int l = 0; l < 2; l++) inv2(ma[2*p+l], mbr[2*p+l], mbi[2*p+l], mc[2*p+l], ex[l], ey[l], ez[l]);
      for (int k = 0; k < 6; k++) begin
        cplx_t e;
        case (k) 0: e = ex[0]; 1: e = ex[1]; 2: e = ey[0]; 3: e = ey[1]; 4: e = ez[0]; default: e = ez[1]; endcase
        got = out_words.pop_front();
        checks++;
        if (got !== e) begin
          failures++;
          if (failures < 10) $display("pair %0d word %0d: dut %h expected %h", p, k, got, e);
        end
      end
      // F * F^-1 = I in real arithmetic, using the expected (already checked) words
      for (int l = 0; l < 2; l++) begin
        real s = 1.0 / (1 << FRAC);
        real a = ma[2*p+l] * s, c = mc[2*p+l] * s, br = mbr[2*p+l] * s, bi = mbi[2*p+l] * s;
        real x = $signed(ex[l].re) * s, z = $signed(ez[l].re) * s;
        real yr = $signed(ey[l].re) * s, yi = $signed(ey[l].im) * s;
        real i11, i12r, i12i, i22;
        i11  = a * x + (br * yr + bi * yi);      // a*x + b*y^*
        i12r = a * yr + br * z;                  // a*y + b*z
        i12i = a * yi + bi * z;
        i22  = (br * yr + bi * yi) + c * z;      // b^* y + c z
        checks++;
        if ((i11 - 1.0) ** 2 > 4e-4 || (i22 - 1.0) ** 2 > 4e-4 || i12r ** 2 + i12i ** 2 > 4e-4) begin
          failures++;
          $display("pair %0d lane %0d: F*inv(F) = [%f (%f,%f); . %f]", p, l, i11, i12r, i12i, i22);
        end
      end
    end
  endtask

  task automatic run(int pairs, output int cycles);
    cycles = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc, words, n;
    idx_we = 1'b0; dict_we = 1'b0; start = 1'b0;
    idx_addr = '0; idx_wdata = '0; dict_addr = '0; dict_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // run 1: 8 matrix pairs, irregular input, output held back (fills O-BUF)
    n = 16;
    assemble(n / 2);
    load_program();
    checks++;
    if (dict.size() >= prog.size()) begin failures++; $display("no dictionary word shared"); end
    $display("program: %0d instructions, %0d dictionary words", prog.size(), dict.size());
    make_matrices(n);
    in_gap_pct = 30; out_gap_pct = 20; hold_out = 1'b1;
    fork
      run(n / 2, cyc);
      begin repeat (150) @(posedge clk); hold_out = 1'b0; end
    join
    while (out_words.size() < 3 * n) @(negedge clk);
    check_results(n);

    // run 2: 5 pairs, all input waiting, no back-pressure: exact cycle count
    n = 10;
    assemble(n / 2);
    load_program();
    make_matrices(n);
    in_gap_pct = 0; out_gap_pct = 0;
    repeat (40) @(negedge clk);
    run(n / 2, cyc);
    checks++;
    if (cyc != 2 + BODY * (n / 2)) begin failures++; $display("cycles %0d, expected %0d", cyc, 2 + BODY * (n / 2)); end
    $display("stall-free run: %0d cycles for %0d matrices", cyc, n);
    repeat (10) @(negedge clk);
    check_results(n);

    // mechanisms
    $display("input stalls %0d, output stalls %0d, loop iterations %0d", stall_in, stall_out, loops);
    checks++; if (stall_in == 0)  begin failures++; $display("no input stall"); end
    checks++; if (stall_out == 0) begin failures++; $display("no output stall"); end
    checks++; if (loops == 0)     begin failures++; $display("no loop iteration"); end
    checks++; if (ma[0] == ma[1] && mc[0] == mc[1]) begin failures++; $display("lanes got equal data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
