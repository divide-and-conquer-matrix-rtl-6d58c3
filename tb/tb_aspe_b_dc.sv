// tb_aspe_b_dc: workload test of ASPE B at its default parameters. It
// runs five programs, each on 16 random matrices, two at a time (one per
// SIMD lane):
//  - inversion of 3x3 and 4x4 Hermitian positive-definite matrices F by
//    divide and conquer with block size p = 2;
//  - the MMSE detector matrix G = (H^H H + s I)^-1 H^H (s = M_T sigma^2)
//    from a 2x2, 3x3 or 4x4 channel matrix H: form J = H^H H + s I, invert
//    it (2x2 direct, or divide and conquer), multiply by H^H.
// Divide and conquer, with F = [A B; B^H C], A 2x2, B 2xm, C mxm
// (m = 1 or 2): R1 = A^-1 (2x2 direct), R2 = B^H R1, R3 = R2 B,
// S = C - R3, Z = S^-1 (a DIV reciprocal for m = 1, 2x2 direct for
// m = 2), Y = -R2^H Z, R4 = Y R2, X = R1 - R4, F^-1 = [X Y; Y^H Z].
//
// Stream formats (per matrix pair, each word for lane 0 then lane 1):
// inversion inputs are A (a, b, c), B row by row, the upper triangle of
// C; outputs Z (upper triangle), Y row by row, X (upper triangle). MMSE
// inputs are H row by row, then s; outputs G row by row.
//
// The programs are written as lists of operations (CMAC chains of one to
// four products, CALU additions and subtractions, DIV reciprocals) on
// named values. A small list scheduler in this file gives every value a
// RAM address and chooses its RAM by graph colouring, so that the two
// operands of an operation never share a RAM port (each word of H is
// written to two RAMs as it arrives, one copy for J and one for G). It
// then places each operation at the earliest cycle at which its operands
// are stored and its RAM ports, CMAC, DIV, CALU and O-BUF slots are free,
// tries many RAM assignments, keeps the shortest loop body and emits the
// VLIWs. The same operation list, run through an integer model of the
// arithmetic, gives the expected output words.
//
// Checks, for each program: every output word bit-exact, F * F^-1 close
// to I (or J * G close to H^H) in real arithmetic, the program fits the
// dictionary, and the cycle count without stalls (2 + body length per
// pair). 16 matrices are more than the 32-word input buffer holds, so the
// input streams in while the program runs.
module tb_aspe_b_dc;
  import aspe_pkg::*;

  localparam int DAW = 8;   // dictionary address width of the default top

  logic clk = 1'b0, rst_n = 1'b0;
  logic idx_we, dict_we, start, busy, done, stall;
  logic [7:0] idx_addr;
  logic [DAW-1:0] idx_wdata, dict_addr;
  vliw_t dict_wdata;
  logic in_valid, in_ready, out_valid, out_ready;
  cplx_t in_data, out_data;

  aspe_b dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------ operation list
  typedef enum int {OP_CHAIN, OP_CALU, OP_RECIP} kind_e;
  typedef struct {
    kind_e    kind;
    calu_op_e cop;               // CALU operation (OP_CALU)
    int       dst;
    int       n;                 // terms of a chain
    int       a [4], b [4];      // operand values
    bit       ca [4], cb [4], ng [4];
  } op_t;
  // one operand: a value, possibly conjugated
  typedef struct {
    int v;
    bit c;
  } ref_t;

  localparam int NV = 128;
  op_t   ops [$];
  int    nvals = 0;
  int    inputs [$];              // values popped, in stream order
  int    inputs2 [$];             // second copy of each, in another RAM (-1: none)
  int    outputs [$];             // values pushed, in order
  int    in_r [$], in_c [$];      // their position in F
  int    out_r [$], out_c [$];    // their position in F^-1

  function automatic int newv();
    nvals++;
    return nvals - 1;
  endfunction
  function automatic ref_t rf(int v, bit c = 0);
    ref_t r;
    r.v = v; r.c = c;
    return r;
  endfunction
  // terms of the chain being built
  ref_t  pa [$], pb [$];
  bit    pn [$];
  function automatic void term(ref_t a, ref_t b, bit ng);
    pa.push_back(a); pb.push_back(b); pn.push_back(ng);
  endfunction
  // chain of the pending terms (one to four): sum of (-1)^ng * a * b
  function automatic int chain();
    op_t o;
    o.kind = OP_CHAIN; o.cop = CALU_PASS; o.dst = newv(); o.n = pa.size();
    for (int i = 0; i < 4; i++) begin
      o.a[i] = -1; o.b[i] = -1; o.ca[i] = 0; o.cb[i] = 0; o.ng[i] = 0;
      if (i < o.n) begin
        o.a[i] = pa[i].v; o.b[i] = pb[i].v; o.ca[i] = pa[i].c; o.cb[i] = pb[i].c; o.ng[i] = pn[i];
      end
    end
    pa.delete(); pb.delete(); pn.delete();
    ops.push_back(o);
    return o.dst;
  endfunction
  function automatic int calu_op(calu_op_e cop, int a, int b);
    op_t o;
    o.kind = OP_CALU; o.cop = cop; o.dst = newv(); o.n = 1;
    for (int i = 0; i < 4; i++) begin o.a[i] = -1; o.b[i] = -1; o.ca[i] = 0; o.cb[i] = 0; o.ng[i] = 0; end
    o.a[0] = a; o.b[0] = b;
    ops.push_back(o);
    return o.dst;
  endfunction
  function automatic int recip_op(int a);
    op_t o;
    o.kind = OP_RECIP; o.cop = CALU_PASS; o.dst = newv(); o.n = 1;
    for (int i = 0; i < 4; i++) begin o.a[i] = -1; o.b[i] = -1; o.ca[i] = 0; o.cb[i] = 0; o.ng[i] = 0; end
    o.a[0] = a;
    ops.push_back(o);
    return o.dst;
  endfunction

  // 2x2 direct inversion of [p q; q* r]: returns x, y, z of [x y; y* z]
  function automatic void inv2(int p, int q, int r, output int x, output int y, output int z);
    int d, rr;
    term(rf(p), rf(r), 0); term(rf(q), rf(q, 1), 1);
    d  = chain();
    rr = recip_op(d);
    term(rf(rr), rf(r), 0); x = chain();
    term(rf(rr), rf(q), 1); y = chain();
    term(rf(rr), rf(p), 0); z = chain();
  endfunction

  // sum over k < m of (-1)^ng * a[k] * b[k]
  function automatic int dot(ref_t a [2], ref_t b [2], int m, bit ng);
    for (int k = 0; k < m; k++) term(a[k], b[k], ng);
    return chain();
  endfunction

  // operation list for an N x N matrix. Inversion (gmode = 0, N = 3 or
  // 4): the input is the upper triangle of F and the output F^-1. MMSE
  // matrix (gmode = 1, N = 2, 3 or 4): the input is H (row by row) and
  // the scalar s = M_T sigma^2; the program forms J = H^H H + s I,
  // inverts it and outputs G = J^-1 H^H row by row.
  function automatic void build(int N, bit gmode);
    int m = N - 2;
    int F [4][4];                 // values of the matrix to invert, upper triangle
    int HJ [4][4], HG [4][4];     // the two copies of H
    int sv;
    ref_t Iv [4][4];              // its inverse, all entries
    ref_t R1 [2][2], Zf [2][2];
    int x1, y1, z1, R2 [2][2], R3 [2][2], S [2][2], Z [2][2], Y [2][2], R4 [2][2], X [2][2];
    ref_t ta [2], tb [2];
    ops.delete(); inputs.delete(); inputs2.delete(); in_r.delete(); in_c.delete();
    outputs.delete(); out_r.delete(); out_c.delete(); nvals = 0;
    if (gmode) begin
      // H, row by row, each word stored twice (for J and for G); then s
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          HJ[r][c] = newv(); HG[r][c] = newv();
          inputs.push_back(HJ[r][c]); inputs2.push_back(HG[r][c]);
          in_r.push_back(r); in_c.push_back(c);
        end
      sv = newv();
      inputs.push_back(sv); inputs2.push_back(-1);
      // J = H^H H + s I (upper triangle)
      for (int i = 0; i < N; i++)
        for (int k = i; k < N; k++) begin
          for (int r = 0; r < N; r++) term(rf(HJ[r][i], 1), rf(HJ[r][k]), 0);
          F[i][k] = chain();
          if (i == k) F[i][k] = calu_op(CALU_ADD, F[i][k], sv);
        end
    end else begin
      // stream order: A (a, b, c), B row by row, upper triangle of C
      in_r = '{0, 0, 1}; in_c = '{0, 1, 1};
      for (int k = 0; k < 2; k++)
        for (int j = 0; j < m; j++) begin in_r.push_back(k); in_c.push_back(2 + j); end
      for (int i = 0; i < m; i++)
        for (int j = i; j < m; j++) begin in_r.push_back(2 + i); in_c.push_back(2 + j); end
      foreach (in_r[w]) begin
        F[in_r[w]][in_c[w]] = newv();
        inputs.push_back(F[in_r[w]][in_c[w]]); inputs2.push_back(-1);
      end
    end
    // R1 = A^-1
    inv2(F[0][0], F[0][1], F[1][1], x1, y1, z1);
    R1[0][0] = rf(x1); R1[0][1] = rf(y1); R1[1][0] = rf(y1, 1); R1[1][1] = rf(z1);
    if (N == 2) begin
      Iv[0][0] = R1[0][0]; Iv[0][1] = R1[0][1]; Iv[1][0] = R1[1][0]; Iv[1][1] = R1[1][1];
    end else begin
      // R2 = B^H R1 (m x 2): R2[i][j] = sum_k conj(B[k][i]) R1[k][j]
      for (int i = 0; i < m; i++)
        for (int j = 0; j < 2; j++) begin
          for (int k = 0; k < 2; k++) begin ta[k] = rf(F[k][2+i], 1); tb[k] = R1[k][j]; end
          R2[i][j] = dot(ta, tb, 2, 0);
        end
      // R3 = R2 B and S = C - R3 (upper triangles, m x m)
      for (int i = 0; i < m; i++)
        for (int j = i; j < m; j++) begin
          for (int k = 0; k < 2; k++) begin ta[k] = rf(R2[i][k]); tb[k] = rf(F[k][2+j]); end
          R3[i][j] = dot(ta, tb, 2, 0);
          S[i][j] = calu_op(CALU_SUB, F[2+i][2+j], R3[i][j]);
        end
      // Z = S^-1
      if (m == 1) begin
        Z[0][0] = recip_op(S[0][0]);
        Zf[0][0] = rf(Z[0][0]);
      end else begin
        inv2(S[0][0], S[0][1], S[1][1], Z[0][0], Z[0][1], Z[1][1]);
        Zf[0][0] = rf(Z[0][0]); Zf[0][1] = rf(Z[0][1]); Zf[1][0] = rf(Z[0][1], 1); Zf[1][1] = rf(Z[1][1]);
      end
      // Y = -R2^H Z (2 x m): Y[i][j] = -sum_k conj(R2[k][i]) Z[k][j]
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < m; j++) begin
          for (int k = 0; k < m; k++) begin ta[k] = rf(R2[k][i], 1); tb[k] = Zf[k][j]; end
          Y[i][j] = dot(ta, tb, m, 1);
        end
      // R4 = Y R2 and X = R1 - R4 (upper triangles, 2 x 2)
      for (int i = 0; i < 2; i++)
        for (int j = i; j < 2; j++) begin
          for (int k = 0; k < m; k++) begin ta[k] = rf(Y[i][k]); tb[k] = rf(R2[k][j]); end
          R4[i][j] = dot(ta, tb, m, 0);
          X[i][j] = calu_op(CALU_SUB, R1[i][j].v, R4[i][j]);
        end
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) Iv[i][j] = (i <= j) ? rf(X[i][j]) : rf(X[j][i], 1);
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < m; j++) begin Iv[i][2+j] = rf(Y[i][j]); Iv[2+j][i] = rf(Y[i][j], 1); end
      for (int i = 0; i < m; i++)
        for (int j = 0; j < m; j++) Iv[2+i][2+j] = Zf[i][j];
    end
    if (gmode) begin
      // G = J^-1 H^H: G[i][k] = sum_j Iv[i][j] conj(H[k][j])
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          for (int j = 0; j < N; j++) term(Iv[i][j], rf(HG[k][j], 1), 0);
          outputs.push_back(chain()); out_r.push_back(i); out_c.push_back(k);
        end
    end else begin
      // outputs in the order they are computed: Z, Y, X
      for (int i = 0; i < m; i++)
        for (int j = i; j < m; j++) begin outputs.push_back(Z[i][j]); out_r.push_back(2 + i); out_c.push_back(2 + j); end
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < m; j++) begin outputs.push_back(Y[i][j]); out_r.push_back(i); out_c.push_back(2 + j); end
      for (int i = 0; i < 2; i++)
        for (int j = i; j < 2; j++) begin outputs.push_back(X[i][j]); out_r.push_back(i); out_c.push_back(j); end
    end
  endfunction

  // ------------------------------------------------------------ scheduler
  localparam int MAXT = 256;
  int  vram [NV];                 // RAM holding each value (address = value number)
  int  avail [NV];                // first cycle the value can be read
  bit  ram_use [4][MAXT], cmac_use [2][MAXT], div_use [MAXT], calu_use [MAXT];
  vliw_t body [MAXT];
  int  body_len;

  function automatic void route(int t, int sink, src_e s);
    body[t].dnet.sel[sink] = s;
  endfunction
  function automatic void ram_rd(int t, int v);
    if (ram_use[vram[v]][t]) $fatal(1, "RAM%0d port used twice at %0d", vram[v], t);
    ram_use[vram[v]][t] = 1;
    body[t].ram[vram[v]].re = 1'b1; body[t].ram[vram[v]].addr = 8'(v);
  endfunction
  function automatic void ram_wr(int t, int v, src_e s, logic [1:0] lanes);
    if (ram_use[vram[v]][t]) $fatal(1, "RAM%0d port used twice at %0d", vram[v], t);
    ram_use[vram[v]][t] = 1;
    body[t].ram[vram[v]].we = 1'b1; body[t].ram[vram[v]].lane_we = lanes;
    body[t].ram[vram[v]].addr = 8'(v);
    route(t, SNK_RAM0 + vram[v], s);
    avail[v] = t + 1;
    if (t + 1 > body_len) body_len = t + 1;
  endfunction
  function automatic src_e ram_src(int v);
    return src_e'(SRC_RAM0 + vram[v]);
  endfunction

  // colour the values so that the two operands of every product or
  // subtraction sit in different RAMs (or are the same value); greedy, in
  // value order or in a random order
  function automatic void place(bit shuffled);
    bit conflict [NV][NV];
    int use_cnt [4] = '{0, 0, 0, 0};
    foreach (conflict[i, j]) conflict[i][j] = 0;
    foreach (ops[k])
      if (ops[k].kind != OP_RECIP)
        for (int t = 0; t < ops[k].n; t++)
          if (ops[k].a[t] != ops[k].b[t]) begin
            conflict[ops[k].a[t]][ops[k].b[t]] = 1;
            conflict[ops[k].b[t]][ops[k].a[t]] = 1;
          end
    foreach (inputs2[i])
      if (inputs2[i] >= 0) begin
        conflict[inputs[i]][inputs2[i]] = 1;
        conflict[inputs2[i]][inputs[i]] = 1;
      end
    // greedy colouring in a random order, retried until it succeeds
    for (int attempt = 0; attempt < 1000; attempt++) begin
      int order [$];
      bit ok_all = 1;
      for (int v = 0; v < nvals; v++) begin order.push_back(v); vram[v] = -1; end
      if (shuffled || attempt > 0) order.shuffle();
      use_cnt = '{0, 0, 0, 0};
      foreach (order[n]) begin
        int v = order[n], best = -1;
        for (int r = 0; r < 4; r++) begin
          bit ok = 1;
          for (int u = 0; u < nvals; u++) if (conflict[v][u] && vram[u] == r) ok = 0;
          if (ok && (best < 0 || use_cnt[r] < use_cnt[best])) best = r;
        end
        if (best < 0) begin ok_all = 0; break; end
        vram[v] = best;
        use_cnt[best]++;
      end
      if (ok_all) return;
    end
    $fatal(1, "no RAM assignment found");
  endfunction

  function automatic bit ram_free(int v, int t);
    return !ram_use[vram[v]][t];
  endfunction

  // schedule the loop body for the current RAM assignment
  function automatic void place_ops();
    int t, last_push;
    for (int i = 0; i < MAXT; i++) begin
      body[i] = '0;
      div_use[i] = 0; calu_use[i] = 0;
      for (int r = 0; r < 4; r++) ram_use[r][i] = 0;
      for (int u = 0; u < 2; u++) cmac_use[u][i] = 0;
    end
    for (int i = 0; i < NV; i++) avail[i] = MAXT;
    body_len = 0;
    // input loads, one pop per cycle: each word for lane 0, then lane 1
    t = 0;
    foreach (inputs[i])
      for (int l = 0; l < 2; l++) begin
        body[t].ibuf.pop = 1'b1;
        ram_wr(t, inputs[i], SRC_IBUF, (l == 0) ? 2'b01 : 2'b10);
        if (inputs2[i] >= 0) ram_wr(t, inputs2[i], SRC_IBUF, (l == 0) ? 2'b01 : 2'b10);
        t++;
      end
    // operations, each at its earliest feasible cycle
    foreach (ops[k]) begin
      op_t o = ops[k];
      int ready = 0;
      bit placed = 0;
      for (int i = 0; i < o.n; i++) begin
        if (avail[o.a[i]] > ready) ready = avail[o.a[i]];
        if (o.b[i] >= 0 && avail[o.b[i]] > ready) ready = avail[o.b[i]];
      end
      for (int s = ready; s < MAXT - 8 && !placed; s++) begin
        case (o.kind)
          OP_CHAIN: begin
            // term i: read at s+i, issue at s+i+1; result stored at s+n+2
            for (int u = 0; u < 2 && !placed; u++) begin
              bit ok = 1;
              for (int i = 0; i < o.n; i++) begin
                if (!ram_free(o.a[i], s + i) || !ram_free(o.b[i], s + i) || cmac_use[u][s + i + 1]) ok = 0;
              end
              if (!ram_free(o.dst, s + o.n + 2)) ok = 0;
              if (ok) begin
                for (int i = 0; i < o.n; i++) begin
                  cmac_ctrl_t cc = '0;
                  ram_rd(s + i, o.a[i]);
                  if (o.b[i] != o.a[i]) ram_rd(s + i, o.b[i]);
                  cmac_use[u][s + i + 1] = 1;
                  cc.en = 1'b1; cc.acc = (i > 0); cc.neg = o.ng[i]; cc.conj_a = o.ca[i]; cc.conj_b = o.cb[i];
                  if (u == 0) begin
                    body[s + i + 1].cmac0 = cc;
                    route(s + i + 1, SNK_CMAC0_A, ram_src(o.a[i])); route(s + i + 1, SNK_CMAC0_B, ram_src(o.b[i]));
                  end else begin
                    body[s + i + 1].cmac1 = cc;
                    route(s + i + 1, SNK_CMAC1_A, ram_src(o.a[i])); route(s + i + 1, SNK_CMAC1_B, ram_src(o.b[i]));
                  end
                end
                ram_wr(s + o.n + 2, o.dst, (u == 0) ? SRC_CMAC0 : SRC_CMAC1, 2'b11);
                placed = 1;
              end
            end
          end
          OP_CALU: begin
            // read at s, issue at s+1, stored at s+2
            if (ram_free(o.a[0], s) && ram_free(o.b[0], s) && !calu_use[s + 1] && ram_free(o.dst, s + 2)) begin
              ram_rd(s, o.a[0]); ram_rd(s, o.b[0]);
              calu_use[s + 1] = 1;
              body[s + 1].calu.en = 1'b1; body[s + 1].calu.op = o.cop;
              route(s + 1, SNK_CALU_A, ram_src(o.a[0])); route(s + 1, SNK_CALU_B, ram_src(o.b[0]));
              ram_wr(s + 2, o.dst, SRC_CALU, 2'b11);
              placed = 1;
            end
          end
          default: begin
            // read at s, issue at s+1, stored at s+1+DIV_LAT
            if (ram_free(o.a[0], s) && !div_use[s + 1] && ram_free(o.dst, s + 1 + DIV_LAT)) begin
              ram_rd(s, o.a[0]);
              div_use[s + 1] = 1;
              body[s + 1].div.en = 1'b1;
              route(s + 1, SNK_DIV, ram_src(o.a[0]));
              ram_wr(s + 1 + DIV_LAT, o.dst, SRC_DIV, 2'b11);
              placed = 1;
            end
          end
        endcase
      end
      if (!placed) $fatal(1, "operation %0d could not be placed", k);
    end
    // outputs in order: read at s, push lane 0 at s+1 and lane 1 at s+2
    last_push = 0;
    foreach (outputs[i]) begin
      int s = (avail[outputs[i]] > last_push - 1) ? avail[outputs[i]] : last_push - 1;
      // the read value must stay in the RAM's output register for both
      // pushes, so the RAM is not read again in cycle s+1
      while (!ram_free(outputs[i], s) || !ram_free(outputs[i], s + 1)) s++;
      ram_rd(s, outputs[i]);
      ram_use[vram[outputs[i]]][s + 1] = 1;
      for (int l = 0; l < 2; l++) begin
        body[s + 1 + l].obuf.push = 1'b1; body[s + 1 + l].obuf.lane = l[0];
        route(s + 1 + l, SNK_OBUF, ram_src(outputs[i]));
      end
      last_push = s + 3;
      if (s + 3 > body_len) body_len = s + 3;
    end
    body[body_len - 1].seq.op = SEQ_DJNZ; body[body_len - 1].seq.imm = 8'd1;
  endfunction

  // try TRIES RAM assignments, keep the one with the shortest loop body,
  // and build the program around that body
  localparam int TRIES = 200;

  function automatic void schedule(int pairs);
    int    best_len = MAXT + 1;
    int    best_ram [NV];
    vliw_t v;
    for (int tr = 0; tr < TRIES; tr++) begin
      place(tr > 0);
      place_ops();
      if (body_len < best_len) begin
        best_len = body_len;
        best_ram = vram;
      end
    end
    vram = best_ram;
    place_ops();
    // program: LOOP pairs-1, body, HALT
    prog.delete();
    v = '0; v.seq.op = SEQ_LOOP; v.seq.imm = 8'(pairs - 1);
    prog.push_back(v);
    for (int i = 0; i < body_len; i++) prog.push_back(body[i]);
    v = '0; v.seq.op = SEQ_HALT;
    prog.push_back(v);
    dict.delete(); pidx.delete();
    foreach (prog[i]) begin
      int found = -1;
      foreach (dict[j]) if (dict[j] == prog[i]) found = j;
      if (found < 0) begin dict.push_back(prog[i]); found = dict.size() - 1; end
      pidx.push_back(found);
    end
  endfunction

  vliw_t prog [$];
  vliw_t dict [$];
  int    pidx [$];

  task automatic load_program();
    foreach (dict[j]) begin
      dict_we = 1'b1; dict_addr = DAW'(j); dict_wdata = dict[j];
      @(negedge clk);
    end
    dict_we = 1'b0;
    foreach (pidx[i]) begin
      idx_we = 1'b1; idx_addr = 8'(i); idx_wdata = DAW'(pidx[i]);
      @(negedge clk);
    end
    idx_we = 1'b0;
  endtask

  // ------------------------------------------------------ reference model
  typedef struct { longint re, im; } acc_t;

  function automatic longint rnd(longint v);
    longint r = (v + (longint'(1) << (FRAC-1))) >>> FRAC;
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction
  function automatic longint s16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  cplx_t mval [NV];

  function automatic void evaluate();
    foreach (ops[k]) begin
      op_t o = ops[k];
      cplx_t r;
      case (o.kind)
        OP_CHAIN: begin
          acc_t acc = '{0, 0};
          for (int i = 0; i < o.n; i++) begin
            longint ar = mval[o.a[i]].re, ai = mval[o.a[i]].im, br = mval[o.b[i]].re, bi = mval[o.b[i]].im, pr, pi;
            if (o.ca[i]) ai = -ai;
            if (o.cb[i]) bi = -bi;
            pr = ar * br - ai * bi;
            pi = ar * bi + ai * br;
            if (o.ng[i]) begin pr = -pr; pi = -pi; end
            acc.re += pr; acc.im += pi;
          end
          r.re = W'(rnd(acc.re)); r.im = W'(rnd(acc.im));
        end
        OP_CALU: begin
          longint sg = (o.cop == CALU_SUB) ? -1 : 1;
          r.re = W'(s16(longint'(mval[o.a[0]].re) + sg * mval[o.b[0]].re));
          r.im = W'(s16(longint'(mval[o.a[0]].im) + sg * mval[o.b[0]].im));
        end
        default: begin
          longint q = (mval[o.a[0]].re <= 0) ? 32767 : (longint'(1) << (2*FRAC)) / longint'(mval[o.a[0]].re);
          r.re = W'((q > 32767) ? 32767 : q); r.im = '0;
        end
      endcase
      mval[o.dst] = r;
    end
  endfunction

  // ------------------------------------------------------------- stimulus
  localparam int MAXM = 16;
  localparam real SV = 0.5;                  // s = M_T sigma^2 of the MMSE runs
  real   fr [MAXM][4][4], fi [MAXM][4][4];   // matrix inverted (F or J), real arithmetic
  real   hqr [MAXM][4][4], hqi [MAXM][4][4]; // quantised H of the MMSE runs
  cplx_t words [MAXM][17];                   // input words in stream order
  cplx_t expv [MAXM][16];                    // expected output words
  cplx_t in_words [$];
  cplx_t out_words [$];

  function automatic cplx_t q(real re, real im);
    cplx_t w;
    w.re = W'(int'(re * (1 << FRAC))); w.im = W'(int'(im * (1 << FRAC)));
    return w;
  endfunction
  function automatic real fx(logic signed [W-1:0] v);
    return $signed(v) / real'(1 << FRAC);
  endfunction

  // nm random N x N channels H, entries uniform in +-0.5. Inversion runs
  // stream the quantised upper triangle of F = H^H H + 0.5 I; MMSE runs
  // stream the quantised H and s. Expected outputs from the model.
  function automatic void make_matrices(int N, bit gmode, int nm);
    in_words.delete();
    for (int mi = 0; mi < nm; mi++) begin
      real hr [4][4], hi [4][4], jr, ji;
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++) begin
          int ur, ui;
          ur = $urandom_range(0, 1000);
          ui = $urandom_range(0, 1000);
          hr[i][k] = (ur - 500) / 1000.0;
          hi[i][k] = (ui - 500) / 1000.0;
          if (gmode) begin
            // quantise H first: J is then formed from the streamed values
            cplx_t w = q(hr[i][k], hi[i][k]);
            hr[i][k] = fx(w.re); hi[i][k] = fx(w.im);
            hqr[mi][i][k] = hr[i][k]; hqi[mi][i][k] = hi[i][k];
          end
        end
      for (int i = 0; i < N; i++)
        for (int k = i; k < N; k++) begin
          jr = (i == k) ? (gmode ? fx(q(SV, 0.0).re) : 0.5) : 0.0; ji = 0.0;
          for (int r = 0; r < N; r++) begin
            jr += hr[r][i] * hr[r][k] + hi[r][i] * hi[r][k];
            ji += hr[r][i] * hi[r][k] - hi[r][i] * hr[r][k];
          end
          if (i == k) ji = 0.0;
          if (!gmode) begin
            // F itself is streamed: use its quantised value
            cplx_t w = q(jr, ji);
            jr = fx(w.re); ji = fx(w.im);
          end
          fr[mi][i][k] = jr; fi[mi][i][k] = ji;
          fr[mi][k][i] = jr; fi[mi][k][i] = -ji;
        end
      foreach (in_r[w]) begin
        if (gmode) words[mi][w] = q(hr[in_r[w]][in_c[w]], hi[in_r[w]][in_c[w]]);
        else       words[mi][w] = q(fr[mi][in_r[w]][in_c[w]], fi[mi][in_r[w]][in_c[w]]);
      end
      if (gmode) words[mi][in_r.size()] = q(SV, 0.0);
      foreach (inputs[i]) begin
        mval[inputs[i]] = words[mi][i];
        if (inputs2[i] >= 0) mval[inputs2[i]] = words[mi][i];
      end
      evaluate();
      foreach (outputs[i]) expv[mi][i] = mval[outputs[i]];
    end
    for (int p = 0; p < nm / 2; p++)
      foreach (inputs[i])
        for (int l = 0; l < 2; l++) in_words.push_back(words[2*p+l][i]);
  endfunction

  logic in_fire = 1'b0;
  always @(posedge clk) in_fire <= in_valid && in_ready;
  always @(negedge clk) if (in_fire) void'(in_words.pop_front());
  assign in_valid  = (in_words.size() > 0);
  assign in_data   = (in_words.size() > 0) ? in_words[0] : '0;
  assign out_ready = 1'b1;
  always @(posedge clk) if (rst_n && out_valid && out_ready) out_words.push_back(out_data);

  task automatic check_results(int N, bit gmode, int nm);
    string what = gmode ? "G" : "inverse";
    for (int p = 0; p < nm / 2; p++) begin
      foreach (outputs[k])
        for (int l = 0; l < 2; l++) begin
          cplx_t got = out_words.pop_front();
          checks++;
          if (got !== expv[2*p+l][k]) begin
            failures++;
            if (failures < 10) $display("%0dx%0d %s pair %0d entry %0d lane %0d: dut %h expected %h", N, N, what, p, k, l, got, expv[2*p+l][k]);
          end
        end
      // inversion: F * F^-1 = I (F^-1 Hermitian, from its upper triangle);
      // MMSE: J * G = H^H
      for (int l = 0; l < 2; l++) begin
        int  mi = 2 * p + l;
        real gr [4][4], gi [4][4], err = 0.0;
        foreach (outputs[k]) begin
          gr[out_r[k]][out_c[k]] = fx(expv[mi][k].re);
          gi[out_r[k]][out_c[k]] = fx(expv[mi][k].im);
          if (!gmode && out_r[k] != out_c[k]) begin
            gr[out_c[k]][out_r[k]] = fx(expv[mi][k].re);
            gi[out_c[k]][out_r[k]] = -fx(expv[mi][k].im);
          end
        end
        for (int i = 0; i < N; i++)
          for (int k = 0; k < N; k++) begin
            real sr = 0.0, si = 0.0;
            for (int r = 0; r < N; r++) begin
              sr += fr[mi][i][r] * gr[r][k] - fi[mi][i][r] * gi[r][k];
              si += fr[mi][i][r] * gi[r][k] + fi[mi][i][r] * gr[r][k];
            end
            if (gmode) begin
              sr -= hqr[mi][k][i];
              si += hqi[mi][k][i];
            end else if (i == k)
              sr -= 1.0;
            err += sr * sr + si * si;
          end
        checks++;
        if (err > 1e-2) begin
          failures++;
          $display("%0dx%0d %s pair %0d lane %0d: squared residual %f", N, N, what, p, l, err);
        end
      end
    end
  endtask

  // build, schedule, load and run one program on nm matrices
  task automatic run_size(int N, bit gmode, int nm);
    int cyc;
    build(N, gmode);
    schedule(nm / 2);
    $display("%0dx%0d %s program: %0d operations, %0d values, body %0d cycles, %0d instructions, %0d dictionary words",
             N, N, gmode ? "MMSE" : "inversion", ops.size(), nvals, body_len, prog.size(), dict.size());
    checks++;
    if (dict.size() > 2 ** DAW) begin
      failures++;
      $display("%0d dictionary words do not fit", dict.size());
      return;
    end
    load_program();
    make_matrices(N, gmode, nm);
    repeat (30) @(negedge clk);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 0;
    while (busy) begin
      if (!stall) cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != 2 + body_len * (nm / 2)) begin
      failures++;
      $display("cycles %0d, expected %0d", cyc, 2 + body_len * (nm / 2));
    end
    $display("%0d cycles (without input stalls) for %0d matrices", cyc, nm);
    repeat (10) @(negedge clk);
    checks++;
    if (out_words.size() != (nm / 2) * 2 * outputs.size()) begin
      failures++;
      $display("%0d output words, expected %0d", out_words.size(), (nm / 2) * 2 * outputs.size());
    end else
      check_results(N, gmode, nm);
    out_words.delete();
  endtask

  initial begin
    idx_we = 1'b0; dict_we = 1'b0; start = 1'b0;
    idx_addr = '0; idx_wdata = '0; dict_addr = '0; dict_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_size(3, 0, 16);
    run_size(4, 0, 16);
    run_size(2, 1, 16);
    run_size(3, 1, 16);
    run_size(4, 1, 16);
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
