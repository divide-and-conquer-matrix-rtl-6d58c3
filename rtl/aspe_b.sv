// aspe_b: top level of ASPE B, a VLIW stream processor whose datapath is
// configured for small Hermitian positive-definite (HPD) matrix inversion,
// the core of a linear MMSE MIMO detector. Programs invert 2x2 matrices
// directly (1/det times the adjugate) and 3x3/4x4 matrices by the
// divide-and-conquer method (invert a 2x2 block A, form the Schur
// complement S = C - B^H A^-1 B, invert it, combine).
//
// Structure (follows the document's unit mix): sequencer SEQ with index
// and dictionary memories; two complex MAC units CMAC0/1; one real
// reciprocal unit DIV; one complex ALU CALU; register file REG (8
// registers); four 256-word storage units RAM0-3; input buffer I-BUF and
// output buffer O-BUF. All units except the buffers are two-way SIMD: the
// same instruction works on lane 0 and lane 1, e.g. on two matrices at
// once. The data network D-Net connects any unit output to any unit input
// under per-cycle control.
//
// Interface: the program is loaded through the idx_/dict_ ports while
// idle; a start pulse runs it from address 0 until a HALT, which pulses
// done. Data enters through in_valid/in_ready/in_data and leaves through
// out_valid/out_ready/out_data (32-bit words: real part low, imaginary
// part high). stall is high in cycles in which the core waits for the
// I-BUF (empty on a pop) or the O-BUF (full on a push); all units then
// hold their state, so a program's schedule does not depend on stalls.
//
// Timing seen by a program (this design's choice): RAM reads 1 cycle,
// CALU 1, CMAC 2, DIV DIV_LAT = 4 cycles from issue to use; REG reads and
// I-BUF reads in the same cycle. Results stay on a unit's output until its
// next result.
module aspe_b
  import aspe_pkg::*;
#(
  parameter int RAM_DEPTH  = 256,
  parameter int NREGS      = 8,
  parameter int IDX_DEPTH  = 256,
  parameter int DICT_DEPTH = 256,
  parameter int BUF_DEPTH  = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load
  input  logic                          idx_we,
  input  logic [$clog2(IDX_DEPTH)-1:0]  idx_addr,
  input  logic [$clog2(DICT_DEPTH)-1:0] idx_wdata,
  input  logic                          dict_we,
  input  logic [$clog2(DICT_DEPTH)-1:0] dict_addr,
  input  vliw_t                         dict_wdata,
  // run control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          stall,
  // input stream
  input  logic                          in_valid,
  output logic                          in_ready,
  input  cplx_t                         in_data,
  // output stream
  output logic                          out_valid,
  input  logic                          out_ready,
  output cplx_t                         out_data
);

  vliw_t instr;
  logic  issue;
  logic  ibuf_empty, obuf_full;
  logic [$clog2(IDX_DEPTH)-1:0] pc;

  simd_t src [NSRC];
  simd_t snk [NSNK];

  // a pop from an empty I-BUF or a push into a full O-BUF waits
  assign stall = (instr.ibuf.pop && ibuf_empty) || (instr.obuf.push && obuf_full);

  aspe_seq #(.IDX_DEPTH(IDX_DEPTH), .DICT_DEPTH(DICT_DEPTH)) u_seq (
    .clk, .rst_n,
    .idx_we, .idx_addr, .idx_wdata, .dict_we, .dict_addr, .dict_wdata,
    .start, .stall, .busy, .done, .issue, .pc, .instr
  );

  aspe_dnet u_dnet (.ctrl(instr.dnet), .src, .snk);

  assign src[SRC_ZERO] = '0;

  aspe_ibuf #(.DEPTH(BUF_DEPTH)) u_ibuf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .pop(issue && instr.ibuf.pop), .empty(ibuf_empty), .rdata(src[SRC_IBUF])
  );

  aspe_obuf #(.DEPTH(BUF_DEPTH)) u_obuf (
    .clk, .rst_n,
    .push(issue && instr.obuf.push), .lane(instr.obuf.lane), .wdata(snk[SNK_OBUF]),
    .full(obuf_full), .out_valid, .out_ready, .out_data
  );

  aspe_regfile #(.NREGS(NREGS)) u_reg (
    .clk, .rst_n, .ce(issue), .ctrl(instr.rf),
    .wdata(snk[SNK_REG]), .rdata(src[SRC_REG])
  );

  for (genvar i = 0; i < 4; i++) begin : g_ram
    aspe_ram #(.DEPTH(RAM_DEPTH)) u_ram (
      .clk, .rst_n, .ce(issue), .ctrl(instr.ram[i]),
      .wdata(snk[SNK_RAM0+i]), .rdata(src[SRC_RAM0+i])
    );
  end

  aspe_cmac u_cmac0 (
    .clk, .rst_n, .ce(issue), .ctrl(instr.cmac0),
    .a(snk[SNK_CMAC0_A]), .b(snk[SNK_CMAC0_B]), .y(src[SRC_CMAC0])
  );

  aspe_cmac u_cmac1 (
    .clk, .rst_n, .ce(issue), .ctrl(instr.cmac1),
    .a(snk[SNK_CMAC1_A]), .b(snk[SNK_CMAC1_B]), .y(src[SRC_CMAC1])
  );

  aspe_div u_div (
    .clk, .rst_n, .ce(issue), .ctrl(instr.div),
    .x(snk[SNK_DIV]), .y(src[SRC_DIV])
  );

  aspe_calu u_calu (
    .clk, .rst_n, .ce(issue), .ctrl(instr.calu),
    .a(snk[SNK_CALU_A]), .b(snk[SNK_CALU_B]), .y(src[SRC_CALU])
  );

endmodule
