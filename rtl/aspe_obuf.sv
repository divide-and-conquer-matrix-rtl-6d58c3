// aspe_obuf: output buffer (O-BUF) of ASPE B. It queues 32-bit complex
// results (for instance entries of an inverted matrix) until the outside
// takes them.
//
// Core side: push stores lane 'lane' of the data-network word. When an
// instruction wants to push and the buffer is full, 'full' makes the
// sequencer stall the core until a word leaves. External side:
// out_valid/out_ready/out_data stream handshake, first in first out.
//
// From the document: an output buffer that is not SIMD. This design's own
// choices: the FIFO organisation, its DEPTH, the lane select, the
// handshake and the stall.
module aspe_obuf
  import aspe_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  logic  lane,
  input  simd_t wdata,
  output logic  full,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data
);

  logic empty, wr_ready;
  logic [$clog2(DEPTH):0] count;

  aspe_fifo #(.T(cplx_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(push), .wr_ready, .wr_data(wdata[lane]),
    .rd(out_ready && !empty), .empty, .rd_data(out_data), .count
  );

  // the core stalls on a full buffer even if a word leaves in the same cycle
  assign full      = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign out_valid = !empty;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> wr_ready)
    else $error("aspe_obuf: push while full");

endmodule
