// aspe_ibuf: input buffer (I-BUF) of ASPE B. It queues 32-bit complex
// samples arriving from outside the processor (for instance channel
// estimates) until a program consumes them.
//
// External side: in_valid/in_ready/in_data stream handshake; a word is
// taken when both valid and ready are high. Core side: the head word is
// offered to the data network on both SIMD lanes (the I-BUF itself is not
// SIMD; the destination's lane enables pick the lane to store). pop
// consumes the head word. When an instruction wants to pop and the buffer
// is empty, 'empty' makes the sequencer stall the core until a word
// arrives, so pop is never asserted on an empty buffer (checked by an
// assertion).
//
// From the document: an input buffer that is not SIMD. This design's own
// choices: the FIFO organisation, its DEPTH, the handshake and the stall.
module aspe_ibuf
  import aspe_pkg::*;
#(
  parameter int DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  input  logic  pop,
  output logic  empty,
  output simd_t rdata
);

  cplx_t head;
  logic [$clog2(DEPTH):0] count;

  aspe_fifo #(.T(cplx_t), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(in_data),
    .rd(pop), .empty, .rd_data(head), .count
  );

  always_comb
    for (int l = 0; l < LANES; l++) rdata[l] = head;

endmodule
