// aspe_fifo: synchronous first-word-fall-through FIFO of DEPTH entries of
// type T, the storage inside the input and output buffers.
//
// Write side: wr_valid/wr_ready handshake; a word is stored when both are
// high. Read side: rd_data is the oldest word whenever empty is low; rd
// removes it at the clock edge. Simultaneous read and write are allowed,
// also when full. DEPTH must be a power of two. Reset empties the FIFO.
module aspe_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_valid,
  output logic wr_ready,
  input  T     wr_data,
  input  logic rd,
  output logic empty,
  output T     rd_data,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          full, do_wr, do_rd;

  assign empty    = (wp == rp);
  assign full     = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign do_rd    = rd && !empty;
  assign wr_ready = !full || rd;
  assign do_wr    = wr_valid && wr_ready;
  assign rd_data  = mem[rp[AW-1:0]];
  assign count    = wp - rp;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  // a read from an empty FIFO is a protocol error of the user
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty)
    else $error("aspe_fifo: read while empty");

endmodule
