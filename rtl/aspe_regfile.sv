// aspe_regfile: the small register file (REG) of ASPE B: NREGS registers,
// each holding one two-lane SIMD word.
//
// One write port: when ctrl.we is set, the lanes selected by ctrl.lane_we
// of register ctrl.waddr take the data-network word at the clock edge.
// One combinational read port: rdata is register ctrl.raddr in the same
// cycle, so a value written in one instruction can be read by the next.
// ce = 0 blocks writes (core stall). All registers reset to zero.
//
// From the document: eight registers. This design's own choices: the
// port count, the per-lane write enables and the reset value.
module aspe_regfile
  import aspe_pkg::*;
#(
  parameter int NREGS = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  reg_ctrl_t ctrl,
  input  simd_t     wdata,
  output simd_t     rdata
);

  simd_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (ce && ctrl.we) begin
      for (int l = 0; l < LANES; l++)
        if (ctrl.lane_we[l]) regs[ctrl.waddr][l] <= wdata[l];
    end
  end

  assign rdata = regs[ctrl.raddr];

endmodule
