// aspe_ram: one of the four storage units RAM0-RAM3 of ASPE B: DEPTH
// words, each a two-lane SIMD word (two 32-bit complex samples).
//
// Single port: in one cycle the unit may write the data-network word at
// ctrl.addr (only the lanes set in ctrl.lane_we) and/or read ctrl.addr
// into its output register. A read returns the old contents when it meets
// a write to the same address. The read data is visible RAM_LAT = 1 cycle
// after the issuing instruction and holds until the next read, so a value
// can feed several later instructions. ce = 0 blocks both (core stall).
// The array is not reset; the output register is.
//
// From the document: four 256-word storage units. This design's own
// choices: one port, per-lane write enables, the held read register.
module aspe_ram
  import aspe_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  ram_ctrl_t ctrl,
  input  simd_t     wdata,
  output simd_t     rdata
);

  localparam int AW = $clog2(DEPTH);

  simd_t mem [DEPTH];
  logic [AW-1:0] a;
  assign a = ctrl.addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (ce && ctrl.we)
      for (int l = 0; l < LANES; l++)
        if (ctrl.lane_we[l]) mem[a][l] <= wdata[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              rdata <= '0;
    else if (ce && ctrl.re)  rdata <= mem[a];
  end

endmodule
