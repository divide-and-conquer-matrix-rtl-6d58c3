// aspe_seq: sequencer (SEQ) of ASPE B. It controls program flow, expands
// the compressed program and hands every unit its 16-bit control word.
//
// Code compression: the program is a list of IDX_DEPTH indices (index
// memory); each index names one full VLIW in the dictionary memory
// (DICT_DEPTH entries of VLIW_W bits). A VLIW that occurs many times in a
// program (typically the no-operation word and loop bodies' repeated
// words) is stored once. Both memories are written through the load port
// while the core is idle.
//
// Flow control, from the seq control word of the current VLIW:
// NEXT, JUMP imm, LOOP imm (load the loop counter), DJNZ imm (taken while
// the counter is not zero, decrementing it) and HALT. start (while idle)
// sets pc = 0 and runs; HALT returns to idle and pulses done.
//
// Timing: fetch is combinational, so the instruction at pc is issued in
// the same cycle and a jump has no delay slot. stall (I-BUF empty on a
// pop or O-BUF full on a push, computed by the top from 'instr') holds pc
// and drops 'issue', which freezes every unit. 'instr' is all-zero (a
// no-operation everywhere) while idle.
//
// From the document: a sequencer controlling program flow, dictionary
// based code compression with an index and a dictionary memory, VLIWs
// split into 16-bit control words. This design's own choices: the memory
// sizes, the flow-control operations, the single loop counter and the
// load port.
module aspe_seq
  import aspe_pkg::*;
#(
  parameter int IDX_DEPTH  = 256,
  parameter int DICT_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load port
  input  logic                          idx_we,
  input  logic [$clog2(IDX_DEPTH)-1:0]  idx_addr,
  input  logic [$clog2(DICT_DEPTH)-1:0] idx_wdata,
  input  logic                          dict_we,
  input  logic [$clog2(DICT_DEPTH)-1:0] dict_addr,
  input  vliw_t                         dict_wdata,
  // run control
  input  logic                          start,
  input  logic                          stall,
  output logic                          busy,
  output logic                          done,
  output logic                          issue,
  output logic [$clog2(IDX_DEPTH)-1:0]  pc,
  output vliw_t                         instr
);

  localparam int PW = $clog2(IDX_DEPTH);
  localparam int DW = $clog2(DICT_DEPTH);

  logic [DW-1:0] idx_mem  [IDX_DEPTH];
  vliw_t         dict_mem [DICT_DEPTH];
  logic [7:0]    loop_cnt;
  logic          running;

  always_ff @(posedge clk) begin
    if (idx_we && !running)  idx_mem[idx_addr]   <= idx_wdata;
    if (dict_we && !running) dict_mem[dict_addr] <= dict_wdata;
  end

  assign instr = running ? dict_mem[idx_mem[pc]] : '0;
  assign issue = running && !stall;
  assign busy  = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pc       <= '0;
      loop_cnt <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          pc      <= '0;
        end
      end else if (issue) begin
        unique case (instr.seq.op)
          SEQ_JUMP: pc <= PW'(instr.seq.imm);
          SEQ_LOOP: begin
            loop_cnt <= instr.seq.imm;
            pc       <= pc + 1'b1;
          end
          SEQ_DJNZ: begin
            if (loop_cnt != 0) begin
              loop_cnt <= loop_cnt - 1'b1;
              pc       <= PW'(instr.seq.imm);
            end else begin
              pc <= pc + 1'b1;
            end
          end
          SEQ_HALT: begin
            running <= 1'b0;
            done    <= 1'b1;
          end
          default:  pc <= pc + 1'b1;
        endcase
      end
    end
  end

endmodule
