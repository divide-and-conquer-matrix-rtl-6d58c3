// aspe_pkg: types and constants shared by the units of the ASPE B VLIW
// processor, a stream processor whose datapath is configured for the
// inversion of small Hermitian positive-definite matrices (2x2 direct
// inversion and 3x3/4x4 divide-and-conquer inversion).
//
// Data format (follows the document): a complex sample is one 32-bit word,
// real part in the lower 16 bits and imaginary part in the upper 16 bits.
// All units except the input and output buffers are two-way SIMD, so the
// data network carries two such words (lane 0 and lane 1) per transfer.
//
// The number of fractional bits (FRAC), the instruction encoding and the
// pipeline depths are this design's own choices: the document gives the
// 16-bit word width, the 16-bit control words, the unit mix and the two
// SIMD lanes, but not the encoding.
package aspe_pkg;

  // ---------------------------------------------------------------- data
  parameter int W     = 16;   // width of one real component (document: 16 bit)
  parameter int LANES = 2;    // two-way SIMD (document)
  parameter int FRAC  = 12;   // fractional bits of the fixed-point format (assumed)

  typedef struct packed {
    logic signed [W-1:0] im;  // upper half of the 32-bit word
    logic signed [W-1:0] re;  // lower half of the 32-bit word
  } cplx_t;

  typedef cplx_t [LANES-1:0] simd_t;

  // ------------------------------------------------------ unit latencies
  // Cycles from the instruction that issues an operation to the first
  // instruction that sees its result on the data network.
  parameter int CMAC_LAT = 2;
  parameter int DIV_LAT  = 4;
  parameter int CALU_LAT = 1;
  parameter int RAM_LAT  = 1;

  // ---------------------------------------------------- data network map
  // Sources (values of a sink's 4-bit select field).
  typedef enum logic [3:0] {
    SRC_ZERO  = 4'd0,
    SRC_IBUF  = 4'd1,
    SRC_REG   = 4'd2,
    SRC_RAM0  = 4'd3,
    SRC_RAM1  = 4'd4,
    SRC_RAM2  = 4'd5,
    SRC_RAM3  = 4'd6,
    SRC_CMAC0 = 4'd7,
    SRC_CMAC1 = 4'd8,
    SRC_DIV   = 4'd9,
    SRC_CALU  = 4'd10
  } src_e;
  parameter int NSRC = 11;

  // Sinks (index of the select field in the D-Net control).
  parameter int SNK_CMAC0_A = 0;
  parameter int SNK_CMAC0_B = 1;
  parameter int SNK_CMAC1_A = 2;
  parameter int SNK_CMAC1_B = 3;
  parameter int SNK_DIV     = 4;
  parameter int SNK_CALU_A  = 5;
  parameter int SNK_CALU_B  = 6;
  parameter int SNK_RAM0    = 7;
  parameter int SNK_RAM1    = 8;
  parameter int SNK_RAM2    = 9;
  parameter int SNK_RAM3    = 10;
  parameter int SNK_REG     = 11;
  parameter int SNK_OBUF    = 12;
  parameter int NSNK        = 13;  // plus 12 spare bits: four 16-bit words

  // ------------------------------------------------------ control words
  // Every unit is driven by one 16-bit control word per cycle (the D-Net
  // by four). An all-zero word is a no-operation for every unit.
  typedef struct packed {
    logic       en;      // start an operation
    logic       acc;     // add to the accumulator instead of starting from zero
    logic       neg;     // subtract the product instead of adding it
    logic       conj_a;  // use conj(a)
    logic       conj_b;  // use conj(b)
    logic [10:0] rsv;
  } cmac_ctrl_t;

  typedef struct packed {
    logic        en;     // start a reciprocal 1/re(x)
    logic [14:0] rsv;
  } div_ctrl_t;

  typedef enum logic [2:0] {
    CALU_PASS    = 3'd0,  // a
    CALU_ADD     = 3'd1,  // a + b
    CALU_SUB     = 3'd2,  // a - b
    CALU_NEG     = 3'd3,  // -a
    CALU_CONJ    = 3'd4,  // conj(a)
    CALU_NEGCONJ = 3'd5   // -conj(a)
  } calu_op_e;

  typedef struct packed {
    logic        en;
    calu_op_e    op;
    logic [11:0] rsv;
  } calu_ctrl_t;

  typedef struct packed {
    logic             we;       // write the D-Net word at addr
    logic [LANES-1:0] lane_we;  // lanes written
    logic             re;       // read addr into the output register
    logic [3:0]       rsv;
    logic [7:0]       addr;
  } ram_ctrl_t;

  typedef struct packed {
    logic             we;
    logic [LANES-1:0] lane_we;
    logic [2:0]       waddr;
    logic [6:0]       rsv;
    logic [2:0]       raddr;    // combinational read port
  } reg_ctrl_t;

  typedef struct packed {
    logic        pop;       // consume the head word (stalls the core if empty)
    logic [14:0] rsv;
  } ibuf_ctrl_t;

  typedef struct packed {
    logic        push;      // store one lane of the D-Net word (stalls if full)
    logic        lane;      // which lane is stored
    logic [13:0] rsv;
  } obuf_ctrl_t;

  typedef enum logic [2:0] {
    SEQ_NEXT = 3'd0,  // pc + 1
    SEQ_JUMP = 3'd1,  // pc = imm
    SEQ_LOOP = 3'd2,  // loop counter = imm, pc + 1
    SEQ_DJNZ = 3'd3,  // if counter != 0: counter - 1, pc = imm; else pc + 1
    SEQ_HALT = 3'd4   // end of program
  } seq_op_e;

  typedef struct packed {
    seq_op_e    op;
    logic [4:0] rsv;
    logic [7:0] imm;
  } seq_ctrl_t;

  typedef struct packed {
    logic [11:0]           rsv;
    logic [NSNK-1:0][3:0]  sel;   // source of every sink
  } dnet_ctrl_t;

  // One very long instruction word: fifteen 16-bit control words.
  typedef struct packed {
    seq_ctrl_t              seq;
    dnet_ctrl_t             dnet;
    cmac_ctrl_t             cmac0;
    cmac_ctrl_t             cmac1;
    div_ctrl_t              div;
    calu_ctrl_t             calu;
    ram_ctrl_t [3:0]        ram;
    reg_ctrl_t              rf;
    ibuf_ctrl_t             ibuf;
    obuf_ctrl_t             obuf;
  } vliw_t;

  parameter int VLIW_W = $bits(vliw_t);

endpackage
