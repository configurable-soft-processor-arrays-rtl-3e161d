// openfire_pkg: types and constants shared by the OpenFire processor.
//
// The OpenFire executes a subset of the MicroBlaze v3 instruction set: everything
// except barrel shifts, hardware division, the status-register instructions, the
// cache instructions, exceptions and interrupts. This package holds the MicroBlaze
// major opcodes that the decoder recognises and the control word that the decode
// stage hands to the execute stage. The instruction encodings are the MicroBlaze
// ones; the layout of the control word is this design's own.
package openfire_pkg;

  // MicroBlaze major opcodes (instruction bits [31:26], bit 31 being MicroBlaze bit 0)
  localparam logic [5:0] OP_MUL    = 6'h10;
  localparam logic [5:0] OP_MULI   = 6'h18;
  localparam logic [5:0] OP_FSL    = 6'h1B;   // get / put and their n, c variants
  localparam logic [5:0] OP_OR     = 6'h20;
  localparam logic [5:0] OP_AND    = 6'h21;
  localparam logic [5:0] OP_XOR    = 6'h22;
  localparam logic [5:0] OP_ANDN   = 6'h23;
  localparam logic [5:0] OP_SHIFT  = 6'h24;   // sra, src, srl, sext8, sext16
  localparam logic [5:0] OP_BR     = 6'h26;   // br, brd, brld, bra, brad, brald
  localparam logic [5:0] OP_BCC    = 6'h27;   // beq .. bge, with optional delay slot
  localparam logic [5:0] OP_ORI    = 6'h28;
  localparam logic [5:0] OP_ANDI   = 6'h29;
  localparam logic [5:0] OP_XORI   = 6'h2A;
  localparam logic [5:0] OP_ANDNI  = 6'h2B;
  localparam logic [5:0] OP_IMM    = 6'h2C;
  localparam logic [5:0] OP_RTSD   = 6'h2D;
  localparam logic [5:0] OP_BRI    = 6'h2E;
  localparam logic [5:0] OP_BCCI   = 6'h2F;

  // Function codes of OP_SHIFT, instruction bits [6:0]
  localparam logic [6:0] FN_SRA    = 7'h01;
  localparam logic [6:0] FN_SRC    = 7'h21;
  localparam logic [6:0] FN_SRL    = 7'h41;
  localparam logic [6:0] FN_SEXT8  = 7'h60;
  localparam logic [6:0] FN_SEXT16 = 7'h61;

  typedef enum logic [3:0] {
    ALU_ADD,      // (inv_a ? ~a : a) + b + cin
    ALU_CMP,      // b - a, MSB = (a > b) signed
    ALU_CMPU,     // b - a, MSB = (a > b) unsigned
    ALU_OR,
    ALU_AND,
    ALU_XOR,
    ALU_ANDN,     // a & ~b
    ALU_SRA,
    ALU_SRC,
    ALU_SRL,
    ALU_SEXT8,
    ALU_SEXT16
  } alu_op_e;

  typedef enum logic [1:0] {CIN_ZERO, CIN_ONE, CIN_CARRY} cin_sel_e;

  typedef enum logic [1:0] {BR_NONE, BR_UNCOND, BR_COND, BR_RETURN} br_kind_e;

  typedef enum logic [2:0] {
    CC_EQ = 3'd0, CC_NE = 3'd1, CC_LT = 3'd2, CC_LE = 3'd3, CC_GT = 3'd4, CC_GE = 3'd5
  } br_cond_e;

  typedef enum logic [1:0] {SZ_BYTE, SZ_HALF, SZ_WORD} mem_size_e;

  // Where the value written to rD comes from
  typedef enum logic [2:0] {WB_ALU, WB_LOAD, WB_MUL, WB_FSL, WB_LINK} wb_sel_e;

  typedef struct packed {
    logic      [4:0] rd;
    logic      [4:0] ra;
    logic      [4:0] rb;
    logic     [15:0] imm16;
    logic            use_imm;     // operand B is the immediate
    alu_op_e         alu_op;
    logic            inv_a;       // reverse subtract: ~rA
    cin_sel_e        cin_sel;
    logic            wr_carry;    // instruction updates the carry flag
    logic            wr_rd;       // instruction writes rD
    wb_sel_e         wb_sel;
    logic            is_imm;      // IMM prefix
    br_kind_e        br_kind;
    br_cond_e        br_cond;
    logic            br_abs;      // absolute target
    logic            br_delay;    // delay slot follows
    logic            is_load;
    logic            is_store;
    mem_size_e       mem_size;
    logic            is_mul;
    logic            fsl_get;
    logic            fsl_put;
    logic            fsl_nonblock;
    logic            fsl_control;
    logic            illegal;     // not in the implemented subset: executes as a no-op
  } ctrl_t;

endpackage
