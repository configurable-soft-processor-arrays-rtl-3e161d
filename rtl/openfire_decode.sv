// openfire_decode: instruction decoder of the OpenFire decode stage.
//
// Turns one 32-bit MicroBlaze instruction into the control word (openfire_pkg::ctrl_t)
// that the execute stage registers. Purely combinational; the decode/execute pipeline
// register sits at the input of openfire_execute.
// Implemented: add/rsub with the C (carry) and K (keep carry) variants, cmp/cmpu,
// mul/muli (ENABLE_MUL), or/and/xor/andn and immediates, sra/src/srl/sext8/sext16,
// imm, br/bri and bcc/bcci families with their delay-slot, absolute and link variants,
// rtsd, lbu/lhu/lw/sb/sh/sw and immediates, get/put with the n and c variants.
// Not implemented, as in the text: barrel shift, divide, status-register and cache
// instructions, exceptions; such words decode as `illegal` and execute as no-ops,
// which is this design's choice (there is no exception to raise).
module openfire_decode
  import openfire_pkg::*;
#(
  parameter bit ENABLE_MUL = 1'b1,
  parameter bit ENABLE_CMP = 1'b1
) (
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [5:0] op;
  assign op = instr[31:26];

  always_comb begin
    ctrl          = '0;
    ctrl.rd       = instr[25:21];
    ctrl.ra       = instr[20:16];
    ctrl.rb       = instr[15:11];
    ctrl.imm16    = instr[15:0];
    ctrl.use_imm  = op[3];
    ctrl.alu_op   = ALU_ADD;
    ctrl.cin_sel  = CIN_ZERO;
    ctrl.wb_sel   = WB_ALU;
    ctrl.br_kind  = BR_NONE;
    ctrl.br_cond  = CC_EQ;
    ctrl.mem_size = SZ_WORD;

    if (op[5:4] == 2'b00) begin
      // add, rsub, addc, rsubc, addk, rsubk, addkc, rsubkc (op[3]: immediate form)
      ctrl.inv_a    = op[0];
      ctrl.cin_sel  = op[1] ? CIN_CARRY : (op[0] ? CIN_ONE : CIN_ZERO);
      ctrl.wr_carry = !op[2];
      ctrl.wr_rd    = 1'b1;
      if (op == 6'h05 && instr[10:0] == 11'h001 && ENABLE_CMP) ctrl.alu_op = ALU_CMP;
      if (op == 6'h05 && instr[10:0] == 11'h003 && ENABLE_CMP) ctrl.alu_op = ALU_CMPU;
    end else begin
      unique case (op)
        OP_MUL, OP_MULI: begin
          if (ENABLE_MUL) begin
            ctrl.is_mul = 1'b1;
            ctrl.wr_rd  = 1'b1;
            ctrl.wb_sel = WB_MUL;
          end else ctrl.illegal = 1'b1;
        end
        OP_FSL: begin
          ctrl.fsl_get      = !instr[15];
          ctrl.fsl_put      = instr[15];
          ctrl.fsl_nonblock = instr[14];
          ctrl.fsl_control  = instr[13];
          ctrl.wr_rd        = !instr[15];
          ctrl.wb_sel       = WB_FSL;
          ctrl.use_imm      = 1'b0;
        end
        OP_OR,  OP_ORI:  begin ctrl.alu_op = ALU_OR;   ctrl.wr_rd = 1'b1; end
        OP_AND, OP_ANDI: begin ctrl.alu_op = ALU_AND;  ctrl.wr_rd = 1'b1; end
        OP_XOR, OP_XORI: begin ctrl.alu_op = ALU_XOR;  ctrl.wr_rd = 1'b1; end
        OP_ANDN, OP_ANDNI: begin ctrl.alu_op = ALU_ANDN; ctrl.wr_rd = 1'b1; end
        OP_SHIFT: begin
          ctrl.use_imm = 1'b0;
          ctrl.wr_rd   = 1'b1;
          unique case (instr[6:0])
            FN_SRA:    begin ctrl.alu_op = ALU_SRA; ctrl.wr_carry = 1'b1; end
            FN_SRC:    begin ctrl.alu_op = ALU_SRC; ctrl.wr_carry = 1'b1; ctrl.cin_sel = CIN_CARRY; end
            FN_SRL:    begin ctrl.alu_op = ALU_SRL; ctrl.wr_carry = 1'b1; end
            FN_SEXT8:  ctrl.alu_op = ALU_SEXT8;
            FN_SEXT16: ctrl.alu_op = ALU_SEXT16;
            default:   begin ctrl.illegal = 1'b1; ctrl.wr_rd = 1'b0; end
          endcase
        end
        OP_BR, OP_BRI: begin
          ctrl.br_kind  = BR_UNCOND;
          ctrl.br_delay = instr[20];
          ctrl.br_abs   = instr[19];
          ctrl.wr_rd    = instr[18];
          ctrl.wb_sel   = WB_LINK;
        end
        OP_BCC, OP_BCCI: begin
          ctrl.br_kind  = BR_COND;
          ctrl.br_delay = instr[25];
          ctrl.br_cond  = br_cond_e'(instr[23:21]);
          if (instr[24] || instr[23:21] > 3'd5) begin
            ctrl.br_kind = BR_NONE;
            ctrl.illegal = 1'b1;
          end
        end
        OP_IMM: ctrl.is_imm = 1'b1;
        OP_RTSD: begin
          // rtsd only; rtid/rtbd/rted belong to interrupts and exceptions
          if (instr[25:21] == 5'b10000) begin
            ctrl.br_kind  = BR_RETURN;
            ctrl.br_delay = 1'b1;
            ctrl.br_abs   = 1'b1;
          end else ctrl.illegal = 1'b1;
        end
        6'h30, 6'h31, 6'h32, 6'h38, 6'h39, 6'h3A: begin
          ctrl.is_load  = 1'b1;
          ctrl.wr_rd    = 1'b1;
          ctrl.wb_sel   = WB_LOAD;
          ctrl.mem_size = mem_size_e'(op[1:0]);
        end
        6'h34, 6'h35, 6'h36, 6'h3C, 6'h3D, 6'h3E: begin
          ctrl.is_store = 1'b1;
          ctrl.mem_size = mem_size_e'(op[1:0]);
        end
        default: ctrl.illegal = 1'b1;
      endcase
    end
  end
endmodule
