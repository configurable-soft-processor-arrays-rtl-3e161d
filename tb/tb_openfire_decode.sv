// tb_openfire_decode: decodes hand-encoded MicroBlaze instruction words and checks
// the control fields that matter for each, including unimplemented instructions
// (barrel shift, divide, status-register access) decoding as no-ops.
module tb_openfire_decode;
  import openfire_pkg::*;
  logic [31:0] instr;
  ctrl_t       c;
  openfire_decode dut (.instr, .ctrl(c));
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %h)", what, instr); end
  endtask

  initial begin
    instr = 32'h30200064; #1;  // addik r1, r0, 100
    chk(c.rd == 1 && c.ra == 0 && c.use_imm && c.imm16 == 100 && c.alu_op == ALU_ADD &&
        !c.inv_a && !c.wr_carry && c.wr_rd && c.cin_sel == CIN_ZERO && !c.illegal, "addik");
    instr = 32'h04611000; #1;  // rsub r3, r1, r2
    chk(c.inv_a && c.cin_sel == CIN_ONE && c.wr_carry && !c.use_imm && c.rb == 2, "rsub");
    instr = 32'h08611000; #1;  // addc r3, r1, r2
    chk(!c.inv_a && c.cin_sel == CIN_CARRY && c.wr_carry, "addc");
    instr = 32'h15211003; #1;  // cmpu r9, r1, r2
    chk(c.alu_op == ALU_CMPU && c.inv_a && c.cin_sel == CIN_ONE && !c.wr_carry, "cmpu");
    instr = 32'h15211001; #1;  // cmp
    chk(c.alu_op == ALU_CMP, "cmp");
    instr = 32'h40a11000; #1;  // mul r5, r1, r2
    chk(c.is_mul && c.wb_sel == WB_MUL && c.wr_rd, "mul");
    instr = 32'hb000abcd; #1;  // imm 0xabcd
    chk(c.is_imm && c.imm16 == 16'habcd && !c.wr_rd, "imm");
    instr = 32'he0c00043; #1;  // lbui r6, r0, 0x43
    chk(c.is_load && c.mem_size == SZ_BYTE && c.use_imm && c.wb_sel == WB_LOAD, "lbui");
    instr = 32'hd4400800; #1;  // sh r2, r0, r1
    chk(c.is_store && c.mem_size == SZ_HALF && !c.use_imm && !c.wr_rd, "sh");
    instr = 32'h6d000000; #1;  // get r8
    chk(c.fsl_get && !c.fsl_put && !c.fsl_nonblock && c.rd == 8 && c.wr_rd && !c.use_imm, "get");
    instr = 32'h6c03c000; #1;  // nput r3
    chk(c.fsl_put && c.fsl_nonblock && !c.wr_rd && c.ra == 3, "nput");
    instr = 32'h6c002000 | (32'd4 << 21); #1;  // cget r4
    chk(c.fsl_get && c.fsl_control, "cget");
    instr = 32'hb80001d0; #1;  // bri
    chk(c.br_kind == BR_UNCOND && !c.br_delay && !c.br_abs && !c.wr_rd && c.use_imm, "bri");
    instr = 32'h99fc0800; #1;  // brald r15, r1
    chk(c.br_kind == BR_UNCOND && c.br_delay && c.br_abs && c.wr_rd && c.rd == 15 &&
        c.wb_sel == WB_LINK && !c.use_imm, "brald");
    instr = 32'hbea300f0; #1;  // bgeid r3, ...
    chk(c.br_kind == BR_COND && c.br_cond == CC_GE && c.br_delay && c.ra == 3, "bgeid");
    instr = 32'hb60f0008; #1;  // rtsd r15, 8
    chk(c.br_kind == BR_RETURN && c.br_delay && c.ra == 15 && c.imm16 == 8, "rtsd");
    instr = 32'h90640001; #1;  // sra r3, r4
    chk(c.alu_op == ALU_SRA && c.wr_carry && !c.use_imm, "sra");
    instr = 32'h90640061; #1;  // sext16
    chk(c.alu_op == ALU_SEXT16 && !c.wr_carry, "sext16");
    instr = 32'ha0640ff0; #1;  // ori
    chk(c.alu_op == ALU_OR && c.use_imm, "ori");
    instr = 32'h44611000; #1;  // bsrl (barrel shift)
    chk(c.illegal && !c.wr_rd, "barrel shift not implemented");
    instr = 32'h48611000; #1;  // idiv
    chk(c.illegal && !c.wr_rd, "divide not implemented");
    instr = 32'h94608001; #1;  // mfs
    chk(c.illegal && !c.wr_rd, "mfs not implemented");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
