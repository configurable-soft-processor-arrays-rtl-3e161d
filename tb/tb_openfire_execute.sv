// tb_openfire_execute: issues single instructions into the execute stage and checks
// register results, carry, memory traffic, FSL handshakes, branch outputs and how many
// cycles each instruction occupies (ALU 1, load/store 2, mul 5, get/put until the
// link is ready). Instruction words are decoded by openfire_decode; the local memory
// and the FSL links are modelled here.
module tb_openfire_execute;
  import openfire_pkg::*;
  localparam int DW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          id_valid, stall, branch_taken, dmem_en, retire;
  ctrl_t         id_ctrl;
  logic [DW-1:0] id_pc, branch_target, dmem_addr, retire_pc;
  logic    [3:0] dmem_we;
  logic   [31:0] dmem_wdata, dmem_rdata, instr;
  logic [DW-1:0] fsl_m_data, fsl_s_data;
  logic          fsl_m_control, fsl_m_write, fsl_m_full, fsl_s_control, fsl_s_exists, fsl_s_read;

  openfire_decode u_dec (.instr, .ctrl(id_ctrl));
  openfire_execute dut (.*);

  // memory model: one-cycle read, byte writes
  logic [31:0] mem [64];
  always @(posedge clk) if (dmem_en) begin
    dmem_rdata <= mem[dmem_addr[7:2]];
    for (int l = 0; l < 4; l++) if (dmem_we[l]) mem[dmem_addr[7:2]][8*l +: 8] <= dmem_wdata[8*l +: 8];
  end

  int checks = 0, failures = 0;
  int n_cycles;
  logic br_seen;
  logic [DW-1:0] br_tgt, put_data;
  int put_count = 0;

  always @(posedge clk) if (fsl_m_write) begin put_count++; put_data = fsl_m_data; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // issue one instruction at `pc`, return the cycles it spends in execute
  task automatic issue(input logic [31:0] w, input logic [DW-1:0] pc);
    @(negedge clk);
    instr = w; id_pc = pc; id_valid = 1;
    @(negedge clk);            // now in execute
    id_valid = 0;
    n_cycles = 1;
    br_seen = 0;
    while (stall) begin @(negedge clk); n_cycles++; end
    br_seen = branch_taken; br_tgt = branch_target;
    chk(retire && retire_pc == pc, $sformatf("retire of %h", w));
    @(posedge clk); #1;        // results are written at the end of the last cycle
  endtask

  function automatic logic [DW-1:0] r(input int n);
    return dut.u_rf.regs[n];
  endfunction

  initial begin
    instr = 0; id_pc = 0; id_valid = 0; fsl_m_full = 0; fsl_s_exists = 0; fsl_s_data = 0; fsl_s_control = 0;
    for (int i = 0; i < 64; i++) mem[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    issue(32'h30200064, 'h00); chk(r(1) == 100 && n_cycles == 1, "addik r1 = 100 in 1 cycle");
    issue(32'h3040fffd, 'h04); chk(r(2) == -3, "addik r2 = -3");
    issue(32'h00611000, 'h08); chk(r(3) == 97 && dut.carry == 1, "add r3 = 97, carry set");
    issue(32'hb000abcd, 'h0c);
    issue(32'h30801234, 'h10); chk(r(4) == 32'habcd1234, "imm prefix");
    issue(32'h30801234, 'h14); chk(r(4) == 32'h00001234, "imm prefix consumed");
    issue(32'h40a11000, 'h18); chk(r(5) == -300 && n_cycles == 5, "mul 5 cycles");
    issue(32'hf8200040, 'h1c); chk(mem[16] == 100 && n_cycles == 2, "swi 2 cycles");
    issue(32'he0c00043, 'h20); chk(r(6) == 100 && n_cycles == 2, "lbui 2 cycles");
    issue(32'he8e00040, 'h24); chk(r(7) == 100, "lwi");
    issue(32'hd4400800, 'h28); chk(mem[25] == 32'hfffd0000, "sh to byte address 100, upper half of the word");
    // blocking get: the link is empty for 4 cycles
    fork
      issue(32'h6d000000, 'h2c);
      begin wait (dut.valid_e && stall); repeat (3) @(posedge clk);
            #1 fsl_s_data = 32'h5555; fsl_s_exists = 1;
            @(posedge clk); #1 fsl_s_exists = 0; end
    join
    chk(r(8) == 32'h5555 && n_cycles == 4, "blocking get waits for data");
    // blocking put with a full link for 3 cycles
    fsl_m_full = 1;
    fork
      issue(32'h6c038000, 'h30);
      begin wait (dut.valid_e && stall); repeat (2) @(posedge clk); #1 fsl_m_full = 0; end
    join
    chk(put_count == 1 && put_data == 97 && n_cycles == 3, "blocking put waits for room");
    fsl_m_full = 1;
    issue(32'h6c03c000, 'h34); chk(put_count == 1 && n_cycles == 1 && dut.carry == 1, "nput on full link fails, sets carry");
    fsl_m_full = 0;
    issue(32'hb80001d0, 'h38); chk(br_seen && br_tgt == 'h208, "bri taken, relative target");
    issue(32'hbc0002cc, 'h3c); chk(br_seen && br_tgt == 'h308, "beqi r0 taken");
    issue(32'hbc2002c8, 'h40); chk(!br_seen, "bnei r0 not taken");
    issue(32'h99fc0800, 'h44); chk(br_seen && br_tgt == 100 && r(15) == 'h44, "brald link and absolute target");
    issue(32'h15211003, 'h48); chk(r(9) == 32'h7fffff99, "cmpu r9 = r2 - r1 with MSB (100 > 0xfffffffd) = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
