// openfire_execute: execute stage of the OpenFire pipeline.
//
// Registers the control word from decode, reads the register file, and completes the
// instruction: ALU operations and carry, the IMM prefix, branches, loads and stores
// to local memory, multiplies and FSL get/put. While an instruction needs more cycles
// `stall` is high and fetch and decode hold. Cycle counts (one cycle unless noted)
// follow the MicroBlaze, except the multiplier:
//   - taken branch: 1 cycle plus 2 flushed slots, or plus 1 when it has a delay slot
//     (the delay-slot instruction then executes normally);
//   - load and store: 2 cycles (address in the first, data in the second);
//   - mul/muli: MUL_LATENCY cycles (5 on the OpenFire, 3 on the MicroBlaze);
//   - blocking get/put: 1 cycle once the FSL link has data / has room; until then the
//     instruction waits in execute. Non-blocking nget/nput never wait and set carry
//     when they fail.
// IMM loads the upper 16 bits of the next instruction's immediate; otherwise
// immediates are sign-extended. All values are DATA_WIDTH bits; loads and stores
// move 32-bit memory words, a word store zero-extends and a word load keeps the low
// DATA_WIDTH bits (this design's reading of a narrow datapath). Only FSL link 0
// exists, so the link number in get/put is ignored; the incoming control bit is not
// compared with the one a get expects, because the FSL error flag it would set lives in
// the status register, which is not implemented (so fsl_s_control is unused). The
// `illegal` bit of the control word only marks no-ops and is not used here. Reading registers in this stage
// (rather than in decode) removes the need for a bypass; that, and the memory-side
// timing, are this design's choices.
module openfire_execute
  import openfire_pkg::*;
#(
  parameter int unsigned DATA_WIDTH  = 32,
  parameter bit          ENABLE_MUL  = 1'b1,
  parameter bit          ENABLE_CMP  = 1'b1,
  parameter int unsigned MUL_LATENCY = 5
) (
  input  logic                  clk,
  input  logic                  rst,
  // from decode
  input  logic                  id_valid,
  input  ctrl_t                 id_ctrl,
  input  logic [DATA_WIDTH-1:0] id_pc,
  // pipeline control
  output logic                  stall,
  output logic                  branch_taken,
  output logic [DATA_WIDTH-1:0] branch_target,
  // data port of the local memory (one-cycle read)
  output logic                  dmem_en,
  output logic            [3:0] dmem_we,
  output logic [DATA_WIDTH-1:0] dmem_addr,
  output logic           [31:0] dmem_wdata,
  input  logic           [31:0] dmem_rdata,
  // FSL master (outgoing) link
  output logic [DATA_WIDTH-1:0] fsl_m_data,
  output logic                  fsl_m_control,
  output logic                  fsl_m_write,
  input  logic                  fsl_m_full,
  // FSL slave (incoming) link
  input  logic [DATA_WIDTH-1:0] fsl_s_data,
  input  logic                  fsl_s_control,
  input  logic                  fsl_s_exists,
  output logic                  fsl_s_read,
  // retirement, for observation
  output logic                  retire,
  output logic [DATA_WIDTH-1:0] retire_pc
);
  localparam int unsigned DW = DATA_WIDTH;

  // ---------------- decode/execute pipeline register ----------------
  logic                  valid_q;   // register bit
  logic                  valid_e;   // valid_q, forced low while reset is held
  ctrl_t                 c;
  logic [DW-1:0]         pc_e;
  logic                  done;
  logic                  carry;     // MSR carry, the only status bit kept

  always_ff @(posedge clk)
    if (rst) begin
      valid_q <= 1'b0;
      c       <= '0;
      pc_e    <= '0;
    end else if (!stall) begin
      valid_q <= id_valid && !(branch_taken && !c.br_delay);
      c       <= id_ctrl;
      pc_e    <= id_pc;
    end

  // The register holds arbitrary values until the first clock edge under reset; masking
  // with rst keeps that edge from storing to memory or touching a link.
  assign valid_e = valid_q && !rst;

  // ---------------- operands ----------------
  logic [DW-1:0] ra_v, rb_v, rd_v, op_b, imm_ext;
  logic          wb_en;
  logic [DW-1:0] wb_data;
  logic   [15:0] imm_hi;
  logic          imm_valid;

  openfire_regfile #(.DATA_WIDTH(DW)) u_rf (
    .clk, .ra_addr(c.ra), .ra_data(ra_v), .rb_addr(c.rb), .rb_data(rb_v),
    .rd_addr(c.rd), .rd_data(rd_v), .we(wb_en), .wa(c.rd), .wd(wb_data)
  );

  assign imm_ext = imm_valid ? DW'({imm_hi, c.imm16})
                             : DW'({{16{c.imm16[15]}}, c.imm16});
  assign op_b    = c.use_imm ? imm_ext : rb_v;

  // ---------------- ALU ----------------
  logic [DW-1:0] alu_y;
  logic          alu_cout, alu_cin;

  always_comb
    unique case (c.cin_sel)
      CIN_ONE:   alu_cin = 1'b1;
      CIN_CARRY: alu_cin = carry;
      default:   alu_cin = 1'b0;
    endcase

  openfire_alu #(.DATA_WIDTH(DW), .ENABLE_CMP(ENABLE_CMP)) u_alu (
    .op(c.alu_op), .a(ra_v), .b(op_b), .inv_a(c.inv_a), .cin(alu_cin),
    .result(alu_y), .cout(alu_cout)
  );

  // ---------------- multi-cycle sequencing ----------------
  logic step;          // second cycle of a load or store
  logic mul_busy;      // a multiply is in flight
  logic mul_done;
  logic [DW-1:0] mul_y;

  if (ENABLE_MUL) begin : g_mul
    openfire_multiplier #(.DATA_WIDTH(DW), .LATENCY(MUL_LATENCY)) u_mul (
      .clk, .rst, .start(valid_e && c.is_mul && !mul_busy),
      .a(ra_v), .b(op_b), .done(mul_done), .product(mul_y)
    );
  end else begin : g_nomul
    assign mul_done = 1'b0;
    assign mul_y    = '0;
  end

  logic is_mem;
  assign is_mem = c.is_load || c.is_store;

  logic fsl_wait;
  assign fsl_wait = !c.fsl_nonblock &&
                    ((c.fsl_get && !fsl_s_exists) || (c.fsl_put && fsl_m_full));

  always_comb begin
    stall = 1'b0;
    if (valid_e) begin
      if (is_mem && !step)          stall = 1'b1;
      if (c.is_mul && !mul_done)    stall = 1'b1;
      if (fsl_wait)                 stall = 1'b1;
    end
  end
  assign done = valid_e && !stall;

  always_ff @(posedge clk)
    if (rst) begin
      step     <= 1'b0;
      mul_busy <= 1'b0;
    end else begin
      step     <= valid_e && is_mem && !step;
      mul_busy <= valid_e && c.is_mul && !mul_done;
    end

  // ---------------- memory ----------------
  logic [DW-1:0] addr;
  logic    [1:0] lane_q;
  logic   [31:0] st_word;
  logic   [31:0] ld_word;
  logic [DW-1:0] ld_val;

  assign addr = ra_v + op_b;
  assign st_word = 32'(rd_v);

  always_comb begin
    dmem_en    = valid_e && is_mem && !step;
    dmem_addr  = addr;
    dmem_we    = '0;
    dmem_wdata = st_word;
    if (c.is_store) begin
      unique case (c.mem_size)
        SZ_BYTE: begin
          dmem_wdata = {4{st_word[7:0]}};
          dmem_we    = 4'b1000 >> addr[1:0];
        end
        SZ_HALF: begin
          dmem_wdata = {2{st_word[15:0]}};
          dmem_we    = addr[1] ? 4'b0011 : 4'b1100;
        end
        default: dmem_we = 4'b1111;
      endcase
      if (!dmem_en) dmem_we = '0;
    end
  end

  always_ff @(posedge clk)
    if (dmem_en) lane_q <= addr[1:0];

  always_comb begin
    ld_word = dmem_rdata;
    unique case (c.mem_size)
      SZ_BYTE: ld_val = DW'(8'(ld_word >> {~lane_q, 3'b000}));
      SZ_HALF: ld_val = DW'(lane_q[1] ? ld_word[15:0] : ld_word[31:16]);
      default: ld_val = DW'(ld_word);
    endcase
  end

  // ---------------- FSL ----------------
  assign fsl_m_data    = ra_v;
  assign fsl_m_control = c.fsl_control;
  assign fsl_m_write   = valid_e && c.fsl_put && !fsl_m_full;
  assign fsl_s_read    = valid_e && c.fsl_get && fsl_s_exists;

  // ---------------- branches ----------------
  logic          cond_true;
  logic [DW-1:0] br_base;

  always_comb begin
    unique case (c.br_cond)
      CC_EQ:   cond_true = (ra_v == '0);
      CC_NE:   cond_true = (ra_v != '0);
      CC_LT:   cond_true = ra_v[DW-1];
      CC_LE:   cond_true = ra_v[DW-1] || (ra_v == '0);
      CC_GT:   cond_true = !ra_v[DW-1] && (ra_v != '0);
      CC_GE:   cond_true = !ra_v[DW-1];
      default: cond_true = 1'b0;
    endcase
  end

  always_comb begin
    br_base = c.br_abs ? '0 : pc_e;
    if (c.br_kind == BR_RETURN) br_base = ra_v;
    branch_target = br_base + op_b;
    unique case (c.br_kind)
      BR_UNCOND: branch_taken = done;
      BR_COND:   branch_taken = done && cond_true;
      BR_RETURN: branch_taken = done;
      default:   branch_taken = 1'b0;
    endcase
  end

  // ---------------- write-back, carry, IMM ----------------
  logic fsl_fail;
  assign fsl_fail = (c.fsl_get && !fsl_s_exists) || (c.fsl_put && fsl_m_full);

  always_comb begin
    unique case (c.wb_sel)
      WB_LOAD: wb_data = ld_val;
      WB_MUL:  wb_data = mul_y;
      WB_FSL:  wb_data = fsl_s_data;
      WB_LINK: wb_data = pc_e;
      default: wb_data = alu_y;
    endcase
    wb_en = done && c.wr_rd && !(c.fsl_get && !fsl_s_exists);
  end

  always_ff @(posedge clk)
    if (rst) begin
      carry     <= 1'b0;
      imm_valid <= 1'b0;
      imm_hi    <= '0;
    end else if (done) begin
      if (c.wr_carry) carry <= alu_cout;
      if (c.fsl_get || c.fsl_put) if (c.fsl_nonblock) carry <= fsl_fail;
      imm_valid <= c.is_imm;
      if (c.is_imm) imm_hi <= c.imm16;
    end

  assign retire    = done;
  assign retire_pc = pc_e;

  // a get/put never waits when non-blocking, and a failed blocking get writes nothing
  a_nb_no_wait: assert property (@(posedge clk) disable iff (rst)
    valid_e && c.fsl_nonblock |-> !(stall && (c.fsl_get || c.fsl_put)));
endmodule
