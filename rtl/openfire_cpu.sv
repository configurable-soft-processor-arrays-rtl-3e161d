// openfire_cpu: the OpenFire processor, a MicroBlaze-compatible soft core.
//
// Three pipeline stages, as in the MicroBlaze: fetch (openfire_fetch), decode
// (openfire_decode) and execute (openfire_execute). Instructions come from and data go
// to a local memory over two plain one-cycle ports (no LMB, no cache, no OPB); the only
// other interface is one pair of Fast Simplex Links, an outgoing master link and an
// incoming slave link, which in an array connect neighbouring processors.
// The datapath width is a parameter: 32 bits gives the MicroBlaze datapath and 16 bits
// the reduced OpenFire variant; registers, the PC and addresses all take this width,
// so a 16-bit OpenFire addresses at most 64 KiB. The multiplier and the comparator
// are optional. A busy execute stage holds fetch and decode; a taken branch discards
// the word in fetch and, unless it has a delay slot, the word in decode.
module openfire_cpu
  import openfire_pkg::*;
#(
  parameter int unsigned DATA_WIDTH  = 32,
  parameter bit          ENABLE_MUL  = 1'b1,
  parameter bit          ENABLE_CMP  = 1'b1,
  parameter int unsigned MUL_LATENCY = 5
) (
  input  logic                  clk,
  input  logic                  rst,
  // instruction port of the local memory
  output logic                  imem_en,
  output logic [DATA_WIDTH-1:0] imem_addr,
  input  logic           [31:0] imem_rdata,
  // data port of the local memory
  output logic                  dmem_en,
  output logic            [3:0] dmem_we,
  output logic [DATA_WIDTH-1:0] dmem_addr,
  output logic           [31:0] dmem_wdata,
  input  logic           [31:0] dmem_rdata,
  // FSL master link (to the next node)
  output logic [DATA_WIDTH-1:0] fsl_m_data,
  output logic                  fsl_m_control,
  output logic                  fsl_m_write,
  input  logic                  fsl_m_full,
  // FSL slave link (from the previous node)
  input  logic [DATA_WIDTH-1:0] fsl_s_data,
  input  logic                  fsl_s_control,
  input  logic                  fsl_s_exists,
  output logic                  fsl_s_read,
  // observation
  output logic                  retire,
  output logic [DATA_WIDTH-1:0] retire_pc
);
  logic                  stall, branch_taken, valid_d;
  logic [DATA_WIDTH-1:0] branch_target, pc_d;
  ctrl_t                 ctrl_d;

  openfire_fetch #(.DATA_WIDTH(DATA_WIDTH)) u_fetch (
    .clk, .rst, .stall, .branch_taken, .branch_target,
    .imem_en, .imem_addr, .pc_d, .valid_d
  );

  openfire_decode #(.ENABLE_MUL(ENABLE_MUL), .ENABLE_CMP(ENABLE_CMP)) u_decode (
    .instr(imem_rdata), .ctrl(ctrl_d)
  );

  openfire_execute #(
    .DATA_WIDTH(DATA_WIDTH), .ENABLE_MUL(ENABLE_MUL), .ENABLE_CMP(ENABLE_CMP),
    .MUL_LATENCY(MUL_LATENCY)
  ) u_ex (
    .clk, .rst,
    .id_valid(valid_d), .id_ctrl(ctrl_d), .id_pc(pc_d),
    .stall, .branch_taken, .branch_target,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .fsl_m_data, .fsl_m_control, .fsl_m_write, .fsl_m_full,
    .fsl_s_data, .fsl_s_control, .fsl_s_exists, .fsl_s_read,
    .retire, .retire_pc
  );
endmodule
