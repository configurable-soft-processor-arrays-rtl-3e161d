// openfire_fetch: fetch stage of the OpenFire pipeline.
//
// Holds the program counter and presents it as the instruction-memory address. The
// local memory answers in one cycle, so its output register is the fetch/decode
// pipeline register and no prefetch buffer is needed. This stage keeps the PC and a
// valid bit that travel alongside that instruction word.
//   - stall: the execute stage is busy; PC, decode PC and valid hold, and the memory
//     port is disabled so the instruction word holds too.
//   - branch_taken: the execute stage redirects to branch_target. The word being
//     fetched in that cycle is marked invalid in decode.
// Reset starts fetching at address 0, the MicroBlaze reset vector. The PC is
// DATA_WIDTH bits wide, like every address of this processor.
module openfire_fetch #(
  parameter int unsigned DATA_WIDTH = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  stall,
  input  logic                  branch_taken,
  input  logic [DATA_WIDTH-1:0] branch_target,
  output logic                  imem_en,
  output logic [DATA_WIDTH-1:0] imem_addr,
  output logic [DATA_WIDTH-1:0] pc_d,      // address of the word now in decode
  output logic                  valid_d    // that word is to be executed
);
  logic [DATA_WIDTH-1:0] pc_f;

  assign imem_addr = pc_f;
  assign imem_en   = !stall;

  always_ff @(posedge clk)
    if (rst) begin
      pc_f    <= '0;
      pc_d    <= '0;
      valid_d <= 1'b0;
    end else if (!stall) begin
      pc_f    <= branch_taken ? branch_target : pc_f + DATA_WIDTH'(4);
      pc_d    <= pc_f;
      valid_d <= !branch_taken;
    end
endmodule
