// openfire_regfile: the 32 general-purpose registers of the OpenFire.
//
// Three asynchronous read ports (rA, rB and rD, the last one for store and put data)
// and one synchronous write port. Register r0 always reads as zero and ignores
// writes, as in MicroBlaze. Registers are DATA_WIDTH bits wide: with a 16-bit
// datapath every register, and therefore every address, is 16 bits.
// The registers are not reset (they map onto LUT RAM); software initialises what it
// reads. The port arrangement is this design's choice.
module openfire_regfile #(
  parameter int unsigned DATA_WIDTH = 32
) (
  input  logic                  clk,
  input  logic            [4:0] ra_addr,
  output logic [DATA_WIDTH-1:0] ra_data,
  input  logic            [4:0] rb_addr,
  output logic [DATA_WIDTH-1:0] rb_data,
  input  logic            [4:0] rd_addr,
  output logic [DATA_WIDTH-1:0] rd_data,
  input  logic                  we,
  input  logic            [4:0] wa,
  input  logic [DATA_WIDTH-1:0] wd
);
  logic [DATA_WIDTH-1:0] regs [32];

  always_ff @(posedge clk)
    if (we && wa != 5'd0) regs[wa] <= wd;

  assign ra_data = (ra_addr == 5'd0) ? '0 : regs[ra_addr];
  assign rb_data = (rb_addr == 5'd0) ? '0 : regs[rb_addr];
  assign rd_data = (rd_addr == 5'd0) ? '0 : regs[rd_addr];
endmodule
