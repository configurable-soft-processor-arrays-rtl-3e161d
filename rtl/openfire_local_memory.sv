// openfire_local_memory: the local block RAM of one OpenFire node.
//
// MEM_WORDS 32-bit words shared by code and data, with two synchronous ports: port I
// reads instructions, port D reads data and writes it with one enable per byte
// (big-endian lane order: we[3] is bits 31:24, the byte at the lowest address). A
// read returns its word one clock after the port is enabled, and the output holds
// while the port is disabled. Both ports take byte addresses and drop bits 1:0.
// The processor connects to this memory directly, without a bus, so an instruction
// fetch completes in one cycle. The memory can be preloaded from INIT_FILE (a
// $readmemh file) the way a bitstream fills block RAM. The size and the read-first
// behaviour of port D are this design's choices.
module openfire_local_memory #(
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned ADDR_BITS = 32,
  parameter string       INIT_FILE = ""
) (
  input  logic                 clk,
  // instruction port
  input  logic                 i_en,
  input  logic [ADDR_BITS-1:0] i_addr,
  output logic          [31:0] i_rdata,
  // data port
  input  logic                 d_en,
  input  logic           [3:0] d_we,
  input  logic [ADDR_BITS-1:0] d_addr,
  input  logic          [31:0] d_wdata,
  output logic          [31:0] d_rdata
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  logic [31:0] mem [MEM_WORDS];

  initial if (INIT_FILE != "") $readmemh(INIT_FILE, mem);

  logic [AW-1:0] i_word, d_word;
  assign i_word = AW'(i_addr >> 2);
  assign d_word = AW'(d_addr >> 2);

  always_ff @(posedge clk)
    if (i_en) i_rdata <= mem[i_word];

  always_ff @(posedge clk)
    if (d_en) begin
      d_rdata <= mem[d_word];
      for (int l = 0; l < 4; l++)
        if (d_we[l]) mem[d_word][8*l +: 8] <= d_wdata[8*l +: 8];
    end
endmodule
