// openfire_array: a ring of OpenFire processing nodes joined by FSL FIFOs.
//
// Each node is an openfire_cpu with its own openfire_local_memory. Link k is an
// fsl_fifo from node k-1 to node k; link 0 comes from the master and link NUM_NODES
// goes back to it, so the master closes the ring (in the reference system the master
// is a MicroBlaze that also reaches the external DDR memory; it sits outside this
// module and its two FSL ports are the ports below). Every node runs the same program,
// loaded into every local memory from INIT_FILE; a node learns its place in the ring
// from the node count that the master sends and each node decrements and passes on.
// A value put by one node reaches a register of the next node two cycles later.
// NUM_NODES = 3 is the ring drawn for the reference system; the memory size and FIFO
// depth are this design's choices. Only the per-node retire strobe is brought out;
// each core's retire_pc is left unread at this level (a debug aid for single-core tests).
module openfire_array #(
  parameter int unsigned NUM_NODES   = 3,
  parameter int unsigned DATA_WIDTH  = 32,
  parameter int unsigned MEM_WORDS   = 4096,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter bit          ENABLE_MUL  = 1'b1,
  parameter bit          ENABLE_CMP  = 1'b1,
  parameter int unsigned MUL_LATENCY = 5,
  parameter string       INIT_FILE   = ""
) (
  input  logic                  clk,
  input  logic                  rst,
  // master -> first node
  input  logic [DATA_WIDTH-1:0] m2r_data,
  input  logic                  m2r_control,
  input  logic                  m2r_write,
  output logic                  m2r_full,
  // last node -> master
  output logic [DATA_WIDTH-1:0] r2m_data,
  output logic                  r2m_control,
  output logic                  r2m_exists,
  input  logic                  r2m_read,
  // per-node instruction retirement, for observation
  output logic  [NUM_NODES-1:0] node_retire
);
  localparam int unsigned NL = NUM_NODES + 1;

  // link k: writer side driven by node k-1 (or master), reader side read by node k
  logic [DATA_WIDTH-1:0] l_wdata [NL];
  logic                  l_wctrl [NL];
  logic                  l_write [NL];
  logic                  l_full  [NL];
  logic [DATA_WIDTH-1:0] l_rdata [NL];
  logic                  l_rctrl [NL];
  logic                  l_exists[NL];
  logic                  l_read  [NL];

  assign l_wdata[0] = m2r_data;
  assign l_wctrl[0] = m2r_control;
  assign l_write[0] = m2r_write;
  assign m2r_full   = l_full[0];

  assign r2m_data        = l_rdata[NUM_NODES];
  assign r2m_control     = l_rctrl[NUM_NODES];
  assign r2m_exists      = l_exists[NUM_NODES];
  assign l_read[NUM_NODES] = r2m_read;

  for (genvar k = 0; k < NL; k++) begin : g_link
    fsl_fifo #(.DATA_WIDTH(DATA_WIDTH), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .wr_data(l_wdata[k]), .wr_control(l_wctrl[k]), .write(l_write[k]), .full(l_full[k]),
      .rd_data(l_rdata[k]), .rd_control(l_rctrl[k]), .exists(l_exists[k]), .read(l_read[k])
    );
  end

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    logic                  imem_en, dmem_en;
    logic [DATA_WIDTH-1:0] imem_addr, dmem_addr, retire_pc;
    logic           [31:0] imem_rdata, dmem_wdata, dmem_rdata;
    logic            [3:0] dmem_we;

    openfire_cpu #(
      .DATA_WIDTH(DATA_WIDTH), .ENABLE_MUL(ENABLE_MUL), .ENABLE_CMP(ENABLE_CMP),
      .MUL_LATENCY(MUL_LATENCY)
    ) u_cpu (
      .clk, .rst,
      .imem_en, .imem_addr, .imem_rdata,
      .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
      .fsl_m_data(l_wdata[n+1]), .fsl_m_control(l_wctrl[n+1]),
      .fsl_m_write(l_write[n+1]), .fsl_m_full(l_full[n+1]),
      .fsl_s_data(l_rdata[n]), .fsl_s_control(l_rctrl[n]),
      .fsl_s_exists(l_exists[n]), .fsl_s_read(l_read[n]),
      .retire(node_retire[n]), .retire_pc
    );

    openfire_local_memory #(
      .MEM_WORDS(MEM_WORDS), .ADDR_BITS(DATA_WIDTH), .INIT_FILE(INIT_FILE)
    ) u_mem (
      .clk,
      .i_en(imem_en), .i_addr(imem_addr), .i_rdata(imem_rdata),
      .d_en(dmem_en), .d_we(dmem_we), .d_addr(dmem_addr), .d_wdata(dmem_wdata),
      .d_rdata(dmem_rdata)
    );
  end
endmodule
