// fsl_fifo: one Fast Simplex Link channel between two nodes of the array.
//
// A first-word-fall-through FIFO of DEPTH entries, each a data word plus the FSL
// control bit. The writer drives data, control and `write` and must not write while
// `full`; the reader sees the head entry on `rd_data`/`rd_control` whenever `exists`
// is high and pops it with `read`. A word written in cycle t is visible to the reader
// in cycle t+1, so a put in one processor and a get in its neighbour move a value
// from register to register in two clock cycles. Simultaneous read and write are
// allowed, also when full (the read frees the slot only at the clock edge, so `full`
// still blocks the writer in that cycle). The depth is this design's choice (the
// Xilinx FSL default of 16); the FIFO interconnect and its timing follow the text.
module fsl_fifo #(
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned DEPTH      = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  // master (writer) side
  input  logic [DATA_WIDTH-1:0] wr_data,
  input  logic                  wr_control,
  input  logic                  write,
  output logic                  full,
  // slave (reader) side
  output logic [DATA_WIDTH-1:0] rd_data,
  output logic                  rd_control,
  output logic                  exists,
  input  logic                  read
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_WIDTH:0] store [DEPTH];
  logic [PW-1:0]       wp, rp;
  logic [PW:0]         count;
  logic                do_wr, do_rd;

  assign do_wr  = write && !full;
  assign do_rd  = read && exists;
  assign full   = (count == (PW+1)'(DEPTH));
  assign exists = (count != '0);
  assign {rd_control, rd_data} = store[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk)
    if (do_wr) store[wp] <= {wr_control, wr_data};

  always_ff @(posedge clk)
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + (PW+1)'(do_wr) - (PW+1)'(do_rd);
    end

  // FSL handshake rules
  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) !(write && full))
    else $error("fsl_fifo: write while full");
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (rst) !(read && !exists))
    else $error("fsl_fifo: read while empty");
endmodule
