// openfire_multiplier: pipelined hardware multiplier of the OpenFire.
//
// Returns the low DATA_WIDTH bits of a * b (MicroBlaze mul/muli), which are the same
// for signed and unsigned operands. Operands are taken in the cycle `start` is high
// (cycle 1); the product is registered and passed down a chain of LATENCY-1 registers,
// so `done` and `product` are valid in cycle LATENCY. The default of five cycles is
// the OpenFire's multiply latency (the MicroBlaze needs three). A new multiply may
// start every cycle. How the latency is spread over the pipeline is this design's
// choice: one multiply stage followed by retiming registers.
module openfire_multiplier #(
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned LATENCY    = 5
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [DATA_WIDTH-1:0] a,
  input  logic [DATA_WIDTH-1:0] b,
  output logic                  done,
  output logic [DATA_WIDTH-1:0] product
);
  localparam int unsigned STAGES = LATENCY - 1;

  logic [DATA_WIDTH-1:0] p_q [STAGES];
  logic [STAGES-1:0]     v_q;

  always_ff @(posedge clk) begin
    p_q[0] <= DATA_WIDTH'(a * b);
    for (int i = 1; i < STAGES; i++) p_q[i] <= p_q[i-1];
  end

  always_ff @(posedge clk)
    if (rst) v_q <= '0;
    else begin
      v_q[0] <= start;
      for (int i = 1; i < STAGES; i++) v_q[i] <= v_q[i-1];
    end

  assign done    = v_q[STAGES-1];
  assign product = p_q[STAGES-1];

  initial assert (LATENCY >= 2) else $error("LATENCY must be at least 2");
endmodule
