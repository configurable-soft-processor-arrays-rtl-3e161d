// median_master: behavioural model of the master node of the median-filter system.
//
// In the reference system the master is a MicroBlaze that reaches the image in DDR
// memory and feeds the ring of OpenFires over FSL; it is not designed here, so this
// model plays its part for the testbenches. Protocol (the node program in
// tb/median_w*.hex follows it):
//   1. send the node count NN; every node keeps what it receives as its number and
//      passes it on decremented, so the value 0 returns to the master;
//   2. send NN blocks of W*W 8-bit pixels, one pixel per FSL word, the block for the
//      farthest node first (each node forwards number-1 blocks and keeps the next);
//   3. send the end marker 0xFFFF_FFFF, then collect NN filtered blocks (farthest
//      upstream first: the block of node NN, ..., of node 1) and a final end marker;
//   4. repeat 2 and 3 for ROUNDS rounds, as the master hands out new blocks after
//      each batch of results.
// The image is random; the expected 3x3 median (border pixels copied) is computed
// here and compared pixel by pixel. The reader stalls at random to create back-
// pressure on the ring. `full_seen` counts cycles the master found the ring full.
module median_master #(
  parameter int NN   = 3,
  parameter int W    = 8,
  parameter int DW   = 32,
  parameter int SEED = 1,
  parameter int ROUNDS = 1
) (
  input  logic          clk,
  input  logic          rst,
  output logic [DW-1:0] m2r_data,
  output logic          m2r_control,
  output logic          m2r_write,
  input  logic          m2r_full,
  input  logic [DW-1:0] r2m_data,
  input  logic          r2m_exists,
  output logic          r2m_read,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            full_seen,
  output longint        run_cycles
);
  localparam int P = W * W;
  logic [7:0] img [ROUNDS*NN][P];

  function automatic logic [7:0] median9(input int b, input int y, input int x);
    logic [7:0] v [9];
    logic [7:0] t;
    int k = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++) begin
        v[k] = img[b][(y + dy) * W + x + dx];
        k++;
      end
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[4];
  endfunction

  function automatic logic [7:0] expected(input int b, input int idx);
    int y = idx / W, x = idx % W;
    if (y == 0 || x == 0 || y == W - 1 || x == W - 1) return img[b][idx];
    return median9(b, y, x);
  endfunction

  // Both tasks start and end at a falling edge, where the FIFO flags are stable.
  task automatic send(input logic [DW-1:0] v);
    while (m2r_full) begin full_seen++; @(negedge clk); end
    m2r_data  = v;
    m2r_write = 1'b1;
    @(negedge clk);                                  // accepted at the rising edge
    m2r_write = 1'b0;
  endtask

  task automatic recv(output logic [DW-1:0] v);
    while ($urandom_range(3) == 0) @(negedge clk);   // random back-pressure
    while (!r2m_exists) @(negedge clk);
    v = r2m_data;
    r2m_read = 1'b1;
    @(negedge clk);
    r2m_read = 1'b0;
  endtask

  initial begin
    logic [DW-1:0] v;
    longint t0;
    void'($urandom(SEED));
    m2r_data = '0; m2r_control = 1'b0; m2r_write = 1'b0; r2m_read = 1'b0;
    done = 1'b0; checks = 0; failures = 0; full_seen = 0; run_cycles = 0;
    for (int b = 0; b < ROUNDS * NN; b++)
      for (int i = 0; i < P; i++) img[b][i] = 8'($urandom);
    @(negedge rst);
    @(negedge clk);
    t0 = 0;
    fork
      forever begin @(posedge clk); t0++; end
    join_none
    send(DW'(NN));
    recv(v);
    checks++;
    if (v != '0) begin failures++; $display("FAIL ring sync returned %0d", v); end
    for (int r = 0; r < ROUNDS; r++) begin
    for (int b = 0; b < NN; b++)
      for (int i = 0; i < P; i++) send(DW'(img[r*NN + b][i]));
    send('1);
    for (int k = 0; k < NN; k++) begin
      // result k comes from node NN-k, which kept input block NN-1-k
      automatic int b = r * NN + NN - 1 - k;
      automatic int bad = 0;
      for (int i = 0; i < P; i++) begin
        recv(v);
        checks++;
        if (v != DW'(expected(b, i))) begin
          failures++;
          if (bad++ < 5) $display("FAIL block %0d pixel %0d: got %0d expected %0d", b, i, v, expected(b, i));
        end
      end
    end
    recv(v);
    checks++;
    if (v != '1) begin failures++; $display("FAIL end marker %h", v); end
    end
    run_cycles = t0;
    done = 1'b1;
  end
endmodule
