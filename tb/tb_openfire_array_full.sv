// tb_openfire_array_full: the OpenFire ring at its default size filtering 64x64 blocks.
//
// The array is instantiated with no parameter overrides (three nodes, 32-bit datapath,
// 16 KiB local memories, 16-word links); the median-filter program for 64x64-pixel
// blocks is loaded into each node's local memory before reset, as configuration
// would. median_master numbers the ring, sends one 64x64 block of 8-bit pixels to each
// node, and checks every filtered pixel; the run time in cycles is printed.
module tb_openfire_array_full;
  localparam int NN = 3, W = 64, DW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [DW-1:0] m2r_data, r2m_data;
  logic          m2r_control, m2r_write, m2r_full, r2m_control, r2m_exists, r2m_read;
  logic [NN-1:0] node_retire;
  logic          done;
  int            checks, failures, full_seen;
  longint        run_cycles;

  openfire_array dut (
    .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
    .r2m_data, .r2m_control, .r2m_exists, .r2m_read, .node_retire
  );

  initial begin
    $readmemh("tb/median_w64.hex", dut.g_node[0].u_mem.mem);
    $readmemh("tb/median_w64.hex", dut.g_node[1].u_mem.mem);
    $readmemh("tb/median_w64.hex", dut.g_node[2].u_mem.mem);
  end

  median_master #(.NN(NN), .W(W), .DW(DW), .SEED(11)) u_master (
    .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
    .r2m_data, .r2m_exists, .r2m_read, .done, .checks, .failures, .full_seen, .run_cycles
  );

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (done);
    $display("run: %0d cycles for %0d blocks of %0dx%0d pixels", run_cycles, NN, W, W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
