// tb_openfire_array_dw16: the median-filter ring with the reduced 16-bit datapath.
//
// Same program and protocol as tb_openfire_array (three nodes, 8x8-pixel blocks), but
// the array is built with DATA_WIDTH = 16: registers, addresses and FSL words are 16
// bits. The unchanged MicroBlaze program still works because every value it handles
// (pixels, counts, addresses below 0x4000) fits in 16 bits. Every pixel is checked.
module tb_openfire_array_dw16;
  localparam int NN = 3, W = 8, DW = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [DW-1:0] m2r_data, r2m_data;
  logic          m2r_control, m2r_write, m2r_full, r2m_control, r2m_exists, r2m_read;
  logic [NN-1:0] node_retire;
  logic          done;
  int            checks, failures, full_seen;
  longint        run_cycles;

  openfire_array #(.DATA_WIDTH(DW), .INIT_FILE("tb/median_w8.hex")) dut (
    .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
    .r2m_data, .r2m_control, .r2m_exists, .r2m_read, .node_retire
  );

  median_master #(.NN(NN), .W(W), .DW(DW), .SEED(3), .ROUNDS(2)) u_master (
    .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
    .r2m_data, .r2m_exists, .r2m_read, .done, .checks, .failures, .full_seen, .run_cycles
  );

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (done);
    $display("run: %0d cycles, 16-bit datapath", run_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
