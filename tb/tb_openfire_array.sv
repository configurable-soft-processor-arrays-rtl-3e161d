// tb_openfire_array: end-to-end test of the OpenFire ring running a 3x3 median filter.
//
// Three OpenFire nodes (the ring of the reference system) run tb/median_w8.hex, the
// median-filter node program for 8x8-pixel blocks; median_master plays the master
// node, numbers the ring, sends one block per node, and checks every filtered pixel.
// The testbench also checks that each node learned its ring position, and counts how
// often each mechanism of the design occurred: blocking get waiting on an empty link,
// put waiting on a full link, the master finding the ring full, multiplies, loads and
// stores, taken branches with and without a delay slot, and compares. A mechanism
// that never occurs counts as a failure. Only the block size is reduced (8x8 instead
// of 64x64); the array runs at its default parameters apart from the program file.
module tb_openfire_array;
  localparam int NN = 3, W = 8, DW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [DW-1:0] m2r_data, r2m_data;
  logic          m2r_control, m2r_write, m2r_full, r2m_control, r2m_exists, r2m_read;
  logic [NN-1:0] node_retire;
  logic          done;
  int            checks, failures, full_seen;
  longint        run_cycles;

  openfire_array #(.INIT_FILE("tb/median_w8.hex")) dut (
    .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
    .r2m_data, .r2m_control, .r2m_exists, .r2m_read, .node_retire
  );

  median_master #(.NN(NN), .W(W), .DW(DW), .SEED(7)) u_master (
    .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
    .r2m_data, .r2m_exists, .r2m_read, .done, .checks, .failures, .full_seen, .run_cycles
  );

  // mechanism counters
  int n_get_wait = 0, n_put_wait = 0, n_mul = 0, n_mem = 0, n_br_delay = 0, n_br = 0, n_cmp = 0;
  for (genvar n = 0; n < NN; n++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      automatic logic v  = dut.g_node[n].u_cpu.u_ex.valid_e;
      automatic logic st = dut.g_node[n].u_cpu.u_ex.stall;
      automatic openfire_pkg::ctrl_t c = dut.g_node[n].u_cpu.u_ex.c;
      if (v && st && c.fsl_get) n_get_wait++;
      if (v && st && c.fsl_put) n_put_wait++;
      if (dut.g_node[n].u_cpu.retire) begin
        if (c.is_mul) n_mul++;
        if (c.is_load || c.is_store) n_mem++;
        if (c.alu_op == openfire_pkg::ALU_CMP && c.wr_rd && !c.is_load) n_cmp++;
        if (dut.g_node[n].u_cpu.branch_taken) begin
          if (c.br_delay) n_br_delay++; else n_br++;
        end
      end
    end
  end

  int tchecks = 0, tfail = 0;
  task automatic need(input int count, input string what);
    tchecks++;
    $display("  %-32s %0d", what, count);
    if (count == 0) begin tfail++; $display("FAIL mechanism never occurred: %s", what); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (done);
    repeat (5) @(posedge clk);
    for (int n = 0; n < NN; n++) begin
      tchecks++;
      if (n == 0 && dut.g_node[0].u_cpu.u_ex.u_rf.regs[1] != NN) tfail++;
      if (n == 1 && dut.g_node[1].u_cpu.u_ex.u_rf.regs[1] != NN - 1) tfail++;
      if (n == 2 && dut.g_node[2].u_cpu.u_ex.u_rf.regs[1] != NN - 2) tfail++;
    end
    $display("run: %0d cycles for %0d blocks of %0dx%0d", run_cycles, NN, W, W);
    need(n_get_wait, "get waiting on empty link");
    need(n_put_wait, "put waiting on full link");
    need(full_seen,  "master finding ring full");
    need(n_mul,      "multiplies");
    need(n_mem,      "loads and stores");
    need(n_br_delay, "taken branches with delay slot");
    need(n_br,       "taken branches without delay slot");
    need(n_cmp,      "compares");
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + tfail);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("node pcs %h %h %h", dut.g_node[0].u_cpu.u_fetch.pc_d, dut.g_node[1].u_cpu.u_fetch.pc_d,
             dut.g_node[2].u_cpu.u_fetch.pc_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tchecks, failures + tfail + 1);
    $finish;
  end
endmodule
