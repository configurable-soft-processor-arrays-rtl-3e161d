// tb_median_speedup: the median-filter workload on rings of 1, 2, 4 and 8 OpenFires.
//
// Every ring filters the same image of eight 64x64-pixel blocks with the same node
// program (tb/median_w64.hex); a ring of N nodes does it in 8/N rounds. Each ring has
// its own master model, which checks every pixel. The testbench prints the run time
// of each ring and its speedup over the single node, and checks that the speedup
// grows with the ring and stays within 30% of linear (the reference system measured
// about 15% below linear at 8 nodes on blocks of this size). About 13 M cycles for
// the single node dominate the run time.
module tb_median_speedup;
  localparam int NC = 4, W = 64, DW = 32, TOTAL = 8;
  localparam int NS [NC] = '{1, 2, 4, 8};
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  for (genvar g = 0; g < NC; g++) begin : g_cfg
    localparam int N = NS[g];
    logic [DW-1:0] m2r_data, r2m_data;
    logic          m2r_control, m2r_write, m2r_full, r2m_control, r2m_exists, r2m_read;
    logic  [N-1:0] node_retire;
    logic          done;
    int            checks, failures, full_seen;
    longint        run_cycles;

    openfire_array #(.NUM_NODES(N), .INIT_FILE("tb/median_w64.hex")) u_arr (
      .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
      .r2m_data, .r2m_control, .r2m_exists, .r2m_read, .node_retire
    );
    median_master #(.NN(N), .W(W), .DW(DW), .SEED(5), .ROUNDS(TOTAL / N)) u_m (
      .clk, .rst, .m2r_data, .m2r_control, .m2r_write, .m2r_full,
      .r2m_data, .r2m_exists, .r2m_read, .done, .checks, .failures, .full_seen, .run_cycles
    );
  end

  int checks = 0, failures = 0;
  real t [NC];

  initial begin
    real s, prev;
    repeat (4) @(posedge clk);
    rst <= 0;
    wait (g_cfg[0].done && g_cfg[1].done && g_cfg[2].done && g_cfg[3].done);
    checks   = g_cfg[0].checks + g_cfg[1].checks + g_cfg[2].checks + g_cfg[3].checks;
    failures = g_cfg[0].failures + g_cfg[1].failures + g_cfg[2].failures + g_cfg[3].failures;
    t[0] = real'(g_cfg[0].run_cycles); t[1] = real'(g_cfg[1].run_cycles);
    t[2] = real'(g_cfg[2].run_cycles); t[3] = real'(g_cfg[3].run_cycles);
    prev = 0.0;
    for (int g = 0; g < NC; g++) begin
      s = t[0] / t[g];
      $display("nodes %0d: %0d cycles, speedup %.2f (%.0f%% of linear)", NS[g], longint'(t[g]), s,
               100.0 * s / NS[g]);
      checks++;
      if (s <= prev || s < 0.7 * NS[g]) begin failures++; $display("FAIL speedup at %0d nodes", NS[g]); end
      prev = s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
