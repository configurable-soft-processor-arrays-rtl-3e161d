// tb_openfire_cpu: runs an instruction-set test program on one OpenFire.
//
// The processor is connected to a local memory preloaded with tb/isa_test.hex and to
// two FSL FIFOs. The program sends every result it computes out through its FSL
// master port; the testbench compares them with values worked out by hand from the
// MicroBlaze instruction definitions. It also feeds the program's get instructions
// (late, so that a blocking get has to wait) and checks cycle counts taken from the
// retirement trace: mul 5 cycles, load 2, taken branch 3, and a delay-slot branch
// whose delay-slot instruction follows at once and whose target follows 2 cycles later.
module tb_openfire_cpu;
  localparam int DW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          imem_en, dmem_en, retire;
  logic [DW-1:0] imem_addr, dmem_addr, retire_pc;
  logic   [31:0] imem_rdata, dmem_wdata, dmem_rdata;
  logic    [3:0] dmem_we;
  logic [DW-1:0] m_data, s_data, o_data, i_data;
  logic          m_ctrl, m_write, m_full, s_ctrl, s_exists, s_read;
  logic          o_ctrl, o_exists, o_read, i_write, i_full;

  openfire_cpu dut (
    .clk, .rst, .imem_en, .imem_addr, .imem_rdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .fsl_m_data(m_data), .fsl_m_control(m_ctrl), .fsl_m_write(m_write), .fsl_m_full(m_full),
    .fsl_s_data(s_data), .fsl_s_control(s_ctrl), .fsl_s_exists(s_exists), .fsl_s_read(s_read),
    .retire, .retire_pc
  );
  openfire_local_memory #(.MEM_WORDS(1024), .INIT_FILE("tb/isa_test.hex")) u_mem (
    .clk, .i_en(imem_en), .i_addr(imem_addr), .i_rdata(imem_rdata),
    .d_en(dmem_en), .d_we(dmem_we), .d_addr(dmem_addr), .d_wdata(dmem_wdata), .d_rdata(dmem_rdata)
  );
  fsl_fifo u_out (.clk, .rst, .wr_data(m_data), .wr_control(m_ctrl), .write(m_write), .full(m_full),
                  .rd_data(o_data), .rd_control(o_ctrl), .exists(o_exists), .read(o_read));
  fsl_fifo u_in  (.clk, .rst, .wr_data(i_data), .wr_control(1'b0), .write(i_write), .full(i_full),
                  .rd_data(s_data), .rd_control(s_ctrl), .exists(s_exists), .read(s_read));

  // expected results; -1 entries are the two words fed in, checked separately
  localparam int N = 30;
  localparam logic [31:0] GET_A = 32'd4000, GET_B = 32'h00abcdef;
  logic [31:0] expect_q [N] = '{32'd93, 32'd1, 32'd107, 32'h12345678, 32'h12345600, 32'h78, 32'h78,
      32'hfffffffc, 32'd50, 32'd0, 32'h80000032, 32'hffffff80, 32'hffffffc1, 32'd10000,
      32'hffffff95, 32'h7fffff95, 32'h34, 32'h5678, 32'h12345664, 32'hfff95664, 32'h5664,
      32'd5, 32'd5, 32'd6, 32'd3, GET_A + 1, 32'd1, GET_B, 32'd0, 32'd77};

  int checks = 0, failures = 0, nout = 0;
  longint cyc = 0;
  longint rcyc [int];

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (retire && !rcyc.exists(int'(retire_pc))) rcyc[int'(retire_pc)] = cyc;

  assign o_read = o_exists;
  always @(posedge clk) if (!rst && o_exists) begin
    if (nout < N) begin
      checks++;
      if (o_data !== expect_q[nout]) begin
        failures++;
        $display("FAIL result %0d: got %h expected %h", nout, o_data, expect_q[nout]);
      end
    end
    nout++;
  end

  task automatic check_gap(input int a, input int b, input int gap, input string what);
    checks++;
    if (!rcyc.exists(a) || !rcyc.exists(b) || rcyc[b] - rcyc[a] != gap) begin
      failures++;
      $display("FAIL timing %s: expected %0d cycles", what, gap);
    end
  endtask

  initial begin
    i_write = 0; i_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // first get: feed it late so that the blocking get waits
    wait (nout == 25);
    repeat (20) @(posedge clk);
    i_data <= GET_A; i_write <= 1; @(posedge clk); i_write <= 0;
    wait (nout == 27);
    @(posedge clk);
    i_data <= GET_B; i_write <= 1; @(posedge clk); i_write <= 0;
    wait (nout == N);
    repeat (10) @(posedge clk);
    checks++; if (nout != N) begin failures++; $display("FAIL %0d extra results", nout - N); end
    check_gap('h70, 'h74, 5, "mul");
    check_gap('h94, 'h98, 2, "load");
    check_gap('hd4, 'hd8, 1, "delay slot");
    check_gap('hd8, 'he0, 2, "branch target after delay slot");
    check_gap('he4, 'hec, 3, "taken branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d results", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
