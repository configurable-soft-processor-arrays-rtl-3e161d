// tb_openfire_fetch: drives random stalls and branch redirects into the fetch stage and
// compares the instruction address, decode PC and decode valid bit with a model.
module tb_openfire_fetch;
  localparam int DW = 32;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic stall, branch_taken, imem_en, valid_d;
  logic [DW-1:0] branch_target, imem_addr, pc_d;
  openfire_fetch #(.DATA_WIDTH(DW)) dut (.*);

  logic [DW-1:0] m_pcf, m_pcd;
  logic          m_vd;
  int checks = 0, failures = 0;

  initial begin
    stall = 0; branch_taken = 0; branch_target = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    m_pcf = 4; m_pcd = 0; m_vd = 1;   // the first edge out of reset fetches address 0
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (imem_addr != m_pcf || pc_d != m_pcd || valid_d != m_vd || imem_en != !stall) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d addr %h/%h pc_d %h/%h v %b/%b", t, imem_addr, m_pcf, pc_d, m_pcd, valid_d, m_vd);
      end
      stall = ($urandom_range(3) == 0);
      branch_taken = !stall && ($urandom_range(5) == 0);
      branch_target = {$urandom} & ~32'h3;
      if (!stall) begin
        m_pcd = m_pcf;
        m_vd  = !branch_taken;
        m_pcf = branch_taken ? branch_target : m_pcf + 4;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
