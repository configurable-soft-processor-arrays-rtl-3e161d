// tb_openfire_local_memory: byte-lane writes and one-cycle reads on both ports of the
// local memory against a model; the read output must hold while its port is idle.
module tb_openfire_local_memory;
  localparam int WORDS = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic i_en, d_en;
  logic [31:0] i_addr, d_addr, i_rdata, d_wdata, d_rdata;
  logic [3:0] d_we;
  openfire_local_memory #(.MEM_WORDS(WORDS)) dut (.*);

  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  initial begin
    logic [31:0] ei, ed, held;
    int wi, wd;
    i_en = 0; d_en = 0; d_we = 0; i_addr = 0; d_addr = 0; d_wdata = 0;
    // initialise through the data port
    for (int k = 0; k < WORDS; k++) begin
      @(negedge clk);
      d_en = 1; d_we = 4'hf; d_addr = 32'(4 * k); d_wdata = $urandom; model[k] = d_wdata;
    end
    @(negedge clk); d_en = 0; d_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      wi = $urandom_range(WORDS - 1); wd = $urandom_range(WORDS - 1);
      i_en = 1; i_addr = 32'(4 * wi) | 32'($urandom_range(3));
      d_en = 1; d_addr = 32'(4 * wd); d_we = 4'($urandom); d_wdata = $urandom;
      ei = model[wi]; ed = model[wd];            // read-first
      for (int l = 0; l < 4; l++) if (d_we[l]) model[wd][8*l +: 8] = d_wdata[8*l +: 8];
      if (wi == wd && d_we != 0) i_en = 0;      // no same-word read/write race on port I
      @(negedge clk);
      if (i_en) begin checks++; if (i_rdata != ei) begin failures++; $display("FAIL port I word %0d", wi); end end
      checks++; if (d_rdata != ed) begin failures++; $display("FAIL port D word %0d", wd); end
      held = d_rdata;
      i_en = 0; d_en = 0; d_we = 0;
      @(negedge clk);
      checks++; if (d_rdata != held) begin failures++; $display("FAIL port D did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
