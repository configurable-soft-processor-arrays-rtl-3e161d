// tb_openfire_regfile: random writes and reads of the register file against a model;
// r0 must read zero whatever is written to it.
module tb_openfire_regfile;
  localparam int DW = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] ra_addr, rb_addr, rd_addr, wa;
  logic [DW-1:0] ra_data, rb_data, rd_data, wd;
  logic we;
  openfire_regfile #(.DATA_WIDTH(DW)) dut (.*);

  logic [DW-1:0] model [32];
  bit            known [32];
  int checks = 0, failures = 0;

  initial begin
    we = 0; wa = 0; wd = 0; ra_addr = 0; rb_addr = 0; rd_addr = 0;
    for (int i = 0; i < 32; i++) known[i] = (i == 0);
    model[0] = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ra_addr = 5'($urandom); rb_addr = 5'($urandom); rd_addr = 5'($urandom);
      #1;
      if (known[ra_addr]) begin checks++; if (ra_data != model[ra_addr]) begin failures++; $display("FAIL ra r%0d", ra_addr); end end
      if (known[rb_addr]) begin checks++; if (rb_data != model[rb_addr]) begin failures++; $display("FAIL rb r%0d", rb_addr); end end
      if (known[rd_addr]) begin checks++; if (rd_data != model[rd_addr]) begin failures++; $display("FAIL rd r%0d", rd_addr); end end
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      if (we && wa != 0) begin model[wa] = wd; known[wa] = 1; end
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
