// tb_fsl_fifo: self-checking test of the FSL FIFO link.
//
// Random writes and reads (never writing while full, never reading while empty)
// against a queue model; checks data, control bit, exists/full flags, that a word
// written in one cycle is readable in the next (the one-cycle half of the two-cycle
// register-to-register transfer), and that DEPTH words fit before full.
module tb_fsl_fifo;
  localparam int DW = 16, DEPTH = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [DW-1:0] wr_data, rd_data;
  logic          wr_control, write, full, rd_control, exists, read;

  fsl_fifo #(.DATA_WIDTH(DW), .DEPTH(DEPTH)) dut (.*);

  logic [DW:0] model [$];
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    write = 0; read = 0; wr_data = '0; wr_control = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // latency: write in one cycle, exists in the next
    @(negedge clk);
    chk(!exists && !full, "empty after reset");
    wr_data = 16'h1234; wr_control = 1; write = 1;
    @(negedge clk);
    write = 0;
    chk(exists && rd_data == 16'h1234 && rd_control, "word visible one cycle after write");
    read = 1;
    @(negedge clk);
    read = 0;
    chk(!exists, "empty after read");
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      wr_data = DW'(i + 100); wr_control = 0; write = 1;
      @(negedge clk);
    end
    write = 0;
    chk(full, "full after DEPTH writes");
    for (int i = 0; i < DEPTH; i++) begin
      chk(rd_data == DW'(i + 100), "fill order");
      read = 1;
      @(negedge clk);
    end
    read = 0;
    chk(!exists && !full, "drained");
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      write = !full && ($urandom_range(1) == 1);
      read  = exists && ($urandom_range(2) != 0);
      wr_data = DW'($urandom); wr_control = 1'($urandom);
      if (read) begin
        chk(model.size() > 0 && {rd_control, rd_data} == model[0], "random data");
        if (model.size() > 0) void'(model.pop_front());
      end
      if (write) model.push_back({wr_control, wr_data});
      @(negedge clk);
      chk(exists == (model.size() != 0) && full == (model.size() == DEPTH), "flags");
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
