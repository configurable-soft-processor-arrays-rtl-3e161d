// tb_openfire_multiplier: starts a multiply in every cycle with random operands and
// checks each product and that it appears exactly LATENCY (5) cycles after its start.
module tb_openfire_multiplier;
  localparam int DW = 32, LAT = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, done;
  logic [DW-1:0] a, b, product;
  openfire_multiplier #(.DATA_WIDTH(DW)) dut (.*);

  logic [DW-1:0] exp_q [$];
  int            when_q [$];
  int cyc = 0, checks = 0, failures = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    start = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // check the output of this cycle
      if (done) begin
        checks++;
        if (exp_q.size() == 0 || product != exp_q[0] || cyc != when_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL product %h at %0d", product, cyc);
        end
        if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(when_q.pop_front()); end
      end else if (when_q.size() != 0 && when_q[0] <= cyc) begin
        failures++; $display("FAIL missing product at %0d", cyc);
        void'(exp_q.pop_front()); void'(when_q.pop_front());
      end
      start = (t < 990) && 1'($urandom);
      a = $urandom; b = $urandom;
      if (start) begin exp_q.push_back(DW'(a * b)); when_q.push_back(cyc + LAT - 1); end
    end
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL products lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
