// tb_openfire_array_dw8: a one-node ring with an 8-bit datapath.
//
// With DATA_WIDTH = 8 every register, the PC and every address is 8 bits wide, so the
// node reaches only 256 bytes (MEM_WORDS = 64). The node runs tb/dw8_test.hex, a loop
// that takes two operands a and b from its input link and returns seven results:
//   a+b (8 bits), the carry out of bit 7, cmpu(a,b), a*b (low 8 bits), a stored as a
//   word at 0xF0 and read back as byte 0xF3, the same word read back, and 1 if a is
//   non-negative as an 8-bit signed number (bgei), else 0.
// The testbench plays the master: it writes the operands and compares every result
// with a model computed here. It drives and samples the links on the falling edge.
// Ends with TB_RESULT; a watchdog stops it if the node hangs.
module tb_openfire_array_dw8;
  localparam int DW = 8, PAIRS = 200, NRES = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [DW-1:0] m2r_data = '0, r2m_data;
  logic          m2r_write = 0, m2r_full, r2m_control, r2m_exists, r2m_read = 0;
  logic    [0:0] node_retire;

  openfire_array #(.NUM_NODES(1), .DATA_WIDTH(DW), .MEM_WORDS(64), .INIT_FILE("tb/dw8_test.hex")) dut (
    .clk, .rst, .m2r_data, .m2r_control(1'b0), .m2r_write, .m2r_full,
    .r2m_data, .r2m_control, .r2m_exists, .r2m_read, .node_retire
  );

  int checks = 0, failures = 0;

  task automatic send(input logic [DW-1:0] v);
    @(negedge clk);
    while (m2r_full) @(negedge clk);
    m2r_data  = v;
    m2r_write = 1;
    @(negedge clk);
    m2r_write = 0;
  endtask

  task automatic recv(output logic [DW-1:0] v);
    @(negedge clk);
    while (!r2m_exists) @(negedge clk);
    v        = r2m_data;
    r2m_read = 1;
    @(negedge clk);
    r2m_read = 0;
  endtask

  initial begin
    logic [DW-1:0] a, b, got;
    logic [DW-1:0] exp [NRES];
    int            sum;
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int p = 0; p < PAIRS; p++) begin
      a = (p < 4) ? DW'(8'hF0 + p) : DW'($urandom);
      b = (p < 4) ? DW'(8'h20 - p) : DW'($urandom);
      sum    = int'(a) + int'(b);
      exp[0] = DW'(sum);
      exp[1] = DW'(sum >> 8);
      exp[2] = DW'({a > b, 7'(b - a)});
      exp[3] = DW'(int'(a) * int'(b));
      exp[4] = a;
      exp[5] = a;
      exp[6] = DW'(!a[7]);
      send(a);
      send(b);
      for (int k = 0; k < NRES; k++) begin
        recv(got);
        checks++;
        if (got !== exp[k]) begin
          failures++;
          $display("FAIL pair %0d (a=%02h b=%02h) result %0d: got %02h expected %02h", p, a, b, k, got, exp[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
