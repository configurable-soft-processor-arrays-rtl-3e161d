// tb_openfire_alu: checks the OpenFire ALU against a reference written from the
// MicroBlaze instruction definitions, with random operands, at 32 bits and at the
// reduced 16-bit datapath width.
module tb_openfire_alu;
  import openfire_pkg::*;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32, y32;
  logic [15:0] a16, b16, y16;
  logic        inv, cin, c32, c16;
  alu_op_e     op;

  openfire_alu #(.DATA_WIDTH(32)) u32 (.op, .a(a32), .b(b32), .inv_a(inv), .cin, .result(y32), .cout(c32));
  openfire_alu #(.DATA_WIDTH(16)) u16 (.op, .a(a16), .b(b16), .inv_a(inv), .cin, .result(y16), .cout(c16));

  // reference at width w (values held in 33-bit containers)
  function automatic void ref_alu(input int w, input alu_op_e o, input longint unsigned a,
                                  input longint unsigned b, input bit iv, input bit ci,
                                  output longint unsigned y, output bit co);
    longint unsigned m = (64'd1 << w) - 1;
    longint unsigned s;
    longint signed sa, sb;
    bit msb;
    sa = (a >> (w - 1)) ? longint'(a) - longint'(64'd1 << w) : longint'(a);
    sb = (b >> (w - 1)) ? longint'(b) - longint'(64'd1 << w) : longint'(b);
    co = 0;
    case (o)
      ALU_ADD:  begin s = ((iv ? ~a : a) & m) + b + ci; y = s & m; co = s[w]; end
      ALU_CMP:  begin y = (b - a) & m; msb = sa > sb; y = (y & (m >> 1)) | (longint'(msb) << (w - 1)); end
      ALU_CMPU: begin y = (b - a) & m; msb = a > b;   y = (y & (m >> 1)) | (longint'(msb) << (w - 1)); end
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      ALU_XOR:  y = a ^ b;
      ALU_ANDN: y = a & ~b & m;
      ALU_SRA:  begin y = (a >> 1) | (a & (64'd1 << (w - 1))); co = a[0]; end
      ALU_SRC:  begin y = (a >> 1) | (longint'(ci) << (w - 1)); co = a[0]; end
      ALU_SRL:  begin y = a >> 1; co = a[0]; end
      ALU_SEXT8:  y = (a[7] ? (m & ~64'hff) : 0) | (a & 64'hff);
      ALU_SEXT16: y = (a[15] ? (m & ~64'hffff) : 0) | (a & 64'hffff);
      default:  y = 0;
    endcase
  endfunction

  initial begin
    longint unsigned ey;
    bit ec;
    for (int t = 0; t < 4000; t++) begin
      op  = alu_op_e'($urandom_range(11));
      a32 = $urandom; b32 = $urandom;
      if (t % 7 == 0) b32 = a32;                    // equal operands for compares
      a16 = a32[15:0]; b16 = b32[15:0];
      inv = (op == ALU_CMP || op == ALU_CMPU) ? 1'b1 : 1'($urandom);
      cin = (op == ALU_CMP || op == ALU_CMPU) ? 1'b1 : 1'($urandom);
      #1;
      ref_alu(32, op, a32, b32, inv, cin, ey, ec);
      checks++;
      if (y32 != ey[31:0] || ((op == ALU_ADD || op inside {ALU_SRA, ALU_SRC, ALU_SRL}) && c32 != ec)) begin
        failures++;
        if (failures < 10) $display("FAIL 32b op %s a=%h b=%h inv=%b cin=%b: %h/%b expected %h/%b",
                                    op.name(), a32, b32, inv, cin, y32, c32, ey[31:0], ec);
      end
      ref_alu(16, op, a16, b16, inv, cin, ey, ec);
      checks++;
      if (y16 != ey[15:0] || ((op == ALU_ADD || op inside {ALU_SRA, ALU_SRC, ALU_SRL}) && c16 != ec)) begin
        failures++;
        if (failures < 10) $display("FAIL 16b op %s a=%h b=%h: %h/%b expected %h/%b",
                                    op.name(), a16, b16, y16, c16, ey[15:0], ec);
      end
    end
    // fixed cases from the instruction definitions
    op = ALU_ADD; a32 = 32'd7; b32 = 32'd100; inv = 1; cin = 1; #1;
    checks++; if (y32 != 32'd93 || c32 != 1'b1) begin failures++; $display("FAIL rsub 100-7"); end
    op = ALU_CMP; a32 = 32'd5; b32 = 32'hffff_fffe; #1;   // 5 > -2 signed
    checks++; if (y32[31] != 1'b1) begin failures++; $display("FAIL cmp sign"); end
    op = ALU_CMPU; #1;                                    // 5 < 0xfffffffe unsigned
    checks++; if (y32[31] != 1'b0) begin failures++; $display("FAIL cmpu sign"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
