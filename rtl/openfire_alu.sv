// openfire_alu: the arithmetic and logic unit of the OpenFire execute stage.
//
// One adder serves add, reverse subtract (rD = rB - rA, formed as rB + ~rA + 1) and
// their carry variants; the carry-out is taken from bit DATA_WIDTH of the sum, so a
// narrower datapath keeps MicroBlaze carry semantics at its own width. The optional
// comparator (ENABLE_CMP) adds cmp/cmpu: the difference rB - rA with its MSB replaced
// by the signed or unsigned result of rA > rB. Shifts move right by one place and
// return the bit shifted out as carry-out. Purely combinational.
// Follows the MicroBlaze instruction semantics; the widths being parameterised and
// cmp degrading to a plain reverse subtract when the comparator is left out are
// this design's choices.
module openfire_alu
  import openfire_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 32,
  parameter bit          ENABLE_CMP = 1'b1
) (
  input  alu_op_e               op,
  input  logic [DATA_WIDTH-1:0] a,        // rA
  input  logic [DATA_WIDTH-1:0] b,        // rB or immediate
  input  logic                  inv_a,
  input  logic                  cin,
  output logic [DATA_WIDTH-1:0] result,
  output logic                  cout
);
  localparam int unsigned DW  = DATA_WIDTH;
  localparam int unsigned H16 = (DW > 16) ? 15 : DW - 1;

  logic [DW:0]   sum;
  logic [DW-1:0] a_in;
  logic          a_gt_b_s, a_gt_b_u;

  assign a_in     = inv_a ? ~a : a;
  assign sum      = {1'b0, a_in} + {1'b0, b} + {{DW{1'b0}}, cin};
  assign a_gt_b_s = $signed(a) > $signed(b);
  assign a_gt_b_u = a > b;

  always_comb begin
    result = '0;
    cout   = 1'b0;
    unique case (op)
      ALU_ADD:   begin result = sum[DW-1:0]; cout = sum[DW]; end
      ALU_CMP:   begin
        result = sum[DW-1:0];
        if (ENABLE_CMP) result[DW-1] = a_gt_b_s;
      end
      ALU_CMPU:  begin
        result = sum[DW-1:0];
        if (ENABLE_CMP) result[DW-1] = a_gt_b_u;
      end
      ALU_OR:    result = a | b;
      ALU_AND:   result = a & b;
      ALU_XOR:   result = a ^ b;
      ALU_ANDN:  result = a & ~b;
      ALU_SRA:   begin result = {a[DW-1], a[DW-1:1]}; cout = a[0]; end
      ALU_SRC:   begin result = {cin,     a[DW-1:1]}; cout = a[0]; end
      ALU_SRL:   begin result = {1'b0,    a[DW-1:1]}; cout = a[0]; end
      ALU_SEXT8: begin
        for (int i = 0; i < DW; i++) result[i] = (i < 8) ? a[i] : a[7];
      end
      ALU_SEXT16: begin
        for (int i = 0; i < DW; i++) result[i] = (i < 16) ? a[i] : a[H16];
      end
      default:   result = '0;
    endcase
  end
endmodule
