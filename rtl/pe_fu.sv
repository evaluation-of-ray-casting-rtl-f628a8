// pe_fu: functional unit of a processing element.
//
// Purely combinational. It executes one operation per clock cycle on two
// 32-bit operands a and b and a 1-bit status operand c, and returns a 32-bit
// result y and a 1-bit status s. It covers the C operators except division
// and remainder, as the design study asks; the multiplier takes the low 16
// bits of each operand and gives the full 32-bit product (16 x 16 -> 32).
// Comparisons and logical operators return 0 or 1 in y, as in C, and the
// same bit in s; the select operation (c ? a : b) lets a branch be mapped
// into a single context. For other operations s is "y is not zero". The
// operation codes and the status rule are this implementation's own.
module pe_fu
  import crc_pkg::*;
(
  input  fu_op_e        op,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic          c,
  output logic [DW-1:0] y,
  output logic          s
);

  logic        bit_res;
  logic        is_cmp;
  logic [4:0]  sh;

  assign sh = b[4:0];

  always_comb begin
    y       = '0;
    bit_res = 1'b0;
    is_cmp  = 1'b0;
    unique case (op)
      OP_NOP:  y = '0;
      OP_PASS: y = a;
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = DW'($signed(a[15:0]) * $signed(b[15:0]));
      OP_MULU: y = DW'(a[15:0] * b[15:0]);
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_NOT:  y = ~a;
      OP_NEG:  y = -a;
      OP_SHL:  y = a << sh;
      OP_SHR:  y = a >> sh;
      OP_SRA:  y = DW'($signed(a) >>> sh);
      OP_EQ:   begin is_cmp = 1'b1; bit_res = (a == b); end
      OP_NE:   begin is_cmp = 1'b1; bit_res = (a != b); end
      OP_LT:   begin is_cmp = 1'b1; bit_res = ($signed(a) <  $signed(b)); end
      OP_LE:   begin is_cmp = 1'b1; bit_res = ($signed(a) <= $signed(b)); end
      OP_GT:   begin is_cmp = 1'b1; bit_res = ($signed(a) >  $signed(b)); end
      OP_GE:   begin is_cmp = 1'b1; bit_res = ($signed(a) >= $signed(b)); end
      OP_LTU:  begin is_cmp = 1'b1; bit_res = (a < b); end
      OP_LAND: begin is_cmp = 1'b1; bit_res = (a != '0) && (b != '0); end
      OP_LOR:  begin is_cmp = 1'b1; bit_res = (a != '0) || (b != '0); end
      OP_LNOT: begin is_cmp = 1'b1; bit_res = (a == '0); end
      OP_SEL:  y = c ? a : b;
      default: y = '0;
    endcase
    if (is_cmp) y = DW'(bit_res);
  end

  assign s = is_cmp ? bit_res : (y != '0);

endmodule
