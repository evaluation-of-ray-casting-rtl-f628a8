// tb_pe_fu: self-checking test of the PE functional unit.
// Drives every operation with random and corner operands and compares the
// result and status with a reference computed here from the C semantics.
module tb_pe_fu;
  import crc_pkg::*;

  fu_op_e        op;
  logic [DW-1:0] a, b, y;
  logic          c, s;
  int checks = 0, failures = 0;

  pe_fu dut (.op(op), .a(a), .b(b), .c(c), .y(y), .s(s));

  function automatic logic [DW:0] ref_model(fu_op_e o, logic [DW-1:0] x, logic [DW-1:0] z, logic cc);
    logic [DW-1:0] r;
    logic          st;
    logic          cmp;
    longint        px;
    cmp = 1'b1;
    r = '0;
    case (o)
      OP_PASS: begin r = x; cmp = 0; end
      OP_ADD:  begin r = x + z; cmp = 0; end
      OP_SUB:  begin r = x - z; cmp = 0; end
      OP_MUL:  begin px = longint'($signed(x[15:0])) * longint'($signed(z[15:0])); r = px[31:0]; cmp = 0; end
      OP_MULU: begin px = longint'(x[15:0]) * longint'(z[15:0]); r = px[31:0]; cmp = 0; end
      OP_AND:  begin r = x & z; cmp = 0; end
      OP_OR:   begin r = x | z; cmp = 0; end
      OP_XOR:  begin r = x ^ z; cmp = 0; end
      OP_NOT:  begin r = ~x; cmp = 0; end
      OP_NEG:  begin r = 32'd0 - x; cmp = 0; end
      OP_SHL:  begin r = x << z[4:0]; cmp = 0; end
      OP_SHR:  begin r = x >> z[4:0]; cmp = 0; end
      OP_SRA:  begin r = 32'($signed(x) >>> z[4:0]); cmp = 0; end
      OP_EQ:   r = {31'd0, x == z};
      OP_NE:   r = {31'd0, x != z};
      OP_LT:   r = {31'd0, $signed(x) < $signed(z)};
      OP_LE:   r = {31'd0, $signed(x) <= $signed(z)};
      OP_GT:   r = {31'd0, $signed(x) > $signed(z)};
      OP_GE:   r = {31'd0, $signed(x) >= $signed(z)};
      OP_LTU:  r = {31'd0, x < z};
      OP_LAND: r = {31'd0, (x != 0) && (z != 0)};
      OP_LOR:  r = {31'd0, (x != 0) || (z != 0)};
      OP_LNOT: r = {31'd0, x == 0};
      OP_SEL:  begin r = cc ? x : z; cmp = 0; end
      default: begin r = '0; cmp = 0; end
    endcase
    st = cmp ? r[0] : (r != 0);
    return {st, r};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW:0] exp;
    logic [DW-1:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_FFFF};
    for (int o = 0; o <= 24; o++) begin
      for (int k = 0; k < 60; k++) begin
        op = fu_op_e'(o);
        if (k < 36) begin a = corner[k % 6]; b = corner[k / 6]; end
        else begin a = $urandom; b = (k % 3 == 0) ? a : $urandom; end
        c = k[0];
        #1;
        exp = ref_model(op, a, b, c);
        checks++;
        if ({s, y} !== exp) begin
          failures++;
          $display("FAIL op=%0d a=%h b=%h c=%b got y=%h s=%b exp y=%h s=%b", o, a, b, c, y, s, exp[DW-1:0], exp[DW]);
        end
      end
    end
    // a few worked values from the ray casting mapping
    op = OP_MUL; a = 32'hFFFF_FFF6; b = 32'd9; #1; checks++; if (y !== 32'hFFFF_FFA6) failures++;
    op = OP_SRA; a = 32'hFFFF_FFA6; b = 32'd4; #1; checks++; if (y !== 32'hFFFF_FFFA) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
