// tb_slice_alu: checks slice ALUs chained into full 32-bit operations.
//
// Two 16-bit slices (and, separately, four 8-bit slices) are wired as the
// core wires them: for add/sub and left shifts the link runs from slice k-1
// to slice k, for right shifts from slice k+1 to slice k, for logic ops it is
// unused. Random operands and shift amounts are applied and the joined
// slices are compared with a plain 32-bit reference computation. The compare
// outputs (eq, zero, msb) are checked per slice as well.
module tb_slice_alu;
  import pok_pkg::*;

  int checks = 0, failures = 0;

  alu_op_e          op;
  logic [31:0]      a, b;
  logic [4:0]       sh;
  logic [15:0]      imm16;

  // ---- slice by 2 ----
  logic [1:0][15:0] r2;
  slice_link_t [1:0] lo2, li2;
  logic [1:0] eq2, z2, m2;
  for (genvar k = 0; k < 2; k++) begin : g2
    slice_alu #(.SLICE_W(16), .NSLICES(2), .SLICE_IDX(k)) u (
      .op, .a(a[k*16 +: 16]), .b(b[k*16 +: 16]), .shamt(sh), .imm16,
      .link_in(li2[k]), .result(r2[k]), .link_out(lo2[k]),
      .eq(eq2[k]), .zero(z2[k]), .msb(m2[k]));
  end
  always_comb begin
    li2[0] = (op == OP_SRL || op == OP_SRA) ? lo2[1] : '0;
    li2[1] = (op == OP_SRL || op == OP_SRA) ? '0 : lo2[0];
  end

  // ---- slice by 4 ----
  logic [3:0][7:0] r4;
  slice_link_t [3:0] lo4, li4;
  logic [3:0] eq4, z4, m4;
  for (genvar k = 0; k < 4; k++) begin : g4
    slice_alu #(.SLICE_W(8), .NSLICES(4), .SLICE_IDX(k)) u (
      .op, .a(a[k*8 +: 8]), .b(b[k*8 +: 8]), .shamt(sh), .imm16,
      .link_in(li4[k]), .result(r4[k]), .link_out(lo4[k]),
      .eq(eq4[k]), .zero(z4[k]), .msb(m4[k]));
  end
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (op == OP_SRL || op == OP_SRA) li4[k] = (k < 3) ? lo4[k < 3 ? k + 1 : 3] : '0;
      else                              li4[k] = (k > 0) ? lo4[k > 0 ? k - 1 : 0] : '0;
    end
  end

  function automatic logic [31:0] ref_op(alu_op_e o, logic [31:0] x, logic [31:0] y,
                                         logic [4:0] s, logic [15:0] i);
    case (o)
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_NOR: return ~(x | y);
      OP_LUI: return {i, 16'h0};
      OP_SLL: return x << s;
      OP_SRL: return x >> s;
      OP_SRA: return $signed(x) >>> s;
      default: return '0;
    endcase
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s a=%h b=%h sh=%0d got=%h exp=%h", what, op.name(), a, b, sh, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static alu_op_e ops[10] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_LUI,
                         OP_SLL, OP_SRL, OP_SRA};
    // directed carries across slice boundaries
    op = OP_ADD; a = 32'h0000_FFFF; b = 32'h0000_0001; sh = 0; imm16 = 0; #1;
    check("add carry x2", r2, 32'h0001_0000);
    check("add carry x4", r4, 32'h0001_0000);
    op = OP_SUB; a = 32'h0001_0000; b = 32'h0000_0001; #1;
    check("sub borrow x2", r2, 32'h0000_FFFF);
    check("sub borrow x4", r4, 32'h0000_FFFF);
    op = OP_SLL; a = 32'h0000_8001; sh = 5'd3; #1;       // sll r48, r17, 3 (Figure 10)
    check("sll x2", r2, 32'h0004_0008);
    op = OP_LUI; imm16 = 16'h1002; #1;                   // lui r34, 0x1002
    check("lui x2", r2, 32'h1002_0000);
    for (int n = 0; n < 4000; n++) begin
      op    = ops[$urandom_range(0, 9)];
      a     = $urandom();
      b     = ($urandom_range(0, 3) == 0) ? a : $urandom();
      if ($urandom_range(0, 3) == 0) b[15:0] = a[15:0];
      sh    = 5'($urandom_range(0, 31));
      imm16 = 16'($urandom());
      #1;
      check("x2", r2, ref_op(op, a, b, sh, imm16));
      check("x4", r4, ref_op(op, a, b, sh, imm16));
      for (int k = 0; k < 2; k++) begin
        check("eq2",  32'(eq2[k]), 32'(a[k*16 +: 16] == b[k*16 +: 16]));
        check("z2",   32'(z2[k]),  32'(a[k*16 +: 16] == 0));
      end
      check("msb2", 32'(m2[1]), 32'(a[31]));
      check("eq4", 32'(eq4), {28'h0, a[31:24] == b[31:24], a[23:16] == b[23:16],
                              a[15:8] == b[15:8], a[7:0] == b[7:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
