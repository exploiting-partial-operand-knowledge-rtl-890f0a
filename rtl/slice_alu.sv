// slice_alu: computes one SLICE_W-bit slice of an integer result.
//
// Each slice of the execution core owns one of these. It sees only its own
// slice of the two source operands, plus the link left by the neighbouring
// slice of the same instruction:
//   * add/sub: the carry out of slice k-1 (slice 0 starts with carry 0 for
//     add, 1 for sub, which adds the inverted second operand);
//   * left shift: the source bits of all lower slices, so bits that cross the
//     slice boundary can be shifted in;
//   * right shift: the source bits of all upper slices (the top slice runs
//     first, so an arithmetic shift has the sign);
//   * logic ops and lui need no link, so their slices may run in any order.
// link_out is what this slice passes on. For branch compare slices the ALU
// also reports whether the two source slices are equal, whether the first is
// zero, and its top bit (the sign when this is the top slice).
//
// Purely combinational: the slice is computed in the cycle it issues.
// The document gives what the slices compute and which slices depend on
// which (carry chain for arithmetic, none for logic, several bits for
// shifts); the link encoding and the operation set are this design's choice.
module slice_alu
  import pok_pkg::*;
#(
  parameter int unsigned SLICE_W   = 16,
  parameter int unsigned NSLICES   = 2,
  parameter int unsigned SLICE_IDX = 0
) (
  input  alu_op_e              op,
  input  logic [SLICE_W-1:0]   a,        // source 1 slice
  input  logic [SLICE_W-1:0]   b,        // source 2 or immediate slice
  input  logic [4:0]           shamt,
  input  logic [15:0]          imm16,    // lui immediate
  input  slice_link_t          link_in,
  output logic [SLICE_W-1:0]   result,
  output slice_link_t          link_out,
  output logic                 eq,       // a == b
  output logic                 zero,     // a == 0
  output logic                 msb       // a[SLICE_W-1]
);
  localparam int unsigned LO = SLICE_IDX * SLICE_W;
  localparam bit IS_LOW = (SLICE_IDX == 0);
  localparam bit IS_TOP = (SLICE_IDX == NSLICES - 1);

  logic              cin;
  logic [SLICE_W:0]  sum;
  logic [XLEN-1:0]   seen;      // source bits of this and already-run slices
  logic [XLEN-1:0]   shl, shr;
  logic [XLEN-1:0]   lui_full;

  always_comb begin
    // carry into this slice
    if (IS_LOW) cin = (op == OP_SUB);
    else        cin = link_in.carry;

    if (op == OP_SUB) sum = {1'b0, a} + {1'b0, ~b} + {{SLICE_W{1'b0}}, cin};
    else              sum = {1'b0, a} + {1'b0, b}  + {{SLICE_W{1'b0}}, cin};

    seen = ((op == OP_SLL && IS_LOW) || ((op == OP_SRL || op == OP_SRA) && IS_TOP))
           ? '0 : link_in.bits;
    seen[LO +: SLICE_W] = a;

    shl = seen << shamt;
    if (op == OP_SRA) shr = XLEN'($signed(seen) >>> shamt);
    else              shr = seen >> shamt;
    lui_full = {imm16, 16'h0000};

    unique case (op)
      OP_ADD, OP_SUB: result = sum[SLICE_W-1:0];
      OP_AND:         result = a & b;
      OP_OR:          result = a | b;
      OP_XOR:         result = a ^ b;
      OP_NOR:         result = ~(a | b);
      OP_LUI:         result = lui_full[LO +: SLICE_W];
      OP_SLL:         result = shl[LO +: SLICE_W];
      OP_SRL, OP_SRA: result = shr[LO +: SLICE_W];
      default:        result = '0;
    endcase

    link_out.carry = sum[SLICE_W];
    link_out.bits  = seen;

    eq   = (a == b);
    zero = (a == '0);
    msb  = a[SLICE_W-1];
  end
endmodule
