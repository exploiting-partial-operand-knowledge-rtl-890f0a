// pok_pkg: types and constants shared by the bit-slice execution core.
//
// The core splits every 32-bit register operand into NSLICES slices of
// SLICE_W bits. Slice 0 holds the low-order bits. An instruction is divided
// into one instruction slice per slice issue queue; each slice computes its
// part of the result independently, apart from the inter-slice link (a carry,
// or the source bits a shift moves across a slice boundary).
//
// The slice-by-2 configuration (two 16-bit slices) is the default, as it is
// the configuration the design is evaluated in first; slice-by-4 (four 8-bit
// slices) is selected with NSLICES = 4. Opcode encodings, the struct layouts
// and the register and queue sizes not given by the design are local choices.
package pok_pkg;

  localparam int unsigned XLEN = 32;

  // Operations executed slice by slice.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,   // also address generation (base + offset)
    OP_SUB  = 4'd1,
    OP_AND  = 4'd2,
    OP_OR   = 4'd3,
    OP_XOR  = 4'd4,
    OP_NOR  = 4'd5,
    OP_LUI  = 4'd6,   // rd = imm << 16
    OP_SLL  = 4'd7,   // shift by imm[4:0]
    OP_SRL  = 4'd8,
    OP_SRA  = 4'd9,
    OP_BR   = 4'd10   // branch comparison slice, writes no register
  } alu_op_e;

  // Conditional branch types of Table 3 (PISA).
  typedef enum logic [2:0] {
    BR_BEQ  = 3'd0,
    BR_BNE  = 3'd1,
    BR_BLEZ = 3'd2,
    BR_BGTZ = 3'd3,
    BR_BLTZ = 3'd4,
    BR_BGEZ = 3'd5
  } br_kind_e;

  // Inter-slice dependency of one instruction slice.
  typedef enum logic [1:0] {
    DEP_NONE  = 2'd0,   // logic, lui, branch compare
    DEP_LOWER = 2'd1,   // add/sub carry, left shift: needs slice k-1 first
    DEP_UPPER = 2'd2    // right shift: needs slice k+1 first
  } slice_dep_e;

  // Memory operation kind sent to the load/store queue.
  typedef enum logic [1:0] {
    MEM_NONE  = 2'd0,
    MEM_LOAD  = 2'd1,
    MEM_STORE = 2'd2
  } mem_kind_e;

  // Link passed from one slice of an instruction to the neighbouring slice.
  // `carry` is the adder carry; `bits` holds the source-operand bits of the
  // slices already executed (in their own bit positions), which shifts need.
  typedef struct packed {
    logic            carry;
    logic [XLEN-1:0] bits;
  } slice_link_t;

  // Field widths of a renamed instruction.
  localparam int unsigned PREG_W = 7;   // up to 128 physical registers
  localparam int unsigned BRT_W  = 3;   // up to 8 branches in flight

  // A renamed instruction as it arrives at dispatch. A load or store is one
  // address-generation add (dst = register receiving the address) plus a
  // load/store queue entry naming the data register.
  typedef struct packed {
    alu_op_e             op;
    logic [PREG_W-1:0]   src1;
    logic [PREG_W-1:0]   src2;
    logic                use_imm;     // second operand is imm
    logic [XLEN-1:0]     imm;         // sign-extended immediate / shift amount
    logic                has_dst;
    logic [PREG_W-1:0]   dst;
    br_kind_e            br_kind;     // op == OP_BR only
    logic                pred_taken;
    logic [BRT_W-1:0]    br_tag;
    mem_kind_e           mem;
    logic [PREG_W-1:0]   mem_data;    // load destination / store data source
  } uop_t;

  // One-cycle event pulses of the core, for performance counting.
  typedef struct packed {
    logic early_access;     // load went to the cache with a partial address
    logic early_disambig;   // ...with older stores in the queue, all ruled out
    logic store_forward;    // load took its data from an older store
    logic wait_full;        // a load waited for a full address comparison
    logic ptag_replay;      // partial tag choice was wrong: replay
    logic cache_miss;       // line fetch started
    logic early_mispredict; // branch mispredict found before all slices ran
    logic late_mispredict;  // branch mispredict found with all slices
    logic ooo_slice;        // a slice issued before the slice below it
    logic partial_operand;  // a slice issued while its source was incomplete
    logic interslice;       // a slice issued on a carry/shift link
  } core_events_t;

  // Inter-slice dependency of an operation.
  function automatic slice_dep_e dep_of(alu_op_e op);
    case (op)
      OP_ADD, OP_SUB, OP_SLL: return DEP_LOWER;
      OP_SRL, OP_SRA:         return DEP_UPPER;
      default:                return DEP_NONE;
    endcase
  endfunction

endpackage
