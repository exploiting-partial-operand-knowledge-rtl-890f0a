// tb_slice_issue_queue: checks wakeup, select, cancel and capacity.
//
// The queue under test is the upper slice (SLICE_IDX 1) of a slice-by-2
// core, with 8 entries and 16 registers. Each cycle random register slice
// ready bits, a random dispatch and a random cancel are applied. A model
// keeps the same entries and computes which entry must issue: source slice 1
// ready, and for add/sub/sll the destination's slice 0 ready (inter-slice
// dependency), for srl/sra none in the top slice, for logic ops none.
// The issued instruction (identified by its destination) and in_ready are
// compared every cycle; the cases "logic slice issues before the lower
// slice" and "carry slice waits for the lower slice" are counted and must
// both have happened.
module tb_slice_issue_queue;
  import pok_pkg::*;
  localparam int D = 8, NP = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, issue_valid, cancel;
  uop_t in_uop, issue_uop;
  logic [NP-1:0][1:0] ready;
  logic [3:0] occ;

  slice_issue_queue #(.DEPTH(D), .NSLICES(2), .SLICE_IDX(1), .NPREG(NP)) dut (
    .clk, .rst_n, .in_valid, .in_uop, .in_ready, .ready,
    .issue_valid, .issue_uop, .cancel, .occupancy(occ));

  logic m_v [D];
  uop_t m_u [D];
  int checks = 0, failures = 0, n_early_logic = 0, n_carry_wait = 0;

  function automatic logic m_ready(uop_t u);
    logic ok;
    ok = ready[u.src1][1] && (u.use_imm || ready[u.src2][1]);
    if (dep_of(u.op) == DEP_LOWER) ok = ok && ready[u.dst][0];
    return ok;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static alu_op_e ops[6] = '{OP_ADD, OP_AND, OP_XOR, OP_SLL, OP_SRA, OP_LUI};
    int exp_idx;
    logic exp_valid, free;
    int free_idx;
    for (int i = 0; i < D; i++) m_v[i] = 0;
    in_valid = 0; in_uop = '0; cancel = 0; ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) ready[p] = 2'($urandom());
      in_valid = $urandom_range(0, 1);
      in_uop = '0;
      in_uop.op      = ops[$urandom_range(0, 5)];
      in_uop.src1    = PREG_W'($urandom_range(0, NP - 1));
      in_uop.src2    = PREG_W'($urandom_range(0, NP - 1));
      in_uop.use_imm = $urandom_range(0, 1);
      in_uop.dst     = PREG_W'($urandom_range(0, NP - 1));
      in_uop.has_dst = 1'b1;
      in_uop.imm     = $urandom();
      cancel = ($urandom_range(0, 7) == 0);
      #1;
      exp_valid = 0; exp_idx = 0; free = 0; free_idx = 0;
      for (int i = D - 1; i >= 0; i--) begin
        if (m_v[i] && m_ready(m_u[i])) begin exp_valid = 1; exp_idx = i; end
        if (!m_v[i]) begin free = 1; free_idx = i; end
      end
      chk("issue_valid", issue_valid, exp_valid);
      chk("in_ready", in_ready, free);
      if (exp_valid) begin
        chk("issue_dst", issue_uop.dst, m_u[exp_idx].dst);
        chk("issue_op", issue_uop.op, m_u[exp_idx].op);
      end
      for (int i = 0; i < D; i++) if (m_v[i]) begin
        automatic uop_t u = m_u[i];
        automatic logic srcs = ready[u.src1][1] && (u.use_imm || ready[u.src2][1]);
        if (dep_of(u.op) == DEP_NONE && srcs && !ready[u.dst][0]) n_early_logic++;
        if (dep_of(u.op) == DEP_LOWER && srcs && !ready[u.dst][0]) n_carry_wait++;
      end
      if (exp_valid && !cancel) m_v[exp_idx] = 0;
      if (in_valid && free) begin m_v[free_idx] = 1; m_u[free_idx] = in_uop; end
    end
    chk("logic slice ran ahead of lower slice", n_early_logic > 0, 1);
    chk("carry slice waited for lower slice", n_carry_wait > 0, 1);
    $display("early logic slices %0d, carry waits %0d", n_early_logic, n_carry_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
