// tb_bitslice_core: runs random programs through the whole bit-slice core
// at its default configuration (two 16-bit slices, 64-entry slice queues,
// 32-entry load/store queue, 128 physical registers, 64KB 4-way L1).
//
// The testbench plays the front end: it generates a program over 15
// architectural registers (add/sub/logic/lui/shifts with register or
// immediate operands, word loads and stores through a base register set by
// lui, and all six conditional branch types with random predictions),
// renames it onto physical registers and dispatches it one instruction per
// cycle while disp_ready is high. A reference model executes the same
// program in order. Programs run in chunks; after each chunk the core must go
// idle, and then
//   * every physical register written in the chunk must hold the value the
//     reference computed for it, with all slices ready;
//   * memory must equal the reference memory on all touched words;
//   * each branch must have been resolved once, with the reference direction
//     and the right misprediction flag.
// A memory model answers line fetches after 6 cycles (the L2 latency of the
// evaluated machine) and takes write-through stores.
// Latency: a chain of 16 dependent adds, dispatched back to back, must have
// its last result within 16 + 4 cycles of the first dispatch, i.e. one add
// per cycle although each add takes two slice cycles. The vortex code
// segment of Figure 10 (sll, lui, addu, lw) runs as a directed case.
// Every mechanism must have happened at least once: partial operands,
// inter-slice links, a slice running ahead of the slice below, early and
// late branch mispredictions, early cache access with a partial address,
// disambiguation past older stores, waiting for a full compare, store
// forwarding, partial-tag replay and a cache miss.
module tb_bitslice_core;
  import pok_pkg::*;
  localparam int NP = 128, PW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic disp_valid, disp_ready;
  uop_t disp_uop;
  logic br_valid, br_taken, br_mispredict, br_early;
  logic [2:0] br_tag;
  logic [7:0] br_busy;
  logic mem_req_valid; logic [31:0] mem_req_addr;
  logic fill_valid; logic [31:0] fill_addr; logic [511:0] fill_line;
  logic mem_wr_valid; logic [31:0] mem_wr_addr, mem_wr_data;
  logic [PW-1:0] dbg_preg; logic [31:0] dbg_data; logic [1:0] dbg_ready;
  logic idle;
  core_events_t ev;

  bitslice_core dut (.*);

  // ---------------- memory model ----------------
  logic [31:0] memw [logic [31:0]];
  function automatic logic [31:0] mem_init(logic [31:0] w);
    return w ^ 32'h1357_0000;
  endfunction
  function automatic logic [31:0] mem_rd(logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    if (memw.exists(w)) return memw[w];
    return mem_init(w);
  endfunction
  int fill_cnt = 0; logic [31:0] fill_pend;
  always @(posedge clk) begin
    if (mem_wr_valid) memw[{mem_wr_addr[31:2], 2'b00}] = mem_wr_data;
    if (mem_req_valid) begin fill_cnt <= 6; fill_pend <= mem_req_addr; end
    else if (fill_cnt > 0) fill_cnt <= fill_cnt - 1;
  end
  always @(negedge clk) begin
    fill_valid = 0;
    if (fill_cnt == 1) begin
      fill_valid = 1; fill_addr = fill_pend;
      for (int i = 0; i < 16; i++) fill_line[i*32 +: 32] = mem_rd(fill_pend + 32'(i*4));
    end
  end

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  int cnt [11];
  string cname [11] = '{"early_access", "early_disambig", "store_forward", "wait_full",
                        "ptag_replay", "cache_miss", "early_mispredict", "late_mispredict",
                        "ooo_slice", "partial_operand", "interslice"};
  always @(posedge clk) if (rst_n) begin
    cnt[0] += int'(ev.early_access);     cnt[1] += int'(ev.early_disambig);
    cnt[2] += int'(ev.store_forward);    cnt[3] += int'(ev.wait_full);
    cnt[4] += int'(ev.ptag_replay);      cnt[5] += int'(ev.cache_miss);
    cnt[6] += int'(ev.early_mispredict); cnt[7] += int'(ev.late_mispredict);
    cnt[8] += int'(ev.ooo_slice);        cnt[9] += int'(ev.partial_operand);
    cnt[10] += int'(ev.interslice);
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  // branch bookkeeping
  logic br_exp_taken [8], br_exp_mis [8];
  int   br_reports [8];
  logic br_rep_taken [8], br_rep_mis [8];
  always @(posedge clk) if (rst_n && br_valid) begin
    br_reports[br_tag]++;
    br_rep_taken[br_tag] = br_taken;
    br_rep_mis[br_tag]   = br_mispredict;
  end

  // ---------------- renamer and reference ----------------
  logic [31:0]   arch [16];
  logic [PW-1:0] map  [16];
  logic          used [NP];
  logic [31:0]   pexp [NP];      // expected value of each preg written this chunk
  logic          pchk [NP];
  logic [31:0]   ref_mem [logic [31:0]];
  logic [7:0]    tag_used;       // tags handed out in this chunk

  function automatic logic [31:0] ref_rd(logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    if (ref_mem.exists(w)) return ref_mem[w];
    return mem_init(w);
  endfunction

  function automatic logic [PW-1:0] new_preg();
    for (int p = 1; p < NP; p++) if (!used[p]) begin used[p] = 1; return PW'(p); end
    $display("out of physical registers");
    return '0;
  endfunction

  task automatic dispatch(uop_t u);
    @(negedge clk);
    disp_valid = 1; disp_uop = u;
    @(posedge clk);
    while (!disp_ready) @(posedge clk);
    #1 disp_valid = 0;
  endtask

  function automatic logic [31:0] alu_ref(alu_op_e op, logic [31:0] a, logic [31:0] b,
                                          logic [31:0] imm);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOR: return ~(a | b);
      OP_LUI: return {imm[15:0], 16'h0};
      OP_SLL: return a << imm[4:0];
      OP_SRL: return a >> imm[4:0];
      default: return $signed(a) >>> imm[4:0];
    endcase
  endfunction

  task automatic emit_alu(alu_op_e op, int rd, int rs, int rt, logic use_imm, logic [31:0] imm);
    uop_t u = '0;
    logic [31:0] b, r;
    u.op = op; u.src1 = (op == OP_LUI) ? '0 : map[rs]; u.src2 = map[rt];
    u.use_imm = use_imm || op inside {OP_LUI, OP_SLL, OP_SRL, OP_SRA};
    u.imm = imm; u.has_dst = 1; u.mem = MEM_NONE;
    u.dst = new_preg();
    b = u.use_imm ? imm : arch[rt];
    r = alu_ref(op, (op == OP_LUI) ? 32'h0 : arch[rs], b, imm);
    arch[rd] = r; map[rd] = u.dst; pexp[u.dst] = r; pchk[u.dst] = 1;
    dispatch(u);
  endtask

  task automatic emit_mem(mem_kind_e k, int rd_rt, int base, logic [31:0] off);
    uop_t u = '0;
    logic [31:0] a;
    u.op = OP_ADD; u.src1 = map[base]; u.use_imm = 1; u.imm = off;
    u.has_dst = 1; u.dst = new_preg(); u.mem = k;
    a = arch[base] + off;
    pexp[u.dst] = a; pchk[u.dst] = 1;
    if (k == MEM_LOAD) begin
      u.mem_data = new_preg();
      arch[rd_rt] = ref_rd(a); map[rd_rt] = u.mem_data;
      pexp[u.mem_data] = arch[rd_rt]; pchk[u.mem_data] = 1;
    end else begin
      u.mem_data = map[rd_rt];
      ref_mem[{a[31:2], 2'b00}] = arch[rd_rt];
    end
    dispatch(u);
  endtask

  task automatic emit_branch(br_kind_e kind, int rs, int rt, logic pred);
    uop_t u = '0;
    int tag = -1;
    logic t;
    while (tag < 0) begin
      for (int i = 0; i < 8; i++) if (tag < 0 && !tag_used[i] && !br_busy[i]) tag = i;
      if (tag < 0) begin
        // all tags of this chunk handed out: wait for them to drain
        @(posedge clk);
        for (int i = 0; i < 8; i++) if (!br_busy[i] && br_reports[i] == 1) tag_used[i] = 0;
        for (int i = 0; i < 8; i++) if (!tag_used[i] && br_reports[i] == 1) begin
          chk("branch taken", br_rep_taken[i], br_exp_taken[i]);
          chk("branch mispredict", br_rep_mis[i], br_exp_mis[i]);
          br_reports[i] = 0;
        end
      end
    end
    if (kind >= BR_BLEZ) rt = 0;
    case (kind)
      BR_BEQ:  t = arch[rs] == arch[rt];
      BR_BNE:  t = arch[rs] != arch[rt];
      BR_BLEZ: t = $signed(arch[rs]) <= 0;
      BR_BGTZ: t = $signed(arch[rs]) > 0;
      BR_BLTZ: t = $signed(arch[rs]) < 0;
      default: t = $signed(arch[rs]) >= 0;
    endcase
    tag_used[tag] = 1; br_reports[tag] = 0;
    br_exp_taken[tag] = t; br_exp_mis[tag] = t != pred;
    u.op = OP_BR; u.src1 = map[rs]; u.src2 = map[rt]; u.has_dst = 0;
    u.br_kind = kind; u.pred_taken = pred; u.br_tag = 3'(tag); u.mem = MEM_NONE;
    dispatch(u);
  endtask

  // wait for idle, then compare registers, memory and branches; free pregs
  task automatic end_chunk();
    int t = 0;
    repeat (3) @(posedge clk);
    while (!idle && t < 20000) begin @(posedge clk); t++; end
    chk("core went idle", idle, 1);
    repeat (2) @(posedge clk);
    for (int p = 1; p < NP; p++) if (pchk[p]) begin
      @(negedge clk); dbg_preg = PW'(p); #1;
      chk($sformatf("preg %0d value", p), dbg_data, pexp[p]);
      chk($sformatf("preg %0d ready", p), dbg_ready, 2'b11);
    end
    foreach (ref_mem[w]) chk("memory word", mem_rd(w), ref_mem[w]);
    for (int i = 0; i < 8; i++) if (tag_used[i]) begin
      chk("branch reported once", br_reports[i], 1);
      chk("branch taken", br_rep_taken[i], br_exp_taken[i]);
      chk("branch mispredict", br_rep_mis[i], br_exp_mis[i]);
      tag_used[i] = 0; br_reports[i] = 0;
    end
    for (int p = 0; p < NP; p++) begin used[p] = 0; pchk[p] = 0; end
    used[0] = 1;
    for (int r = 0; r < 16; r++) used[map[r]] = 1;
  endtask

  function automatic logic [31:0] rand_val();
    case ($urandom_range(0, 4))
      0: return 32'h0;
      1: return 32'($urandom_range(0, 255));
      2: return 32'hFFFF_0000 | 32'($urandom_range(0, 65535));
      default: return $urandom();
    endcase
  endfunction

  task automatic random_chunk(int n);
    static alu_op_e ops[10] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_LUI,
                                OP_SLL, OP_SRL, OP_SRA};
    for (int i = 0; i < n; i++) begin
      int kind = $urandom_range(0, 9);
      int rd = $urandom_range(1, 14), rs = $urandom_range(0, 14), rt = $urandom_range(0, 14);
      if (kind <= 4) begin
        alu_op_e op = ops[$urandom_range(0, 9)];
        emit_alu(op, rd, rs, rt, $urandom_range(0, 1), rand_val());
      end else if (kind == 5) begin
        // new base address: one of four tags sharing the early tag bits
        emit_alu(OP_LUI, 15, 0, 0, 1, 32'h3A00 + 32'($urandom_range(0, 3) * 4));
      end else if (kind <= 7) begin
        logic [31:0] off = 32'h4000 | 32'($urandom_range(0, 1) * 32'h1540) | 32'($urandom_range(0, 3) * 4);
        emit_mem(($urandom_range(0, 2) == 0) ? MEM_STORE : MEM_LOAD, rd, 15, off);
      end else begin
        br_kind_e bk = br_kind_e'($urandom_range(0, 5));
        if ($urandom_range(0, 1)) rt = rs;
        emit_branch(bk, rs, rt, $urandom_range(0, 1));
      end
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    for (int i = 0; i < 11; i++) cnt[i] = 0;
    for (int i = 0; i < 8; i++) begin tag_used[i] = 0; br_reports[i] = 0; end
    for (int r = 0; r < 16; r++) begin arch[r] = 0; map[r] = '0; end
    for (int p = 0; p < NP; p++) begin used[p] = 0; pchk[p] = 0; end
    used[0] = 1;
    disp_valid = 0; disp_uop = '0; dbg_preg = '0;
    fill_valid = 0; fill_addr = 0; fill_line = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initial register values
    for (int r = 1; r < 15; r++) emit_alu(OP_ADD, r, 0, 0, 1, rand_val());
    emit_alu(OP_LUI, 15, 0, 0, 1, 32'h3A00);
    end_chunk();
    // dependent add chain: one add per cycle
    @(negedge clk);
    t0 = $time / 10;
    for (int i = 0; i < 16; i++) emit_alu(OP_ADD, 1, 1, 2, 0, 0);
    t1 = 0;
    while (!(&dbg_ready) || dbg_preg != map[1]) begin
      dbg_preg = map[1]; #1;
      if (&dbg_ready) break;
      @(posedge clk); #1; t1++;
      if (t1 > 100) break;
    end
    chk("add chain latency within 20 cycles", ($time / 10 - t0) <= 20, 1);
    $display("16 dependent adds: %0d cycles", $time / 10 - t0);
    end_chunk();
    // code segment of Figure 10 (vortex), registers renumbered:
    //   sll r13, r14, 3 ; lui r3, 0x1002 ; addu r3, r3, r13 ; lw r3, 0xF3C0(r3)
    emit_alu(OP_SLL, 13, 14, 0, 1, 32'd3);
    emit_alu(OP_LUI, 3, 0, 0, 1, 32'h1002);
    emit_alu(OP_ADD, 3, 3, 13, 0, 0);
    emit_mem(MEM_LOAD, 3, 3, 32'hFFFF_F3C0);
    end_chunk();
    // random programs
    for (int c = 0; c < 60; c++) begin
      random_chunk(40);
      end_chunk();
    end
    for (int i = 0; i < 11; i++) begin
      chk({"mechanism ", cname[i]}, cnt[i] > 0, 1);
      $display("%-18s %0d", cname[i], cnt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
