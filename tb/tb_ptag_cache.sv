// tb_ptag_cache: checks partial-tag access, verification, MRU way choice,
// fills and stores of the L1 data cache at its full 64KB 4-way geometry.
//
// Memory contents are a fixed function of the address, and a model records
// which lines have been filled (at most four tags per set are used, so no
// line is evicted) and which words were stored. Per access:
//   * an early access (low 16 bits only) reports a candidate exactly when a
//     filled line in the set has the same two low tag bits;
//   * in the verify cycle, ver_hit says whether the full line is present;
//     when ver_correct is set the word returned a cycle earlier must be the
//     right one; a wrong choice can only happen when another line shares the
//     partial tag;
//   * an access repeated right after a verified hit must be predicted
//     correctly (the way just verified has become the MRU way);
//   * a full-address access is always right.
// Directed start (Figure 6): two lines whose tags differ only above the
// early bits share a set; the MRU one is picked first, the other is then
// verified, replayed and picked correctly the next time.
module tb_ptag_cache;
  import pok_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic acc_valid, acc_full, acc_hit_pred, acc_multi;
  logic [31:0] acc_addr, acc_data, ver_addr;
  logic [1:0] acc_way, ver_hit_way;
  logic ver_valid, ver_hit, ver_correct, ver_pred_hit;
  logic fill_valid; logic [31:0] fill_addr; logic [511:0] fill_line;
  logic st_valid, st_hit; logic [31:0] st_addr, st_data;

  ptag_cache dut (.*);

  int checks = 0, failures = 0;
  int n_wrong_way = 0, n_right_spec = 0, n_early_miss = 0, n_multi = 0;
  logic [31:0] stored [logic [31:0]];
  logic        present [logic [31:0]];

  function automatic logic [31:0] memw(logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    if (stored.exists(w)) return stored[w];
    return w * 32'h9E37_79B1 ^ 32'h5A5A_1234;
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic fill(logic [31:0] a);
    @(negedge clk);
    fill_valid = 1; fill_addr = {a[31:6], 6'b0};
    for (int i = 0; i < 16; i++) fill_line[i*32 +: 32] = memw({a[31:6], 6'b0} + 32'(i*4));
    present[{a[31:6], 6'b0}] = 1;
    @(negedge clk);
    fill_valid = 0;
  endtask

  // one access (early or full) followed by its verify cycle; returns correct
  task automatic access(logic [31:0] a, logic full, output logic correct, output logic hit);
    logic any_partial, pred;
    logic [31:0] data;
    @(negedge clk);
    acc_valid = 1; acc_full = full;
    acc_addr  = full ? a : {16'hDEAD, a[15:0]};   // upper bits must not matter
    if (!full) acc_addr[31:16] = 16'($urandom());
    #1;
    any_partial = 0;
    foreach (present[l]) if (l[13:6] == a[13:6] && l[15:14] == a[15:14]) any_partial = 1;
    if (full) chk("full access hit", acc_hit_pred, present.exists({a[31:6], 6'b0}));
    else      chk("early candidate", acc_hit_pred, any_partial);
    if (acc_multi) n_multi++;
    pred = acc_hit_pred; data = acc_data;
    @(negedge clk);
    acc_valid = 0; ver_addr = a;
    #1;
    chk("ver_valid", ver_valid, 1);
    chk("ver_hit", ver_hit, present.exists({a[31:6], 6'b0}));
    if (ver_correct) chk("data", data == memw(a), 1);
    if (full) chk("full access never wrong", ver_correct, ver_hit);
    if (pred && !ver_correct) n_wrong_way++;
    if (!full && ver_correct) n_right_spec++;
    if (!pred) n_early_miss++;
    correct = ver_correct; hit = ver_hit;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c, h;
    logic [31:0] a1, a2;
    acc_valid = 0; acc_full = 0; acc_addr = 0; ver_addr = 0;
    fill_valid = 0; fill_addr = 0; fill_line = 0; st_valid = 0; st_addr = 0; st_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Figure 6 style: index 0x154 << 6, tags ...101 vs ...001 in the low bits
    a1 = 32'h2B51_5504;        // tag low bits 01, set 0x54
    a2 = a1 ^ 32'h0010_0000;   // same set, same two early tag bits, other tag
    access(a1, 0, c, h);  chk("cold early miss", h, 0);
    fill(a1); fill(a2);        // a2 filled last: MRU
    access(a1, 0, c, h);  chk("MRU picks other line", c, 0); chk("line present", h, 1);
    access(a1, 0, c, h);  chk("after verify MRU is right", c, 1);
    // store hits the line and is seen by the next load
    @(negedge clk); st_valid = 1; st_addr = a1; st_data = 32'hCAFE_F00D; #1;
    chk("store hit", st_hit, 1);
    stored[{a1[31:2], 2'b00}] = 32'hCAFE_F00D;
    @(negedge clk); st_valid = 0;
    access(a1, 0, c, h);  chk("stored data", c, 1);
    @(negedge clk); st_valid = 1; st_addr = 32'h7000_0040; st_data = 1; #1;
    chk("store to absent line misses", st_hit, 0);
    @(negedge clk); st_valid = 0;
    // random phase: few sets, at most four tags per set
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a;
      a = $urandom() & 32'h3C;
      a[31:16] = {12'h123, 2'($urandom_range(0, 1)), 2'b0};
      a[15:14] = 2'($urandom_range(0, 1));
      a[13:6]  = 8'($urandom_range(0, 3));
      access(a, $urandom_range(0, 3) == 0, c, h);
      if (!h) fill(a);
      else if (c) begin
        access(a, 0, c, h);
        chk("repeat after verified hit", c, 1);
      end else begin
        access(a, 0, c, h);
        chk("re-access after wrong way", c, 1);
      end
    end
    chk("wrong-way predictions seen", n_wrong_way > 0, 1);
    chk("multiple partial matches seen", n_multi > 0, 1);
    $display("right speculative %0d, wrong way %0d, early misses %0d, multi %0d",
             n_right_spec, n_wrong_way, n_early_miss, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
