// tb_lsq_disambig: checks the load/store queue with partial addresses,
// together with the real L1 cache, a register model and a memory model.
//
// Batches of up to eight loads and stores are dispatched in program order.
// Their addresses come from a small pool (two sets, four lines per set that
// all share the two early tag bits, four words per line), so that aliasing,
// partial tag collisions and misses are frequent. The testbench then writes
// each address slice by slice, as the slice ALUs would: the low slice first,
// the high slice in the next cycle or after a random delay, ops in random
// order. Slice writes in a cycle where the queue raises replay are dropped
// and repeated, as the core cancels them.
// A register model takes load results (fw_*), serves store data (fr_*) and
// drops ready bits on replay. A memory model answers line fetches after six
// cycles and takes write-through stores.
// When a batch has drained, every load's register must hold the value of
// the latest older store to the same word in program order, or else memory;
// memory must hold the stores in program order. A load whose result was
// replayed must end with the right value and be ready. Each mechanism (early
// access, early disambiguation past stores, waiting for the full compare,
// forwarding, replay, miss) must have happened.
module tb_lsq_disambig;
  import pok_pkg::*;
  localparam int NS = 2, W = 16, NP = 128, PW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_valid, alloc_ready;
  mem_kind_e alloc_kind;
  logic [PW-1:0] alloc_addr_preg, alloc_data_preg;
  logic [NS-1:0] sw_en, sw_req;
  logic [NS-1:0][PW-1:0] sw_preg;
  logic [NS-1:0][W-1:0] sw_data;
  logic [NP-1:0][NS-1:0] ready;
  logic [1:0][PW-1:0] fr_preg;
  logic [1:0][31:0] fr_data;
  logic fw_en; logic [PW-1:0] fw_preg; logic [31:0] fw_data;
  logic replay; logic [PW-1:0] replay_preg;
  logic c_acc_valid, c_acc_full, c_acc_hit_pred, c_ver_valid, c_ver_hit, c_ver_correct, c_ver_pred_hit;
  logic [31:0] c_acc_addr, c_acc_data, c_ver_addr;
  logic c_st_valid, c_st_hit; logic [31:0] c_st_addr, c_st_data;
  logic mem_req_valid; logic [31:0] mem_req_addr;
  logic fill_valid; logic [31:0] fill_addr; logic [511:0] fill_line;
  logic mem_wr_valid; logic [31:0] mem_wr_addr, mem_wr_data;
  logic e_ea, e_ed, e_fw, e_wf, e_rp, e_ms;
  logic [5:0] count;
  logic acc_multi; logic [1:0] acc_way, ver_way;

  lsq_disambig #(.DEPTH(32), .NSLICES(NS), .SLICE_W(W), .NPREG(NP)) dut (
    .clk, .rst_n, .alloc_valid, .alloc_kind, .alloc_addr_preg, .alloc_data_preg, .alloc_ready,
    .sw_en, .sw_preg, .sw_data, .ready, .fr_preg, .fr_data, .fw_en, .fw_preg, .fw_data,
    .replay, .replay_preg,
    .c_acc_valid, .c_acc_addr, .c_acc_full, .c_acc_hit_pred, .c_acc_data,
    .c_ver_addr, .c_ver_valid, .c_ver_hit, .c_ver_correct, .c_ver_pred_hit,
    .c_st_valid, .c_st_addr, .c_st_data,
    .mem_req_valid, .mem_req_addr, .fill_valid, .fill_addr,
    .mem_wr_valid, .mem_wr_addr, .mem_wr_data,
    .ev_early_access(e_ea), .ev_early_disambig(e_ed), .ev_forward(e_fw),
    .ev_wait_full(e_wf), .ev_ptag_replay(e_rp), .ev_miss(e_ms), .count);

  ptag_cache dc (
    .clk, .rst_n, .acc_valid(c_acc_valid), .acc_addr(c_acc_addr), .acc_full(c_acc_full),
    .acc_hit_pred(c_acc_hit_pred), .acc_way, .acc_data(c_acc_data), .acc_multi,
    .ver_addr(c_ver_addr), .ver_valid(c_ver_valid), .ver_hit(c_ver_hit), .ver_hit_way(ver_way),
    .ver_correct(c_ver_correct), .ver_pred_hit(c_ver_pred_hit),
    .fill_valid, .fill_addr, .fill_line,
    .st_valid(c_st_valid), .st_addr(c_st_addr), .st_data(c_st_data), .st_hit(c_st_hit));

  // ---------------- register model ----------------
  logic [31:0] rf [NP];
  always_comb begin
    for (int f = 0; f < 2; f++) fr_data[f] = rf[fr_preg[f]];
    sw_en = sw_req & {NS{!replay}};
  end
  always @(posedge clk) begin
    for (int k = 0; k < NS; k++)
      if (sw_en[k]) begin rf[sw_preg[k]][k*W +: W] <= sw_data[k]; ready[sw_preg[k]][k] <= 1; end
    if (fw_en) begin rf[fw_preg] <= fw_data; ready[fw_preg] <= '1; end
    if (replay) ready[replay_preg] <= '0;
  end

  // ---------------- memory model ----------------
  logic [31:0] memw [logic [31:0]];
  function automatic logic [31:0] mem_rd(logic [31:0] a);
    logic [31:0] w = {a[31:2], 2'b00};
    if (memw.exists(w)) return memw[w];
    return w ^ 32'hA5A5_0000;
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
  int n_ea = 0, n_ed = 0, n_fw = 0, n_wf = 0, n_rp = 0, n_ms = 0;
  always @(posedge clk) if (rst_n) begin
    n_ea += int'(e_ea); n_ed += int'(e_ed); n_fw += int'(e_fw);
    n_wf += int'(e_wf); n_rp += int'(e_rp); n_ms += int'(e_ms);
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  // one batch
  mem_kind_e   b_kind [8];
  logic [31:0] b_addr [8];
  logic [PW-1:0] b_ap [8], b_dp [8];
  logic [31:0] b_sd [8];
  int          b_s0 [8], b_s1 [8];    // cycle of each address slice write

  function automatic logic [31:0] pool_addr();
    logic [31:0] a;
    a = 32'h0;
    a[31:16] = {12'h3A0, 2'($urandom_range(0, 3)), 2'b00};  // four tags, same bits 15:14
    a[15:14] = 2'b01;
    a[13:6]  = 8'($urandom_range(0, 1) * 8'h55);
    a[5:2]   = 4'($urandom_range(0, 3));
    return a;
  endfunction

  task automatic run_batch(int n);
    logic [31:0] expv;
    int t, done;
    // program-order reference starts from memory as it is now
    for (int i = 0; i < n; i++) begin
      b_kind[i] = ($urandom_range(0, 2) == 0) ? MEM_STORE : MEM_LOAD;
      b_addr[i] = pool_addr();
      b_ap[i]   = PW'(1 + i);
      b_dp[i]   = PW'(16 + i);
      b_sd[i]   = $urandom();
      b_s0[i]   = $urandom_range(0, 6);
      b_s1[i]   = b_s0[i] + (($urandom_range(0, 2) == 0) ? $urandom_range(2, 6) : 1);
    end
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      ready[b_ap[i]] = '0;
      if (b_kind[i] == MEM_STORE) begin rf[b_dp[i]] = b_sd[i]; ready[b_dp[i]] = '1; end
      else begin rf[b_dp[i]] = 32'hBAD0_0000; ready[b_dp[i]] = '0; end
    end
    for (int i = 0; i < n; i++) begin
      alloc_valid = 1; alloc_kind = b_kind[i];
      alloc_addr_preg = b_ap[i]; alloc_data_preg = b_dp[i];
      @(negedge clk);
    end
    alloc_valid = 0;
    // address slices; a write dropped by replay is retried
    t = 0; done = 0;
    while (done < 2 * n && t < 200) begin
      @(negedge clk);
      sw_req = '0;
      for (int k = 0; k < NS; k++)
        for (int i = 0; i < n; i++)
          if (!sw_req[k] && !ready[b_ap[i]][k] && t >= (k == 0 ? b_s0[i] : b_s1[i]) &&
              (k == 0 || ready[b_ap[i]][0])) begin
            sw_req[k] = 1; sw_preg[k] = b_ap[i]; sw_data[k] = b_addr[i][k*W +: W];
          end
      #1;
      for (int k = 0; k < NS; k++) if (sw_en[k]) done++;
      t++;
    end
    @(negedge clk); sw_req = '0;
    t = 0;
    while (count != 0 && t < 2000) begin @(negedge clk); t++; end
    chk("batch drained", count, 0);
    // reference
    for (int i = 0; i < n; i++) begin
      if (b_kind[i] == MEM_LOAD) begin
        logic found = 0;
        expv = 0;
        for (int j = i - 1; j >= 0 && !found; j--)
          if (b_kind[j] == MEM_STORE && b_addr[j][31:2] == b_addr[i][31:2]) begin
            found = 1; expv = b_sd[j];
          end
        if (!found) expv = pre_mem(i);
        chk("load value", rf[b_dp[i]], expv);
        chk("load ready", ready[b_dp[i]], 2'b11);
      end
    end
    // memory holds the last store to each word
    for (int i = 0; i < n; i++) if (b_kind[i] == MEM_STORE) begin
      int last = i;
      for (int j = i + 1; j < n; j++)
        if (b_kind[j] == MEM_STORE && b_addr[j][31:2] == b_addr[i][31:2]) last = j;
      chk("memory after stores", mem_rd(b_addr[i]), b_sd[last]);
    end
  endtask

  // memory value a load sees when no older store of its batch matches:
  // memory now, unless a younger store of the batch has overwritten it
  logic [31:0] pre_snap [logic [31:0]];
  function automatic logic [31:0] pre_mem(int i);
    logic [31:0] w = {b_addr[i][31:2], 2'b00};
    if (pre_snap.exists(w)) return pre_snap[w];
    return w ^ 32'hA5A5_0000;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin rf[p] = 0; ready[p] = '1; end
    alloc_valid = 0; alloc_kind = MEM_NONE; alloc_addr_preg = 0; alloc_data_preg = 0;
    sw_req = 0; sw_preg = '0; sw_data = '0; fill_valid = 0; fill_addr = 0; fill_line = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      pre_snap = memw;
      run_batch($urandom_range(1, 8));
    end
    chk("early accesses", n_ea > 0, 1);
    chk("early disambiguation past stores", n_ed > 0, 1);
    chk("waits for full compare", n_wf > 0, 1);
    chk("store forwarding", n_fw > 0, 1);
    chk("partial tag replays", n_rp > 0, 1);
    chk("misses", n_ms > 0, 1);
    $display("early %0d, early past stores %0d, wait full %0d, forward %0d, replay %0d, miss %0d",
             n_ea, n_ed, n_wf, n_fw, n_rp, n_ms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
