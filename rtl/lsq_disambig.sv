// lsq_disambig: unified load/store queue with partial-address disambiguation.
//
// Loads and stores enter in program order at dispatch. Their addresses are
// produced slice by slice by an address-generation add in the slice queues;
// the queue snoops the slice write ports and captures each address slice as
// soon as it is written, so it holds partial addresses.
//
// Disambiguation. An older store is ruled out for a load when some address
// slice known for both differs (bits 1:0 are ignored: word accesses). While
// any older store is not ruled out, the load waits until its own address and
// those stores' addresses are complete; then the youngest older store with
// the same address forwards its data (when that data is ready), or the load
// goes to the cache if none matches.
//
// Early cache access. A load whose low EARLY_BITS address bits are known, and
// whose remaining slices are known or being written in this cycle, and which
// has all older stores ruled out by the bits known so far, accesses the cache
// with the partial address (partial tag match, see ptag_cache). The data it
// returns is written to the load's destination at once. In the next cycle the
// full address is known and the cache verifies the choice; if the cache gave
// data from the wrong way, `replay` is raised for that cycle: the load's
// destination loses its ready bits, every instruction slice issued in that
// cycle is cancelled by the core and issues again, and the load re-accesses
// the cache (wrong way) or fetches the line (miss). A load with its whole
// address known accesses by full tag and is never replayed.
//
// Misses fetch one line at a time through mem_req_* / fill_*. Stores write the
// cache (when the line is present) and memory when they reach the head of the
// queue with address and data complete, so they never pass an older load.
// Completed loads and written stores leave from the head, one per cycle.
//
// One load is served per cycle (cache access or forward), oldest first.
// The partial comparison, partial tag access and replay follow the document
// (Sections 5.2, 5.3, 7); forwarding only after the full comparison,
// the store commit rule and the single outstanding miss are this design's
// choices.
module lsq_disambig
  import pok_pkg::*;
#(
  parameter int unsigned DEPTH      = 32,
  parameter int unsigned NSLICES    = 2,
  parameter int unsigned SLICE_W    = 16,
  parameter int unsigned NPREG      = 128,
  parameter int unsigned EARLY_BITS = 16,
  parameter int unsigned LINE_BYTES = 64,
  localparam int unsigned PW        = $clog2(NPREG),
  localparam int unsigned QW        = $clog2(DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // dispatch
  input  logic                          alloc_valid,
  input  mem_kind_e                     alloc_kind,
  input  logic [PW-1:0]                 alloc_addr_preg,
  input  logic [PW-1:0]                 alloc_data_preg,
  output logic                          alloc_ready,
  // snooped slice writes (already cancelled when replay is high)
  input  logic [NSLICES-1:0]            sw_en,
  input  logic [NSLICES-1:0][PW-1:0]    sw_preg,
  input  logic [NSLICES-1:0][SLICE_W-1:0] sw_data,
  input  logic [NPREG-1:0][NSLICES-1:0] ready,
  // register file: store data reads, load result write, replay clear
  output logic [1:0][PW-1:0]            fr_preg,
  input  logic [1:0][XLEN-1:0]          fr_data,
  output logic                          fw_en,
  output logic [PW-1:0]                 fw_preg,
  output logic [XLEN-1:0]               fw_data,
  output logic                          replay,
  output logic [PW-1:0]                 replay_preg,
  // cache
  output logic                          c_acc_valid,
  output logic [XLEN-1:0]               c_acc_addr,
  output logic                          c_acc_full,
  input  logic                          c_acc_hit_pred,
  input  logic [XLEN-1:0]               c_acc_data,
  output logic [XLEN-1:0]               c_ver_addr,
  input  logic                          c_ver_valid,
  input  logic                          c_ver_hit,
  input  logic                          c_ver_correct,
  input  logic                          c_ver_pred_hit,
  output logic                          c_st_valid,
  output logic [XLEN-1:0]               c_st_addr,
  output logic [XLEN-1:0]               c_st_data,
  // memory
  output logic                          mem_req_valid,
  output logic [XLEN-1:0]               mem_req_addr,
  input  logic                          fill_valid,
  input  logic [XLEN-1:0]               fill_addr,
  output logic                          mem_wr_valid,
  output logic [XLEN-1:0]               mem_wr_addr,
  output logic [XLEN-1:0]               mem_wr_data,
  // events
  output logic                          ev_early_access,   // access with a partial address
  output logic                          ev_early_disambig, // ...while older stores were present
  output logic                          ev_forward,
  output logic                          ev_wait_full,      // a load waited for full comparison
  output logic                          ev_ptag_replay,
  output logic                          ev_miss,
  output logic [$clog2(DEPTH+1)-1:0]    count
);
  localparam int unsigned NLOW = (EARLY_BITS + SLICE_W - 1) / SLICE_W;
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);

  typedef enum logic [2:0] {
    L_WAIT   = 3'd0,   // needs an access or a forward
    L_VERIFY = 3'd1,   // accessed last cycle
    L_MISS   = 3'd2,   // needs a line fetch
    L_FILL   = 3'd3,   // line fetch outstanding
    L_DONE   = 3'd4
  } lstate_e;

  typedef struct packed {
    mem_kind_e          kind;
    logic [PW-1:0]      addr_preg;
    logic [PW-1:0]      data_preg;
    logic [XLEN-1:0]    addr;
    logic [NSLICES-1:0] known;
    lstate_e            st;
  } lsq_ent_t;

  logic [DEPTH-1:0] valid_q;
  lsq_ent_t         ent_q [DEPTH];
  logic [QW-1:0]    head_q, tail_q;
  logic [QW:0]      cnt_q;

  // ---------------- per-entry views ----------------
  logic [DEPTH-1:0][NSLICES-1:0] writing;   // slice being written this cycle

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      for (int k = 0; k < NSLICES; k++)
        writing[i][k] = sw_en[k] && sw_preg[k] == ent_q[i].addr_preg;
    end
  end

  // does store s still possibly alias load l, given the slices both know?
  function automatic logic maybe_alias(lsq_ent_t l, lsq_ent_t s);
    logic ruled_out;
    logic [XLEN-1:0] diff;
    ruled_out = 1'b0;
    diff = l.addr ^ s.addr;
    diff[1:0] = 2'b00;
    for (int k = 0; k < NSLICES; k++)
      if (l.known[k] && s.known[k] && diff[k*SLICE_W +: SLICE_W] != '0) ruled_out = 1'b1;
    return !ruled_out;
  endfunction

  // ---------------- load selection ----------------
  logic            sel_valid, sel_fwd, sel_full, sel_had_st;
  logic [QW-1:0]   sel_idx, sel_src;
  logic            any_wait_full;

  always_comb begin
    sel_valid     = 1'b0;
    sel_fwd       = 1'b0;
    sel_full      = 1'b0;
    sel_had_st    = 1'b0;
    sel_idx       = '0;
    sel_src       = '0;
    any_wait_full = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      logic [QW-1:0] i;
      logic low_known, rest_ok, all_known, blocked, exact_ok, have_st;
      logic [QW-1:0] src;
      i = QW'(a) + head_q;
      low_known = &ent_q[i].known[NLOW-1:0];
      all_known = &ent_q[i].known;
      rest_ok   = &(ent_q[i].known | writing[i]);
      blocked   = 1'b0;
      exact_ok  = 1'b1;
      have_st   = 1'b0;
      src       = '0;
      for (int b = 0; b < DEPTH; b++) begin
        logic [QW-1:0] j;
        j = QW'(b) + head_q;
        if (b < a && valid_q[j] && ent_q[j].kind == MEM_STORE) begin
          have_st = 1'b1;
          if (maybe_alias(ent_q[i], ent_q[j])) begin
            blocked = 1'b1;
            if (!(&ent_q[j].known)) exact_ok = 1'b0;
            else begin
              src = j;         // youngest matching older store wins
            end
          end
        end
      end
      if (valid_q[i] && ent_q[i].kind == MEM_LOAD && ent_q[i].st == L_WAIT) begin
        if (!blocked && low_known && rest_ok) begin
          sel_valid  = 1'b1;
          sel_fwd    = 1'b0;
          sel_full   = all_known;
          sel_had_st = have_st;
          sel_idx    = i;
        end else if (blocked && all_known && exact_ok && &ready[ent_q[src].data_preg]) begin
          sel_valid  = 1'b1;
          sel_fwd    = 1'b1;
          sel_full   = 1'b1;
          sel_had_st = have_st;
          sel_idx    = i;
          sel_src    = src;
        end
        if (blocked && low_known) any_wait_full = 1'b1;
      end
    end
  end

  // ---------------- verify ----------------
  logic [QW-1:0] v_idx_q;

  always_comb begin
    c_ver_addr  = ent_q[v_idx_q].addr;
    replay      = c_ver_valid && c_ver_pred_hit && !c_ver_correct;
    replay_preg = ent_q[v_idx_q].data_preg;
  end

  // ---------------- cache / register file / memory ----------------
  logic          fill_busy_q;
  logic          miss_sel;
  logic [QW-1:0] miss_idx;
  logic          st_go;
  logic [XLEN-1:0] sel_addr;

  always_comb begin
    sel_addr = ent_q[sel_idx].addr;
    for (int k = 0; k < NSLICES; k++)
      if (!ent_q[sel_idx].known[k] && writing[sel_idx][k])
        sel_addr[k*SLICE_W +: SLICE_W] = sw_data[k];

    c_acc_valid = sel_valid && !sel_fwd;
    c_acc_addr  = sel_addr;
    c_acc_full  = sel_full;

    fr_preg[0] = ent_q[head_q].data_preg;   // store data at the head
    fr_preg[1] = ent_q[sel_src].data_preg;  // forwarded store data

    fw_en   = (c_acc_valid && c_acc_hit_pred) || (sel_valid && sel_fwd);
    fw_preg = ent_q[sel_idx].data_preg;
    fw_data = sel_fwd ? fr_data[1] : c_acc_data;

    st_go = valid_q[head_q] && ent_q[head_q].kind == MEM_STORE &&
            &ent_q[head_q].known && &ready[ent_q[head_q].data_preg];
    c_st_valid  = st_go;
    c_st_addr   = ent_q[head_q].addr;
    c_st_data   = fr_data[0];
    mem_wr_valid = st_go;
    mem_wr_addr  = ent_q[head_q].addr;
    mem_wr_data  = fr_data[0];

    miss_sel = 1'b0;
    miss_idx = '0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      logic [QW-1:0] i;
      i = QW'(a) + head_q;
      if (valid_q[i] && ent_q[i].kind == MEM_LOAD && ent_q[i].st == L_MISS) begin
        miss_sel = 1'b1;
        miss_idx = i;
      end
    end
    mem_req_valid = miss_sel && !fill_busy_q;
    mem_req_addr  = {ent_q[miss_idx].addr[XLEN-1:OFF_W], {OFF_W{1'b0}}};

    ev_early_access   = c_acc_valid && !sel_full;
    ev_early_disambig = c_acc_valid && !sel_full && sel_had_st;
    ev_forward        = sel_valid && sel_fwd;
    ev_wait_full      = any_wait_full;
    ev_ptag_replay    = replay;
    ev_miss           = mem_req_valid;
  end

  logic deq;
  assign deq = valid_q[head_q] &&
               ((ent_q[head_q].kind == MEM_LOAD && ent_q[head_q].st == L_DONE) || st_go);
  assign alloc_ready = cnt_q < (QW+1)'(DEPTH);
  assign count       = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q     <= '0;
      head_q      <= '0;
      tail_q      <= '0;
      cnt_q       <= '0;
      v_idx_q     <= '0;
      fill_busy_q <= 1'b0;
    end else begin
      if (alloc_valid && alloc_ready) begin
        valid_q[tail_q] <= 1'b1;
        tail_q          <= tail_q + 1'b1;
      end
      if (deq) begin
        valid_q[head_q] <= 1'b0;
        head_q          <= head_q + 1'b1;
      end
      cnt_q <= cnt_q + (QW+1)'(alloc_valid && alloc_ready) - (QW+1)'(deq);
      if (c_acc_valid) v_idx_q <= sel_idx;
      if (mem_req_valid) fill_busy_q <= 1'b1;
      if (fill_valid)    fill_busy_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      for (int k = 0; k < NSLICES; k++) begin
        if (writing[i][k] && !ent_q[i].known[k]) begin
          ent_q[i].addr[k*SLICE_W +: SLICE_W] <= sw_data[k];
          ent_q[i].known[k] <= 1'b1;
        end
      end
      if ((ent_q[i].st == L_FILL || ent_q[i].st == L_MISS) && fill_valid &&
          fill_addr[XLEN-1:OFF_W] == ent_q[i].addr[XLEN-1:OFF_W])
        ent_q[i].st <= L_WAIT;
    end
    // verification of last cycle's access
    if (c_ver_valid) begin
      if (c_ver_correct)  ent_q[v_idx_q].st <= L_DONE;
      else if (c_ver_hit) ent_q[v_idx_q].st <= L_WAIT;
      else                ent_q[v_idx_q].st <= L_MISS;
    end
    if (sel_valid) ent_q[sel_idx].st <= sel_fwd ? L_DONE : L_VERIFY;
    if (mem_req_valid) ent_q[miss_idx].st <= L_FILL;
    if (alloc_valid && alloc_ready) begin
      ent_q[tail_q].kind      <= alloc_kind;
      ent_q[tail_q].addr_preg <= alloc_addr_preg;
      ent_q[tail_q].data_preg <= alloc_data_preg;
      ent_q[tail_q].addr      <= '0;
      ent_q[tail_q].known     <= '0;
      ent_q[tail_q].st        <= L_WAIT;
    end
  end

  // the entry being verified is the load that accessed the cache last cycle
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n)
    c_ver_valid |-> ent_q[v_idx_q].st == L_VERIFY);
endmodule
