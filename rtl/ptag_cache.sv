// ptag_cache: set-associative L1 data cache with partial tag matching.
//
// With the address generated slice by slice, the low EARLY_BITS bits of a
// load address exist a cycle before the rest. They already hold the line
// offset and the full set index, plus a few low tag bits. This cache uses
// them to start the access early:
//   access cycle (acc_valid): the set is read with the early bits. Every
//     valid way whose low tag bits equal the available address tag bits is a
//     candidate. If there is none the access is a certain miss. If there are
//     several, the set's most-recently-used way is taken when it is a
//     candidate, else the lowest candidate. The chosen way's word is returned
//     at once (acc_data, acc_hit_pred) and may be used speculatively.
//     With acc_full set the whole address is already known and the way is
//     chosen by the full tag, so the answer is never wrong.
//   verify cycle (the next one, ver_valid): with the full address on
//     ver_addr the full tags of the set are compared. ver_hit / ver_hit_way
//     give the true outcome, ver_correct says the early choice was right.
//     A wrong early choice means the load has to be replayed. A verified hit
//     makes that way the set's MRU way.
// Misses are not allocated by the cache itself: the owner fetches the line
// and writes it with fill_*; the victim is an invalid way, or else the way
// after the MRU one. Stores write one word with st_* if the line is present
// (write-through, no write allocate).
// Reads are combinational from the arrays; all updates happen at the clock
// edge. Default geometry: 64KB, 4-way, 64-byte lines, so with 16 early bits
// the index is bits 13:6 and two tag bits (15:14) are matched early.
// Early indexing, partial tag match, MRU selection and next-cycle
// verification follow the document; the victim choice and the store policy
// are this design's choices.
module ptag_cache
  import pok_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned EARLY_BITS = 16,
  localparam int unsigned SETS      = SIZE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned TAG_LO    = OFF_W + IDX_W,
  localparam int unsigned TAG_W     = XLEN - TAG_LO,
  localparam int unsigned PT_W      = EARLY_BITS - TAG_LO,
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned LINE_W    = LINE_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // early access
  input  logic              acc_valid,
  input  logic [XLEN-1:0]   acc_addr,
  input  logic              acc_full,
  output logic              acc_hit_pred,
  output logic [WAY_W-1:0]  acc_way,
  output logic [XLEN-1:0]   acc_data,
  output logic              acc_multi,     // several ways matched the partial tag
  // verification, one cycle after an access
  input  logic [XLEN-1:0]   ver_addr,
  output logic              ver_valid,
  output logic              ver_hit,
  output logic [WAY_W-1:0]  ver_hit_way,
  output logic              ver_correct,
  output logic              ver_pred_hit,  // the access returned data
  // line fill
  input  logic              fill_valid,
  input  logic [XLEN-1:0]   fill_addr,
  input  logic [LINE_W-1:0] fill_line,
  // store word
  input  logic              st_valid,
  input  logic [XLEN-1:0]   st_addr,
  input  logic [XLEN-1:0]   st_data,
  output logic              st_hit
);
  logic [TAG_W-1:0]  tag_q  [SETS][WAYS];
  logic [LINE_W-1:0] data_q [SETS][WAYS];
  logic [WAYS-1:0]   val_q  [SETS];
  logic [WAY_W-1:0]  mru_q  [SETS];

  initial begin
    if (PT_W < 1 || PT_W > TAG_W) $error("EARLY_BITS must reach past the set index");
  end

  // ---------------- access ----------------
  logic [IDX_W-1:0] a_set;
  logic [WAYS-1:0]  cand;
  logic [WAY_W-1:0] a_way;
  logic [LINE_W-1:0] a_line;

  always_comb begin
    a_set = acc_addr[TAG_LO-1:OFF_W];
    for (int w = 0; w < WAYS; w++) begin
      if (acc_full)
        cand[w] = val_q[a_set][w] && (tag_q[a_set][w] == acc_addr[XLEN-1:TAG_LO]);
      else
        cand[w] = val_q[a_set][w] &&
                  (tag_q[a_set][w][PT_W-1:0] == acc_addr[EARLY_BITS-1:TAG_LO]);
    end
    a_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) if (cand[w]) a_way = WAY_W'(w);
    if (cand[mru_q[a_set]]) a_way = mru_q[a_set];
    acc_hit_pred = |cand;
    acc_multi    = $countones(cand) > 1;
    acc_way      = a_way;
    a_line       = data_q[a_set][a_way];
    acc_data     = a_line[acc_addr[OFF_W-1:2] * 32 +: 32];
  end

  // ---------------- verify ----------------
  logic             v_pend_q, v_pred_q;
  logic [WAY_W-1:0] v_way_q;
  logic [IDX_W-1:0] v_set;
  logic [WAYS-1:0]  v_match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pend_q <= 1'b0;
      v_pred_q <= 1'b0;
      v_way_q  <= '0;
    end else begin
      v_pend_q <= acc_valid;
      v_pred_q <= acc_hit_pred;
      v_way_q  <= a_way;
    end
  end

  always_comb begin
    v_set = ver_addr[TAG_LO-1:OFF_W];
    ver_hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      v_match[w] = val_q[v_set][w] && (tag_q[v_set][w] == ver_addr[XLEN-1:TAG_LO]);
      if (v_match[w]) ver_hit_way = WAY_W'(w);
    end
    ver_valid    = v_pend_q;
    ver_hit      = |v_match;
    ver_pred_hit = v_pred_q;
    ver_correct  = v_pred_q && ver_hit && (ver_hit_way == v_way_q);
  end

  // ---------------- store, fill, MRU ----------------
  logic [IDX_W-1:0] s_set, f_set;
  logic [WAY_W-1:0] s_way, f_way;

  always_comb begin
    s_set  = st_addr[TAG_LO-1:OFF_W];
    st_hit = 1'b0;
    s_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (val_q[s_set][w] && tag_q[s_set][w] == st_addr[XLEN-1:TAG_LO]) begin
        st_hit = 1'b1;
        s_way  = WAY_W'(w);
      end
    end
    f_set = fill_addr[TAG_LO-1:OFF_W];
    f_way = WAY_W'((int'(mru_q[f_set]) + 1) % WAYS);
    for (int w = WAYS - 1; w >= 0; w--) if (!val_q[f_set][w]) f_way = WAY_W'(w);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        val_q[s] <= '0;
        mru_q[s] <= '0;
      end
    end else begin
      if (ver_valid && ver_hit) mru_q[v_set] <= ver_hit_way;
      if (fill_valid) begin
        val_q[f_set][f_way] <= 1'b1;
        mru_q[f_set]        <= f_way;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (st_valid && st_hit)
      data_q[s_set][s_way][st_addr[OFF_W-1:2] * 32 +: 32] <= st_data;
    if (fill_valid) begin
      tag_q[f_set][f_way]  <= fill_addr[XLEN-1:TAG_LO];
      data_q[f_set][f_way] <= fill_line;
    end
  end
endmodule
