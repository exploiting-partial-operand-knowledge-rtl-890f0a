// bitslice_core: out-of-order bit-slice execution core.
//
// The execution stage is not pipelined as a whole; instead the 32-bit
// datapath is cut into NSLICES slices of SLICE_W bits (two 16-bit slices by
// default, four 8-bit slices with NSLICES = 4). Every renamed instruction is
// split at dispatch into one instruction slice per slice issue queue. Slice k
// of an instruction issues as soon as slice k of its sources is ready and,
// for add/sub/shift, the neighbouring slice of the same instruction has run
// (the inter-slice dependency); logic slices have no such dependency and may
// run out of order. Results are written slice by slice into the sliced
// register file, so dependent instructions start on partial operands. Each
// slice executes in one cycle, so dependent slices issue back to back.
//
// Partial operands are also used by
//   * the branch unit, which flags a misprediction as soon as the compare
//     slices that have run settle the branch (early_branch_unit);
//   * the load/store queue, which rules out older stores on partial
//     addresses (lsq_disambig) and starts the L1 access with the low 16
//     address bits, choosing the way by a partial tag match (ptag_cache);
//     a wrong choice replays the load and cancels the slices issued in the
//     verify cycle.
//
// Interface: a renamed instruction (uop_t) enters per cycle on disp_* when
// disp_ready is high; the caller picks physical registers and branch tags
// and frees them (branch tags while br_busy shows them in flight). Branch
// outcomes come out on br_*; line fetches and store write-through on mem_*,
// with line data returning on fill_*. dbg_* reads a register and its slice
// ready bits. ev is a set of one-cycle event pulses.
// The slicing, the dependency rules and the uses of partial operands follow
// the document; the front end, rename and commit are outside this core, and
// issue width (one slice per slice queue per cycle, one dispatch per cycle)
// is this design's simplification.
module bitslice_core
  import pok_pkg::*;
#(
  parameter int unsigned NSLICES    = 2,
  parameter int unsigned IQ_DEPTH   = 64,
  parameter int unsigned LSQ_DEPTH  = 32,
  parameter int unsigned NPREG      = 128,
  parameter int unsigned NBR        = 8,
  parameter int unsigned DC_BYTES   = 65536,
  parameter int unsigned DC_WAYS    = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned EARLY_BITS = 16,
  localparam int unsigned SLICE_W   = XLEN / NSLICES,
  localparam int unsigned PW        = $clog2(NPREG),
  localparam int unsigned TW        = $clog2(NBR),
  localparam int unsigned LINE_W    = LINE_BYTES * 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic              disp_valid,
  input  uop_t              disp_uop,
  output logic              disp_ready,
  // branch resolution
  output logic              br_valid,
  output logic [TW-1:0]     br_tag,
  output logic              br_taken,
  output logic              br_mispredict,
  output logic              br_early,
  output logic [NBR-1:0]    br_busy,
  // memory side
  output logic              mem_req_valid,
  output logic [XLEN-1:0]   mem_req_addr,
  input  logic              fill_valid,
  input  logic [XLEN-1:0]   fill_addr,
  input  logic [LINE_W-1:0] fill_line,
  output logic              mem_wr_valid,
  output logic [XLEN-1:0]   mem_wr_addr,
  output logic [XLEN-1:0]   mem_wr_data,
  // observation
  input  logic [PW-1:0]     dbg_preg,
  output logic [XLEN-1:0]   dbg_data,
  output logic [NSLICES-1:0] dbg_ready,
  output logic              idle,
  output core_events_t      ev
);
  // ---------------- register file ----------------
  logic [NSLICES-1:0][1:0][PW-1:0]      rf_rd_preg;
  logic [NSLICES-1:0][1:0][SLICE_W-1:0] rf_rd_data;
  logic [NSLICES-1:0][PW-1:0]           rf_lk_preg;
  logic [NSLICES-1:0]                   rf_lk_up;
  slice_link_t [NSLICES-1:0]            rf_lk_data;
  logic [NSLICES-1:0]                   rf_wr_en;
  logic [NSLICES-1:0][PW-1:0]           rf_wr_preg;
  logic [NSLICES-1:0][SLICE_W-1:0]      rf_wr_data;
  slice_link_t [NSLICES-1:0]            rf_wr_link;
  logic [2:0][PW-1:0]                   rf_fr_preg;
  logic [2:0][XLEN-1:0]                 rf_fr_data;
  logic                                 rf_fw_en;
  logic [PW-1:0]                        rf_fw_preg;
  logic [XLEN-1:0]                      rf_fw_data;
  logic [2:0]                           rf_clr_en;
  logic [2:0][PW-1:0]                   rf_clr_preg;
  logic [NPREG-1:0][NSLICES-1:0]        ready;

  sliced_regfile #(
    .NPREG(NPREG), .NSLICES(NSLICES), .SLICE_W(SLICE_W), .NFR(3), .NCLR(3)
  ) u_rf (
    .clk, .rst_n,
    .rd_preg(rf_rd_preg), .rd_data(rf_rd_data),
    .lk_preg(rf_lk_preg), .lk_from_upper(rf_lk_up), .lk_data(rf_lk_data),
    .wr_en(rf_wr_en), .wr_preg(rf_wr_preg), .wr_data(rf_wr_data), .wr_link(rf_wr_link),
    .fr_preg(rf_fr_preg), .fr_data(rf_fr_data),
    .fw_en(rf_fw_en), .fw_preg(rf_fw_preg), .fw_data(rf_fw_data),
    .clr_en(rf_clr_en), .clr_preg(rf_clr_preg),
    .ready
  );

  // ---------------- dispatch ----------------
  logic [NSLICES-1:0] iq_in_ready;
  logic               lsq_ready;
  logic               is_mem, disp_go;
  logic               replay;
  logic [PW-1:0]      replay_preg;

  always_comb begin
    is_mem     = disp_uop.mem != MEM_NONE;
    disp_ready = &iq_in_ready && (!is_mem || lsq_ready);
    disp_go    = disp_valid && disp_ready;
    rf_clr_en[0]   = disp_go && disp_uop.has_dst;
    rf_clr_preg[0] = PW'(disp_uop.dst);
    rf_clr_en[1]   = disp_go && disp_uop.mem == MEM_LOAD;
    rf_clr_preg[1] = PW'(disp_uop.mem_data);
    rf_clr_en[2]   = replay;
    rf_clr_preg[2] = replay_preg;
  end

  // ---------------- slices ----------------
  logic [NSLICES-1:0]           iss_valid;
  uop_t [NSLICES-1:0]           iss_uop;
  logic [NSLICES-1:0]           cmp_eq, cmp_zero, cmp_msb, br_res_valid;
  logic [NSLICES-1:0][TW-1:0]   br_res_tag;
  logic [NSLICES-1:0]           ev_ooo, ev_partial, ev_link;

  for (genvar k = 0; k < NSLICES; k++) begin : g_slice
    logic [SLICE_W-1:0] opb, res;
    slice_link_t        lk_out;
    logic [$clog2(IQ_DEPTH+1)-1:0] occ;

    slice_issue_queue #(
      .DEPTH(IQ_DEPTH), .NSLICES(NSLICES), .SLICE_IDX(k), .NPREG(NPREG)
    ) u_iq (
      .clk, .rst_n,
      .in_valid(disp_go), .in_uop(disp_uop), .in_ready(iq_in_ready[k]),
      .ready,
      .issue_valid(iss_valid[k]), .issue_uop(iss_uop[k]),
      .cancel(replay), .occupancy(occ)
    );

    always_comb begin
      rf_rd_preg[k][0] = PW'(iss_uop[k].src1);
      rf_rd_preg[k][1] = PW'(iss_uop[k].src2);
      rf_lk_preg[k]    = PW'(iss_uop[k].dst);
      rf_lk_up[k]      = dep_of(iss_uop[k].op) == DEP_UPPER;
      opb = iss_uop[k].use_imm ? iss_uop[k].imm[k*SLICE_W +: SLICE_W] : rf_rd_data[k][1];
    end

    slice_alu #(.SLICE_W(SLICE_W), .NSLICES(NSLICES), .SLICE_IDX(k)) u_alu (
      .op(iss_uop[k].op), .a(rf_rd_data[k][0]), .b(opb),
      .shamt(iss_uop[k].imm[4:0]), .imm16(iss_uop[k].imm[15:0]),
      .link_in(rf_lk_data[k]),
      .result(res), .link_out(lk_out),
      .eq(cmp_eq[k]), .zero(cmp_zero[k]), .msb(cmp_msb[k])
    );

    always_comb begin
      rf_wr_en[k]   = iss_valid[k] && !replay && iss_uop[k].has_dst && iss_uop[k].op != OP_BR;
      rf_wr_preg[k] = PW'(iss_uop[k].dst);
      rf_wr_data[k] = res;
      rf_wr_link[k] = lk_out;
      br_res_valid[k] = iss_valid[k] && !replay && iss_uop[k].op == OP_BR;
      br_res_tag[k]   = TW'(iss_uop[k].br_tag);
      // events: slice ran ahead of the slice below, ran on a partial source,
      // or consumed an inter-slice link
      ev_ooo[k]     = rf_wr_en[k] && k > 0 && !ready[PW'(iss_uop[k].dst)][k > 0 ? k - 1 : 0];
      ev_partial[k] = iss_valid[k] && !replay && iss_uop[k].src1 != '0 &&
                      !(&ready[PW'(iss_uop[k].src1)]);
      ev_link[k]    = rf_wr_en[k] && dep_of(iss_uop[k].op) != DEP_NONE &&
                      ((dep_of(iss_uop[k].op) == DEP_LOWER && k > 0) ||
                       (dep_of(iss_uop[k].op) == DEP_UPPER && k < NSLICES - 1));
    end
  end

  // ---------------- branch unit ----------------
  logic bu_resolve_valid;

  early_branch_unit #(.NBR(NBR), .NSLICES(NSLICES)) u_br (
    .clk, .rst_n,
    .alloc_valid(disp_go && disp_uop.op == OP_BR),
    .alloc_tag(TW'(disp_uop.br_tag)),
    .alloc_kind(disp_uop.br_kind),
    .alloc_pred_taken(disp_uop.pred_taken),
    .res_valid(br_res_valid), .res_tag(br_res_tag),
    .res_eq(cmp_eq), .res_zero(cmp_zero), .res_msb(cmp_msb),
    .resolve_valid(bu_resolve_valid), .resolve_tag(br_tag),
    .resolve_taken(br_taken), .resolve_mispredict(br_mispredict),
    .resolve_early(br_early), .busy(br_busy)
  );
  assign br_valid = bu_resolve_valid;

  // ---------------- load/store queue and cache ----------------
  logic              c_acc_valid, c_acc_full, c_acc_hit_pred, c_acc_multi;
  logic [XLEN-1:0]   c_acc_addr, c_acc_data, c_ver_addr;
  logic              c_ver_valid, c_ver_hit, c_ver_correct, c_ver_pred_hit;
  logic [$clog2(DC_WAYS > 1 ? DC_WAYS : 2)-1:0] c_acc_way, c_ver_way;
  logic              c_st_valid, c_st_hit;
  logic [XLEN-1:0]   c_st_addr, c_st_data;
  logic [$clog2(LSQ_DEPTH+1)-1:0] lsq_count;
  logic              e_early_access, e_early_disambig, e_forward, e_wait_full,
                     e_ptag_replay, e_miss;

  lsq_disambig #(
    .DEPTH(LSQ_DEPTH), .NSLICES(NSLICES), .SLICE_W(SLICE_W), .NPREG(NPREG),
    .EARLY_BITS(EARLY_BITS), .LINE_BYTES(LINE_BYTES)
  ) u_lsq (
    .clk, .rst_n,
    .alloc_valid(disp_go && is_mem), .alloc_kind(disp_uop.mem),
    .alloc_addr_preg(PW'(disp_uop.dst)), .alloc_data_preg(PW'(disp_uop.mem_data)),
    .alloc_ready(lsq_ready),
    .sw_en(rf_wr_en), .sw_preg(rf_wr_preg), .sw_data(rf_wr_data), .ready,
    .fr_preg(rf_fr_preg[1:0]), .fr_data(rf_fr_data[1:0]),
    .fw_en(rf_fw_en), .fw_preg(rf_fw_preg), .fw_data(rf_fw_data),
    .replay, .replay_preg,
    .c_acc_valid, .c_acc_addr, .c_acc_full, .c_acc_hit_pred, .c_acc_data,
    .c_ver_addr, .c_ver_valid, .c_ver_hit, .c_ver_correct, .c_ver_pred_hit,
    .c_st_valid, .c_st_addr, .c_st_data,
    .mem_req_valid, .mem_req_addr, .fill_valid, .fill_addr,
    .mem_wr_valid, .mem_wr_addr, .mem_wr_data,
    .ev_early_access(e_early_access), .ev_early_disambig(e_early_disambig),
    .ev_forward(e_forward), .ev_wait_full(e_wait_full),
    .ev_ptag_replay(e_ptag_replay), .ev_miss(e_miss),
    .count(lsq_count)
  );

  ptag_cache #(
    .SIZE_BYTES(DC_BYTES), .WAYS(DC_WAYS), .LINE_BYTES(LINE_BYTES), .EARLY_BITS(EARLY_BITS)
  ) u_dc (
    .clk, .rst_n,
    .acc_valid(c_acc_valid), .acc_addr(c_acc_addr), .acc_full(c_acc_full),
    .acc_hit_pred(c_acc_hit_pred), .acc_way(c_acc_way), .acc_data(c_acc_data),
    .acc_multi(c_acc_multi),
    .ver_addr(c_ver_addr), .ver_valid(c_ver_valid), .ver_hit(c_ver_hit),
    .ver_hit_way(c_ver_way), .ver_correct(c_ver_correct), .ver_pred_hit(c_ver_pred_hit),
    .fill_valid, .fill_addr, .fill_line,
    .st_valid(c_st_valid), .st_addr(c_st_addr), .st_data(c_st_data), .st_hit(c_st_hit)
  );

  // ---------------- observation ----------------
  logic [NSLICES-1:0] iq_empty;
  for (genvar k = 0; k < NSLICES; k++) begin : g_empty
    assign iq_empty[k] = g_slice[k].occ == '0;
  end

  always_comb begin
    rf_fr_preg[2] = dbg_preg;
    dbg_data      = rf_fr_data[2];
    dbg_ready     = ready[dbg_preg];
    idle          = &iq_empty && lsq_count == '0 && br_busy == '0;

    ev.early_access     = e_early_access;
    ev.early_disambig   = e_early_disambig;
    ev.store_forward    = e_forward;
    ev.wait_full        = e_wait_full;
    ev.ptag_replay      = e_ptag_replay;
    ev.cache_miss       = e_miss;
    ev.early_mispredict = br_valid && br_mispredict && br_early;
    ev.late_mispredict  = br_valid && br_mispredict && !br_early;
    ev.ooo_slice        = |ev_ooo;
    ev.partial_operand  = |ev_partial;
    ev.interslice       = |ev_link;
  end
endmodule
