// early_branch_unit: resolves conditional branches from partial operands.
//
// A branch is split into one compare slice per slice queue. Each compare
// slice reports, for its slice of the operands, whether RS equals RT, whether
// RS is zero, and the slice's top bit (the sign bit for the top slice). The
// unit keeps these per in-flight branch and decides the outcome as soon as
// the slices known so far settle it, without waiting for the rest:
//   * BEQ/BNE: one unequal slice proves RS != RT; equality needs all slices.
//     So a BEQ predicted taken or a BNE predicted not-taken can be found
//     mispredicted early, the other two cases only at the end (Table 3).
//   * BLTZ/BGEZ: decided by the sign bit, i.e. when the top slice is known.
//   * BLEZ/BGTZ: a set sign bit decides at once; otherwise one non-zero
//     slice with a clear sign decides, and RS == 0 needs all slices.
// When a branch is decided the unit reports it once (resolve_*), with
// resolve_early set if some slices were still unknown; a misprediction is
// thus signalled to the front end before the branch finishes executing.
// The entry stays busy until all its slices have reported, so its tag can
// be reused only then (busy output). One branch is reported per cycle, the
// lowest tag first.
// Timing: slice results are stored at the clock edge; the decision and the
// report come from the stored state in the following cycle.
// The decision rules follow the document (Section 5.1, Table 3, Figure 3);
// the table of in-flight branches and its size are this design's choices.
module early_branch_unit
  import pok_pkg::*;
#(
  parameter int unsigned NBR     = 8,
  parameter int unsigned NSLICES = 2,
  localparam int unsigned TW     = $clog2(NBR)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // allocation at dispatch
  input  logic                     alloc_valid,
  input  logic [TW-1:0]            alloc_tag,
  input  br_kind_e                 alloc_kind,
  input  logic                     alloc_pred_taken,
  // compare slice results, one port per slice
  input  logic [NSLICES-1:0]       res_valid,
  input  logic [NSLICES-1:0][TW-1:0] res_tag,
  input  logic [NSLICES-1:0]       res_eq,
  input  logic [NSLICES-1:0]       res_zero,
  input  logic [NSLICES-1:0]       res_msb,
  // resolution
  output logic                     resolve_valid,
  output logic [TW-1:0]            resolve_tag,
  output logic                     resolve_taken,
  output logic                     resolve_mispredict,
  output logic                     resolve_early,
  output logic [NBR-1:0]           busy
);
  typedef struct packed {
    br_kind_e           kind;
    logic               pred;
    logic [NSLICES-1:0] known;
    logic [NSLICES-1:0] eq;
    logic [NSLICES-1:0] zero;
    logic               msb;
    logic               reported;
  } br_ent_t;

  logic [NBR-1:0] valid_q;
  br_ent_t        ent_q [NBR];

  logic [NBR-1:0] decided, taken;

  // outcome of one branch from what is known so far
  always_comb begin
    for (int b = 0; b < NBR; b++) begin
      logic all_known, top_known, any_neq, any_nz, le;
      all_known = &ent_q[b].known;
      top_known = ent_q[b].known[NSLICES-1];
      any_neq   = |(ent_q[b].known & ~ent_q[b].eq);
      any_nz    = |(ent_q[b].known & ~ent_q[b].zero);
      decided[b] = 1'b0;
      taken[b]   = 1'b0;
      le         = 1'b0;
      unique case (ent_q[b].kind)
        BR_BEQ, BR_BNE: begin
          decided[b] = any_neq || all_known;
          taken[b]   = (ent_q[b].kind == BR_BEQ) ? !any_neq : any_neq;
        end
        BR_BLTZ, BR_BGEZ: begin
          decided[b] = top_known;
          taken[b]   = (ent_q[b].kind == BR_BLTZ) ? ent_q[b].msb : !ent_q[b].msb;
        end
        BR_BLEZ, BR_BGTZ: begin
          // RS <= 0  <=>  sign set, or all slices zero
          decided[b] = (top_known && (ent_q[b].msb || any_nz)) || all_known;
          le         = (top_known && ent_q[b].msb) || !any_nz;
          taken[b]   = (ent_q[b].kind == BR_BLEZ) ? le : !le;
        end
        default: ;
      endcase
      decided[b] = decided[b] && valid_q[b];
    end
  end

  // report the lowest decided, unreported branch
  always_comb begin
    resolve_valid      = 1'b0;
    resolve_tag        = '0;
    for (int b = NBR - 1; b >= 0; b--) begin
      if (decided[b] && !ent_q[b].reported) begin
        resolve_valid = 1'b1;
        resolve_tag   = TW'(b);
      end
    end
    resolve_taken      = taken[resolve_tag];
    resolve_mispredict = taken[resolve_tag] != ent_q[resolve_tag].pred;
    resolve_early      = !(&ent_q[resolve_tag].known);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      for (int b = 0; b < NBR; b++) begin
        // release once reported and all slices are in
        if (valid_q[b] && &ent_q[b].known &&
            (ent_q[b].reported || (resolve_valid && resolve_tag == TW'(b))))
          valid_q[b] <= 1'b0;
      end
      if (alloc_valid) valid_q[alloc_tag] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (resolve_valid) ent_q[resolve_tag].reported <= 1'b1;
    for (int k = 0; k < NSLICES; k++) begin
      if (res_valid[k]) begin
        ent_q[res_tag[k]].known[k] <= 1'b1;
        ent_q[res_tag[k]].eq[k]    <= res_eq[k];
        ent_q[res_tag[k]].zero[k]  <= res_zero[k];
        if (k == NSLICES - 1) ent_q[res_tag[k]].msb <= res_msb[k];
      end
    end
    if (alloc_valid) begin
      ent_q[alloc_tag]          <= '0;
      ent_q[alloc_tag].kind     <= alloc_kind;
      ent_q[alloc_tag].pred     <= alloc_pred_taken;
    end
  end

  assign busy = valid_q;

  // a tag is not reused while its branch is in flight
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_valid |-> !valid_q[alloc_tag]);
endmodule
