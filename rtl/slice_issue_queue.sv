// slice_issue_queue: the issue queue of one bit slice.
//
// At dispatch every instruction is split into one instruction slice per
// slice queue. This queue holds the slices for slice SLICE_IDX and issues at
// most one per cycle to that slice's ALU. An entry is ready when
//   * slice SLICE_IDX of each register source is ready (partial operand
//     knowledge: the other slices of the operands need not exist yet), and
//   * its inter-slice dependency is met: for add/sub and left shifts the
//     slice below of the same instruction has written its result (slice k-1
//     of the destination is ready), for right shifts the slice above.
// Logic operations have no inter-slice dependency, so their high slice may
// issue before their low slice.
//
// Select is by position (lowest ready entry first). An issued entry leaves
// the queue at the next clock edge unless `cancel` is high in its issue cycle
// (load replay); it then stays and issues again later.
// Dispatch writes the lowest free entry; in_ready is low when all are used.
// Interface timing: issue_valid/issue_uop are combinational from the stored
// entries and the ready bits of the register file.
// The wakeup rules follow the document (Figures 9 and 10); queue size and
// select policy are this design's choices.
module slice_issue_queue
  import pok_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter int unsigned NSLICES   = 2,
  parameter int unsigned SLICE_IDX = 0,
  parameter int unsigned NPREG     = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  uop_t                          in_uop,
  output logic                          in_ready,
  input  logic [NPREG-1:0][NSLICES-1:0] ready,
  output logic                          issue_valid,
  output uop_t                          issue_uop,
  input  logic                          cancel,
  output logic [$clog2(DEPTH+1)-1:0]    occupancy
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0] valid_q;
  uop_t             ent_q [DEPTH];

  logic [DEPTH-1:0] rdy;
  logic [IW-1:0]    sel_idx, free_idx;
  logic             have_free;

  function automatic logic entry_ready(uop_t u, logic [NPREG-1:0][NSLICES-1:0] r);
    logic ok;
    ok = r[u.src1][SLICE_IDX];
    if (!u.use_imm) ok = ok & r[u.src2][SLICE_IDX];
    case (dep_of(u.op))
      DEP_LOWER: if (SLICE_IDX > 0)           ok = ok & r[u.dst][SLICE_IDX - 1];
      DEP_UPPER: if (SLICE_IDX < NSLICES - 1) ok = ok & r[u.dst][SLICE_IDX + 1];
      default: ;
    endcase
    return ok;
  endfunction

  always_comb begin
    issue_valid = 1'b0;
    sel_idx     = '0;
    have_free   = 1'b0;
    free_idx    = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      rdy[i] = valid_q[i] && entry_ready(ent_q[i], ready);
      if (rdy[i]) begin
        issue_valid = 1'b1;
        sel_idx     = IW'(i);
      end
      if (!valid_q[i]) begin
        have_free = 1'b1;
        free_idx  = IW'(i);
      end
    end
    issue_uop = ent_q[sel_idx];
    in_ready  = have_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (issue_valid && !cancel) valid_q[sel_idx] <= 1'b0;
      if (in_valid && have_free) valid_q[free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && have_free) ent_q[free_idx] <= in_uop;
  end

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < DEPTH; i++) occupancy += valid_q[i];
  end

  // an issued entry is always a stored one
  a_issue_valid: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid |-> valid_q[sel_idx]);
endmodule
