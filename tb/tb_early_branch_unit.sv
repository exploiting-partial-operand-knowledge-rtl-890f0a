// tb_early_branch_unit: checks early branch resolution from partial compares.
//
// Rounds of up to four branches (random kind, random prediction, operands
// with equal, zero and negative slices made likely) are allocated; their
// compare slices are then fed in a random order, one per slice port per
// cycle, with values computed here from the full operands. A monitor records
// each resolution. For every branch the check is: exactly one report, the
// correct direction and misprediction flag, and `early` set exactly when the
// report came while some slice was still missing. Directed cases follow
// Table 3 and Figure 3: a BNE predicted not-taken whose low slice differs
// must be reported as an early misprediction after only that slice.
// Early mispredictions, late mispredictions and early correct resolutions
// must each have happened.
module tb_early_branch_unit;
  import pok_pkg::*;
  localparam int NB = 8, NS = 2, W = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_valid, alloc_pred;
  logic [2:0] alloc_tag;
  br_kind_e alloc_kind;
  logic [NS-1:0] res_valid, res_eq, res_zero, res_msb;
  logic [NS-1:0][2:0] res_tag;
  logic rv, rt, rm, re;
  logic [2:0] rtag;
  logic [NB-1:0] busy;

  early_branch_unit #(.NBR(NB), .NSLICES(NS)) dut (
    .clk, .rst_n, .alloc_valid, .alloc_tag, .alloc_kind, .alloc_pred_taken(alloc_pred),
    .res_valid, .res_tag, .res_eq, .res_zero, .res_msb,
    .resolve_valid(rv), .resolve_tag(rtag), .resolve_taken(rt),
    .resolve_mispredict(rm), .resolve_early(re), .busy);

  int checks = 0, failures = 0;
  int n_early_mis = 0, n_late_mis = 0, n_early_ok = 0;
  int nrep [NB];
  logic rep_taken [NB], rep_mis [NB], rep_early [NB];
  int sent [NB];            // slices delivered before the current edge
  int sent_at_rep [NB];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp, $time);
    end
  endtask

  always @(posedge clk) if (rst_n && rv) begin
    nrep[rtag]++;
    rep_taken[rtag] = rt; rep_mis[rtag] = rm; rep_early[rtag] = re;
    sent_at_rep[rtag] = sent[rtag];
  end

  function automatic logic actual(br_kind_e k, logic [31:0] s, logic [31:0] t);
    case (k)
      BR_BEQ:  return s == t;
      BR_BNE:  return s != t;
      BR_BLEZ: return $signed(s) <= 0;
      BR_BGTZ: return $signed(s) > 0;
      BR_BLTZ: return $signed(s) < 0;
      default: return $signed(s) >= 0;
    endcase
  endfunction

  logic [31:0] rs [NB], rtv [NB];
  br_kind_e    kd [NB];
  logic        pr [NB];

  task automatic send_slice(int tag, int k);
    res_valid[k] = 1; res_tag[k] = 3'(tag);
    res_eq[k]   = rs[tag][k*W +: W] == rtv[tag][k*W +: W];
    res_zero[k] = rs[tag][k*W +: W] == 0;
    res_msb[k]  = rs[tag][k*W + W - 1];
  endtask

  task automatic run_round(int nbr, logic directed);
    int order [8][2];
    int left;
    for (int b = 0; b < nbr; b++) begin
      @(negedge clk);
      if (directed) begin
        kd[b] = BR_BNE; pr[b] = 0; rs[b] = 32'h0000_0001; rtv[b] = 32'h0;   // Figure 3
      end else begin
        kd[b] = br_kind_e'($urandom_range(0, 5));
        pr[b] = $urandom_range(0, 1);
        rs[b] = $urandom();
        case ($urandom_range(0, 3))
          0: rtv[b] = rs[b];
          1: rtv[b] = {rs[b][31:16], 16'($urandom())};
          2: rtv[b] = {16'($urandom()), rs[b][15:0]};
          default: rtv[b] = $urandom();
        endcase
        case ($urandom_range(0, 4))
          0: rs[b] = 0;
          1: rs[b][31:16] = 0;
          2: rs[b][15:0] = 0;
          default: ;
        endcase
        if (kd[b] >= BR_BLEZ) rtv[b] = 0;
      end
      nrep[b] = 0; sent[b] = 0;
      alloc_valid = 1; alloc_tag = 3'(b); alloc_kind = kd[b]; alloc_pred = pr[b];
      @(negedge clk);
      alloc_valid = 0;
    end
    // random slice order per branch; slice 0 first for the directed case
    for (int b = 0; b < nbr; b++) begin
      if (directed || $urandom_range(0, 1)) begin order[b][0] = 0; order[b][1] = 1; end
      else begin order[b][0] = 1; order[b][1] = 0; end
    end
    left = nbr * NS;
    for (int step = 0; step < NS; step++) begin
      for (int b = 0; b < nbr; b++) begin
        @(negedge clk);
        res_valid = '0;
        send_slice(b, order[b][step]);
        @(posedge clk);
        #1 sent[b]++;
        res_valid = '0;
        if (directed) begin
          // report comes from the stored slice in the next cycle
          @(posedge clk); #1;
          chk("directed bne reported", nrep[b], 1);
          chk("directed bne early", rep_early[b], 1);
          chk("directed bne mispredict", rep_mis[b], 1);
        end
      end
    end
    repeat (NB + 3) @(posedge clk);
    for (int b = 0; b < nbr; b++) begin
      logic a;
      a = actual(kd[b], rs[b], rtv[b]);
      chk("one report", nrep[b], 1);
      chk("taken", rep_taken[b], a);
      chk("mispredict", rep_mis[b], a != pr[b]);
      chk("early flag", rep_early[b], sent_at_rep[b] < NS);
      if (rep_mis[b] && rep_early[b]) n_early_mis++;
      if (rep_mis[b] && !rep_early[b]) n_late_mis++;
      if (!rep_mis[b] && rep_early[b]) n_early_ok++;
    end
    chk("all released", busy, 0);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_valid = 0; alloc_tag = 0; alloc_kind = BR_BEQ; alloc_pred = 0;
    res_valid = 0; res_tag = '0; res_eq = 0; res_zero = 0; res_msb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_round(1, 1'b1);
    for (int r = 0; r < 400; r++) run_round($urandom_range(1, 4), 1'b0);
    chk("early mispredicts seen", n_early_mis > 0, 1);
    chk("late mispredicts seen", n_late_mis > 0, 1);
    chk("early correct resolutions seen", n_early_ok > 0, 1);
    $display("early mispredict %0d, late mispredict %0d, early correct %0d",
             n_early_mis, n_late_mis, n_early_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
