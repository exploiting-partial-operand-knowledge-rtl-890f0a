// tb_sliced_regfile: checks slice-wise writes, ready bits and links.
//
// A reference model (array of registers + per-slice ready bits + links)
// follows random slice writes, full-width writes and clears, applied in the
// same cycle in any mix. Every cycle all read ports and the ready bits of the
// addressed registers are compared with the model. Register 0 must stay zero
// and ready. Default sizes: two 16-bit slices, 128 registers.
module tb_sliced_regfile;
  import pok_pkg::*;
  localparam int NP = 128, NS = 2, W = 16, PW = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NS-1:0][1:0][PW-1:0] rd_preg;
  logic [NS-1:0][1:0][W-1:0]  rd_data;
  logic [NS-1:0][PW-1:0]      lk_preg;
  logic [NS-1:0]              lk_up;
  slice_link_t [NS-1:0]       lk_data;
  logic [NS-1:0]              wr_en;
  logic [NS-1:0][PW-1:0]      wr_preg;
  logic [NS-1:0][W-1:0]       wr_data;
  slice_link_t [NS-1:0]       wr_link;
  logic [1:0][PW-1:0]         fr_preg;
  logic [1:0][31:0]           fr_data;
  logic                       fw_en;
  logic [PW-1:0]              fw_preg;
  logic [31:0]                fw_data;
  logic [2:0]                 clr_en;
  logic [2:0][PW-1:0]         clr_preg;
  logic [NP-1:0][NS-1:0]      ready;

  sliced_regfile #(.NPREG(NP), .NSLICES(NS), .SLICE_W(W), .NFR(2), .NCLR(3)) dut (
    .clk, .rst_n, .rd_preg, .rd_data, .lk_preg, .lk_from_upper(lk_up), .lk_data,
    .wr_en, .wr_preg, .wr_data, .wr_link, .fr_preg, .fr_data,
    .fw_en, .fw_preg, .fw_data, .clr_en, .clr_preg, .ready);

  logic [31:0]   m_val [NP];
  logic [NS-1:0] m_rdy [NP];
  slice_link_t   m_lnk [NP][NS];
  int checks = 0, failures = 0;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      m_val[p] = 0; m_rdy[p] = '1;
      for (int k = 0; k < NS; k++) m_lnk[p][k] = '0;
    end
    wr_en = 0; fw_en = 0; clr_en = 0; rd_preg = '0; lk_preg = '0; lk_up = '0; fr_preg = '0;
    wr_preg = '0; wr_data = '0; wr_link = '0; fw_preg = '0; fw_data = '0; clr_preg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // random stimulus
      for (int k = 0; k < NS; k++) begin
        wr_en[k]   = $urandom_range(0, 1);
        wr_preg[k] = PW'($urandom_range(0, 15));
        wr_data[k] = W'($urandom());
        wr_link[k] = {1'($urandom()), 32'($urandom())};
      end
      fw_en   = ($urandom_range(0, 3) == 0);
      fw_preg = PW'($urandom_range(0, 15));
      fw_data = $urandom();
      for (int c = 0; c < 3; c++) begin
        clr_en[c]   = ($urandom_range(0, 4) == 0);
        clr_preg[c] = PW'($urandom_range(0, 15));
      end
      for (int k = 0; k < NS; k++) begin
        rd_preg[k][0] = PW'($urandom_range(0, 15));
        rd_preg[k][1] = PW'($urandom_range(0, 15));
        lk_preg[k]    = PW'($urandom_range(0, 15));
        lk_up[k]      = (k == 0);
      end
      fr_preg[0] = PW'($urandom_range(0, 15));
      fr_preg[1] = PW'($urandom_range(0, 15));
      #1;
      // compare reads with the model (state before this cycle's edge)
      for (int k = 0; k < NS; k++) begin
        for (int r = 0; r < 2; r++)
          chk("rd", 64'(rd_data[k][r]), 64'(m_val[rd_preg[k][r]][k*W +: W]));
        chk("lk", 64'(lk_data[k]), 64'(m_lnk[lk_preg[k]][k == 0 ? 1 : 0]));
      end
      for (int f = 0; f < 2; f++) chk("fr", 64'(fr_data[f]), 64'(m_val[fr_preg[f]]));
      for (int p = 0; p < 16; p++) chk("ready", 64'(ready[p]), 64'(m_rdy[p]));
      // update the model as the edge will
      for (int k = 0; k < NS; k++)
        if (wr_en[k]) begin
          if (wr_preg[k] != 0) begin
            m_val[wr_preg[k]][k*W +: W] = wr_data[k];
            m_lnk[wr_preg[k]][k] = wr_link[k];
          end
          m_rdy[wr_preg[k]][k] = 1'b1;
        end
      if (fw_en) begin
        if (fw_preg != 0) m_val[fw_preg] = fw_data;
        m_rdy[fw_preg] = '1;
      end
      for (int c = 0; c < 3; c++) if (clr_en[c]) m_rdy[clr_preg[c]] = '0;
      m_rdy[0] = '1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
