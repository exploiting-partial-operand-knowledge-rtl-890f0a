// sliced_regfile: physical register file divided into bit slices.
//
// Every physical register is stored as NSLICES slices of SLICE_W bits, and
// each slice has its own ready bit. Slice k of a result is written by the
// slice-k ALU as soon as that slice has executed, so a consumer can start on
// slice k of an operand while higher slices are still being computed: this
// is how partial operands reach dependent instructions. The ready bits are
// the scheduler's view of which operand slices exist.
//
// Next to each slice the file keeps the inter-slice link the instruction
// writing it left behind (carry and shifted source bits), read by the next
// slice of the same instruction.
//
// Ports:
//   * per slice k: two read ports (data slice) and one write port
//     (data slice + link), which also sets ready[preg][k];
//   * per slice k: one link read port (link left by slice k-1 or k+1 of the
//     named register's producer, chosen by the caller);
//   * NFR full-width read ports for the load/store queue;
//   * one full-width write port (load data) that sets all slices ready;
//   * NCLR clear ports that drop all ready bits of a register (allocation at
//     dispatch, load replay). A clear wins over a write in the same cycle.
// Writes and clears take effect at the clock edge; reads are combinational
// from the stored state, so a slice written in cycle t is read in cycle t+1.
// Register 0 reads as zero and is always ready. At reset every register is
// zero and ready (the architectural state before any instruction).
// The slice organisation follows the document; the port counts and the
// register count are this design's choices.
module sliced_regfile
  import pok_pkg::*;
#(
  parameter int unsigned NPREG   = 128,
  parameter int unsigned NSLICES = 2,
  parameter int unsigned SLICE_W = 16,
  parameter int unsigned NFR     = 2,
  parameter int unsigned NCLR    = 3,
  localparam int unsigned PW     = $clog2(NPREG)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // slice read ports
  input  logic [NSLICES-1:0][1:0][PW-1:0]  rd_preg,
  output logic [NSLICES-1:0][1:0][SLICE_W-1:0] rd_data,
  // slice link read
  input  logic [NSLICES-1:0][PW-1:0]       lk_preg,
  input  logic [NSLICES-1:0]               lk_from_upper, // 0: slice k-1, 1: slice k+1
  output slice_link_t [NSLICES-1:0]        lk_data,
  // slice write ports
  input  logic [NSLICES-1:0]               wr_en,
  input  logic [NSLICES-1:0][PW-1:0]       wr_preg,
  input  logic [NSLICES-1:0][SLICE_W-1:0]  wr_data,
  input  slice_link_t [NSLICES-1:0]        wr_link,
  // full-width read ports
  input  logic [NFR-1:0][PW-1:0]           fr_preg,
  output logic [NFR-1:0][XLEN-1:0]         fr_data,
  // full-width write port
  input  logic                             fw_en,
  input  logic [PW-1:0]                    fw_preg,
  input  logic [XLEN-1:0]                  fw_data,
  // ready clear
  input  logic [NCLR-1:0]                  clr_en,
  input  logic [NCLR-1:0][PW-1:0]          clr_preg,
  // ready bits of every register slice
  output logic [NPREG-1:0][NSLICES-1:0]    ready
);
  logic [NSLICES-1:0][SLICE_W-1:0] mem [NPREG];
  slice_link_t                     lnk [NPREG][NSLICES];
  logic [NPREG-1:0][NSLICES-1:0]   rdy_q;

  initial begin
    if (NSLICES * SLICE_W != XLEN) $error("NSLICES * SLICE_W must be %0d", XLEN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPREG; p++) begin
        mem[p] <= '0;
        for (int k = 0; k < NSLICES; k++) lnk[p][k] <= '0;
      end
    end else begin
      for (int k = 0; k < NSLICES; k++) begin
        if (wr_en[k] && wr_preg[k] != '0) begin
          mem[wr_preg[k]][k] <= wr_data[k];
          lnk[wr_preg[k]][k] <= wr_link[k];
        end
      end
      if (fw_en && fw_preg != '0) mem[fw_preg] <= fw_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_q <= '1;
    end else begin
      for (int k = 0; k < NSLICES; k++)
        if (wr_en[k]) rdy_q[wr_preg[k]][k] <= 1'b1;
      if (fw_en) rdy_q[fw_preg] <= '1;
      for (int c = 0; c < NCLR; c++)
        if (clr_en[c]) rdy_q[clr_preg[c]] <= '0;
      rdy_q[0] <= '1;
    end
  end

  always_comb begin
    ready = rdy_q;
    for (int k = 0; k < NSLICES; k++) begin
      for (int r = 0; r < 2; r++) rd_data[k][r] = mem[rd_preg[k][r]][k];
      lk_data[k] = '0;
      if (lk_from_upper[k]) begin
        if (k + 1 < NSLICES) lk_data[k] = lnk[lk_preg[k]][k + 1];
      end else begin
        if (k > 0) lk_data[k] = lnk[lk_preg[k]][k - 1];
      end
    end
    for (int f = 0; f < NFR; f++) fr_data[f] = mem[fr_preg[f]];
  end
endmodule
