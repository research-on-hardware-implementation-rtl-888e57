// hough_bank: one of the N_PAR parallel Hough-space modules, with its voting
// and threshold (peak) logic.
//
// The bank holds the votes of the K angles of its computing unit. Because the
// angles advance in regular steps, the two-dimensional (rho, theta) slice is
// stored as a one-dimensional array, address = k*N_RHO + rho_idx.
//
// Voting is a read-modify-write spread over two cycles of clk, the memory
// clock, which runs at twice the rate of vote operations:
//   cycle 0 (issue high): the counter at the vote address is read;
//   cycle 1: the counter plus one (saturating) is written back. If it is now
//            larger than thr, a peak event (rho_idx, theta_idx, votes) is
//            output for this cycle, and the counter is written as zero instead
//            when zero_on_peak is set (it keeps counting when clear).
// Successive votes of one bank go to different angle rows and an operation is
// finished before the next is issued, so the pipeline has no address hazard.
//
// A second write port clears the word at clr_addr whenever clr_en is high:
// it is driven, in parallel for all banks, by hough_init_ctrl, which sweeps
// the whole space in the background of voting. A vote must not touch a word
// that the sweep has not reached yet: `cleared` tells the issuing logic
// whether the address currently presented may be voted on.
//
// Two-cycle voting, the clear sweep and the threshold rule follow the
// architecture; the port arrangement, saturation and zero_on_peak select are
// this design's choices.
module hough_bank
  import ht_pkg::*;
#(
  parameter int IMG_W   = DEF_IMG_W,
  parameter int IMG_H   = DEF_IMG_H,
  parameter int N_THETA = DEF_N_THETA,
  parameter int N_PAR   = DEF_N_PAR,
  parameter int UNIT    = 0,
  parameter int VW      = DEF_VW,
  localparam int K      = N_THETA / N_PAR,
  localparam int KW     = (K > 1) ? $clog2(K) : 1,
  localparam int NR     = n_rho(IMG_W, IMG_H),
  localparam int RW     = $clog2(NR),
  localparam int TW     = $clog2(N_THETA),
  localparam int DEPTH  = K * NR,
  localparam int AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // vote request (address = k*NR + rho_idx)
  input  logic          issue,
  input  logic [KW-1:0] k,
  input  logic [RW-1:0] rho_idx,
  output logic          cleared,
  // configuration
  input  logic [VW-1:0] thr,
  input  logic          zero_on_peak,
  // background initialisation
  input  logic          clr_busy,
  input  logic          clr_en,
  input  logic [AW-1:0] clr_addr,
  // peak event, valid for one cycle
  output logic          ev_valid,
  output logic [RW-1:0] ev_rho,
  output logic [TW-1:0] ev_theta,
  output logic [VW-1:0] ev_votes
);

  logic [VW-1:0] mem [DEPTH];

  logic [AW-1:0] addr;
  logic          op_v;
  logic [AW-1:0] op_addr;
  logic [KW-1:0] op_k;
  logic [RW-1:0] op_rho;
  logic [VW-1:0] rd;
  logic [VW-1:0] inc;
  logic          hit;

  always_comb begin
    addr    = AW'(k) * AW'(NR) + AW'(rho_idx);
    cleared = !clr_busy || (addr < clr_addr);
  end

  always_comb begin
    inc      = (rd == '1) ? rd : rd + 1'b1;
    hit      = op_v && (inc > thr);
    ev_valid = hit;
    ev_rho   = op_rho;
    ev_theta = TW'(UNIT * K) + TW'(op_k);
    ev_votes = inc;
  end

  always_ff @(posedge clk) begin
    if (issue) rd <= mem[addr];
    if (op_v) mem[op_addr] <= (hit && zero_on_peak) ? '0 : inc;
    if (clr_en) mem[clr_addr] <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_v    <= 1'b0;
      op_addr <= '0;
      op_k    <= '0;
      op_rho  <= '0;
    end else begin
      op_v <= issue;
      if (issue) begin
        op_addr <= addr;
        op_k    <= k;
        op_rho  <= rho_idx;
      end
    end
  end

  // A vote never lands on a word the sweep has still to clear, and the sweep
  // never writes the word being voted on.
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> cleared);
  assert property (@(posedge clk) disable iff (!rst_n) issue |=> !op_v || !issue);
  assert property (@(posedge clk) disable iff (!rst_n) (op_v && clr_en) |-> op_addr != clr_addr);

endmodule
