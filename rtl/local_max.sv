// local_max: local-maximum search that runs alongside the voting.
//
// A plain threshold leaves clusters of neighbouring (rho, theta) bins above
// it around every real line. This unit keeps a table of up to MAX_LINES
// candidate peaks, each the centre of an A x A window of the Hough space.
// Only bins that have crossed the threshold are ever compared, so instead of
// scanning every window of the space after the frame, each incoming peak
// event (rho, theta, votes) is handled in one cycle as it arrives:
//   - it lies in the window of a candidate (|d rho| <= A/2 and
//     |d theta| <= A/2; the first such candidate is used): if its vote count
//     is larger, the candidate's centre moves to it, otherwise it is dropped;
//   - it lies in no window: it becomes a new candidate in a free entry, or,
//     if the table is full, it is dropped and `overflow` is set until the
//     next readout.
// When the frame's voting is over, flush starts the readout: the valid
// candidates leave on line_valid, one per cycle, the table is emptied and
// done pulses. in_ready is low during the readout.
//
// Following only the windows that contain peaks and moving their centres to
// the best peak follow the architecture; the table size, first-match rule,
// theta not wrapping around at 180 degrees and the readout protocol are this
// design's choices.
module local_max #(
  parameter int RW        = 11,
  parameter int TW        = 8,
  parameter int VW        = 10,
  parameter int A         = 5,
  parameter int MAX_LINES = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [RW-1:0] in_rho,
  input  logic [TW-1:0] in_theta,
  input  logic [VW-1:0] in_votes,
  input  logic          flush,
  output logic          line_valid,
  output logic [RW-1:0] line_rho,
  output logic [TW-1:0] line_theta,
  output logic [VW-1:0] line_votes,
  output logic          done,
  output logic          overflow,
  // activity, one-cycle pulses (for monitoring)
  output logic          ev_insert,
  output logic          ev_move,
  output logic          ev_drop
);

  localparam int H  = A / 2;
  localparam int IW = (MAX_LINES > 1) ? $clog2(MAX_LINES) : 1;

  typedef struct packed {
    logic          v;
    logic [RW-1:0] rho;
    logic [TW-1:0] theta;
    logic [VW-1:0] votes;
  } cand_t;

  cand_t tab [MAX_LINES];

  logic          reading;
  logic [IW:0]   rd_idx;

  logic          take;
  logic          match, has_free;
  logic [IW-1:0] m_idx, f_idx;

  function automatic logic near(logic [RW-1:0] r0, logic [TW-1:0] t0,
                                logic [RW-1:0] r1, logic [TW-1:0] t1);
    int dr, dt;
    dr = int'(r0) - int'(r1);
    dt = int'(t0) - int'(t1);
    return (dr <= H) && (dr >= -H) && (dt <= H) && (dt >= -H);
  endfunction

  assign in_ready = !reading;
  assign take     = in_valid && in_ready;

  always_comb begin
    match    = 1'b0;
    m_idx    = '0;
    has_free = 1'b0;
    f_idx    = '0;
    for (int i = MAX_LINES - 1; i >= 0; i--) begin
      if (tab[i].v && near(in_rho, in_theta, tab[i].rho, tab[i].theta)) begin
        match = 1'b1;
        m_idx = IW'(i);
      end
      if (!tab[i].v) begin
        has_free = 1'b1;
        f_idx    = IW'(i);
      end
    end
  end

  always_comb begin
    ev_insert = take && !match && has_free;
    ev_move   = take && match && (in_votes > tab[m_idx].votes);
    ev_drop   = take && !ev_insert && !ev_move;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_LINES; i++) tab[i] <= '0;
      reading    <= 1'b0;
      rd_idx     <= '0;
      overflow   <= 1'b0;
      line_valid <= 1'b0;
      line_rho   <= '0;
      line_theta <= '0;
      line_votes <= '0;
      done       <= 1'b0;
    end else begin
      line_valid <= 1'b0;
      done       <= 1'b0;
      if (reading) begin
        if (rd_idx == (IW + 1)'(MAX_LINES)) begin
          reading  <= 1'b0;
          done     <= 1'b1;
          overflow <= 1'b0;
        end else begin
          line_valid <= tab[rd_idx[IW-1:0]].v;
          line_rho   <= tab[rd_idx[IW-1:0]].rho;
          line_theta <= tab[rd_idx[IW-1:0]].theta;
          line_votes <= tab[rd_idx[IW-1:0]].votes;
          tab[rd_idx[IW-1:0]].v <= 1'b0;
          rd_idx <= rd_idx + 1'b1;
        end
      end else if (flush) begin
        reading <= 1'b1;
        rd_idx  <= '0;
      end else if (take) begin
        if (ev_insert) tab[f_idx] <= '{v: 1'b1, rho: in_rho, theta: in_theta, votes: in_votes};
        else if (ev_move) tab[m_idx] <= '{v: 1'b1, rho: in_rho, theta: in_theta, votes: in_votes};
        else if (!match) overflow <= 1'b1;
      end
    end
  end

  // flush is only given while no peak is arriving
  assert property (@(posedge clk) disable iff (!rst_n) flush |-> !in_valid);

endmodule
