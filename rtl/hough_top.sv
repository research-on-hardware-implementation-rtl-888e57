// hough_top: real-time straight-line detector based on the Hough transform.
//
// Feature (edge) pixels of a frame arrive as (x, y) on a valid/ready stream.
// For each pixel the sequencer steps a local angle counter k through K =
// N_THETA/N_PAR steps; in every step the N_PAR computing units (rho_unit,
// each with its own slice of the sin/cos tables) compute rho for angles
// i*K + k in parallel, and each unit votes in its own Hough bank. A bin whose
// count exceeds thr is reported at once as a peak (rho_idx, theta_idx,
// votes); with lms_en low the bin is then zeroed, with lms_en high it keeps
// counting and the local-maximum unit follows the peaks during voting, so
// that when the frame ends only the best bin of each A x A neighbourhood is
// left to read out on line_*.
//
// Clocking: clk is the Hough-memory clock. A vote is a two-cycle
// read-modify-write, so votes are issued on every second clk cycle (phase 0)
// and the memories' second port is free for the background initialisation:
// frame_start starts a sweep that zeroes every bank in parallel, one word per
// cycle, while the new frame is already being voted; a vote waits only if its
// word has not been swept yet (stall_init). Peaks of the banks are merged by
// peak_collector; when one of its FIFOs is full, issuing waits (stall_fifo).
//
// Frame protocol: frame_start is taken when start_ready is high. Pixels are
// then taken until frame_end (a one-cycle pulse, no pixel offered with or
// after it). When all votes and peaks are done the candidate lines are read
// out (line_valid, one per cycle, no back-pressure) and frame_done pulses;
// start_ready rises again once the initialisation sweep is also over.
// rho_idx = rho + RHO_MAX (rho in pixels, origin at pixel (0,0)), theta_idx
// in steps of 180/N_THETA degrees.
//
// The LUT-based rho computation, n-way split of units and Hough space, 1-D
// mapping, voting with threshold and zeroing, background initialisation with
// a doubled memory clock and the concurrent local-maximum search follow the
// architecture. All sizes other than the VGA image, the interfaces, the stall
// rules and the peak merge are this design's choices.
module hough_top
  import ht_pkg::*;
#(
  parameter int IMG_W     = DEF_IMG_W,
  parameter int IMG_H     = DEF_IMG_H,
  parameter int N_THETA   = DEF_N_THETA,
  parameter int N_PAR     = DEF_N_PAR,
  parameter int FRAC      = DEF_FRAC,
  parameter int VW        = DEF_VW,
  parameter int WIN       = DEF_WIN,
  parameter int MAX_LINES = DEF_MAX_LINES,
  parameter int FIFO_D    = DEF_FIFO_D,
  localparam int K        = N_THETA / N_PAR,
  localparam int KW       = (K > 1) ? $clog2(K) : 1,
  localparam int XW       = $clog2(IMG_W),
  localparam int YW       = $clog2(IMG_H),
  localparam int NR       = n_rho(IMG_W, IMG_H),
  localparam int RW       = $clog2(NR),
  localparam int TW       = $clog2(N_THETA),
  localparam int DEPTH    = K * NR,
  localparam int AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration
  input  logic [VW-1:0] thr,
  input  logic          lms_en,
  // frame control
  input  logic          frame_start,
  output logic          start_ready,
  input  logic          frame_end,
  output logic          frame_done,
  // feature pixels
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  // threshold peaks, as they are found
  output logic          peak_valid,
  output logic [RW-1:0] peak_rho,
  output logic [TW-1:0] peak_theta,
  output logic [VW-1:0] peak_votes,
  // local maxima, read out at the end of a frame
  output logic          line_valid,
  output logic [RW-1:0] line_rho,
  output logic [TW-1:0] line_theta,
  output logic [VW-1:0] line_votes,
  // status
  output logic          init_busy,
  output logic          stall_init,
  output logic          stall_fifo,
  output logic          lms_overflow,
  output logic          lms_insert,   // a peak opened a new candidate window
  output logic          lms_move,     // a peak moved a window centre
  output logic          lms_drop      // a peak was weaker than its window centre
);

  localparam int EW = RW + TW + VW;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_READ} state_t;
  state_t state;

  // ---------------- frame control
  logic          ph;          // 0: vote issue slot, 1: vote write-back slot
  logic          seq_busy;
  logic          s1_valid;    // computed rho waiting to issue
  logic [KW-1:0] s1_k;
  logic          inflight;    // a vote in its write-back cycle
  logic          coll_empty;
  logic          lms_ready, lms_done, lms_flush;

  assign start_ready = (state == S_IDLE) && !init_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:  if (frame_start && start_ready) state <= S_RUN;
        S_RUN:   if (frame_end) state <= S_DRAIN;
        S_DRAIN: if (lms_flush) state <= S_READ;
        S_READ:  if (lms_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign lms_flush  = (state == S_DRAIN) && !seq_busy && !s1_valid && !inflight
                      && coll_empty && lms_ready;
  assign frame_done = lms_done;

  // ---------------- background initialisation
  logic          clr_en;
  logic [AW-1:0] clr_addr;

  hough_init_ctrl #(.DEPTH(DEPTH)) u_init (
    .clk(clk), .rst_n(rst_n),
    .start(frame_start && start_ready),
    .busy(init_busy), .clr_en(clr_en), .clr_addr(clr_addr)
  );

  // ---------------- angle sequencing
  logic          op_valid, op_ready;
  logic [XW-1:0] op_x;
  logic [YW-1:0] op_y;
  logic [KW-1:0] op_k;
  logic          seq_in_valid, seq_in_ready;

  assign seq_in_valid = in_valid && (state == S_RUN);
  assign in_ready     = seq_in_ready && (state == S_RUN);

  ht_sequencer #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_THETA(N_THETA), .N_PAR(N_PAR)) u_seq (
    .clk(clk), .rst_n(rst_n),
    .in_valid(seq_in_valid), .in_ready(seq_in_ready), .in_x(in_x), .in_y(in_y),
    .op_valid(op_valid), .op_ready(op_ready), .op_x(op_x), .op_y(op_y), .op_k(op_k),
    .busy(seq_busy)
  );

  // ---------------- issue control
  logic [N_PAR-1:0] bank_cleared;
  logic             all_cleared, coll_full, issue, s1_load;

  assign all_cleared = &bank_cleared;
  assign issue       = !ph && s1_valid && all_cleared && !coll_full;
  assign op_ready    = !s1_valid || issue;
  assign s1_load     = op_valid && op_ready;
  assign stall_init  = !ph && s1_valid && !all_cleared;
  assign stall_fifo  = !ph && s1_valid && all_cleared && coll_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= 1'b0;
      s1_valid <= 1'b0;
      s1_k     <= '0;
      inflight <= 1'b0;
    end else begin
      ph       <= !ph;
      inflight <= issue;
      if (s1_load) begin
        s1_valid <= 1'b1;
        s1_k     <= op_k;
      end else if (issue) begin
        s1_valid <= 1'b0;
      end
    end
  end

  // ---------------- computing units and Hough banks
  logic [N_PAR-1:0] ev_valid;
  logic [EW-1:0]    ev_data [N_PAR];

  for (genvar i = 0; i < N_PAR; i++) begin : g_unit
    logic [RW-1:0] rho_idx;
    logic [RW-1:0] e_rho;
    logic [TW-1:0] e_theta;
    logic [VW-1:0] e_votes;

    rho_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_THETA(N_THETA), .N_PAR(N_PAR),
               .UNIT(i), .FRAC(FRAC)) u_rho (
      .clk(clk), .ld(s1_load), .x(op_x), .y(op_y), .k(op_k), .rho_idx(rho_idx)
    );

    hough_bank #(.IMG_W(IMG_W), .IMG_H(IMG_H), .N_THETA(N_THETA), .N_PAR(N_PAR),
                 .UNIT(i), .VW(VW)) u_bank (
      .clk(clk), .rst_n(rst_n),
      .issue(issue), .k(s1_k), .rho_idx(rho_idx), .cleared(bank_cleared[i]),
      .thr(thr), .zero_on_peak(!lms_en),
      .clr_busy(init_busy), .clr_en(clr_en), .clr_addr(clr_addr),
      .ev_valid(ev_valid[i]), .ev_rho(e_rho), .ev_theta(e_theta), .ev_votes(e_votes)
    );

    assign ev_data[i] = {e_rho, e_theta, e_votes};
  end

  // ---------------- peak merge
  logic          pk_valid;
  logic [EW-1:0] pk_data;

  peak_collector #(.N(N_PAR), .W(EW), .DEPTH(FIFO_D)) u_coll (
    .clk(clk), .rst_n(rst_n),
    .ev_valid(ev_valid), .ev_data(ev_data),
    .any_full(coll_full), .all_empty(coll_empty),
    .out_valid(pk_valid), .out_ready(lms_ready), .out_data(pk_data)
  );

  assign peak_valid = pk_valid && lms_ready;
  assign {peak_rho, peak_theta, peak_votes} = pk_data;

  // ---------------- local-maximum search

  local_max #(.RW(RW), .TW(TW), .VW(VW), .A(WIN), .MAX_LINES(MAX_LINES)) u_lms (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pk_valid), .in_ready(lms_ready),
    .in_rho(peak_rho), .in_theta(peak_theta), .in_votes(peak_votes),
    .flush(lms_flush),
    .line_valid(line_valid), .line_rho(line_rho), .line_theta(line_theta),
    .line_votes(line_votes), .done(lms_done), .overflow(lms_overflow),
    .ev_insert(lms_insert), .ev_move(lms_move), .ev_drop(lms_drop)
  );

  // pixels are offered only while a frame is open
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> state == S_RUN);

endmodule
