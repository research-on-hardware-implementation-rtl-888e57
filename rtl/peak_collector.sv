// peak_collector: merges the peak events of the N parallel Hough banks into
// one stream.
//
// Several banks can cross the threshold in the same cycle, so each bank
// writes its events into a small FIFO of its own. A round-robin arbiter then
// forwards one event per cycle on out_valid/out_ready, starting its search
// after the bank it served last. any_full is high when some FIFO is full; the
// issuing logic then holds back new votes, so no event is ever lost.
// The merge structure is this design's choice: the architecture only requires
// that every (rho, theta) crossing the threshold is reported.
module peak_collector #(
  parameter int N     = 30,
  parameter int W     = 28,
  parameter int DEPTH = 4,
  localparam int NW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ev_valid,
  input  logic [W-1:0] ev_data [N],
  output logic         any_full,
  output logic         all_empty,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic [N-1:0] empty, full, pop;
  logic [W-1:0] dout [N];
  logic [NW-1:0] last, sel;
  logic          found;

  for (genvar i = 0; i < N; i++) begin : g_fifo
    sync_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n),
      .push(ev_valid[i]), .din(ev_data[i]),
      .pop(pop[i]), .dout(dout[i]),
      .empty(empty[i]), .full(full[i])
    );
  end

  // Round robin: first non-empty FIFO after `last`.
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int j = 1; j <= N; j++) begin
      int idx;
      idx = (int'(last) + j) % N;
      if (!found && !empty[idx]) begin
        found = 1'b1;
        sel   = NW'(idx);
      end
    end
  end

  always_comb begin
    pop = '0;
    if (found && out_ready) pop[sel] = 1'b1;
  end

  assign out_valid = found;
  assign out_data  = dout[sel];
  assign any_full  = |full;
  assign all_empty = &empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= NW'(N - 1);
    else if (found && out_ready) last <= sel;
  end

endmodule
