// tb_hough_bank: one small bank (16x12 image, 8 angles over 2 banks, this is
// bank 1, so K = 4 rows of 41 bins). A reference array here mirrors the
// votes. The bank is first cleared through its clear port (starting from
// random contents), then random votes are issued one per two cycles; every
// vote must yield a peak event exactly when the new count exceeds thr, with
// the right rho, theta and count, in the cycle after issue; with zero_on_peak
// the bin must restart from zero. The `cleared` flag is checked against the
// sweep position, and a final sweep must leave every bin at zero.
module tb_hough_bank;
  localparam int NR = 41, K = 4, DEPTH = NR * K, UNIT = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic issue, cleared, zero_on_peak, clr_busy, clr_en, ev_valid;
  logic [1:0] k;
  logic [5:0] rho_idx, ev_rho;
  logic [3:0] thr;
  logic [7:0] clr_addr;
  logic [2:0] ev_theta;
  logic [3:0] ev_votes;
  always #5 clk = ~clk;

  hough_bank #(.IMG_W(16), .IMG_H(12), .N_THETA(8), .N_PAR(2), .UNIT(UNIT), .VW(4)) dut (.*);

  int model [DEPTH];
  int n_peaks = 0, n_sat = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    @(negedge clk);
    clr_busy = 1;
    for (int a = 0; a < DEPTH; a++) begin
      clr_en = 1; clr_addr = 8'(a);
      // cleared: only addresses below the sweep may be voted
      k = 2'($urandom_range(K - 1)); rho_idx = 6'($urandom_range(NR - 1));
      #1;
      checks++;
      if (cleared != (int'(k) * NR + int'(rho_idx) < a)) begin
        failures++; $display("FAIL cleared flag a=%0d k=%0d r=%0d", a, k, rho_idx);
      end
      @(negedge clk);
    end
    clr_en = 0; clr_busy = 0;
    foreach (model[i]) model[i] = 0;
  endtask

  task automatic votes(int n, bit zop, int th);
    zero_on_peak = zop; thr = 4'(th);
    for (int i = 0; i < n; i++) begin
      int kk, rr, a, nv;
      kk = int'($urandom_range(K - 1));
      rr = int'($urandom_range(7));  // few bins, so counts build up
      a = kk * NR + rr;
      @(negedge clk);
      issue = 1; k = 2'(kk); rho_idx = 6'(rr);
      @(negedge clk);
      issue = 0;
      nv = (model[a] == 15) ? 15 : model[a] + 1;
      if (nv == 15) n_sat++;
      checks++;
      if (ev_valid != (nv > th)) begin
        failures++; $display("FAIL ev_valid=%0d count %0d thr %0d", ev_valid, nv, th);
      end
      if (nv > th) begin
        n_peaks++;
        checks++;
        if (int'(ev_rho) != rr || int'(ev_theta) != UNIT * K + kk || int'(ev_votes) != nv) begin
          failures++; $display("FAIL event r%0d t%0d v%0d exp r%0d t%0d v%0d", ev_rho, ev_theta, ev_votes, rr, UNIT*K+kk, nv);
        end
        model[a] = zop ? 0 : nv;
      end else model[a] = nv;
    end
  endtask

  initial begin
    issue = 0; k = 0; rho_idx = 0; thr = 0; zero_on_peak = 1;
    clr_busy = 0; clr_en = 0; clr_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    sweep();
    votes(600, 1'b1, 5);
    votes(600, 1'b0, 9);
    // read back every bin through one vote with a huge threshold
    sweep();
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      issue = 1; k = 2'(a / NR); rho_idx = 6'(a % NR); thr = 0;
      @(negedge clk);
      issue = 0;
      checks++;
      if (!ev_valid || ev_votes != 1) begin failures++; $display("FAIL bin %0d not cleared", a); end
    end
    checks++;
    if (n_peaks < 50 || n_sat < 5) begin failures++; $display("FAIL coverage %0d %0d", n_peaks, n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
