// tb_hough_top: end-to-end test of the line detector at its default size
// (640x480 image, 180 angles, 30 parallel units and banks).
//
// A reference Hough accumulator here (its own sin/cos tables, computed from
// the angle) predicts every (rho, theta, count) that must be reported as a
// threshold peak; the reported peaks are compared with it as a multiset per
// frame. The peaks, in the order the detector passed them on, are run through
// a reference of the local-maximum rules and the line readout must match it.
// Three frames:
//   A  lms_en=1, three straight lines plus noise, pixels sent right after
//      frame_start (votes wait for the background initialisation); each true
//      line must be found within 2 bins;
//   B  lms_en=1, a small blob repeated with a low threshold: every bank
//      reports at once (peak FIFOs fill and voting waits) and the
//      candidate table overflows;
//   C  lms_en=0 (bins zeroed when reported), pixels sent after the
//      initialisation ended: every pixel must take exactly 2*K clocks.
// Every mechanism (initialisation stall, FIFO stall, zeroing, window insert /
// move / drop, table overflow, mode switch) must occur at least once.
module tb_hough_top;
  import ht_pkg::*;
  localparam int W = DEF_IMG_W, H = DEF_IMG_H, NT = DEF_N_THETA, NP = DEF_N_PAR;
  localparam int K = NT / NP;
  localparam int RMAX = rho_max(W, H);
  localparam int NR = 2 * RMAX + 1;
  localparam int ML = DEF_MAX_LINES;
  localparam int HW = DEF_WIN / 2;
  localparam int VMAX = (1 << DEF_VW) - 1;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [9:0] thr;
  logic lms_en, frame_start, start_ready, frame_end, frame_done;
  logic in_valid, in_ready;
  logic [9:0] in_x;
  logic [8:0] in_y;
  logic peak_valid, line_valid;
  logic [10:0] peak_rho, line_rho;
  logic [7:0] peak_theta, line_theta;
  logic [9:0] peak_votes, line_votes;
  logic init_busy, stall_init, stall_fifo, lms_overflow, lms_insert, lms_move, lms_drop;

  always #5 clk = ~clk;

  hough_top dut (.*);

  // ---------------- reference
  int cq [NT], sq [NT];
  int acc [NT][NR];
  int exp_pk [longint];
  typedef struct { bit v; int r, t, c; } cand_t;
  cand_t m [ML];
  int px [$], py [$];

  function automatic longint key(int t, int r, int c);
    return (longint'(t) << 32) | (longint'(r) << 16) | longint'(c);
  endfunction

  function automatic void ref_vote(int x, int y, bit lms, int th);
    for (int t = 0; t < NT; t++) begin
      longint s;
      int r, nv;
      s = longint'(x) * cq[t] + longint'(y) * sq[t];
      r = int'(s >>> DEF_FRAC) + RMAX;
      nv = (acc[t][r] == VMAX) ? VMAX : acc[t][r] + 1;
      if (nv > th) begin
        exp_pk[key(t, r, nv)] = exp_pk.exists(key(t, r, nv)) ? exp_pk[key(t, r, nv)] + 1 : 1;
        acc[t][r] = lms ? nv : 0;
      end else acc[t][r] = nv;
    end
  endfunction

  function automatic void ref_lms(int r, int t, int c);
    int hit, fr;
    hit = -1; fr = -1;
    for (int i = 0; i < ML; i++) begin
      if (hit < 0 && m[i].v && r - m[i].r <= HW && m[i].r - r <= HW && t - m[i].t <= HW && m[i].t - t <= HW) hit = i;
      if (fr < 0 && !m[i].v) fr = i;
    end
    if (hit >= 0) begin
      if (c > m[hit].c) m[hit] = '{1, r, t, c};
    end else if (fr >= 0) m[fr] = '{1, r, t, c};
  endfunction

  // ---------------- mechanism counters
  int n_stall_init = 0, n_stall_fifo = 0, n_zeroed = 0, n_ins = 0, n_mov = 0, n_drp = 0;
  int n_ovf = 0, n_switch = 0, n_peaks = 0;
  bit ovf_q = 0;
  bit cur_lms;
  int cur_thr;
  int lines_r [$], lines_t [$], lines_c [$];

  always @(posedge clk) if (rst_n) begin
    if (stall_init) n_stall_init++;
    if (stall_fifo) n_stall_fifo++;
    if (lms_insert) n_ins++;
    if (lms_move) n_mov++;
    if (lms_drop) n_drp++;
    if (lms_overflow && !ovf_q) n_ovf++;
    ovf_q <= lms_overflow;
    if (peak_valid) begin
      longint kk;
      n_peaks++;
      kk = key(int'(peak_theta), int'(peak_rho), int'(peak_votes));
      if (exp_pk.exists(kk) && exp_pk[kk] > 0) exp_pk[kk]--;
      else begin
        failures++;
        if (failures < 20) $display("FAIL unexpected peak t%0d r%0d v%0d", peak_theta, peak_rho, peak_votes);
      end
      checks++;
      if (!cur_lms) begin
        if (int'(peak_votes) == cur_thr + 1) n_zeroed++;
        else failures++;
      end
      ref_lms(int'(peak_rho), int'(peak_theta), int'(peak_votes));
    end
    if (line_valid) begin
      lines_r.push_back(int'(line_rho)); lines_t.push_back(int'(line_theta)); lines_c.push_back(int'(line_votes));
    end
  end

  // ---------------- rate measurement
  // (the first interval of a frame depends on the vote phase and is skipped)
  int cyc = 0, last_acc = -1, n_rate = 0, n_acc = 0;
  bit stalled_since, measure_rate;
  always @(posedge clk) begin
    cyc++;
    if (stall_init || stall_fifo) stalled_since = 1;
    if (in_valid && in_ready) begin
      n_acc++;
      if (measure_rate && n_acc > 2 && !stalled_since) begin
        checks++; n_rate++;
        if (cyc - last_acc != 2 * K) begin failures++; $display("FAIL pixel interval %0d", cyc - last_acc); end
      end
      last_acc = cyc;
      stalled_since = 0;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus helpers
  task automatic add_line(int deg, int rho, int len, int start);
    real a, c, s;
    int n;
    a = real'(deg) * 3.14159265358979 / 180.0;
    c = $cos(a); s = $sin(a);
    n = 0;
    if (s * s > c * c) begin
      for (int x = start; x < W && n < len; x++) begin
        int y;
        y = $rtoi($floor((real'(rho) - real'(x) * c) / s + 0.5));
        if (y >= 0 && y < H) begin px.push_back(x); py.push_back(y); n++; end
      end
    end else begin
      for (int y = start; y < H && n < len; y++) begin
        int x;
        x = $rtoi($floor((real'(rho) - real'(y) * s) / c + 0.5));
        if (x >= 0 && x < W) begin px.push_back(x); py.push_back(y); n++; end
      end
    end
  endtask

  task automatic shuffle_noise(int n);
    for (int i = 0; i < n; i++) begin
      int pos;
      pos = int'($urandom_range(px.size()));
      px.insert(pos, int'($urandom_range(W - 1)));
      py.insert(pos, int'($urandom_range(H - 1)));
    end
  endtask

  task automatic run_frame(bit lms, int th, bit wait_init);
    if (cur_lms != lms) n_switch++;
    cur_lms = lms; cur_thr = th;
    @(negedge clk);
    lms_en = lms; thr = 10'(th);
    foreach (acc[t, r]) acc[t][r] = 0;
    exp_pk.delete();
    foreach (m[i]) m[i] = '{0, 0, 0, 0};
    lines_r.delete(); lines_t.delete(); lines_c.delete();
    while (!start_ready) @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    if (wait_init) while (init_busy) @(negedge clk);
    measure_rate = wait_init;
    last_acc = -1; n_acc = 0;
    foreach (px[i]) begin
      ref_vote(px[i], py[i], lms, th);
      in_valid = 1; in_x = 10'(px[i]); in_y = 9'(py[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    measure_rate = 0;
    frame_end = 1;
    @(negedge clk);
    frame_end = 0;
    while (!frame_done) @(negedge clk);
    @(negedge clk);
    // every predicted peak reported
    checks++;
    foreach (exp_pk[kk]) if (exp_pk[kk] != 0) begin
      failures++;
      $display("FAIL missing peak t%0d r%0d v%0d", kk >> 32, (kk >> 16) & 64'hffff, kk & 64'hffff);
      break;
    end
    // line readout equals the local-maximum reference, in table order
    begin
      int j;
      j = 0;
      for (int i = 0; i < ML; i++) if (m[i].v) begin
        checks++;
        if (j >= lines_r.size() || lines_r[j] != m[i].r || lines_t[j] != m[i].t || lines_c[j] != m[i].c) begin
          failures++;
          $display("FAIL line %0d mismatch", j);
        end
        j++;
      end
      checks++;
      if (j != lines_r.size()) begin failures++; $display("FAIL %0d lines, expected %0d", lines_r.size(), j); end
    end
  endtask

  task automatic expect_line(int deg, int rho);
    bit found;
    found = 0;
    foreach (lines_r[i])
      if (lines_r[i] - (rho + RMAX) <= 2 && (rho + RMAX) - lines_r[i] <= 2 &&
          lines_t[i] - deg <= 2 && deg - lines_t[i] <= 2) found = 1;
    checks++;
    if (!found) begin failures++; $display("FAIL line theta %0d rho %0d not detected", deg, rho); end
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin
      real a;
      a = real'(t) * 3.14159265358979 / real'(NT);
      cq[t] = $rtoi($floor($cos(a) * 65536.0 + 0.5));
      sq[t] = $rtoi($floor($sin(a) * 65536.0 + 0.5));
    end
    thr = 0; lms_en = 1; cur_lms = 1; frame_start = 0; frame_end = 0;
    in_valid = 0; in_x = 0; in_y = 0; measure_rate = 0; stalled_since = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // frame A: three lines and noise, local maximum search on
    px.delete(); py.delete();
    add_line(30, 200, 300, 0);
    add_line(100, 150, 300, 0);
    add_line(150, -100, 300, 0);
    shuffle_noise(150);
    run_frame(1'b1, 120, 1'b0);
    expect_line(30, 200);
    expect_line(100, 150);
    expect_line(150, -100);

    // frame B: repeated blob, low threshold
    px.delete(); py.delete();
    for (int rep = 0; rep < 6; rep++)
      for (int d = 0; d < 9; d++) begin px.push_back(300 + d % 3); py.push_back(200 + d / 3); end
    run_frame(1'b1, 3, 1'b0);

    // frame C: zeroing mode, sent after initialisation
    px.delete(); py.delete();
    add_line(60, 250, 250, 0);
    add_line(135, -50, 250, 0);
    shuffle_noise(50);
    run_frame(1'b0, 40, 1'b1);

    $display("mechanisms: stall_init=%0d stall_fifo=%0d zeroed=%0d insert=%0d move=%0d drop=%0d overflow=%0d switch=%0d peaks=%0d rate_checks=%0d",
             n_stall_init, n_stall_fifo, n_zeroed, n_ins, n_mov, n_drp, n_ovf, n_switch, n_peaks, n_rate);
    checks += 10;
    if (n_stall_init == 0) begin failures++; $display("FAIL no initialisation stall"); end
    if (n_stall_fifo == 0) begin failures++; $display("FAIL no FIFO stall"); end
    if (n_zeroed == 0) begin failures++; $display("FAIL no zeroed peak"); end
    if (n_ins == 0) begin failures++; $display("FAIL no window insert"); end
    if (n_mov == 0) begin failures++; $display("FAIL no window move"); end
    if (n_drp == 0) begin failures++; $display("FAIL no window drop"); end
    if (n_ovf == 0) begin failures++; $display("FAIL no table overflow"); end
    if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    if (n_rate < 100) begin failures++; $display("FAIL too few rate checks"); end
    if (n_peaks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
