// tb_local_max: window A = 5, table of 4 candidates. Peaks are drawn around a
// few cluster centres (with rising and falling counts) plus scattered ones
// that fill the table. A reference model here applies the rules: a peak in a
// window (|d rho|,|d theta| <= 2, first candidate in table order) replaces the
// centre if its count is larger; otherwise it opens a window in the lowest
// free entry, or is dropped with overflow set. After flush the lines must come
// out in table order, one per cycle, then done, with the table empty.
module tb_local_max;
  localparam int ML = 4, H = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, flush, line_valid, done, overflow;
  logic ev_insert, ev_move, ev_drop;
  logic [10:0] in_rho, line_rho;
  logic [7:0] in_theta, line_theta;
  logic [9:0] in_votes, line_votes;
  always #5 clk = ~clk;

  local_max #(.RW(11), .TW(8), .VW(10), .A(5), .MAX_LINES(ML)) dut (.*);

  typedef struct { bit v; int r, t, c; } cand_t;
  cand_t m [ML];
  bit m_ovf;
  int n_ins = 0, n_mov = 0, n_drp = 0, n_ovf = 0;

  function automatic bit near(int r0, int t0, int r1, int t1);
    return (r0 - r1 <= H) && (r1 - r0 <= H) && (t0 - t1 <= H) && (t1 - t0 <= H);
  endfunction

  function automatic void model(int r, int t, int c);
    int hit, fr;
    hit = -1; fr = -1;
    for (int i = 0; i < ML; i++) begin
      if (hit < 0 && m[i].v && near(r, t, m[i].r, m[i].t)) hit = i;
      if (fr < 0 && !m[i].v) fr = i;
    end
    if (hit >= 0) begin
      if (c > m[hit].c) begin m[hit] = '{1, r, t, c}; n_mov++; end else n_drp++;
    end else if (fr >= 0) begin m[fr] = '{1, r, t, c}; n_ins++; end
    else begin m_ovf = 1; n_drp++; n_ovf++; end
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int n_clusters, int n_peaks);
    int cr [4], ct [4];
    for (int i = 0; i < 4; i++) begin cr[i] = 100 + 40 * i; ct[i] = 20 + 30 * i; end
    for (int p = 0; p < n_peaks; p++) begin
      int r, t, c, ci;
      if ($urandom_range(7) == 0) begin
        r = int'($urandom_range(1600)); t = int'($urandom_range(179));
      end else begin
        ci = int'($urandom_range(n_clusters - 1));
        r = cr[ci] + int'($urandom_range(6)) - 3;
        t = ct[ci] + int'($urandom_range(6)) - 3;
      end
      c = int'($urandom_range(1023));
      @(negedge clk);
      in_valid = 1; in_rho = 11'(r); in_theta = 8'(t); in_votes = 10'(c);
      #1;
      checks++;
      if (!in_ready) failures++;
      model(r, t, c);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (overflow != m_ovf) begin failures++; $display("FAIL overflow %0d", overflow); end
      if ($urandom_range(1) == 0) @(negedge clk);
    end
    // readout
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    for (int i = 0; i < ML; i++) begin
      #1;
      checks += 2;
      if (in_ready) failures++;
      @(posedge clk); #1;
      if (line_valid != m[i].v ||
          (m[i].v && (int'(line_rho) != m[i].r || int'(line_theta) != m[i].t || int'(line_votes) != m[i].c))) begin
        failures++;
        $display("FAIL line %0d: v%0d r%0d t%0d c%0d exp v%0d r%0d t%0d c%0d", i, line_valid, line_rho,
                 line_theta, line_votes, m[i].v, m[i].r, m[i].t, m[i].c);
      end
      @(negedge clk);
    end
    @(posedge clk); #1;
    checks += 2;
    if (!done) begin failures++; $display("FAIL done missing"); end
    if (overflow) failures++;
    foreach (m[i]) m[i].v = 0;
    m_ovf = 0;
    @(negedge clk);
  endtask

  // activity pulses agree with the model's decisions
  int d_ins = 0, d_mov = 0, d_drp = 0;
  always @(posedge clk) begin
    if (ev_insert) d_ins++;
    if (ev_move) d_mov++;
    if (ev_drop) d_drp++;
  end

  initial begin
    in_valid = 0; flush = 0; in_rho = 0; in_theta = 0; in_votes = 0; m_ovf = 0;
    foreach (m[i]) m[i] = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(2, 60);
    frame(4, 200);
    frame(1, 5);
    checks += 4;
    if (d_ins != n_ins || d_mov != n_mov || d_drp != n_drp) begin
      failures++; $display("FAIL pulses %0d/%0d %0d/%0d %0d/%0d", d_ins, n_ins, d_mov, n_mov, d_drp, n_drp);
    end
    if (n_mov == 0) failures++;
    if (n_drp == 0) failures++;
    if (n_ins == 0) failures++;
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL table never overflowed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
