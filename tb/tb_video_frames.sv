// tb_video_frames: whole video frames in the two formats the detector is
// meant for, fed as a raster-ordered stream of feature pixels right after
// frame_start.
//   VGA 640x480, default parameters, lms_en=1: a road scene with two lane
//     markings, a horizon edge and 3% random edge noise. The three lines must
//     be found within 2 bins by the local-maximum readout, and every reported
//     line must lie within 12 bins of one of them (a long line also leaves
//     weaker peaks in the wings of its butterfly, outside the A x A window).
//   XGA 1024x768 (IMG_W/IMG_H overridden), lms_en=0: three lines and noise.
//     Each line must be reported by a threshold peak within 2 bins, and every
//     peak must carry the count thr+1.
// For both frames the clock cycles from frame_start to frame_done must be at
// least 2*K per pixel and at most that plus one initialisation sweep and a
// small drain allowance; the frame rate at a 100 MHz memory clock is printed.
module tb_video_frames;
  import ht_pkg::*;
  localparam int K = DEF_N_THETA / DEF_N_PAR;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- VGA instance (all defaults)
  logic [9:0] v_thr;
  logic v_lms, v_fs, v_sr, v_fe, v_fd, v_iv, v_ir;
  logic [9:0] v_x;
  logic [8:0] v_y;
  logic v_pv, v_lv;
  logic [10:0] v_pr, v_lr;
  logic [7:0] v_pt, v_lt;
  logic [9:0] v_pc, v_lc;
  logic v_ib, v_si, v_sf, v_ov, v_li, v_lm, v_ld;

  hough_top u_vga (
    .clk(clk), .rst_n(rst_n), .thr(v_thr), .lms_en(v_lms),
    .frame_start(v_fs), .start_ready(v_sr), .frame_end(v_fe), .frame_done(v_fd),
    .in_valid(v_iv), .in_ready(v_ir), .in_x(v_x), .in_y(v_y),
    .peak_valid(v_pv), .peak_rho(v_pr), .peak_theta(v_pt), .peak_votes(v_pc),
    .line_valid(v_lv), .line_rho(v_lr), .line_theta(v_lt), .line_votes(v_lc),
    .init_busy(v_ib), .stall_init(v_si), .stall_fifo(v_sf), .lms_overflow(v_ov),
    .lms_insert(v_li), .lms_move(v_lm), .lms_drop(v_ld));

  // ---------------- XGA instance
  localparam int XW_ = 1024, XH_ = 768;
  logic [9:0] x_thr;
  logic x_lms, x_fs, x_sr, x_fe, x_fd, x_iv, x_ir;
  logic [9:0] x_x;
  logic [9:0] x_y;
  logic x_pv, x_lv;
  logic [11:0] x_pr, x_lr;
  logic [7:0] x_pt, x_lt;
  logic [9:0] x_pc, x_lc;
  logic x_ib, x_si, x_sf, x_ov, x_li, x_lm, x_ld;

  hough_top #(.IMG_W(XW_), .IMG_H(XH_)) u_xga (
    .clk(clk), .rst_n(rst_n), .thr(x_thr), .lms_en(x_lms),
    .frame_start(x_fs), .start_ready(x_sr), .frame_end(x_fe), .frame_done(x_fd),
    .in_valid(x_iv), .in_ready(x_ir), .in_x(x_x), .in_y(x_y),
    .peak_valid(x_pv), .peak_rho(x_pr), .peak_theta(x_pt), .peak_votes(x_pc),
    .line_valid(x_lv), .line_rho(x_lr), .line_theta(x_lt), .line_votes(x_lc),
    .init_busy(x_ib), .stall_init(x_si), .stall_fifo(x_sf), .lms_overflow(x_ov),
    .lms_insert(x_li), .lms_move(x_lm), .lms_drop(x_ld));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scene generation: a bitmap, then raster order
  bit img [XH_][XW_];
  int tr [$], tt [$];   // true lines: rho (pixels), theta (degrees)

  function automatic void clear_img();
    foreach (img[y, x]) img[y][x] = 0;
    tr.delete(); tt.delete();
  endfunction

  function automatic void draw_line(int w, int h, int deg, int rho, int y_min);
    real a, c, s;
    a = real'(deg) * 3.14159265358979 / 180.0;
    c = $cos(a); s = $sin(a);
    tr.push_back(rho); tt.push_back(deg);
    if (s * s > c * c) begin
      for (int x = 0; x < w; x++) begin
        int y;
        y = $rtoi($floor((real'(rho) - real'(x) * c) / s + 0.5));
        if (y >= y_min && y < h) img[y][x] = 1;
      end
    end else begin
      for (int y = y_min; y < h; y++) begin
        int x;
        x = $rtoi($floor((real'(rho) - real'(y) * s) / c + 0.5));
        if (x >= 0 && x < w) img[y][x] = 1;
      end
    end
  endfunction

  function automatic void add_noise(int w, int h, int pct10);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        if ($urandom_range(999) < pct10) img[y][x] = 1;
  endfunction

  function automatic bit close(int r, int t, int rmax, int slack);
    foreach (tr[i])
      if (r - (tr[i] + rmax) <= slack && (tr[i] + rmax) - r <= slack && t - tt[i] <= slack && tt[i] - t <= slack)
        return 1;
    return 0;
  endfunction

  // ---------------- VGA frame
  int v_lines_r [$], v_lines_t [$];
  always @(posedge clk) if (rst_n && v_lv) begin v_lines_r.push_back(int'(v_lr)); v_lines_t.push_back(int'(v_lt)); end

  task automatic vga_frame();
    int n, t0, cyc;
    localparam int RM = 800;
    clear_img();
    draw_line(640, 480, 42, 290, 250);    // left lane marking
    draw_line(640, 480, 138, -180, 250);  // right lane marking
    draw_line(640, 480, 90, 250, 0);      // horizon edge
    add_noise(640, 480, 30);
    v_thr = 10'd80; v_lms = 1;
    @(negedge clk);
    while (!v_sr) @(negedge clk);
    v_fs = 1; t0 = 0; cyc = 0;
    @(negedge clk);
    v_fs = 0;
    n = 0;
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++)
        if (img[y][x]) begin
          v_iv = 1; v_x = 10'(x); v_y = 9'(y);
          @(posedge clk); cyc++;
          while (!v_ir) begin @(posedge clk); cyc++; end
          @(negedge clk);
          n++;
        end
    v_iv = 0;
    v_fe = 1;
    @(negedge clk); cyc++;
    v_fe = 0;
    while (!v_fd) begin @(negedge clk); cyc++; end
    $display("VGA frame: %0d feature pixels, %0d cycles, %0d lines, %0.1f frames/s at 100 MHz",
             n, cyc, v_lines_r.size(), 100.0e6 / real'(cyc));
    checks += 2;
    if (cyc < 2 * K * n) begin failures++; $display("FAIL VGA frame faster than 2K cycles per pixel"); end
    if (cyc > 2 * K * n + K * n_rho(640, 480) + 200) begin failures++; $display("FAIL VGA frame too slow"); end
    foreach (tr[i]) begin
      bit found;
      found = 0;
      foreach (v_lines_r[j])
        if (v_lines_r[j] - (tr[i] + RM) <= 2 && (tr[i] + RM) - v_lines_r[j] <= 2 &&
            v_lines_t[j] - tt[i] <= 2 && tt[i] - v_lines_t[j] <= 2) found = 1;
      checks++;
      if (!found) begin failures++; $display("FAIL VGA line theta %0d rho %0d missed", tt[i], tr[i]); end
    end
    foreach (v_lines_r[j]) begin
      checks++;
      if (!close(v_lines_r[j], v_lines_t[j], RM, 12)) begin
        failures++; $display("FAIL VGA false line rho_idx %0d theta %0d", v_lines_r[j], v_lines_t[j]);
      end
    end
  endtask

  // ---------------- XGA frame
  int x_hit [3];
  int x_peaks = 0, x_bad = 0;
  localparam int XRM = 1280;
  always @(posedge clk) if (rst_n && x_pv) begin
    x_peaks++;
    if (int'(x_pc) != int'(x_thr) + 1) x_bad++;
    foreach (tr[i])
      if (i < 3 && int'(x_pr) - (tr[i] + XRM) <= 2 && (tr[i] + XRM) - int'(x_pr) <= 2 &&
          int'(x_pt) - tt[i] <= 2 && tt[i] - int'(x_pt) <= 2) x_hit[i]++;
  end

  task automatic xga_frame();
    int n, cyc;
    clear_img();
    draw_line(1024, 768, 35, 500, 300);
    draw_line(1024, 768, 145, -300, 300);
    draw_line(1024, 768, 0, 700, 0);      // a vertical edge
    add_noise(1024, 768, 20);
    foreach (x_hit[i]) x_hit[i] = 0;
    x_thr = 10'd200; x_lms = 0;
    @(negedge clk);
    while (!x_sr) @(negedge clk);
    x_fs = 1; cyc = 0;
    @(negedge clk);
    x_fs = 0;
    n = 0;
    for (int y = 0; y < 768; y++)
      for (int x = 0; x < 1024; x++)
        if (img[y][x]) begin
          x_iv = 1; x_x = 10'(x); x_y = 10'(y);
          @(posedge clk); cyc++;
          while (!x_ir) begin @(posedge clk); cyc++; end
          @(negedge clk);
          n++;
        end
    x_iv = 0;
    x_fe = 1;
    @(negedge clk); cyc++;
    x_fe = 0;
    while (!x_fd) begin @(negedge clk); cyc++; end
    $display("XGA frame: %0d feature pixels, %0d cycles, %0d peaks, %0.1f frames/s at 100 MHz",
             n, cyc, x_peaks, 100.0e6 / real'(cyc));
    checks += 3;
    if (cyc < 2 * K * n) begin failures++; $display("FAIL XGA frame faster than 2K cycles per pixel"); end
    if (cyc > 2 * K * n + K * n_rho(1024, 768) + 200) begin failures++; $display("FAIL XGA frame too slow"); end
    if (x_bad != 0) begin failures++; $display("FAIL %0d XGA peaks not at thr+1", x_bad); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (x_hit[i] == 0) begin failures++; $display("FAIL XGA line theta %0d rho %0d missed", tt[i], tr[i]); end
    end
  endtask

  initial begin
    v_fs = 0; v_fe = 0; v_iv = 0; v_x = 0; v_y = 0; v_thr = 0; v_lms = 1;
    x_fs = 0; x_fe = 0; x_iv = 0; x_x = 0; x_y = 0; x_thr = 0; x_lms = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    vga_frame();
    xga_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
