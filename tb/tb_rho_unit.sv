// tb_rho_unit: random pixels and angle steps through three computing units at
// the VGA defaults. The expected rho index is computed here as
// floor((x*C + y*S) / 2**16) + RHO_MAX with C, S = round(cos/sin * 2**16), and
// must appear one clock after ld; it must also lie within one bin of the exact
// real-valued rho.
module tb_rho_unit;
  localparam int W = 640, H = 480, N_THETA = 180, N_PAR = 30, K = 6;
  localparam int RHO_MAX = 800;
  localparam int UNITS [3] = '{0, 14, 29};

  int checks = 0, failures = 0;
  logic clk = 0;
  logic ld;
  logic [9:0] x;
  logic [8:0] y;
  logic [2:0] k;
  logic [10:0] r [3];

  always #5 clk = ~clk;

  for (genvar u = 0; u < 3; u++) begin : g_u
    rho_unit #(.UNIT(UNITS[u])) dut (.clk(clk), .ld(ld), .x(x), .y(y), .k(k), .rho_idx(r[u]));
  end

  function automatic int ref_rho(int xx, int yy, int th_idx);
    real rad;
    longint c, s, sum;
    rad = real'(th_idx) * 3.14159265358979 / real'(N_THETA);
    c = longint'($rtoi($floor($cos(rad) * 65536.0 + 0.5)));
    s = longint'($rtoi($floor($sin(rad) * 65536.0 + 0.5)));
    sum = longint'(xx) * c + longint'(yy) * s;
    return int'(sum >>> 16) + RHO_MAX;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 0; x = 0; y = 0; k = 0;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int xx, yy, kk;
      xx = (n < 4) ? ((n % 2 == 1) ? W - 1 : 0) : int'($urandom_range(W - 1));
      yy = (n < 4) ? ((n / 2 == 1) ? H - 1 : 0) : int'($urandom_range(H - 1));
      kk = int'($urandom_range(K - 1));
      @(negedge clk);
      ld = 1; x = 10'(xx); y = 9'(yy); k = 3'(kk);
      @(negedge clk);
      ld = 0;
      x = ~x;  // must not matter once sampled
      for (int u = 0; u < 3; u++) begin
        int e;
        real exact, rad;
        e = ref_rho(xx, yy, UNITS[u] * K + kk);
        rad = real'(UNITS[u] * K + kk) * 3.14159265358979 / real'(N_THETA);
        exact = real'(xx) * $cos(rad) + real'(yy) * $sin(rad) + real'(RHO_MAX);
        checks += 2;
        if (int'(r[u]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL u%0d x%0d y%0d k%0d: %0d exp %0d", UNITS[u], xx, yy, kk, r[u], e);
        end
        if (real'(r[u]) > exact + 0.01 || real'(r[u]) < exact - 1.01) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
