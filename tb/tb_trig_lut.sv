// tb_trig_lut: checks every entry of the local sin/cos tables of the first,
// a middle and the last computing unit against round(f(theta)*2**16)
// computed here from the angle, theta = (UNIT*K + k) * 180/N_THETA degrees.
module tb_trig_lut;
  localparam int N_THETA = 180;
  localparam int N_PAR   = 30;
  localparam int K       = N_THETA / N_PAR;
  localparam int FRAC    = 16;
  localparam int UNITS [3] = '{0, 13, 29};

  int checks = 0, failures = 0;
  logic [2:0] k;
  logic signed [17:0] c [3], s [3];

  for (genvar u = 0; u < 3; u++) begin : g_u
    trig_lut #(.N_THETA(N_THETA), .N_PAR(N_PAR), .UNIT(UNITS[u]), .FRAC(FRAC)) dut (
      .k(k), .cos_o(c[u]), .sin_o(s[u]));
  end

  function automatic int q(real v);
    return $rtoi($floor(v * 65536.0 + 0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int kk = 0; kk < K; kk++) begin
      k = 3'(kk);
      #1;
      for (int u = 0; u < 3; u++) begin
        real deg, rad;
        int ec, es;
        deg = real'(UNITS[u] * K + kk) * 180.0 / real'(N_THETA);
        rad = deg * 3.14159265358979 / 180.0;
        ec = q($cos(rad));
        es = q($sin(rad));
        checks += 2;
        if (int'(c[u]) != ec || int'(s[u]) != es) begin
          failures++;
          $display("FAIL unit %0d k %0d: cos %0d/%0d sin %0d/%0d", UNITS[u], kk, c[u], ec, s[u], es);
        end
      end
    end
    // two fixed points: 0 deg and 90 deg
    k = 0; #1;
    checks += 2;
    if (c[0] != 18'sd65536 || s[0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
