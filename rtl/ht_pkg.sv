// ht_pkg: constants and elaboration-time helpers shared by the Hough-transform
// line detector.
//
// The image size defaults are the VGA frame (640x480) that the detector with
// local-maximum search is built for. The number of discrete angles, the
// parallelism, the fixed-point scale of the sine/cosine tables and the vote
// width are not fixed by the architecture description and are this design's
// choices; every module takes them as parameters whose defaults come from here.
//
// The sine/cosine table function is evaluated only at elaboration: it turns
// each table entry into a rounded two's-complement integer
// round(cos(theta) * 2**FRAC), theta = idx * 180 deg / N_THETA.
package ht_pkg;

  // Defaults of the design (see README for which are fixed and which chosen).
  localparam int DEF_IMG_W     = 640;  // VGA width
  localparam int DEF_IMG_H     = 480;  // VGA height
  localparam int DEF_N_THETA   = 180;  // 1 degree angle step (chosen)
  localparam int DEF_N_PAR     = 30;   // parallel computing units / Hough banks (chosen)
  localparam int DEF_FRAC      = 16;   // fractional bits of the sin/cos tables (chosen)
  localparam int DEF_VW        = 10;   // vote counter width (chosen)
  localparam int DEF_WIN       = 5;    // local-maximum window A (chosen)
  localparam int DEF_MAX_LINES = 16;   // local-maximum candidate table (chosen)
  localparam int DEF_FIFO_D    = 4;    // per-bank peak FIFO depth (chosen)

  localparam real PI = 3.14159265358979323846;

  // Smallest r with r*r >= v: the largest |rho| for an image of w x h.
  function automatic int isqrt_ceil(int v);
    int r;
    r = 0;
    while (r * r < v) r++;
    return r;
  endfunction

  // Largest |rho| and number of rho bins (delta rho = 1 pixel).
  function automatic int rho_max(int w, int h);
    return isqrt_ceil(w * w + h * h);
  endfunction

  function automatic int n_rho(int w, int h);
    return 2 * rho_max(w, h) + 1;
  endfunction

  // Quantised table entry: round(f(theta) * 2**frac), f = sin or cos.
  function automatic int trig_q(int idx, int n_theta, int frac, bit is_sin);
    real th, v;
    th = PI * real'(idx) / real'(n_theta);
    v  = is_sin ? $sin(th) : $cos(th);
    return $rtoi($floor(v * real'(longint'(1) << frac) + 0.5));
  endfunction

endpackage
