// trig_lut: the local sine/cosine look-up table of one computing unit.
//
// The complete tables of N_THETA angles are split across N_PAR units: unit
// UNIT holds the K = N_THETA/N_PAR consecutive angles
// theta_idx = UNIT*K + k, k = 0..K-1, with theta = theta_idx * 180deg/N_THETA.
// Each entry is the fractional value scaled by 2**FRAC and rounded, stored in
// two's complement (CW = FRAC+2 bits holds -1.0 .. +1.0). Storing the values
// replaces run-time trigonometry; the table split and scaling follow the
// architecture, the rounding rule and FRAC are this design's choices.
//
// Interface: k selects the entry; cos_o/sin_o are combinational (a ROM read).
module trig_lut
  import ht_pkg::*;
#(
  parameter int N_THETA = DEF_N_THETA,
  parameter int N_PAR   = DEF_N_PAR,
  parameter int UNIT    = 0,
  parameter int FRAC    = DEF_FRAC,
  localparam int K      = N_THETA / N_PAR,
  localparam int KW     = (K > 1) ? $clog2(K) : 1,
  localparam int CW     = FRAC + 2
) (
  input  logic [KW-1:0]        k,
  output logic signed [CW-1:0] cos_o,
  output logic signed [CW-1:0] sin_o
);

  typedef logic signed [CW-1:0] tab_t [K];

  function automatic tab_t build(bit is_sin);
    tab_t t;
    for (int i = 0; i < K; i++) t[i] = CW'(trig_q(UNIT * K + i, N_THETA, FRAC, is_sin));
    return t;
  endfunction

  localparam tab_t COS_TAB = build(1'b0);
  localparam tab_t SIN_TAB = build(1'b1);

  always_comb begin
    cos_o = '0;
    sin_o = '0;
    for (int i = 0; i < K; i++) begin
      if (KW'(i) == k) begin
        cos_o = COS_TAB[i];
        sin_o = SIN_TAB[i];
      end
    end
  end

endmodule
