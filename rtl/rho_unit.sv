// rho_unit: one of the N_PAR parallel (rho, theta) computing units.
//
// For the feature pixel (x, y) and local angle step k it evaluates
//   rho = x*cos(theta) + y*sin(theta),  theta_idx = UNIT*K + k,
// with cos/sin taken from the unit's own slice of the tables (trig_lut).
// The products are exact fixed-point values scaled by 2**FRAC; the FRAC least
// significant bits of the sum are then dropped (arithmetic shift, i.e. floor),
// which leaves rho at the 1-pixel resolution of the Hough space. The result is
// offset by RHO_MAX so that rho_idx = rho + RHO_MAX is an unsigned bin index
// 0 .. 2*RHO_MAX. Origin at pixel (0,0) and delta-rho = 1 are this design's
// choices.
//
// Timing: one pipeline register. When ld is high, (x, y, k) is sampled and
// rho_idx holds the result from the next clock edge on until the next ld.
module rho_unit
  import ht_pkg::*;
#(
  parameter int IMG_W   = DEF_IMG_W,
  parameter int IMG_H   = DEF_IMG_H,
  parameter int N_THETA = DEF_N_THETA,
  parameter int N_PAR   = DEF_N_PAR,
  parameter int UNIT    = 0,
  parameter int FRAC    = DEF_FRAC,
  localparam int K      = N_THETA / N_PAR,
  localparam int KW     = (K > 1) ? $clog2(K) : 1,
  localparam int XW     = $clog2(IMG_W),
  localparam int YW     = $clog2(IMG_H),
  localparam int RHO_MAX = rho_max(IMG_W, IMG_H),
  localparam int RW     = $clog2(2 * RHO_MAX + 1)
) (
  input  logic          clk,
  input  logic          ld,
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  input  logic [KW-1:0] k,
  output logic [RW-1:0] rho_idx
);

  localparam int CW = FRAC + 2;
  localparam int PW = CW + ((XW > YW) ? XW : YW) + 2;  // product/sum width

  logic signed [CW-1:0] c, s;
  logic signed [PW-1:0] sum;
  logic signed [PW-1:0] rho;

  trig_lut #(.N_THETA(N_THETA), .N_PAR(N_PAR), .UNIT(UNIT), .FRAC(FRAC)) u_lut (
    .k(k), .cos_o(c), .sin_o(s)
  );

  always_comb begin
    sum = PW'($signed({1'b0, x})) * PW'(c) + PW'($signed({1'b0, y})) * PW'(s);
    rho = (sum >>> FRAC) + PW'(RHO_MAX);
  end

  always_ff @(posedge clk) begin
    if (ld) rho_idx <= RW'(rho);
  end

endmodule
