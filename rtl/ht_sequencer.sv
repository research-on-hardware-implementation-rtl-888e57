// ht_sequencer: angle-step counter that maps the N_THETA angles onto N_PAR
// parallel computing units.
//
// A feature pixel (x, y) is accepted from a valid/ready stream and held while
// the local angle counter k runs from 0 to K-1, K = N_THETA/N_PAR: each step
// is one operation offered to the computing units (op_valid/op_ready), and
// all N_PAR units work on it at once, unit i on angle i*K + k. Keeping the
// parallelism in a counter lets N_PAR be changed without touching the
// datapath; N_THETA must be a multiple of N_PAR.
//
// Timing: a pixel is taken in the cycle its last step is accepted, so with
// op_ready always high a pixel occupies K operation slots.
module ht_sequencer
  import ht_pkg::*;
#(
  parameter int IMG_W   = DEF_IMG_W,
  parameter int IMG_H   = DEF_IMG_H,
  parameter int N_THETA = DEF_N_THETA,
  parameter int N_PAR   = DEF_N_PAR,
  localparam int K      = N_THETA / N_PAR,
  localparam int KW     = (K > 1) ? $clog2(K) : 1,
  localparam int XW     = $clog2(IMG_W),
  localparam int YW     = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output logic          op_valid,
  input  logic          op_ready,
  output logic [XW-1:0] op_x,
  output logic [YW-1:0] op_y,
  output logic [KW-1:0] op_k,
  output logic          busy
);

  logic last;

  assign last     = (op_k == KW'(K - 1));
  assign in_ready = !op_valid || (op_ready && last);
  assign busy     = op_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_valid <= 1'b0;
      op_x     <= '0;
      op_y     <= '0;
      op_k     <= '0;
    end else if (in_valid && in_ready) begin
      op_valid <= 1'b1;
      op_x     <= in_x;
      op_y     <= in_y;
      op_k     <= '0;
    end else if (op_valid && op_ready) begin
      if (last) op_valid <= 1'b0;
      else      op_k     <= op_k + 1'b1;
    end
  end

  initial assert (N_THETA % N_PAR == 0) else $error("N_THETA must be a multiple of N_PAR");

endmodule
