// hough_init_ctrl: background initialisation of the Hough space.
//
// The Hough space is a set of memories, so it cannot be zeroed by one control
// signal. Instead, when a frame starts (start pulse) this controller sweeps
// the address range 0..DEPTH-1 once, one word per clk cycle, and the word it
// points at is zeroed in all N_PAR banks at once through their second write
// port. clk is the double-rate memory clock, so the sweep runs alongside the
// voting of the new frame: a vote may use an address only once the sweep has
// passed it (addr < clr_addr, see hough_bank), which in practice only delays
// a frame whose first feature pixels arrive before the sweep is through.
//
// Interface: busy is high from the cycle after start until the last word is
// cleared; clr_en/clr_addr drive the banks' clear ports. start is ignored
// while busy. Sweep order and one word per cycle are this design's choices.
module hough_init_ctrl #(
  parameter int DEPTH = 6 * 1601,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          clr_en,
  output logic [AW-1:0] clr_addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      clr_addr <= '0;
    end else if (!busy) begin
      if (start) begin
        busy     <= 1'b1;
        clr_addr <= '0;
      end
    end else if (clr_addr == AW'(DEPTH - 1)) begin
      busy     <= 1'b0;
      clr_addr <= '0;
    end else begin
      clr_addr <= clr_addr + 1'b1;
    end
  end

  assign clr_en = busy;

endmodule
