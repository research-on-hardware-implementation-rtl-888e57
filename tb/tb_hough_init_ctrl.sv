// tb_hough_init_ctrl: the sweep must visit 0..DEPTH-1 once each, one address
// per cycle, with busy high exactly DEPTH cycles, and ignore start while busy.
module tb_hough_init_ctrl;
  localparam int DEPTH = 37;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start, busy, clr_en;
  logic [5:0] clr_addr;
  always #5 clk = ~clk;

  hough_init_ctrl #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      int n;
      @(negedge clk);
      checks++; if (busy || clr_en) failures++;
      start = 1;
      @(negedge clk);
      start = (rep == 1);  // start held high must not restart the sweep
      n = 0;
      while (busy) begin
        checks++;
        if (!clr_en || int'(clr_addr) != n) begin
          failures++; $display("FAIL addr %0d exp %0d", clr_addr, n);
        end
        n++;
        @(negedge clk);
        if (rep == 1 && n == 5) start = 0;
      end
      start = 0;
      checks++;
      if (n != DEPTH) begin failures++; $display("FAIL swept %0d words", n); end
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
