// tb_ht_sequencer: K = 4 angle steps per pixel (12 angles over 3 units).
// Random pixels with random gaps, random op_ready. Every accepted pixel must
// produce steps k = 0..K-1 in order with its own coordinates, and with
// op_ready held high a pixel must take exactly K cycles.
module tb_ht_sequencer;
  localparam int K = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, op_valid, op_ready, busy;
  logic [9:0] in_x, op_x;
  logic [8:0] in_y, op_y;
  logic [1:0] op_k;

  always #5 clk = ~clk;

  ht_sequencer #(.N_THETA(12), .N_PAR(3)) dut (.*);

  int qx[$], qy[$];
  int exp_k;
  bit rnd_ready;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin qx.push_back(int'(in_x)); qy.push_back(int'(in_y)); end
    if (op_valid && op_ready) begin
      checks++;
      if (qx.size() == 0 || int'(op_x) != qx[0] || int'(op_y) != qy[0] || int'(op_k) != exp_k) begin
        failures++;
        if (failures < 10) $display("FAIL op x%0d y%0d k%0d exp k%0d", op_x, op_y, op_k, exp_k);
      end
      if (exp_k == K - 1) begin
        exp_k = 0;
        if (qx.size() > 0) begin void'(qx.pop_front()); void'(qy.pop_front()); end
      end else exp_k++;
    end
  end

  always @(negedge clk) op_ready = rnd_ready ? ($urandom_range(3) != 0) : 1'b1;

  initial begin
    int n;
    exp_k = 0; rnd_ready = 1;
    in_valid = 0; in_x = 0; in_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 500; p++) begin
      @(negedge clk);
      in_valid = ($urandom_range(1) == 1);
      in_x = 10'($urandom); in_y = 9'($urandom);
      while (!in_valid) begin @(negedge clk); in_valid = ($urandom_range(1) == 1); end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    // rate: back-to-back pixels with op_ready high
    rnd_ready = 0;
    repeat (10) @(posedge clk);
    @(negedge clk);
    in_valid = 1; n = 0;
    for (int c = 0; n < 20; c++) begin
      @(posedge clk);
      if (in_ready) n++;
      @(negedge clk); in_x = 10'($urandom); in_y = 9'($urandom);
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (qx.size() != 0 || busy) begin failures++; $display("FAIL leftover pixels %0d", qx.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle count between acceptances while op_ready is forced high
  int last_acc = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && !rnd_ready && in_valid && in_ready) begin
      if (last_acc >= 0) begin
        checks++;
        if (cyc - last_acc != K) begin failures++; $display("FAIL rate %0d", cyc - last_acc); end
      end
      last_acc = cyc;
    end
  end
endmodule
