// tb_peak_collector: 4 sources, FIFO depth 4. Each source pushes tagged
// events (source, sequence number) at random, but only while any_full is
// low, as the issuing logic does; the sink takes them with a random ready.
// Every event must come out once, in order per source, nothing may be lost,
// and a source that is waiting must be served within N grants.
module tb_peak_collector;
  localparam int N = 4, W = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] ev_valid;
  logic [W-1:0] ev_data [N];
  logic any_full, all_empty, out_valid, out_ready;
  logic [W-1:0] out_data;
  always #5 clk = ~clk;

  peak_collector #(.N(N), .W(W), .DEPTH(4)) dut (.*);

  int sent [N], got [N], wait_cnt [N];
  int full_seen = 0;
  bit running;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      ev_valid[i] = running && !any_full && ($urandom_range(2) == 0);
      ev_data[i]  = W'((i << 10) | (sent[i] & 32'h3ff));
    end
    out_ready = ($urandom_range(2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (any_full) full_seen++;
    for (int i = 0; i < N; i++) if (ev_valid[i]) sent[i]++;
    if (out_valid && out_ready) begin
      int src, seq;
      src = int'(out_data) >> 10;
      seq = int'(out_data) & 32'h3ff;
      checks++;
      if (seq != (got[src] & 32'h3ff)) begin
        failures++; $display("FAIL src %0d seq %0d exp %0d", src, seq, got[src]);
      end
      got[src]++;
      // fairness: every other non-empty source waits at most N grants
      for (int i = 0; i < N; i++) begin
        if (i == src) wait_cnt[i] = 0;
        else if (!dut.empty[i]) wait_cnt[i]++;
        checks++;
        if (wait_cnt[i] > N) begin failures++; $display("FAIL source %0d starved", i); end
      end
    end
  end

  initial begin
    running = 0;
    foreach (sent[i]) begin sent[i] = 0; got[i] = 0; wait_cnt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    running = 1;
    repeat (3000) @(posedge clk);
    running = 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent[i] != got[i]) begin failures++; $display("FAIL source %0d sent %0d got %0d", i, sent[i], got[i]); end
    end
    checks += 2;
    if (!all_empty) failures++;
    if (full_seen == 0) begin failures++; $display("FAIL any_full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
