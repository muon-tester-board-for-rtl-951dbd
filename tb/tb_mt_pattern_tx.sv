// Self-checking testbench for mt_pattern_tx.
//
// A queue stands in for the pattern FIFO. Each test loads N words (bit 31
// set, so every word differs from the idle value 0), issues a start at a
// random phase and logs the output at every falling clock edge. Checks: the
// words come out in order, one per cycle, with no gap; the first word follows
// a bunch-crossing edge (it is frame 1); the output is 0 before and after;
// the FIFO is drained; one launch pulse per transmission; a second start
// while busy is ignored; start-to-first-word latency is at most 3 cycles;
// a start with an empty FIFO sends nothing.
module tb_mt_pattern_tx;
  logic clk = 0, rst_n = 0, start = 0, bx_start = 0;
  logic [31:0] fifo_rdata, tx_data;
  logic fifo_empty, fifo_pop, busy, launched;
  logic [31:0] q[$];
  int checks = 0, failures = 0, n_launch = 0;

  mt_pattern_tx #(.WIDTH(32)) dut (.clk, .clk_out(clk), .rst_n, .start, .bx_start,
    .fifo_rdata, .fifo_empty, .fifo_pop, .tx_data, .busy, .launched);

  always #6 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // FIFO outputs are refreshed explicitly after every queue change
  task automatic show();
    fifo_empty = (q.size() == 0);
    fifo_rdata = fifo_empty ? 32'h0 : q[0];
  endtask
  initial show();

  always @(posedge clk) begin
    bx_start <= rst_n ? ~bx_start : 1'b0;
    if (fifo_pop) begin
      check(q.size() != 0, "pop only when not empty");
      void'(q.pop_front());
    end
    #1 show();
  end

  // log output per cycle with the bx_start value that preceded its edge
  logic [31:0] out_log[$];
  bit bx_log[$];
  bit bx_prev = 0;
  int start_idx = -1;
  always @(negedge clk) begin
    out_log.push_back(tx_data);
    bx_log.push_back(bx_prev);
    bx_prev = bx_start;
    if (launched) n_launch++;
  end

  task automatic run(input int n, input bit double_start);
    automatic logic [31:0] words[$];
    automatic int i0 = -1, base;
    for (int i = 0; i < n; i++) begin
      automatic logic [31:0] w = $urandom | 32'h8000_0000;
      words.push_back(w);
      q.push_back(w);
    end
    show();
    repeat ($urandom % 4) @(negedge clk);
    @(negedge clk);
    start = 1;
    #1 base = out_log.size();  // index of the entry logged one edge later
    @(negedge clk);
    start = 0;
    if (double_start) begin
      repeat (3) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
    end
    repeat (n + 10) @(negedge clk);
    wait (!busy);
    repeat (4) @(negedge clk);
    for (int i = base; i < out_log.size(); i++)
      if (out_log[i] != 0) begin i0 = i; break; end
    if (n == 0) begin
      check(i0 == -1, "empty FIFO sends nothing");
      return;
    end
    check(i0 != -1, "transmission seen");
    if (i0 == -1) return;
    check(i0 - base <= 3, $sformatf("start latency %0d", i0 - base));
    check(bx_log[i0], "first word is frame 1 of a bunch crossing");
    for (int j = 0; j < n; j++)
      check(out_log[i0 + j] == words[j], $sformatf("word %0d", j));
    for (int i = i0 + n; i < out_log.size(); i++)
      check(out_log[i] == 0, "idle after transmission");
    check(q.size() == 0, "FIFO drained");
  endtask

  initial begin
    #30 rst_n = 1;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 20; t++) run(1 + ($urandom % 40), 0);
    check(n_launch == 20, "one launch per transmission");
    run(2, 0);
    run(511, 1);
    check(n_launch == 22, "start while busy ignored");
    run(0, 0);
    check(n_launch == 23, "launch with empty FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
