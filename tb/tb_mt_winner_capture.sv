// Self-checking testbench for mt_winner_capture (2-bit, MS winners).
//
// A queue with a depth limit stands in for FIFO_D. Random winner bits are
// driven every cycle and logged; after an arm pulse each FIFO entry must
// equal the bits driven k+2 cycles after the arm cycle, capture must stop
// when the FIFO reports full, nothing is written before arming, and a clear
// stops capture.
module tb_mt_winner_capture;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, arm = 0, clr = 0;
  logic [1:0] win_in = '0, fifo_wdata;
  logic fifo_full = 0, fifo_push, capturing;
  logic [1:0] q[$], drv_log[$];
  int checks = 0, failures = 0;

  mt_winner_capture #(.WIDTH(2)) dut (.clk_win(clk), .clk, .rst_n, .win_in, .arm,
    .clr, .fifo_full, .fifo_push, .fifo_wdata, .capturing);

  always #6 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // the model FIFO takes the push seen just before each rising edge
  always @(negedge clk) begin
    if (fifo_push) begin
      check(q.size() < DEPTH, "no push when full");
      q.push_back(fifo_wdata);
    end
    fifo_full = (q.size() == DEPTH);
  end

  // new random winners after every edge, logged per cycle
  always @(negedge clk) begin
    win_in = 2'($urandom);
    drv_log.push_back(win_in);
  end

  int arm_idx;
  initial begin
    #30 rst_n = 1;
    @(negedge clk);
    #2 q.delete();
    repeat (20) @(negedge clk);
    check(q.size() == 0, "nothing captured before arming");
    #1 arm = 1;
    arm_idx = drv_log.size() - 1;  // bits driven in the arm cycle
    @(negedge clk);
    #1 arm = 0;
    repeat (DEPTH + 20) @(negedge clk);
    check(q.size() == DEPTH, "capture until full");
    check(!capturing, "capture stops when full");
    for (int k = 0; k < DEPTH; k++)
      check(q[k] == drv_log[arm_idx + 2 + k], $sformatf("entry %0d", k));
    // empty the model FIFO, arm again and clear part way
    q.delete();
    @(negedge clk);
    #1 arm = 1;
    @(negedge clk);
    #1 arm = 0;
    repeat (12) @(negedge clk);
    #1 clr = 1;
    @(negedge clk);
    #1 clr = 0;
    begin
      automatic int n = q.size();
      repeat (10) @(negedge clk);
      check(q.size() == n && !capturing, "clear stops capture");
      check(n >= 9 && n <= 11, $sformatf("entries before clear %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
