// Self-checking testbench for mt_l1a_counter.
//
// Sends random L1A pulses and clears, compares the count with a reference
// after every cycle (including the clear-over-pulse priority), and checks
// the wrap from 0xFFFF to 0.
module tb_mt_l1a_counter;
  logic clk = 0, rst_n = 0, clr = 0, l1a = 0;
  logic [15:0] count;
  logic [15:0] ref_count = '0;
  int checks = 0, failures = 0;

  mt_l1a_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: count=%0d ref=%0d", what, $time, count, ref_count);
    end
  endtask

  initial begin
    #12 rst_n = 1;
    check(count == 0, "zero after reset");
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      l1a = ($urandom % 2) == 1;
      clr = ($urandom % 200) == 0;
      @(posedge clk);
      if (clr) ref_count = '0;
      else if (l1a) ref_count = ref_count + 1;
      #1 check(count == ref_count, "count");
    end
    // run up to the wrap
    @(negedge clk);
    clr = 0;
    l1a = 1;
    for (int i = 0; i < 70000; i++) begin
      @(posedge clk);
      ref_count = ref_count + 1;
    end
    #1 check(count == ref_count, "count after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
