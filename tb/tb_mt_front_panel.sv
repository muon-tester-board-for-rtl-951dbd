// Self-checking testbench for mt_front_panel.
//
// Uses short one-shot and blink intervals. Checks that the flag LEDs follow
// their inputs, that each one-shot LED lights for exactly ONESHOT_CYCLES
// cycles after a trigger and is restarted by a new trigger, and that the two
// clock LEDs toggle every CCB_HALF / VME_HALF cycles of their own clocks and
// stop when their clock stops.
module tb_mt_front_panel;
  localparam int OS = 20, CH = 5, VH = 3;
  logic clk = 0, clk_ccb = 0, clk_vme = 0, rst_n = 0;
  logic dcm_locked = 0, vme_access = 0, st_tmb = 0, st_sp = 0;
  logic [3:0] fifo_full = '0, fifo_empty = '0;
  logic led_lock, led_dack, led_st_tmb, led_st_sp, led_clkc, led_clkv;
  logic [3:0] led_ful, led_emp;
  int checks = 0, failures = 0;
  bit vme_run = 1;

  mt_front_panel #(.ONESHOT_CYCLES(OS), .CCB_HALF(CH), .VME_HALF(VH)) dut (.*);

  always #6 clk = ~clk;
  always #12 clk_ccb = ~clk_ccb;
  always #31 if (vme_run) clk_vme = ~clk_vme;

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

  // trigger a one-shot and measure how many cycles its LED stays on
  task automatic pulse_len(input int which, output int len);
    @(negedge clk);
    case (which)
      0: vme_access = 1;
      1: st_tmb = 1;
      default: st_sp = 1;
    endcase
    @(negedge clk);
    vme_access = 0; st_tmb = 0; st_sp = 0;
    len = 0;
    while ((which == 0) ? led_dack : (which == 1) ? led_st_tmb : led_st_sp) begin
      len++;
      @(negedge clk);
    end
  endtask

  int len, n_c, n_v;
  logic prev_c, prev_v;
  initial begin
    #30 rst_n = 1;
    // flag LEDs
    repeat (10) begin
      @(negedge clk);
      dcm_locked = 1'($urandom);
      fifo_full = 4'($urandom);
      fifo_empty = 4'($urandom);
      #1 check(led_lock == dcm_locked && led_ful == fifo_full && led_emp == fifo_empty,
               "flag LEDs");
    end
    // one-shots
    for (int w = 0; w < 3; w++) begin
      pulse_len(w, len);
      check(len == OS, $sformatf("one-shot %0d length %0d", w, len));
    end
    check(!led_dack && !led_st_tmb && !led_st_sp, "one-shots off");
    // retrigger in the middle doubles the on time
    @(negedge clk) vme_access = 1;
    @(negedge clk) vme_access = 0;
    repeat (OS / 2 - 1) @(negedge clk);
    vme_access = 1;
    @(negedge clk) vme_access = 0;
    len = 0;
    while (led_dack) begin len++; @(negedge clk); end
    check(len == OS, $sformatf("retriggered one-shot %0d", len));
    // blinkers: count toggles over 100 CCB cycles and 60 VME cycles
    n_c = 0;
    prev_c = led_clkc;
    repeat (100) begin
      @(negedge clk_ccb);
      if (led_clkc != prev_c) n_c++;
      prev_c = led_clkc;
    end
    check(n_c == 100 / CH, $sformatf("CLKC toggles %0d", n_c));
    n_v = 0;
    prev_v = led_clkv;
    repeat (60) begin
      @(negedge clk_vme);
      if (led_clkv != prev_v) n_v++;
      prev_v = led_clkv;
    end
    check(n_v == 60 / VH, $sformatf("CLKV toggles %0d", n_v));
    // stopped VME clock freezes CLKV
    vme_run = 0;
    prev_v = led_clkv;
    repeat (100) @(negedge clk);
    check(led_clkv == prev_v, "CLKV frozen with no clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
