// Self-checking testbench for mt_dcm_ps.
//
// Connects the controller to a behavioural DCM phase-shift port and writes a
// series of targets (positive, negative, a retarget during a walk, the range
// ends +255 and -255). Checks that the modelled DCM shift and the
// controller's copy both end at each target, that no PSEN is issued while a
// step is in progress, and that a walk of N steps takes N*(DONE_DELAY+3)
// cycles or less (PSEN register, model delay, PSDONE, next PSEN).
module tb_mt_dcm_ps;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [15:0] value = '0;
  logic psen, psincdec, psdone, busy;
  logic signed [8:0] current;
  int shift, errors;
  int checks = 0, failures = 0;

  mt_dcm_ps dut (.*);
  dcm_ps_model #(.DONE_DELAY(5)) dcm (.psclk(clk), .psen, .psincdec, .psdone,
    .shift, .errors);

  always #5 clk = ~clk;

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

  task automatic write(input int v);
    @(negedge clk);
    wr = 1;
    value = 16'(v);
    @(negedge clk);
    wr = 0;
  endtask

  task automatic walk(input int v);
    automatic int steps = (v > shift) ? v - shift : shift - v;
    automatic int t = 0;
    write(v);
    while (busy) begin
      @(negedge clk);
      t++;
    end
    repeat (3) @(negedge clk);
    check(shift == v, $sformatf("DCM shift %0d, target %0d", shift, v));
    check(int'(current) == v, "controller copy");
    check(t <= steps * 8 + 2, $sformatf("walk time %0d for %0d steps", t, steps));
  endtask

  initial begin
    #22 rst_n = 1;
    check(!busy && current == 0, "idle after reset");
    walk(10);
    walk(-7);
    walk(0);
    // retarget during a walk
    write(40);
    repeat (60) @(negedge clk);
    walk(-20);
    walk(255);
    walk(-255);
    check(errors == 0, "PSEN only after PSDONE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
