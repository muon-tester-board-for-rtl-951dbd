// Self-checking testbench for mt_fifo.
//
// Runs the FIFO at its full 511-word depth and 32-bit width against a
// queue-based reference: fills it to full (checking that further pushes are
// dropped), drains it to empty (checking order and that pops on empty do
// nothing), mixes random pushes and pops, and checks the synchronous clear.
module tb_mt_fifo;
  localparam int W = 32;
  localparam int D = 511;

  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  mt_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one clock step with the given controls, updating the reference
  task automatic step(input bit p, input bit q, input logic [W-1:0] d);
    push = p; pop = q; wr_data = d;
    @(posedge clk);
    #1;
    push = 0; pop = 0;
  endtask

  task automatic compare();
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == D), "full flag");
    check(count == model.size(), "count");
    if (model.size() != 0) check(rd_data == model[0], "head data");
  endtask

  always @(posedge clk) begin
    if (rst_n && !clr) begin
      automatic bit do_pop = pop && model.size() != 0;
      automatic bit do_push = push && model.size() != D;
      if (do_pop) void'(model.pop_front());
      if (do_push) model.push_back(wr_data);
    end else if (clr) begin
      model.delete();
    end
  end

  initial begin
    #22 rst_n = 1;
    #1;
    compare();
    check(empty && !full, "empty after reset");
    // fill to full and beyond
    for (int i = 0; i < D + 5; i++) begin
      step(1, 0, $urandom);
      compare();
    end
    check(full, "full after DEPTH pushes");
    // push and pop together while full: only the pop happens
    step(1, 1, 32'hDEAD_BEEF);
    compare();
    // drain and keep popping
    for (int i = 0; i < D + 5; i++) begin
      step(0, 1, '0);
      compare();
    end
    check(empty, "empty after drain");
    // random traffic
    for (int i = 0; i < 20000; i++) begin
      step(($urandom % 3) != 0, ($urandom % 3) != 0, $urandom);
      compare();
    end
    // synchronous clear
    for (int i = 0; i < 10; i++) step(1, 0, $urandom);
    clr = 1;
    @(posedge clk);
    #1 clr = 0;
    compare();
    check(empty && count == 0, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
