// Self-checking testbench for mt_ccb_if.
//
// Drives the CCB lines on the 40 MHz clock and checks on the 80 MHz side:
// one start_a pulse per strobed 0x24 command, one start_b pulse per strobed
// 0x2F, none for other codes or unstrobed commands, one l1a_pulse per L1A
// including L1As in consecutive bunch crossings, the command latency, the
// bx_start phase against the 40 MHz clock, and the CSR1 bit layout.
module tb_mt_ccb_if;
  import mt_pkg::*;

  logic clk40 = 0, clk80 = 0, rst_n = 0;
  logic [5:0] ccb_cmd = '0;
  logic ccb_cmd_strobe = 0, ccb_l1a = 0, ccb_bc0 = 0, ccb_bcntres = 0;
  logic ccb_eventres = 0, ccb_ready = 0, ccb_clken = 0;
  logic [4:1] ccb_reserv = '0;
  logic start_a, start_b, l1a_pulse, bx_start;
  csr1_t csr1;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_l1a = 0;
  longint cyc = 0, last_a_cyc = 0;

  mt_ccb_if dut (.*);

  // clk80 and clk40 from one process so that their rising edges coincide
  always begin
    #6 clk80 = ~clk80;
    if (clk80) clk40 = ~clk40;
  end

  initial begin
    repeat (20000) @(posedge clk80);
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

  // pulses are counted at the falling edge, away from the register updates
  logic bx_before;
  always @(negedge clk80) bx_before <= bx_start;
  always @(negedge clk80) begin
    if (start_a) begin n_a++; last_a_cyc = cyc; end
    if (start_b) n_b++;
    if (l1a_pulse) n_l1a++;
    cyc++;
  end
  always @(posedge clk80) begin
    if (rst_n && cyc > 8) begin
      #1;
      // bx_start seen before this edge must be 1 exactly when clk40 rose
      check(bx_before == clk40, "bx_start phase");
    end
  end

  task automatic bx();  // wait one bunch crossing, return at a falling clk40
    @(negedge clk40);
  endtask

  task automatic send_cmd(input logic [5:0] code, input bit strobe);
    ccb_cmd = code;
    ccb_cmd_strobe = strobe;
    bx();
    ccb_cmd = '0;
    ccb_cmd_strobe = 0;
  endtask

  longint t_cmd;
  initial begin
    #30 rst_n = 1;
    repeat (4) bx();
    // strobed 0x24 -> one start_a
    t_cmd = cyc;
    send_cmd(CCB_CMD_INJECT_TMB, 1);
    repeat (4) bx();
    check(n_a == 1 && n_b == 0, "0x24 gives one start_a");
    // cyc counts falling clk80 edges. The command is registered at the next
    // clk40 edge, toggles at the one after, and the pulse is high in the
    // clk80 cycle after that: the 4th falling clk80 edge after the command
    check(last_a_cyc == t_cmd + 4, $sformatf("start_a latency %0d", last_a_cyc - t_cmd));
    // strobed 0x2F -> one start_b
    send_cmd(CCB_CMD_INJECT_SP, 1);
    repeat (4) bx();
    check(n_a == 1 && n_b == 1, "0x2F gives one start_b");
    // unstrobed command and other codes -> nothing
    send_cmd(CCB_CMD_INJECT_TMB, 0);
    send_cmd(6'h25, 1);
    send_cmd(6'h0F, 1);
    repeat (4) bx();
    check(n_a == 1 && n_b == 1, "no start for other codes or no strobe");
    // commands in consecutive crossings
    send_cmd(CCB_CMD_INJECT_TMB, 1);
    send_cmd(CCB_CMD_INJECT_TMB, 1);
    send_cmd(CCB_CMD_INJECT_SP, 1);
    repeat (4) bx();
    check(n_a == 3 && n_b == 2, "back-to-back commands");
    // L1A: 5 consecutive crossings, then 3 isolated
    ccb_l1a = 1;
    repeat (5) bx();
    ccb_l1a = 0;
    repeat (3) begin
      bx();
      ccb_l1a = 1;
      bx();
      ccb_l1a = 0;
    end
    repeat (4) bx();
    check(n_l1a == 8, "L1A pulse count");
    // CSR1 layout with random line values
    repeat (20) begin
      automatic logic [15:0] v = 16'($urandom);
      ccb_bcntres = v[0]; ccb_eventres = v[1]; ccb_cmd = v[7:2];
      ccb_l1a = v[8]; ccb_bc0 = v[9]; ccb_ready = v[10]; ccb_clken = v[11];
      ccb_reserv[1] = v[12]; ccb_reserv[2] = v[13];
      ccb_reserv[3] = v[14]; ccb_reserv[4] = v[15];
      ccb_cmd_strobe = 0;
      bx();
      check(16'(csr1) == v, "CSR1 bit layout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
