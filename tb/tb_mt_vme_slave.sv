// Self-checking testbench for mt_vme_slave.
//
// A VME master model runs A24/D16 cycles against the slave, which is backed
// by a small register model in the testbench (offsets 00-0E read/write,
// 10-1E read only). Checks: written data arrives with one write strobe per
// cycle, read data returns on the bus with the drivers enabled only during
// reads, DTACK* timing and release, and that no DTACK* is given for a wrong
// slot, a wrong address modifier, a 32-bit or byte access, an interrupt
// acknowledge, an address above the register block, or an access the
// register model refuses. The board sits in slot 6, base 0x300000.
module tb_mt_vme_slave;
  logic clk = 0, rst_n = 0;
  logic [4:0] ga = 5'd6;
  logic [23:1] vme_a = '0;
  logic [5:0] vme_am = '0;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1, vme_iack_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_dtack_n;
  logic [4:0] reg_addr;
  logic reg_write, reg_hit, reg_wr, reg_rd, access;
  logic [15:0] reg_wdata, reg_rdata;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  logic [15:0] regs [16];

  mt_vme_slave dut (.*);

  always #6 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // register model
  assign reg_hit   = (reg_addr < 5'h10) || !reg_write;
  assign reg_rdata = regs[reg_addr[4:1]] ^ 16'hA5A5;
  always @(posedge clk) begin
    if (reg_wr) begin
      regs[reg_addr[4:1]] <= reg_wdata;
      n_wr++;
    end
    if (reg_rd) n_rd++;
  end

  // drivers enabled only while DTACK* is low in a read
  always @(negedge clk) if (vme_d_oe) check(!vme_dtack_n && vme_write_n, "d_oe only in read");

  // one master cycle; returns whether DTACK* came and how many clocks it took
  task automatic cycle(input logic [23:0] addr, input bit write,
                       input logic [15:0] wdata, output logic [15:0] rdata,
                       output bit acked, output int lat,
                       input logic [5:0] am = 6'h39, input logic [1:0] ds = 2'b00,
                       input bit lword_n = 1, input bit iack_n = 1);
    vme_a = addr[23:1];
    vme_am = am;
    vme_write_n = !write;
    vme_lword_n = lword_n;
    vme_iack_n = iack_n;
    vme_d_in = write ? wdata : 16'hxxxx;
    #7 vme_as_n = 0;
    #5 vme_ds_n = ds;
    acked = 0;
    lat = 0;
    for (int i = 0; i < 30; i++) begin
      @(posedge clk);
      lat++;
      #1;
      if (!vme_dtack_n) begin
        acked = 1;
        break;
      end
    end
    rdata = vme_d_out;
    if (acked && !write) check(vme_d_oe, "drivers on during read");
    #3 vme_ds_n = 2'b11;
    vme_as_n = 1;
    repeat (6) @(posedge clk);
    #1 check(vme_dtack_n && !vme_d_oe, "DTACK* and drivers released");
  endtask

  logic [15:0] rd, exp_regs [16];
  bit ack;
  int lat, wr0, rd0;
  initial begin
    foreach (regs[i]) regs[i] = '0;
    #30 rst_n = 1;
    #50;
    // writes and reads through every read/write offset
    for (int k = 0; k < 8; k++) begin
      automatic logic [15:0] v = 16'($urandom);
      exp_regs[k] = v;
      wr0 = n_wr;
      cycle(24'h300000 + 24'(2 * k), 1, v, rd, ack, lat);
      check(ack, "write acknowledged");
      check(lat >= 4 && lat <= 5, $sformatf("write DTACK latency %0d", lat));
      check(n_wr == wr0 + 1, "one write strobe");
      check(regs[k] == v, "write data");
    end
    for (int k = 0; k < 8; k++) begin
      rd0 = n_rd;
      cycle(24'h300000 + 24'(2 * k), 0, '0, rd, ack, lat, 6'h3D);
      check(ack && rd == (exp_regs[k] ^ 16'hA5A5), "read data");
      check(n_rd == rd0 + 1, "one read strobe");
    end
    // the other accepted address modifiers
    cycle(24'h300004, 0, '0, rd, ack, lat, 6'h3A);
    check(ack, "AM 3A accepted");
    cycle(24'h300004, 0, '0, rd, ack, lat, 6'h3E);
    check(ack, "AM 3E accepted");
    // cycles that must not be answered
    wr0 = n_wr;
    rd0 = n_rd;
    cycle(24'h380000, 1, 16'h1111, rd, ack, lat);
    check(!ack, "other slot ignored");
    cycle(24'h300000, 1, 16'h2222, rd, ack, lat, 6'h09);
    check(!ack, "A32 AM ignored");
    cycle(24'h300000, 1, 16'h3333, rd, ack, lat, 6'h29);
    check(!ack, "A16 AM ignored");
    cycle(24'h300000, 1, 16'h4444, rd, ack, lat, 6'h39, 2'b10);
    check(!ack, "byte access ignored");
    cycle(24'h300000, 1, 16'h5555, rd, ack, lat, 6'h39, 2'b00, 0);
    check(!ack, "32-bit access ignored");
    cycle(24'h300000, 0, '0, rd, ack, lat, 6'h39, 2'b00, 1, 0);
    check(!ack, "interrupt acknowledge ignored");
    cycle(24'h300020, 1, 16'h6666, rd, ack, lat);
    check(!ack, "address above the registers ignored");
    cycle(24'h300012, 1, 16'h7777, rd, ack, lat);
    check(!ack, "refused offset ignored");
    check(n_wr == wr0 && n_rd == rd0, "no strobes for ignored cycles");
    check(regs[0] == exp_regs[0], "register untouched");
    // geographical address follows the slot input
    ga = 5'd21;
    cycle(24'hA80000, 0, '0, rd, ack, lat);
    check(ack, "slot 21 base A80000 answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
