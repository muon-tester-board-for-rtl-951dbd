// Self-checking testbench for mt_regs.
//
// Drives the register-file side of the VME slave directly and checks the
// address map: which offsets answer for reads and writes, CSR0 storage, the
// CSR1/CSR2/CSR3 layouts (CSR3 = 0x0871 for 17 March 2004), the 16-bit
// halves of FIFO_A/FIFO_B words (push on the high-half write, pop on the
// high-half read, 0 when empty), FIFO_C/FIFO_D reads and the command pulses.
module tb_mt_regs;
  import mt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [4:0] reg_addr = '0;
  logic reg_write = 0, reg_hit, reg_wr = 0, reg_rd = 0;
  logic [15:0] reg_wdata = '0, reg_rdata;
  csr1_t csr1 = '0;
  logic [3:0] fifo_full = '0, fifo_empty = '1;
  logic [31:0] fifo_a_rdata = '0, fifo_b_rdata = '0;
  logic fifo_c_rdata = 0;
  logic [1:0] fifo_d_rdata = '0;
  logic [15:0] l1a_count = '0;
  logic [15:0] csr0;
  logic fifo_a_push, fifo_b_push, fifo_a_pop, fifo_b_pop, fifo_c_pop, fifo_d_pop;
  logic [31:0] fifo_a_wdata, fifo_b_wdata;
  logic start_a, start_b, fifo_reset, ps_win_wr, ps_out_wr;
  logic [15:0] ps_value;
  int checks = 0, failures = 0;

  mt_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  // side-effect outputs as a vector, for "exactly this one pulses" checks
  function automatic logic [10:0] pulses();
    return {fifo_a_push, fifo_b_push, fifo_a_pop, fifo_b_pop, fifo_c_pop,
            fifo_d_pop, start_a, start_b, fifo_reset, ps_win_wr, ps_out_wr};
  endfunction

  // one access; returns read data and the pulses seen in the strobe cycle
  task automatic acc(input logic [4:0] a, input bit w, input logic [15:0] d,
                     output logic [15:0] rd, output logic [10:0] p);
    @(negedge clk);
    reg_addr = a;
    reg_write = w;
    reg_wdata = d;
    #1;
    reg_wr = w && reg_hit;
    reg_rd = !w && reg_hit;
    #1;
    rd = reg_rdata;
    p = pulses();
    @(posedge clk);
    #1 reg_wr = 0;
    reg_rd = 0;
  endtask

  logic [15:0] rd;
  logic [10:0] p;
  initial begin
    #12 rst_n = 1;
    // hit map
    for (int a = 0; a < 32; a += 2) begin
      automatic bit rw = (a == 0) || (a >= 8 && a <= 14);
      automatic bit ro = (a >= 2 && a <= 6) || (a >= 16 && a <= 20);
      automatic bit wo = (a >= 22);
      reg_addr = 5'(a);
      reg_write = 0;
      #1 check(reg_hit == (rw || ro), $sformatf("read hit %02h", a));
      reg_write = 1;
      #1 check(reg_hit == (rw || wo), $sformatf("write hit %02h", a));
    end
    // CSR0
    acc(REG_CSR0, 1, 16'hBEEF, rd, p);
    check(p == '0, "CSR0 write has no side effect");
    acc(REG_CSR0, 0, '0, rd, p);
    check(rd == 16'hBEEF && csr0 == 16'hBEEF, "CSR0 read back");
    // CSR1 is the CCB status word
    csr1 = csr1_t'(16'h9C37);
    acc(REG_CSR1, 0, '0, rd, p);
    check(rd == 16'h9C37, "CSR1");
    // CSR2: full on 3:0, empty on 7:4, upper byte zero
    fifo_full = 4'b1010;
    fifo_empty = 4'b0101;
    acc(REG_CSR2, 0, '0, rd, p);
    check(rd == 16'h005A, "CSR2");
    // CSR3 firmware date
    acc(REG_CSR3, 0, '0, rd, p);
    check(rd == 16'h0871, $sformatf("CSR3 %04h", rd));
    // FIFO_A load: low half staged, high half pushes
    acc(REG_FIFOA_LO, 1, 16'h1234, rd, p);
    check(p == '0, "low half does not push");
    acc(REG_FIFOA_HI, 1, 16'hABCD, rd, p);
    check(p == 11'b100_0000_0000 && fifo_a_wdata == 32'hABCD_1234, "FIFO_A push word");
    acc(REG_FIFOB_LO, 1, 16'h5678, rd, p);
    acc(REG_FIFOB_HI, 1, 16'h9ABC, rd, p);
    check(p == 11'b010_0000_0000 && fifo_b_wdata == 32'h9ABC_5678, "FIFO_B push word");
    // FIFO_A read-back (not empty)
    fifo_empty = 4'b0000;
    fifo_a_rdata = 32'hCAFE_F00D;
    fifo_b_rdata = 32'h0BAD_1DEA;
    acc(REG_FIFOA_LO, 0, '0, rd, p);
    check(rd == 16'hF00D && p == '0, "FIFO_A low read, no pop");
    acc(REG_FIFOA_HI, 0, '0, rd, p);
    check(rd == 16'hCAFE && p == 11'b001_0000_0000, "FIFO_A high read pops");
    acc(REG_FIFOB_LO, 0, '0, rd, p);
    check(rd == 16'h1DEA && p == '0, "FIFO_B low read");
    acc(REG_FIFOB_HI, 0, '0, rd, p);
    check(rd == 16'h0BAD && p == 11'b000_1000_0000, "FIFO_B high read pops");
    fifo_c_rdata = 1;
    fifo_d_rdata = 2'b10;
    acc(REG_FIFOC, 0, '0, rd, p);
    check(rd == 16'h0001 && p == 11'b000_0100_0000, "FIFO_C read pops");
    acc(REG_FIFOD, 0, '0, rd, p);
    check(rd == 16'h0002 && p == 11'b000_0010_0000, "FIFO_D read pops");
    // empty FIFOs read as 0
    fifo_empty = 4'b1111;
    acc(REG_FIFOA_HI, 0, '0, rd, p);
    check(rd == 0, "empty FIFO_A reads 0");
    acc(REG_FIFOC, 0, '0, rd, p);
    check(rd == 0, "empty FIFO_C reads 0");
    acc(REG_FIFOD, 0, '0, rd, p);
    check(rd == 0, "empty FIFO_D reads 0");
    // L1A counter
    l1a_count = 16'd4321;
    acc(REG_L1A_CNT, 0, '0, rd, p);
    check(rd == 16'd4321, "L1A counter read");
    // command pulses
    acc(REG_START_A, 1, '0, rd, p);
    check(p == 11'b000_0001_0000, "start A");
    acc(REG_START_B, 1, '0, rd, p);
    check(p == 11'b000_0000_1000, "start B");
    acc(REG_RESET, 1, '0, rd, p);
    check(p == 11'b000_0000_0100, "FIFO reset");
    acc(REG_PS_WIN, 1, 16'h0123, rd, p);
    check(p == 11'b000_0000_0010 && ps_value == 16'h0123, "winner phase shift");
    acc(REG_PS_OUT, 1, 16'h01F0, rd, p);
    check(p == 11'b000_0000_0001 && ps_value == 16'h01F0, "output phase shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
