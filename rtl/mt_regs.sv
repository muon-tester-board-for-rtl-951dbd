// VME register file and command decoder.
//
// Decodes the sixteen word offsets of the board's VME address map and turns
// accesses into register reads, FIFO loads and pops, and command pulses:
//
//   00 CSR0 R/W  general-purpose 16-bit register
//   02 CSR1 R    CCB lines as last registered on the CCB clock
//   04 CSR2 R    full flags of FIFO_A..D on bits 3:0, empty flags on 7:4
//   06 CSR3 R    firmware date: day [4:0], month [8:5], year-2000 [11:9]
//   08/0A R/W    FIFO_A data[15:0] / data[31:16]
//   0C/0E R/W    FIFO_B data[15:0] / data[31:16]
//   10 R         FIFO_C winner on data[0], other bits 0
//   12 R         FIFO_D winners on data[1:0], other bits 0
//   14 R         L1A counter
//   16/18 W      start transmission from FIFO_A / FIFO_B
//   1A W         phase shift for the winner input clock
//   1C W         reset all FIFOs and the L1A counter
//   1E W         phase shift for the output data clock
//
// The map and the CSR layouts follow the specification. How a 32-bit FIFO
// word is carried by 16-bit accesses is this design's choice: a write to the
// low half is held in a staging register and the write to the high half
// pushes the full word; a read of the low half shows the oldest word without
// removing it and a read of the high half shows the rest and pops it. A FIFO
// read while the FIFO is empty returns 0 and pops nothing. Write data of the
// start and reset commands is ignored; the phase-shift writes pass the data
// word to the DCM controllers.
//
// Timing: reg_rdata is combinational from reg_addr; every side effect of an
// access (push, pop, pulse) happens in the single reg_wr / reg_rd cycle.
module mt_regs
  import mt_pkg::*;
#(
  parameter logic [4:0] FW_DAY   = 5'd17,  // firmware revision 03/17/2004
  parameter logic [3:0] FW_MONTH = 4'd3,
  parameter logic [2:0] FW_YEAR  = 3'd4    // years after 2000
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the VME slave
  input  logic [4:0]  reg_addr,
  input  logic        reg_write,
  output logic        reg_hit,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata,
  // status sources
  input  csr1_t       csr1,
  input  logic [3:0]  fifo_full,    // {D, C, B, A}
  input  logic [3:0]  fifo_empty,   // {D, C, B, A}
  input  logic [31:0] fifo_a_rdata,
  input  logic [31:0] fifo_b_rdata,
  input  logic        fifo_c_rdata,
  input  logic [1:0]  fifo_d_rdata,
  input  logic [15:0] l1a_count,
  // controls
  output logic [15:0] csr0,
  output logic        fifo_a_push,
  output logic        fifo_b_push,
  output logic [31:0] fifo_a_wdata,
  output logic [31:0] fifo_b_wdata,
  output logic        fifo_a_pop,
  output logic        fifo_b_pop,
  output logic        fifo_c_pop,
  output logic        fifo_d_pop,
  output logic        start_a,
  output logic        start_b,
  output logic        fifo_reset,
  output logic        ps_win_wr,
  output logic        ps_out_wr,
  output logic [15:0] ps_value
);
  logic [15:0] stage_a, stage_b;
  csr2_t       csr2;
  csr3_t       csr3;

  assign csr2 = '{zero: '0, empty: fifo_empty, full: fifo_full};
  assign csr3 = '{zero: '0, year: FW_YEAR, month: FW_MONTH, day: FW_DAY};

  // Which offsets exist for which direction
  always_comb begin
    unique case (reg_addr)
      REG_CSR0, REG_FIFOA_LO, REG_FIFOA_HI, REG_FIFOB_LO, REG_FIFOB_HI:
        reg_hit = 1'b1;
      REG_CSR1, REG_CSR2, REG_CSR3, REG_FIFOC, REG_FIFOD, REG_L1A_CNT:
        reg_hit = !reg_write;
      REG_START_A, REG_START_B, REG_PS_WIN, REG_RESET, REG_PS_OUT:
        reg_hit = reg_write;
      default:
        reg_hit = 1'b0;
    endcase
  end

  always_comb begin
    reg_rdata = '0;
    case (reg_addr)
      REG_CSR0:     reg_rdata = csr0;
      REG_CSR1:     reg_rdata = csr1;
      REG_CSR2:     reg_rdata = csr2;
      REG_CSR3:     reg_rdata = csr3;
      REG_FIFOA_LO: reg_rdata = fifo_empty[0] ? '0 : fifo_a_rdata[15:0];
      REG_FIFOA_HI: reg_rdata = fifo_empty[0] ? '0 : fifo_a_rdata[31:16];
      REG_FIFOB_LO: reg_rdata = fifo_empty[1] ? '0 : fifo_b_rdata[15:0];
      REG_FIFOB_HI: reg_rdata = fifo_empty[1] ? '0 : fifo_b_rdata[31:16];
      REG_FIFOC:    reg_rdata = {15'b0, fifo_c_rdata && !fifo_empty[2]};
      REG_FIFOD:    reg_rdata = {14'b0, fifo_empty[3] ? 2'b00 : fifo_d_rdata};
      REG_L1A_CNT:  reg_rdata = l1a_count;
      default:      reg_rdata = '0;
    endcase
  end

  function automatic logic wr_at(input logic [4:0] a);
    return reg_wr && reg_addr == a;
  endfunction
  function automatic logic rd_at(input logic [4:0] a);
    return reg_rd && reg_addr == a;
  endfunction

  always_comb begin
    fifo_a_push  = wr_at(REG_FIFOA_HI);
    fifo_b_push  = wr_at(REG_FIFOB_HI);
    fifo_a_wdata = {reg_wdata, stage_a};
    fifo_b_wdata = {reg_wdata, stage_b};
    fifo_a_pop   = rd_at(REG_FIFOA_HI);
    fifo_b_pop   = rd_at(REG_FIFOB_HI);
    fifo_c_pop   = rd_at(REG_FIFOC);
    fifo_d_pop   = rd_at(REG_FIFOD);
    start_a      = wr_at(REG_START_A);
    start_b      = wr_at(REG_START_B);
    fifo_reset   = wr_at(REG_RESET);
    ps_win_wr    = wr_at(REG_PS_WIN);
    ps_out_wr    = wr_at(REG_PS_OUT);
    ps_value     = reg_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr0    <= '0;
      stage_a <= '0;
      stage_b <= '0;
    end else begin
      if (wr_at(REG_CSR0))     csr0    <= reg_wdata;
      if (wr_at(REG_FIFOA_LO)) stage_a <= reg_wdata;
      if (wr_at(REG_FIFOB_LO)) stage_b <= reg_wdata;
    end
  end
endmodule
