// MT'2004 muon tester board: FPGA logic.
//
// The tester stands in for up to nine Trigger Motherboards (towards the Muon
// Port Card, MPC) or twelve Sector Processors (towards the Muon Sorter, MS)
// when those boards are tested. Software loads 32-bit backplane words into
// FIFO_A (TMB format) or FIFO_B (SP format) over VME; a CCB command (0x24 or
// 0x2F) or a VME write starts the transmitter, which plays the FIFO out at
// 80 MHz, two frames per bunch crossing. The winner bits that the board under
// test returns are recorded, one entry per frame, in FIFO_C (1 bit, MPC) or
// FIFO_D (2 bits, MS) and read back over VME together with the FIFO flags,
// the CCB line status and an L1A counter. Two DCM phase shifts, written over
// VME, trim the winner sampling clock and the output data clock.
//
// Clocks (all from one DCM fed by the CCB clock, edge aligned except for the
// trimmed phases): clk40 is the 40.08 MHz CCB clock, clk80 the doubled core
// clock, clk80_win and clk80_out the phase-shifted copies for the winner
// input and data output registers. clk_vme is the 16 MHz VME system clock,
// used only for its blinker LED. rst_n is an asynchronous reset, released
// synchronously to clk80 by the board.
//
// Outside this module on the board: the DCM itself (its phase-shift port is
// brought out), the GTLP drivers and receivers, the VME transceivers (data
// direction from vme_d_oe), clock source selection, configuration and the
// power LEDs.
module mt2004_top
  import mt_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH     = 511,
  parameter int unsigned ONESHOT_CYCLES = 4_000_000,
  parameter int unsigned CCB_HALF       = 2_004_000,
  parameter int unsigned VME_HALF       = 800_000,
  parameter logic [4:0]  FW_DAY         = 5'd17,
  parameter logic [3:0]  FW_MONTH       = 4'd3,
  parameter logic [2:0]  FW_YEAR        = 3'd4
) (
  // clocks and reset
  input  logic        clk40,
  input  logic        clk80,
  input  logic        clk80_win,
  input  logic        clk80_out,
  input  logic        clk_vme,
  input  logic        rst_n,
  // DCM status and variable phase-shift ports
  input  logic        dcm_locked,
  output logic        ps_win_en,
  output logic        ps_win_incdec,
  input  logic        ps_win_done,
  output logic        ps_out_en,
  output logic        ps_out_incdec,
  input  logic        ps_out_done,
  // CCB backplane
  input  logic [5:0]  ccb_cmd,
  input  logic        ccb_cmd_strobe,
  input  logic        ccb_l1a,
  input  logic        ccb_bc0,
  input  logic        ccb_bcntres,
  input  logic        ccb_eventres,
  input  logic        ccb_ready,
  input  logic        ccb_clken,
  input  logic [4:1]  ccb_reserv,
  // VME
  input  logic [4:0]  ga,
  input  logic [23:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // TMB-to-MPC and SP-to-MS backplane
  output logic [31:0] tmb_data,
  input  logic        tmb_winner,
  output logic [31:0] sp_data,
  input  logic [1:0]  sp_win,
  // general-purpose register
  output logic [15:0] csr0,
  // front panel
  output logic        led_lock,
  output logic        led_dack,
  output logic [3:0]  led_ful,
  output logic [3:0]  led_emp,
  output logic        led_st_tmb,
  output logic        led_st_sp,
  output logic        led_clkc,
  output logic        led_clkv
);
  // ---------------- CCB ----------------
  logic  ccb_start_a, ccb_start_b, l1a_pulse, bx_start;
  csr1_t csr1;

  mt_ccb_if u_ccb (
    .clk40, .clk80, .rst_n,
    .ccb_cmd, .ccb_cmd_strobe, .ccb_l1a, .ccb_bc0, .ccb_bcntres,
    .ccb_eventres, .ccb_ready, .ccb_clken, .ccb_reserv,
    .start_a(ccb_start_a), .start_b(ccb_start_b),
    .l1a_pulse, .bx_start, .csr1);

  // ---------------- VME ----------------
  logic [4:0]  reg_addr;
  logic        reg_write, reg_hit, reg_wr, reg_rd, vme_access;
  logic [15:0] reg_wdata, reg_rdata;

  mt_vme_slave u_vme (
    .clk(clk80), .rst_n, .ga, .vme_a, .vme_am, .vme_as_n, .vme_ds_n,
    .vme_write_n, .vme_lword_n, .vme_iack_n, .vme_d_in, .vme_d_out,
    .vme_d_oe, .vme_dtack_n,
    .reg_addr, .reg_write, .reg_hit, .reg_wr, .reg_rd, .reg_wdata,
    .reg_rdata, .access(vme_access));

  logic [3:0]  fifo_full, fifo_empty;
  logic [31:0] fa_rdata, fb_rdata, fa_wdata, fb_wdata;
  logic        fc_rdata;
  logic [1:0]  fd_rdata;
  logic [15:0] l1a_count;
  logic        fa_push, fb_push, fa_vpop, fb_vpop, fc_pop, fd_pop;
  logic        vme_start_a, vme_start_b, fifo_reset;
  logic        ps_win_wr, ps_out_wr;
  logic [15:0] ps_value;

  mt_regs #(.FW_DAY(FW_DAY), .FW_MONTH(FW_MONTH), .FW_YEAR(FW_YEAR)) u_regs (
    .clk(clk80), .rst_n,
    .reg_addr, .reg_write, .reg_hit, .reg_wr, .reg_rd, .reg_wdata, .reg_rdata,
    .csr1, .fifo_full, .fifo_empty,
    .fifo_a_rdata(fa_rdata), .fifo_b_rdata(fb_rdata),
    .fifo_c_rdata(fc_rdata), .fifo_d_rdata(fd_rdata), .l1a_count,
    .csr0,
    .fifo_a_push(fa_push), .fifo_b_push(fb_push),
    .fifo_a_wdata(fa_wdata), .fifo_b_wdata(fb_wdata),
    .fifo_a_pop(fa_vpop), .fifo_b_pop(fb_vpop),
    .fifo_c_pop(fc_pop), .fifo_d_pop(fd_pop),
    .start_a(vme_start_a), .start_b(vme_start_b), .fifo_reset,
    .ps_win_wr, .ps_out_wr, .ps_value);

  mt_l1a_counter u_l1a (
    .clk(clk80), .rst_n, .clr(fifo_reset), .l1a(l1a_pulse), .count(l1a_count));

  // ---------------- TMB path: FIFO_A -> MPC, MPC winner -> FIFO_C ----------
  logic fa_txpop, tx_a_busy, tx_a_launch;
  logic fc_push, fc_wdata, cap_c;

  mt_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo_a (
    .clk(clk80), .rst_n, .clr(fifo_reset),
    .push(fa_push), .wr_data(fa_wdata), .pop(fa_txpop || fa_vpop),
    .rd_data(fa_rdata), .full(fifo_full[0]), .empty(fifo_empty[0]), .count());

  mt_pattern_tx #(.WIDTH(32)) u_tx_a (
    .clk(clk80), .clk_out(clk80_out), .rst_n,
    .start(ccb_start_a || vme_start_a), .bx_start,
    .fifo_rdata(fa_rdata), .fifo_empty(fifo_empty[0]), .fifo_pop(fa_txpop),
    .tx_data(tmb_data), .busy(tx_a_busy), .launched(tx_a_launch));

  mt_winner_capture #(.WIDTH(1)) u_cap_c (
    .clk_win(clk80_win), .clk(clk80), .rst_n, .win_in(tmb_winner),
    .arm(tx_a_launch), .clr(fifo_reset), .fifo_full(fifo_full[2]),
    .fifo_push(fc_push), .fifo_wdata(fc_wdata), .capturing(cap_c));

  mt_fifo #(.WIDTH(1), .DEPTH(FIFO_DEPTH)) u_fifo_c (
    .clk(clk80), .rst_n, .clr(fifo_reset),
    .push(fc_push), .wr_data(fc_wdata), .pop(fc_pop),
    .rd_data(fc_rdata), .full(fifo_full[2]), .empty(fifo_empty[2]), .count());

  // ---------------- SP path: FIFO_B -> MS, MS winners -> FIFO_D ------------
  logic       fb_txpop, tx_b_busy, tx_b_launch;
  logic       fd_push, cap_d;
  logic [1:0] fd_wdata;

  mt_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo_b (
    .clk(clk80), .rst_n, .clr(fifo_reset),
    .push(fb_push), .wr_data(fb_wdata), .pop(fb_txpop || fb_vpop),
    .rd_data(fb_rdata), .full(fifo_full[1]), .empty(fifo_empty[1]), .count());

  mt_pattern_tx #(.WIDTH(32)) u_tx_b (
    .clk(clk80), .clk_out(clk80_out), .rst_n,
    .start(ccb_start_b || vme_start_b), .bx_start,
    .fifo_rdata(fb_rdata), .fifo_empty(fifo_empty[1]), .fifo_pop(fb_txpop),
    .tx_data(sp_data), .busy(tx_b_busy), .launched(tx_b_launch));

  mt_winner_capture #(.WIDTH(2)) u_cap_d (
    .clk_win(clk80_win), .clk(clk80), .rst_n, .win_in(sp_win),
    .arm(tx_b_launch), .clr(fifo_reset), .fifo_full(fifo_full[3]),
    .fifo_push(fd_push), .fifo_wdata(fd_wdata), .capturing(cap_d));

  mt_fifo #(.WIDTH(2), .DEPTH(FIFO_DEPTH)) u_fifo_d (
    .clk(clk80), .rst_n, .clr(fifo_reset),
    .push(fd_push), .wr_data(fd_wdata), .pop(fd_pop),
    .rd_data(fd_rdata), .full(fifo_full[3]), .empty(fifo_empty[3]), .count());

  // ---------------- DCM phase-shift control ----------------
  mt_dcm_ps u_ps_win (
    .clk(clk80), .rst_n, .wr(ps_win_wr), .value(ps_value),
    .psen(ps_win_en), .psincdec(ps_win_incdec), .psdone(ps_win_done),
    .current(), .busy());

  mt_dcm_ps u_ps_out (
    .clk(clk80), .rst_n, .wr(ps_out_wr), .value(ps_value),
    .psen(ps_out_en), .psincdec(ps_out_incdec), .psdone(ps_out_done),
    .current(), .busy());

  // ---------------- front panel ----------------
  mt_front_panel #(
    .ONESHOT_CYCLES(ONESHOT_CYCLES), .CCB_HALF(CCB_HALF), .VME_HALF(VME_HALF)
  ) u_panel (
    .clk(clk80), .clk_ccb(clk40), .clk_vme, .rst_n, .dcm_locked,
    .vme_access, .st_tmb(tx_a_launch), .st_sp(tx_b_launch),
    .fifo_full, .fifo_empty,
    .led_lock, .led_dack, .led_ful, .led_emp, .led_st_tmb, .led_st_sp,
    .led_clkc, .led_clkv);
endmodule
