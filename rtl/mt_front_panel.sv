// Front-panel LED logic.
//
// Drives the LEDs that the FPGA controls (the three power LEDs and DONE are
// wired on the board):
//   LOCK         DCMs locked
//   DACK         VME access to the board, stretched by a one-shot
//   FULA..FULD   FIFO_A..FIFO_D full
//   EMPA..EMPD   FIFO_A..FIFO_D empty
//   ST_TMB/ST_SP start of transmission from FIFO_A / FIFO_B, one-shot
//   CLKC/CLKV    about 10 Hz blink from a counter on the CCB clock / the
//                16 MHz VME clock, showing that each clock runs
// The LED list, the one-shots and the 10 Hz blinkers follow the
// specification; the one-shot length and active-high outputs are this
// design's choices. Flag LEDs follow their inputs with no delay; one-shots
// turn on one clk cycle after their trigger.
module mt_front_panel #(
  parameter int unsigned ONESHOT_CYCLES = 4_000_000,  // ~50 ms at 80 MHz
  parameter int unsigned CCB_HALF       = 2_004_000,  // 40.08 MHz / 20
  parameter int unsigned VME_HALF       = 800_000     // 16 MHz / 20
) (
  input  logic       clk,          // 80 MHz core clock
  input  logic       clk_ccb,      // 40.08 MHz CCB clock
  input  logic       clk_vme,      // 16 MHz VME system clock
  input  logic       rst_n,
  input  logic       dcm_locked,
  input  logic       vme_access,   // one-cycle pulse per access
  input  logic       st_tmb,       // one-cycle pulse, FIFO_A transmission start
  input  logic       st_sp,        // one-cycle pulse, FIFO_B transmission start
  input  logic [3:0] fifo_full,    // {D, C, B, A}
  input  logic [3:0] fifo_empty,   // {D, C, B, A}
  output logic       led_lock,
  output logic       led_dack,
  output logic [3:0] led_ful,      // {FULD, FULC, FULB, FULA}
  output logic [3:0] led_emp,      // {EMPD, EMPC, EMPB, EMPA}
  output logic       led_st_tmb,
  output logic       led_st_sp,
  output logic       led_clkc,
  output logic       led_clkv
);
  assign led_lock = dcm_locked;
  assign led_ful  = fifo_full;
  assign led_emp  = fifo_empty;

  mt_one_shot #(.CYCLES(ONESHOT_CYCLES)) u_dack (
    .clk, .rst_n, .trig(vme_access), .out(led_dack));
  mt_one_shot #(.CYCLES(ONESHOT_CYCLES)) u_st_tmb (
    .clk, .rst_n, .trig(st_tmb), .out(led_st_tmb));
  mt_one_shot #(.CYCLES(ONESHOT_CYCLES)) u_st_sp (
    .clk, .rst_n, .trig(st_sp), .out(led_st_sp));

  mt_heartbeat #(.HALF_PERIOD(CCB_HALF)) u_clkc (
    .clk(clk_ccb), .rst_n, .blink(led_clkc));
  mt_heartbeat #(.HALF_PERIOD(VME_HALF)) u_clkv (
    .clk(clk_vme), .rst_n, .blink(led_clkv));
endmodule
