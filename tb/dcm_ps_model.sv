// Behavioural model of the variable phase-shift port of a DCM.
//
// Each PSEN pulse moves the modelled shift by one step up (PSINCDEC = 1) or
// down (0), and PSDONE pulses for one cycle DONE_DELAY cycles later. A PSEN
// while a step is in progress is counted as a protocol error. The model acts
// on the falling edge of psclk, clear of the register updates of the design.
module dcm_ps_model #(
  parameter int DONE_DELAY = 5
) (
  input  logic     psclk,
  input  logic     psen,
  input  logic     psincdec,
  output logic     psdone,
  output int       shift,
  output int       errors
);
  int busy_cnt = 0;
  initial begin
    psdone = 0;
    shift = 0;
    errors = 0;
  end
  always @(negedge psclk) begin
    psdone <= 1'b0;
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) psdone <= 1'b1;
    end
    if (psen) begin
      if (busy_cnt != 0) errors <= errors + 1;
      shift <= psincdec ? shift + 1 : shift - 1;
      busy_cnt <= DONE_DELAY;
    end
  end
endmodule
