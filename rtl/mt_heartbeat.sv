// Clock-alive blinker.
//
// Divides the monitored clock so that an LED blinks: the output toggles every
// HALF_PERIOD cycles of clk. A stopped clock freezes the LED. The default
// gives about 10 Hz from the 40.08 MHz CCB clock (toggle every 2,004,000
// cycles); the board uses a second instance for the 16 MHz VME clock.
module mt_heartbeat #(
  parameter int unsigned HALF_PERIOD = 2_004_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic blink
);
  logic [$clog2(HALF_PERIOD)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      blink <= 1'b0;
    end else if (cnt == ($clog2(HALF_PERIOD))'(HALF_PERIOD - 1)) begin
      cnt   <= '0;
      blink <= ~blink;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
