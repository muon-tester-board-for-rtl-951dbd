// One-shot pulse stretcher for front-panel LEDs.
//
// A one-cycle trigger turns the output on for CYCLES clock cycles so that a
// single VME access or transmission start is visible to the eye. A trigger
// while the output is on restarts the interval. The length is this design's
// choice; the default is about 50 ms at 80 MHz.
module mt_one_shot #(
  parameter int unsigned CYCLES = 4_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic out
);
  logic [$clog2(CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (trig)       cnt <= ($clog2(CYCLES+1))'(CYCLES);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign out = (cnt != '0);
endmodule
