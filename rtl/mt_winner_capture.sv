// Winner-bit capture into FIFO_C (from the MPC) or FIFO_D (from the MS).
//
// The board under test answers each emulated frame with "winner" bits at
// 80 MHz: one bit from the Muon Port Card, two from the Muon Sorter (line 0
// carries muon 1 in frame 1 and muon 3 in frame 2, line 1 carries muon 2 in
// frame 1 and 0 in frame 2). The bits are latched on clk_win, an 80 MHz DCM
// output whose phase software trims so that the sampling edge sits in the
// middle of the data eye, then moved to the main 80 MHz clock (same
// frequency and source, so one register stage suffices). Width, rate and
// the adjustable input clock follow the specification.
//
// When to record is this design's choice: capture is armed when the matching
// transmitter launches and then writes one FIFO entry per 80 MHz frame until
// the FIFO is full or cleared, so the answer is recorded whatever the
// latency of the board under test. The arm pulse is delayed so that entry k
// holds the bits present at win_in in clk cycle a+2+k, where a is the cycle
// of the arm pulse: with the transmitter's launch pulse as arm, that is the
// cycle in which word k is on the transmitter output (both clocks at zero
// phase shift). A winner returned d frames later is thus in entry k+d.
module mt_winner_capture #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk_win,
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] win_in,     // from the GTLP receivers
  input  logic             arm,        // transmitter launch pulse
  input  logic             clr,        // FIFO reset command
  input  logic             fifo_full,
  output logic             fifo_push,
  output logic [WIDTH-1:0] fifo_wdata,
  output logic             capturing
);
  logic [WIDTH-1:0] win_q;
  logic [2:0]       arm_d;

  always_ff @(posedge clk_win or negedge rst_n) begin
    if (!rst_n) win_q <= '0;
    else        win_q <= win_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_wdata <= '0;
      arm_d      <= '0;
      capturing  <= 1'b0;
    end else begin
      fifo_wdata <= win_q;
      arm_d      <= clr ? 3'b000 : {arm_d[1:0], arm};
      if (clr)            capturing <= 1'b0;
      else if (arm_d[2])  capturing <= 1'b1;
      else if (fifo_full) capturing <= 1'b0;
    end
  end

  assign fifo_push = capturing && !fifo_full && !clr;
endmodule
