// Pattern transmitter: plays a pattern FIFO out to the backplane.
//
// The tester emulates a Trigger Motherboard (FIFO_A towards the Muon Port
// Card) or a Sector Processor (FIFO_B towards the Muon Sorter). Each backplane
// word is 32 bits sent at 80 MHz, two frames per 40 MHz bunch crossing; the
// meaning of the bits (two LCTs per word pair for the TMB, three muons for the
// SP) is carried by the loaded data, not by this block. On a start command
// (CCB command or VME write) the block waits for the right clock phase and
// then sends one FIFO word per 80 MHz cycle until the FIFO is empty. The
// specification gives the width, the rate and the start sources; the phase
// alignment, the play-until-empty rule and the idle value are this design's
// choices.
//
// Timing: bx_start is high in the clk cycle whose ending edge begins a bunch
// crossing. The first word is taken from the FIFO at the edge in the middle of
// a crossing and passes the output register (clocked by clk_out, the
// phase-adjustable DCM output of the same frequency) at the next edge, so it
// is on tx_data during the first half of a crossing: word 2k is frame 1 and
// word 2k+1 is frame 2 of crossing k. Between transmissions tx_data is 0. A
// start while a transmission is pending or running is ignored.
module mt_pattern_tx #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             clk_out,
  input  logic             rst_n,
  input  logic             start,     // one-cycle start request
  input  logic             bx_start,
  input  logic [WIDTH-1:0] fifo_rdata,
  input  logic             fifo_empty,
  output logic             fifo_pop,
  output logic [WIDTH-1:0] tx_data,   // to the GTLP drivers, clk_out domain
  output logic             busy,
  output logic             launched   // one-cycle pulse when sending begins
);
  logic             armed, sending;
  logic [WIDTH-1:0] data_r;
  logic             send;

  assign send     = sending || (armed && !bx_start);
  assign fifo_pop = send && !fifo_empty;
  assign launched = armed && !bx_start;
  assign busy     = armed || sending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      sending <= 1'b0;
      data_r  <= '0;
    end else begin
      if (start && !busy) armed <= 1'b1;
      if (send) begin
        armed   <= 1'b0;
        sending <= !fifo_empty;
        data_r  <= fifo_empty ? '0 : fifo_rdata;
      end
    end
  end

  always_ff @(posedge clk_out or negedge rst_n) begin
    if (!rst_n) tx_data <= '0;
    else        tx_data <= data_r;
  end
endmodule
