// Level-1 accept counter.
//
// Counts the L1A signals received from the CCB so that software can read the
// total over VME. The specification gives the register (16 bits read on
// data[15:0]) and that the FIFO reset command also clears it; counting
// modulo 2^16 is this design's choice.
//
// Interface: l1a is a one-cycle pulse per L1A in the clk domain; clr clears
// the count synchronously and wins over a simultaneous pulse. count shows the
// new value one cycle after the pulse.
module mt_l1a_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             l1a,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (l1a) count <= count + 1'b1;
  end
endmodule
