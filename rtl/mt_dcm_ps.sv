// Fine phase-shift controller for one DCM.
//
// Two DCM outputs of the board have a phase that software trims over VME:
// the clock that latches the winner bits and the clock of the output data to
// the MPC or MS. The specification only says that a VME write puts a fine
// phase shift into the DCM; the mechanism here is this design's own, built
// on the variable phase-shift port of Virtex-II DCMs (PSEN, PSINCDEC,
// PSDONE, all on psclk = clk).
//
// A write of value[PS_WIDTH-1:0] (two's complement) sets the target shift.
// While the current shift differs from the target, the controller issues one
// PSEN pulse with PSINCDEC = 1 to increase or 0 to decrease, waits for
// PSDONE and updates its copy of the current shift; a new target may be
// written at any time. After reset the DCM and this copy both start at 0.
module mt_dcm_ps #(
  parameter int unsigned PS_WIDTH = 9   // Virtex-II range -255..+255
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,
  input  logic [15:0]                value,
  output logic                       psen,
  output logic                       psincdec,
  input  logic                       psdone,
  output logic signed [PS_WIDTH-1:0] current,
  output logic                       busy
);
  logic signed [PS_WIDTH-1:0] target;
  logic                       waiting;
  logic                       up;

  assign up   = target > current;
  assign busy = waiting || (target != current);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      target   <= '0;
      current  <= '0;
      waiting  <= 1'b0;
      psen     <= 1'b0;
      psincdec <= 1'b0;
    end else begin
      psen <= 1'b0;
      if (wr) target <= signed'(value[PS_WIDTH-1:0]);
      if (waiting) begin
        if (psdone) begin
          waiting <= 1'b0;
          current <= psincdec ? current + 1'b1 : current - 1'b1;
        end
      end else if (target != current && !psen) begin
        psen     <= 1'b1;
        psincdec <= up;
        waiting  <= 1'b1;
      end
    end
  end

  // A DCM accepts a new PSEN only after PSDONE of the previous one
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(psen && waiting && psdone))
      else $error("mt_dcm_ps: PSDONE in the PSEN cycle");
  end
endmodule
