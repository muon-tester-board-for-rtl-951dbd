// CCB interface: backplane control lines from the Clock and Control Board.
//
// The CCB drives the board clock (40.08 MHz, one bunch crossing per period)
// and a set of GTLP control lines: the 6-bit command bus with its strobe,
// L1A, BC0, bunch counter and event counter resets, ready, clock enable and
// four reserved lines. All of them are registered on the CCB clock (clk40).
// A command is taken when its strobe is high; the two codes the tester
// decodes are 0x24 (inject the TMB patterns of FIFO_A) and 0x2F (inject the
// SP patterns of FIFO_B). The codes, the line list and the CSR1 layout follow
// the specification.
//
// The rest of the logic runs on the doubled 80 MHz clock (clk80), which comes
// from the same DCM and is edge aligned with clk40. Events cross by toggles:
// each decoded command or L1A flips a bit in the clk40 domain and the clk80
// domain emits a one-cycle pulse when it sees the flip, so events in
// consecutive bunch crossings are all delivered. A free-running clk40 toggle
// gives bx_start, high in the clk80 cycle whose ending edge begins a bunch
// crossing; the transmitters use it to send the first 80 MHz frame of a word
// pair in the first half of the crossing. The crossing mechanism is this
// design's own choice.
//
// Latency: a command registered at clk40 edge N reaches start_a/start_b in
// the clk80 cycle that follows clk40 edge N+1.
module mt_ccb_if
  import mt_pkg::*;
(
  input  logic       clk40,
  input  logic       clk80,
  input  logic       rst_n,
  // CCB backplane lines (after the GTLP receivers, active high)
  input  logic [5:0] ccb_cmd,
  input  logic       ccb_cmd_strobe,
  input  logic       ccb_l1a,
  input  logic       ccb_bc0,
  input  logic       ccb_bcntres,
  input  logic       ccb_eventres,
  input  logic       ccb_ready,
  input  logic       ccb_clken,
  input  logic [4:1] ccb_reserv,
  // clk80 domain outputs
  output logic       start_a,    // one-cycle pulse: command 0x24
  output logic       start_b,    // one-cycle pulse: command 0x2F
  output logic       l1a_pulse,  // one-cycle pulse per L1A
  output logic       bx_start,   // next clk80 edge starts a bunch crossing
  output csr1_t      csr1        // registered CCB lines (quasi-static)
);
  // ---------------- clk40 domain ----------------
  logic [5:0] cmd_q;
  logic       strobe_q, l1a_q;
  logic       tog_a, tog_b, tog_l1a, tog_bx;

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      cmd_q    <= '0;
      strobe_q <= 1'b0;
      l1a_q    <= 1'b0;
      csr1     <= '0;
    end else begin
      cmd_q          <= ccb_cmd;
      strobe_q       <= ccb_cmd_strobe;
      l1a_q          <= ccb_l1a;
      csr1.bcntres   <= ccb_bcntres;
      csr1.eventres  <= ccb_eventres;
      csr1.cmd       <= ccb_cmd;
      csr1.l1a       <= ccb_l1a;
      csr1.bc0       <= ccb_bc0;
      csr1.ready     <= ccb_ready;
      csr1.clken     <= ccb_clken;
      csr1.res       <= {ccb_reserv[4], ccb_reserv[3], ccb_reserv[2], ccb_reserv[1]};
    end
  end

  always_ff @(posedge clk40 or negedge rst_n) begin
    if (!rst_n) begin
      tog_a   <= 1'b0;
      tog_b   <= 1'b0;
      tog_l1a <= 1'b0;
      tog_bx  <= 1'b0;
    end else begin
      tog_bx <= ~tog_bx;
      if (strobe_q && cmd_q == CCB_CMD_INJECT_TMB) tog_a <= ~tog_a;
      if (strobe_q && cmd_q == CCB_CMD_INJECT_SP)  tog_b <= ~tog_b;
      if (l1a_q) tog_l1a <= ~tog_l1a;
    end
  end

  // ---------------- clk80 domain ----------------
  logic [3:0] s, s_d;  // {bx, l1a, b, a}

  always_ff @(posedge clk80 or negedge rst_n) begin
    if (!rst_n) begin
      s   <= '0;
      s_d <= '0;
    end else begin
      s   <= {tog_bx, tog_l1a, tog_b, tog_a};
      s_d <= s;
    end
  end

  assign start_a   = s[0] ^ s_d[0];
  assign start_b   = s[1] ^ s_d[1];
  assign l1a_pulse = s[2] ^ s_d[2];
  assign bx_start  = s[3] ^ s_d[3];
endmodule
