// VME A24/D16 slave with geographical addressing.
//
// The board answers in the A24 space at the base address given by its slot:
// an access is for this board when A[23:19] equals the 5-bit geographical
// code, the address modifier is 0x39, 0x3A, 0x3D or 0x3E, and it is a 16-bit
// word access (both data strobes low, LWORD* high). Slot 6 thus maps to
// 0x300000. Those rules are from the specification. This design also
// requires A[18:5] = 0, IACK* high and the offset to be one of the register
// map entries with the right direction (hit from the register file);
// anything else gets no DTACK*, and the master's bus timer ends the cycle.
//
// The VME strobes are asynchronous, so AS*, DS1*, DS0* and WRITE* pass
// through two flip-flops into the 80 MHz clock domain. The address, AM and
// data lines are stable while the strobes are low and are sampled directly.
// One cycle after a data strobe is seen the access is decoded; on a hit,
// reg_wr or reg_rd pulses for one cycle, read data is latched into the output
// register on the same edge, and DTACK* goes low on the next edge. DTACK* and
// the data drivers are released once both data strobes are high again.
// Response time from DS* low to DTACK* low: the fifth clk edge after the
// strobes fall, 4 to 5 clk periods (50-62 ns at 80 MHz).
module mt_vme_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ga,          // slot number (geographical address)
  input  logic [23:1] vme_a,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic        vme_iack_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,    // drive the data bus (read cycle)
  output logic        vme_dtack_n,
  // register-file side
  output logic [4:0]  reg_addr,    // byte offset from the base, bit 0 = 0
  output logic        reg_write,   // direction of the access being decoded
  input  logic        reg_hit,     // offset/direction is in the register map
  output logic        reg_wr,      // one-cycle write strobe
  output logic        reg_rd,      // one-cycle read strobe
  output logic [15:0] reg_wdata,
  input  logic [15:0] reg_rdata,   // valid in the reg_rd cycle
  output logic        access       // one-cycle pulse per acknowledged access
);
  import mt_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_DECODE, S_ACK, S_WAIT_REL} state_e;
  state_e state;

  logic [1:0] as_sync, wr_sync;
  logic [1:0] ds0_sync, ds1_sync;
  logic       as_act, ds_both, ds_any, is_write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync  <= 2'b11;
      ds0_sync <= 2'b11;
      ds1_sync <= 2'b11;
      wr_sync  <= 2'b11;
    end else begin
      as_sync  <= {as_sync[0],  vme_as_n};
      ds0_sync <= {ds0_sync[0], vme_ds_n[0]};
      ds1_sync <= {ds1_sync[0], vme_ds_n[1]};
      wr_sync  <= {wr_sync[0],  vme_write_n};
    end
  end

  assign as_act   = !as_sync[1];
  assign ds_both  = !ds0_sync[1] && !ds1_sync[1];
  assign ds_any   = !ds0_sync[1] || !ds1_sync[1];
  assign is_write = !wr_sync[1];

  logic am_ok, addr_ok, selected;
  always_comb begin
    am_ok = (vme_am == AM_A24_USER_DATA) || (vme_am == AM_A24_USER_PROG) ||
            (vme_am == AM_A24_SUP_DATA)  || (vme_am == AM_A24_SUP_PROG);
    addr_ok  = (vme_a[23:19] == ga) && (vme_a[18:5] == '0);
    selected = as_act && ds_both && am_ok && addr_ok && vme_lword_n && vme_iack_n;
  end

  assign reg_addr  = {vme_a[4:1], 1'b0};
  assign reg_write = is_write;
  assign reg_wdata = vme_d_in;

  always_comb begin
    reg_wr = 1'b0;
    reg_rd = 1'b0;
    if (state == S_DECODE && selected && reg_hit) begin
      reg_wr = is_write;
      reg_rd = !is_write;
    end
  end
  assign access = reg_wr || reg_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      vme_dtack_n <= 1'b1;
      vme_d_oe    <= 1'b0;
      vme_d_out   <= '0;
    end else begin
      case (state)
        S_IDLE:
          if (as_act && ds_any) state <= S_DECODE;
        S_DECODE:
          if (access) begin
            state <= S_ACK;
            if (reg_rd) vme_d_out <= reg_rdata;
          end else begin
            state <= S_WAIT_REL;
          end
        S_ACK: begin
          vme_dtack_n <= 1'b0;
          vme_d_oe    <= !is_write;
          if (!ds_any) begin
            vme_dtack_n <= 1'b1;
            vme_d_oe    <= 1'b0;
            state       <= S_IDLE;
          end
        end
        S_WAIT_REL:
          if (!ds_any) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Handshake rule: the board acknowledges only inside an access it decoded
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (vme_dtack_n || state == S_ACK)
        else $error("mt_vme_slave: DTACK* low outside an acknowledged access");
      assert (!(reg_wr && reg_rd))
        else $error("mt_vme_slave: read and write strobes together");
    end
  end
endmodule
