// Shared constants and types of the MT'2004 muon tester FPGA logic.
//
// Holds the CCB command codes, the accepted VME address modifiers, the
// register offsets of the VME address map (in bytes from the board base)
// and the CSR field layouts. The codes and offsets are the ones the board
// specification lists; the struct layouts follow its CSR bit tables.
package mt_pkg;

  // CCB commands decoded from ccb_cmd[5:0] (specification, decoded commands table)
  localparam logic [5:0] CCB_CMD_INJECT_TMB = 6'h24;  // send FIFO_A to the MPC
  localparam logic [5:0] CCB_CMD_INJECT_SP  = 6'h2F;  // send FIFO_B to the MS

  // VME address modifiers answered (A24 data accesses)
  localparam logic [5:0] AM_A24_USER_DATA = 6'h39;
  localparam logic [5:0] AM_A24_USER_PROG = 6'h3A;
  localparam logic [5:0] AM_A24_SUP_DATA  = 6'h3D;
  localparam logic [5:0] AM_A24_SUP_PROG  = 6'h3E;

  // Register offsets from the board base address (byte addresses, all even)
  typedef enum logic [4:0] {
    REG_CSR0      = 5'h00,  // R/W general purpose
    REG_CSR1      = 5'h02,  // R   CCB interface status
    REG_CSR2      = 5'h04,  // R   FIFO status
    REG_CSR3      = 5'h06,  // R   firmware revision date
    REG_FIFOA_LO  = 5'h08,  // R/W FIFO_A data[15:0]
    REG_FIFOA_HI  = 5'h0A,  // R/W FIFO_A data[31:16]
    REG_FIFOB_LO  = 5'h0C,  // R/W FIFO_B data[15:0]
    REG_FIFOB_HI  = 5'h0E,  // R/W FIFO_B data[31:16]
    REG_FIFOC     = 5'h10,  // R   TMB winner on data[0]
    REG_FIFOD     = 5'h12,  // R   SP winners on data[1:0]
    REG_L1A_CNT   = 5'h14,  // R   L1A counter
    REG_START_A   = 5'h16,  // W   start transmission from FIFO_A
    REG_START_B   = 5'h18,  // W   start transmission from FIFO_B
    REG_PS_WIN    = 5'h1A,  // W   fine phase shift, winner input clock
    REG_RESET     = 5'h1C,  // W   reset all FIFOs and the L1A counter
    REG_PS_OUT    = 5'h1E   // W   fine phase shift, output data clock
  } reg_addr_e;

  // CSR1: CCB backplane lines as registered on the CCB clock
  typedef struct packed {
    logic [3:0] res;       // [15:12] ccb_reserv4..1 (res4 at bit 15)
    logic       clken;     // [11]
    logic       ready;     // [10]
    logic       bc0;       // [9]
    logic       l1a;       // [8]
    logic [5:0] cmd;       // [7:2]
    logic       eventres;  // [1]
    logic       bcntres;   // [0]
  } csr1_t;

  // CSR2: FIFO flags, one bit per FIFO (A at bit 0 / bit 4)
  typedef struct packed {
    logic [7:0] zero;
    logic [3:0] empty;     // [7:4] D,C,B,A
    logic [3:0] full;      // [3:0] D,C,B,A
  } csr2_t;

  // CSR3: firmware revision date; the year counts from 2000
  typedef struct packed {
    logic [3:0] zero;
    logic [2:0] year;      // [11:9]
    logic [3:0] month;     // [8:5]
    logic [4:0] day;       // [4:0]
  } csr3_t;

  // ---------------- TMB-to-MPC word format ----------------
  // Each 32-bit word carries two LCTs, LCT 0 in bits 15:0 and LCT 1 in
  // bits 31:16; frame 1 and frame 2 of a bunch crossing differ.
  typedef struct packed {
    logic       valid;        // valid pattern flag
    logic [3:0] quality;      // used by the MPC for sorting
    logic [3:0] pattern_id;   // CLCT pattern ID
    logic [6:0] wire_group;
  } tmb_lct_f1_t;

  typedef struct packed {
    logic [3:0] csc_id;
    logic       bc0;
    logic       bxn0;         // bunch crossing number, bit 0
    logic       sync_err;
    logic       bend;         // L/R bend angle
    logic [7:0] half_strip;
  } tmb_lct_f2_t;

  typedef struct packed { tmb_lct_f1_t lct1, lct0; } tmb_frame1_t;
  typedef struct packed { tmb_lct_f2_t lct1, lct0; } tmb_frame2_t;

  // ---------------- SP-to-MS word format ----------------
  // Each word carries three muons (muon 1 in bits 9:0, muon 2 in 19:10,
  // muon 3 in 29:20) and two bits common to the three.
  typedef struct packed {
    logic [4:0] eta;
    logic [4:0] phi;
  } sp_muon_f1_t;

  typedef struct packed {
    logic       hl;
    logic       c;
    logic       vc;
    logic [6:0] rank;
  } sp_muon_f2_t;

  typedef struct packed {
    logic        se;          // synchronisation error
    logic        bc0;         // bunch crossing zero flag
    sp_muon_f1_t mu3, mu2, mu1;
  } sp_frame1_t;

  typedef struct packed {
    logic        spare;
    logic        bx0;         // bunch crossing counter, bit 0
    sp_muon_f2_t mu3, mu2, mu1;
  } sp_frame2_t;

endpackage
