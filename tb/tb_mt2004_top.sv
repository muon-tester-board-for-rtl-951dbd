// End-to-end testbench for mt2004_top at its default parameters.
//
// The board sits in slot 6 (base 0x300000) and is driven through its VME,
// CCB and backplane pins only. A VME master model runs D16 cycles; models of
// the MPC and MS watch the 32-bit output and answer with winner bits a fixed
// number of frames later. The MPC model answers each frame with the parity of
// the two LCT valid flags and bit 0. The MS model reads the ranks of the
// three muons from frame 2 of each bunch crossing, takes a muon whose rank
// is 64 or more, and answers in the winner format of the MS: line 0 = muon 1
// in frame 1 and muon 3 in frame 2, line 1 = muon 2 in frame 1 and 0 in
// frame 2. Behavioural DCM phase-shift ports answer PSEN.
//
// The run: register checks (CSR0-CSR3, CSR1 against the CCB lines); FIFO_A
// filled to 511 words (full flag, overfill ignored); CCB command 0x24 plays
// it to the MPC (every word checked, frame alignment checked); FIFO_C
// records 511 winner entries, all read back and compared with the MPC model;
// FIFO_B filled to 511 words and started by a VME write, sp_data and all
// 511 FIFO_D entries checked; a short FIFO_B run started by CCB command 0x2F; a
// start on an empty FIFO; FIFO_A read-back; L1A counting including
// consecutive crossings; the reset command; both phase shifts; accesses that
// must not be answered. Each mechanism is counted and one never exercised
// counts as a failure.
module tb_mt2004_top;
  import mt_pkg::*;

  localparam int N_FIFO  = 511;
  localparam int LAT_MPC = 6;   // frames from word out to winner in
  localparam int LAT_MS  = 9;

  logic clk40 = 0, clk80 = 0, clk_vme = 0, rst_n = 0;
  logic dcm_locked = 1;
  logic ps_win_en, ps_win_incdec, ps_win_done, ps_out_en, ps_out_incdec, ps_out_done;
  logic [5:0] ccb_cmd = '0;
  logic ccb_cmd_strobe = 0, ccb_l1a = 0, ccb_bc0 = 0, ccb_bcntres = 0, ccb_eventres = 0;
  logic ccb_ready = 0, ccb_clken = 0;
  logic [4:1] ccb_reserv = '0;
  logic [4:0] ga = 5'd6;
  logic [23:1] vme_a = '0;
  logic [5:0] vme_am = 6'h39;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1, vme_iack_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [15:0] vme_d_in = '0, vme_d_out, csr0;
  logic vme_d_oe, vme_dtack_n;
  logic [31:0] tmb_data, sp_data;
  logic tmb_winner = 0;
  logic [1:0] sp_win = '0;
  logic led_lock, led_dack, led_st_tmb, led_st_sp, led_clkc, led_clkv;
  logic [3:0] led_ful, led_emp;
  int ps_win_shift, ps_win_err, ps_out_shift, ps_out_err;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_ccb_start = 0, m_vme_start = 0, m_full = 0, m_overfill = 0, m_empty_start = 0;
  int m_winner_c = 0, m_winner_d = 0, m_reset = 0, m_l1a = 0, m_ps = 0, m_nack = 0;
  int m_readback = 0;

  mt2004_top dut (
    .clk40, .clk80, .clk80_win(clk80), .clk80_out(clk80), .clk_vme, .rst_n,
    .dcm_locked, .ps_win_en, .ps_win_incdec, .ps_win_done,
    .ps_out_en, .ps_out_incdec, .ps_out_done,
    .ccb_cmd, .ccb_cmd_strobe, .ccb_l1a, .ccb_bc0, .ccb_bcntres, .ccb_eventres,
    .ccb_ready, .ccb_clken, .ccb_reserv,
    .ga, .vme_a, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_lword_n,
    .vme_iack_n, .vme_d_in, .vme_d_out, .vme_d_oe, .vme_dtack_n,
    .tmb_data, .tmb_winner, .sp_data, .sp_win, .csr0,
    .led_lock, .led_dack, .led_ful, .led_emp, .led_st_tmb, .led_st_sp,
    .led_clkc, .led_clkv);

  dcm_ps_model dcm_win (.psclk(clk80), .psen(ps_win_en), .psincdec(ps_win_incdec),
    .psdone(ps_win_done), .shift(ps_win_shift), .errors(ps_win_err));
  dcm_ps_model dcm_out (.psclk(clk80), .psen(ps_out_en), .psincdec(ps_out_incdec),
    .psdone(ps_out_done), .shift(ps_out_shift), .errors(ps_out_err));

  // 80 MHz and 40 MHz with coinciding rising edges
  always begin
    #6 clk80 = ~clk80;
    if (clk80) clk40 = ~clk40;
  end
  always #31 clk_vme = ~clk_vme;

  initial begin
    repeat (400000) @(posedge clk80);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- board-under-test models ----------------
  function automatic logic mpc_f(input logic [31:0] w);
    tmb_frame1_t f = w;
    return w[0] ^ f.lct0.valid ^ f.lct1.valid;
  endfunction
  // MS answer to one bunch crossing, from its frame-2 word: {frame 1, frame 2}
  function automatic logic [3:0] ms_f(input logic [31:0] frame2_word);
    sp_frame2_t f = frame2_word;
    logic s1 = f.mu1.rank >= 7'd64;
    logic s2 = f.mu2.rank >= 7'd64;
    logic s3 = f.mu3.rank >= 7'd64;
    return {s2, s1, 1'b0, s3};
  endfunction

  logic       mpc_hist[$];
  logic [1:0] ms_hist[$];
  logic [31:0] tmb_log[$], sp_log[$];
  bit          frame1_log[$];
  initial begin
    repeat (LAT_MPC + 1) mpc_hist.push_front(1'b0);
    repeat (LAT_MS + 1) ms_hist.push_front(2'b00);
  end
  always @(negedge clk80) begin
    // clk40 is high in the first half of a bunch crossing
    mpc_hist.push_front(mpc_f(tmb_data));
    if (clk40) begin
      ms_hist.push_front(2'b00);          // frame 1: answered once frame 2 is in
    end else begin
      automatic logic [3:0] a = ms_f(sp_data);
      ms_hist[0] = a[3:2];                // answer for frame 1
      ms_hist.push_front(a[1:0]);         // answer for frame 2
    end
    tmb_winner = mpc_hist[LAT_MPC];
    sp_win = ms_hist[LAT_MS];
    void'(mpc_hist.pop_back());
    void'(ms_hist.pop_back());
    tmb_log.push_back(tmb_data);
    sp_log.push_back(sp_data);
    frame1_log.push_back(clk40);
  end

  // ---------------- VME master ----------------
  task automatic vme_cycle(input logic [23:0] addr, input bit write,
                           input logic [15:0] wdata, output logic [15:0] rdata,
                           output bit acked);
    @(negedge clk80);
    vme_a = addr[23:1];
    vme_write_n = !write;
    vme_d_in = wdata;
    #3 vme_as_n = 0;
    #4 vme_ds_n = 2'b00;
    acked = 0;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk80);
      #1;
      if (!vme_dtack_n) begin acked = 1; break; end
    end
    rdata = vme_d_out;
    #2 vme_ds_n = 2'b11;
    vme_as_n = 1;
    wait (vme_dtack_n);
  endtask

  task automatic vme_wr(input logic [4:0] off, input logic [15:0] d);
    logic [15:0] r;
    bit ack;
    vme_cycle(24'h300000 | 24'(off), 1, d, r, ack);
    check(ack, $sformatf("write %02h acknowledged", off));
  endtask

  task automatic vme_rd(input logic [4:0] off, output logic [15:0] d);
    bit ack;
    vme_cycle(24'h300000 | 24'(off), 0, '0, d, ack);
    check(ack, $sformatf("read %02h acknowledged", off));
  endtask

  // ---------------- CCB ----------------
  task automatic ccb_command(input logic [5:0] code);
    @(negedge clk40);
    ccb_cmd = code;
    ccb_cmd_strobe = 1;
    @(negedge clk40);
    ccb_cmd = '0;
    ccb_cmd_strobe = 0;
  endtask

  // ---------------- helpers ----------------
  // find a transmission in a log: first index >= from holding a nonzero word
  function automatic int find_start(ref logic [31:0] log[$], input int from);
    for (int i = from; i < log.size(); i++) if (log[i] != 0) return i;
    return -1;
  endfunction

  task automatic load_fifo(input bit b, input int n, ref logic [31:0] words[$]);
    words.delete();
    for (int i = 0; i < n; i++) begin
      automatic logic [31:0] w = $urandom;
      if (i == 0) w[31] = 1'b1;  // first word nonzero marks the start
      words.push_back(w);
      vme_wr(b ? REG_FIFOB_LO : REG_FIFOA_LO, w[15:0]);
      vme_wr(b ? REG_FIFOB_HI : REG_FIFOA_HI, w[31:16]);
    end
  endtask

  task automatic check_stream(ref logic [31:0] log[$], input int from,
                              ref logic [31:0] words[$], input string name,
                              output int i0);
    i0 = find_start(log, from);
    check(i0 >= 0, {name, " transmission seen"});
    if (i0 < 0) return;
    check(frame1_log[i0], {name, " first word in frame 1"});
    for (int j = 0; j < words.size(); j++)
      check(log[i0 + j] == words[j], $sformatf("%s word %0d", name, j));
    for (int j = words.size(); j < words.size() + 4; j++)
      check(log[i0 + j] == 0, {name, " idle after"});
  endtask

  logic [15:0] r, r2;
  logic [31:0] wa[$], wb[$], wc[$];
  int i0, from;
  bit ack;

  initial begin
    #40 rst_n = 1;
    repeat (10) @(negedge clk80);

    // ---- registers ----
    vme_rd(REG_CSR2, r);
    check(r == 16'h00F0, $sformatf("CSR2 after reset %04h", r));
    check(led_emp == 4'hF && led_ful == 4'h0, "empty LEDs after reset");
    vme_rd(REG_CSR3, r);
    check(r == 16'h0871, $sformatf("CSR3 %04h", r));
    vme_wr(REG_CSR0, 16'h5AC3);
    vme_rd(REG_CSR0, r);
    check(r == 16'h5AC3 && csr0 == 16'h5AC3, "CSR0");
    check(led_dack, "DACK LED after an access");
    @(negedge clk40);
    {ccb_reserv[4], ccb_reserv[3], ccb_reserv[2], ccb_reserv[1]} = 4'b1001;
    ccb_clken = 1; ccb_ready = 1; ccb_bc0 = 0; ccb_eventres = 1; ccb_bcntres = 0;
    ccb_cmd = 6'h15;
    repeat (3) @(negedge clk40);
    vme_rd(REG_CSR1, r);
    check(r == 16'h9C56, $sformatf("CSR1 %04h", r));
    ccb_reserv = '0; ccb_clken = 0; ccb_ready = 0; ccb_eventres = 0; ccb_cmd = '0;

    // ---- FIFO_A full, CCB start, FIFO_C winners ----
    load_fifo(0, N_FIFO, wa);
    vme_rd(REG_CSR2, r);
    check(r == 16'h00E1, $sformatf("CSR2 with FIFO_A full %04h", r));
    if (r[0]) m_full++;
    check(led_ful[0] && !led_emp[0], "FULA LED");
    vme_wr(REG_FIFOA_LO, 16'hFFFF);
    vme_wr(REG_FIFOA_HI, 16'hFFFF);  // dropped: FIFO full
    m_overfill++;
    from = tmb_log.size();
    ccb_command(CCB_CMD_INJECT_TMB);
    m_ccb_start++;
    repeat (N_FIFO + 40) @(negedge clk80);
    check(led_st_tmb, "ST_TMB LED");
    check_stream(tmb_log, from, wa, "TMB", i0);
    check(sp_log.size() > 0 && find_start(sp_log, from) < 0, "no SP output");
    vme_rd(REG_CSR2, r);
    check(r == 16'h00B4, $sformatf("CSR2 after TMB run %04h", r));
    // FIFO_C: entry k = MPC answer to word k-LAT_MPC
    for (int k = 0; k < N_FIFO; k++) begin
      automatic logic e = (k >= LAT_MPC) ? mpc_f(wa[k - LAT_MPC]) : 1'b0;
      vme_rd(REG_FIFOC, r);
      check(r == {15'b0, e}, $sformatf("FIFO_C entry %0d", k));
      m_winner_c++;
    end
    vme_rd(REG_CSR2, r);
    check(r == 16'h00F0, $sformatf("all empty after reading FIFO_C %04h", r));
    vme_rd(REG_FIFOC, r);
    check(r == 0, "empty FIFO_C reads 0");

    // ---- FIFO_B, VME start, FIFO_D winners ----
    load_fifo(1, N_FIFO, wb);
    from = sp_log.size();
    vme_wr(REG_START_B, 16'h0);
    m_vme_start++;
    repeat (N_FIFO + 40) @(negedge clk80);
    check(led_st_sp, "ST_SP LED");
    check_stream(sp_log, from, wb, "SP", i0);
    vme_rd(REG_CSR2, r);
    check(r[3] && !r[7], "FIFO_D full after capture");
    for (int k = 0; k < N_FIFO; k++) begin
      // the last word (510) is a frame 1 with no frame 2: answered with 0
      automatic int j = k - LAT_MS;
      automatic logic [3:0] a = (j >= 0 && (j | 1) < N_FIFO) ? ms_f(wb[j | 1]) : 4'b0;
      automatic logic [1:0] e = (j % 2 == 0) ? a[3:2] : a[1:0];
      vme_rd(REG_FIFOD, r);
      check(r == {14'b0, e}, $sformatf("FIFO_D entry %0d: %04h", k, r));
      m_winner_d++;
    end

    // ---- start with an empty FIFO_A sends nothing ----
    from = tmb_log.size();
    ccb_command(CCB_CMD_INJECT_TMB);
    repeat (20) @(negedge clk80);
    check(find_start(tmb_log, from) < 0, "empty FIFO_A sends nothing");
    m_empty_start++;

    // ---- L1A counting ----
    @(negedge clk40);
    ccb_l1a = 1;
    repeat (3) @(negedge clk40);
    ccb_l1a = 0;
    repeat (2) @(negedge clk40);
    repeat (4) begin
      ccb_l1a = 1;
      @(negedge clk40);
      ccb_l1a = 0;
      repeat (5) @(negedge clk40);
    end
    vme_rd(REG_L1A_CNT, r);
    check(r == 16'd7, $sformatf("L1A count %0d", r));
    if (r != 0) m_l1a++;

    // ---- FIFO_A read-back over VME ----
    load_fifo(0, 3, wc);
    for (int k = 0; k < 3; k++) begin
      vme_rd(REG_FIFOA_LO, r);
      vme_rd(REG_FIFOA_HI, r2);
      check({r2, r} == wc[k], $sformatf("FIFO_A read-back %0d", k));
      m_readback++;
    end
    vme_rd(REG_CSR2, r);
    check(r[4], "FIFO_A empty after read-back");

    // ---- reset command ----
    load_fifo(1, 5, wc);
    vme_wr(REG_RESET, 16'h0);
    m_reset++;
    vme_rd(REG_CSR2, r);
    check(r == 16'h00F0, $sformatf("CSR2 after reset command %04h", r));
    vme_rd(REG_L1A_CNT, r);
    check(r == 0, "L1A counter cleared");

    // ---- FIFO_B started by CCB command 0x2F ----
    load_fifo(1, 6, wc);
    from = sp_log.size();
    ccb_command(CCB_CMD_INJECT_SP);
    m_ccb_start++;
    repeat (20) @(negedge clk80);
    check_stream(sp_log, from, wc, "SP by CCB", i0);
    check(find_start(tmb_log, from) < 0, "no TMB output on 0x2F");

    // ---- phase shifts ----
    vme_wr(REG_PS_WIN, 16'd5);
    vme_wr(REG_PS_OUT, 16'h01FD);  // -3
    repeat (100) @(negedge clk80);
    check(ps_win_shift == 5, $sformatf("winner clock shift %0d", ps_win_shift));
    check(ps_out_shift == -3, $sformatf("output clock shift %0d", ps_out_shift));
    check(ps_win_err == 0 && ps_out_err == 0, "DCM handshake");
    if (ps_win_shift != 0) m_ps++;

    // ---- accesses that get no DTACK ----
    vme_cycle(24'h280000, 0, '0, r, ack);     // slot 5
    check(!ack, "other slot not answered");
    vme_cycle(24'h300014, 1, 16'h1, r, ack);  // write to a read-only register
    check(!ack, "write to L1A counter not answered");
    if (!ack) m_nack++;

    // ---- mechanism coverage ----
    check(m_ccb_start > 0, "CCB start exercised");
    check(m_vme_start > 0, "VME start exercised");
    check(m_full > 0 && m_overfill > 0, "FIFO full exercised");
    check(m_empty_start > 0, "start on empty FIFO exercised");
    check(m_winner_c > 0 && m_winner_d > 0, "winner capture exercised");
    check(m_reset > 0, "reset command exercised");
    check(m_l1a > 0, "L1A counting exercised");
    check(m_ps > 0, "phase shift exercised");
    check(m_nack > 0, "unanswered access exercised");
    check(m_readback > 0, "FIFO read-back exercised");
    $display("mechanisms: ccb_start=%0d vme_start=%0d full=%0d empty_start=%0d winner_c=%0d winner_d=%0d reset=%0d l1a=%0d ps=%0d nack=%0d readback=%0d",
             m_ccb_start, m_vme_start, m_full, m_empty_start, m_winner_c, m_winner_d,
             m_reset, m_l1a, m_ps, m_nack, m_readback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
