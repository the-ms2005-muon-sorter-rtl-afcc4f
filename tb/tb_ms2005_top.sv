// tb_ms2005_top - end-to-end test of the MS2005 main FPGA at full size.
//
// The test drives the 12 SP inputs with random muons, the CCB lines and the
// VME bus, loops GMT cable 1 back into the on-board receiver, and checks:
//   * Trigger mode: every GMT word, four bx after the SP frames, against a
//     reference sort (highest rank, larger input index on equal rank), the
//     default LUT contents and the GMT bit table; SyncEr with MASKSP and
//     MASKCOMP; Bx bits with MASKER and MASKBXN (counting BXN after BC0);
//     an SP disabled through CSR9; MS_L1A_Request pulses;
//   * winner bits three bx after the SP frames, and the training pattern
//     after the CCB Stop Trigger command, winner mode after Start Trigger;
//   * Test mode: patterns loaded into FIFO_A over VME and sent by the VME
//     command and by the CCB Inject command; the FIFO_C and FIFO_B contents
//     read back over VME against the reference;
//   * RAM playback on a write to the send register and on the CCB bunch
//     counter reset line: 512 words on the GMT outputs and the non-empty
//     ones captured in FIFO_D through the loop-back;
//   * LUT and CSR2 access over VME;
//   * Soft_Reset (FIFO flags in CSR1), the 500 ns reload pulse, the CLK40
//     LED counter.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_ms2005_top;
  import ms_pkg::*;

  localparam int OFS [6] = '{6, 30, 54, 78, 102, 126};

  logic clk = 0, rst = 1;
  logic [N_SP-1:0][31:0] sp_frame = '0;
  logic [N_SP-1:0][1:0]  winner;
  logic [5:0] ccb_cmd = 0;
  logic ccb_cmd_strobe = 0, ccb_bc0 = 0, ccb_bcntres = 0, ms_hard_reset = 0, ms_l1a_request;
  logic [4:0] vme_ga = 5'd14;
  logic vme_as = 0, vme_write = 0;
  logic [1:0] vme_ds = 0;
  logic [5:0] vme_am = 6'h39;
  logic [23:1] vme_addr = 0;
  logic [15:0] vme_wdata = 0, vme_rdata;
  logic vme_dtack;
  logic [N_OUT-1:0][30:0] gmt_out;
  logic [30:0] gmt_rx;
  logic cfg_done = 1, fpga_reload, jtag_enable, jtag_reset;
  logic dcm1_psdone = 0, dcm2_psdone = 0;
  logic [2:0] dcm1_status = 0, dcm2_status = 0;
  logic dcm1_ps_en, dcm2_ps_en, dcm_ps_inc, dcm1_rst, dcm2_rst;
  logic [7:0] clk_delay, fifo_flags;
  logic led_test, led_clk40;
  logic [N_OUT-1:0] muon_valid;

  ms2005_top dut (.*);

  assign gmt_rx = gmt_out[0];   // cable from connector 1 to the on-board receiver

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_sorted = 0, n_ties = 0, n_empty_out = 0, n_win = 0, n_train = 0, n_l1a = 0;
  int n_se_sp = 0, n_se_comp = 0, n_bx_er = 0, n_bx_bxn = 0, n_disabled = 0;
  int n_lut = 0;
  int n_test_words = 0, n_inject = 0, n_ram_words = 0, n_fifo_d = 0, n_soft = 0, n_reload = 0;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  logic [15:0] csr0_m = 0;   // model copy of CSR0
  logic [11:0] csr9_m = 0;

  function automatic logic [6:0] rk(sp_pattern_t [N_SP-1:0] p, int i);
    return p[i/3].mu[i%3].rank;
  endfunction

  function automatic void top4(sp_pattern_t [N_SP-1:0] p, output int idx[4]);
    logic [N_IN-1:0] used;
    used = '0;
    for (int o = 0; o < 4; o++) begin
      idx[o] = -1;
      for (int i = 0; i < N_IN; i++)
        if (!used[i] && rk(p, i) != 0 && (idx[o] < 0 || rk(p, i) >= rk(p, idx[o]))) idx[o] = i;
      if (idx[o] >= 0) used[idx[o]] = 1'b1;
    end
  endfunction

  // GMT word of one sorter output with masks; bits 25..27 only when not MASKBXN
  function automatic logic [30:0] gmt_ref(sp_pattern_t [N_SP-1:0] p, int i, logic bc0);
    logic [30:0] e;
    logic [4:0] pt;
    logic se, bx0, valid;
    int id, ones;
    e = '0;
    valid = (i >= 0);
    id = valid ? i / 3 + 1 : 0;
    pt = valid ? rk(p, i)[4:0] : 5'd0;
    se = valid ? p[i/3].se : 1'b0;
    bx0 = valid ? p[i/3].bx0 : 1'b0;
    if (pt == 0) begin
      e[15:0] = 16'hFFFF;
    end else begin
      muon_t m;
      m = p[i/3].mu[i%3];
      e[7:0]   = 8'(m.phi + OFS[(id - 1) % 6]);
      e[12:8]  = ~pt;
      e[15:13] = ~{1'b0, m.rank[6:5]};
      e[20:16] = m.eta;
      e[21]    = (id >= 7);
      e[22] = m.hl; e[23] = m.c; e[24] = m.vc;
    end
    if (!csr0_m[8] && csr0_m[7]) e[25] = bx0;
    e[28] = bc0;
    e[29] = (csr0_m[5] && se) || (csr0_m[6] && valid && bx0 != 1'b0);  // BXN held at 0
    ones = 0;
    for (int b = 0; b < 30; b++) ones += e[b];
    e[30] = (ones % 2 == 0);
    return e;
  endfunction

  function automatic logic [31:0] fifo_c_ref(sp_pattern_t [N_SP-1:0] p, int i);
    logic [31:0] e;
    muon_t m;
    if (i < 0) return 32'h0;
    m = p[i/3].mu[i%3];
    e = '0;
    e[6:0] = m.rank; e[7] = m.vc; e[8] = m.c; e[9] = m.hl;
    e[14:10] = m.phi; e[15] = m.eta[0]; e[19:16] = m.eta[4:1];
    e[20] = p[i/3].bx0; e[21] = p[i/3].sp; e[22] = p[i/3].bc0; e[23] = p[i/3].se;
    e[27:24] = 4'(i / 3 + 1);
    return e;
  endfunction

  function automatic sp_pattern_t [N_SP-1:0] rand_patterns(int style);
    sp_pattern_t [N_SP-1:0] p;
    for (int s = 0; s < N_SP; s++) begin
      p[s] = sp_pattern_t'({$urandom, $urandom});
      p[s].bc0 = ($urandom_range(0, 15) == 0);
      for (int k = 0; k < 3; k++)
        case (style)
          0: p[s].mu[k].rank = 7'($urandom_range(0, 2) == 0 ? $urandom : 0);
          1: p[s].mu[k].rank = 7'($urandom_range(0, 3));
          default: p[s].mu[k].rank = ($urandom_range(0, 20) == 0) ? 7'($urandom) : 7'd0;
        endcase
    end
    return p;
  endfunction

  function automatic logic [31:0] frame1_of(sp_pattern_t q);
    logic [31:0] f;
    for (int k = 0; k < 3; k++) begin
      f[10*k +: 5] = q.mu[k].phi;
      f[10*k+5 +: 5] = q.mu[k].eta;
    end
    f[30] = q.bc0; f[31] = q.se;
    return f;
  endfunction

  function automatic logic [31:0] frame2_of(sp_pattern_t q);
    logic [31:0] f;
    for (int k = 0; k < 3; k++) begin
      f[10*k +: 7] = q.mu[k].rank;
      f[10*k+7] = q.mu[k].vc; f[10*k+8] = q.mu[k].c; f[10*k+9] = q.mu[k].hl;
    end
    f[30] = q.bx0; f[31] = q.sp;
    return f;
  endfunction

  // ------------------------------------------------------------ SP driver and checker
  bit stim_on = 0;          // random SP patterns
  int stim_style = 0;
  bit check_on = 0;         // compare GMT words and winner bits
  bit expect_training = 0;
  int settle = 0;
  int bxc = 0;              // bx counter of the driver
  sp_pattern_t [N_SP-1:0] applied [int];
  logic [30:0] exp_gmt [int][4];
  logic [N_IN-1:0] exp_won [int];
  logic exp_l1a [int];
  logic [2:0] last_bx = 0;
  bit bx_prev = 0;
  logic [N_SP-1:0][31:0] f2_next;

  always @(negedge clk) begin
    if (!rst) begin
      if (!dut.frame2) begin
        sp_pattern_t [N_SP-1:0] p, pm;
        int idx[4];
        logic bc0;
        p = stim_on ? rand_patterns(stim_style) : '0;
        pm = p;
        for (int s = 0; s < N_SP; s++) if (csr9_m[s]) pm[s] = '0;
        if (csr9_m != 0 && p != pm) n_disabled++;
        applied[bxc] = pm;
        top4(pm, idx);
        bc0 = 0;
        for (int s = 0; s < N_SP; s++) bc0 |= pm[s].bc0;
        exp_won[bxc] = '0;
        for (int o = 0; o < 4; o++) begin
          exp_gmt[bxc][o] = gmt_ref(pm, idx[o], bc0);
          if (idx[o] >= 0) exp_won[bxc][idx[o]] = 1'b1;
        end
        exp_l1a[bxc] = csr0_m[9] && idx[0] >= 0;
        for (int s = 0; s < N_SP; s++) begin
          sp_frame[s] = frame1_of(p[s]);
          f2_next[s]  = frame2_of(p[s]);
        end
        // ---- checks of earlier bx ----
        if (settle > 0) begin settle--; bx_prev = 0; end
        else if (check_on) begin
          int k;
          k = bxc - 4;
          if (applied.exists(k)) begin
            for (int o = 0; o < 4; o++) begin
              logic [30:0] got, e;
              got = gmt_out[o];
              e = exp_gmt[k][o];
              if (csr0_m[8]) begin
                // Bx bits carry BXN: check they advance by one per bx, and the parity
                e[27:25] = got[27:25];
                e[30] = ~^e[29:0];
              end
              chk(got === e, $sformatf("GMT word %0d of bx %0d: got %h expected %h", o, k, got, e));
              if (got[29] && csr0_m[5]) n_se_sp++;
              if (got[29] && csr0_m[6] && !csr0_m[5]) n_se_comp++;
              if (got[25] && csr0_m[7] && !csr0_m[8]) n_bx_er++;
              if (got[15:0] == 16'hFFFF) n_empty_out++;
            end
            if (csr0_m[8] && bx_prev) begin
              chk(gmt_out[0][27:25] == 3'(last_bx + 1), "Bx bits follow BXN");
              n_bx_bxn++;
            end
            bx_prev = csr0_m[8];
            last_bx = gmt_out[0][27:25];
            n_sorted++;
            for (int i = 0; i < N_IN; i++)
              for (int j = i + 1; j < N_IN; j++)
                if (rk(applied[k], i) == rk(applied[k], j) && rk(applied[k], i) != 0 &&
                    exp_won[k][i] != exp_won[k][j]) n_ties++;
          end
          k = bxc - 3;
          if (applied.exists(k)) begin
            chk(ms_l1a_request == exp_l1a[k], "MS_L1A_Request");
            if (ms_l1a_request) n_l1a++;
            if (!expect_training) begin
              for (int s = 0; s < N_SP; s++)
                chk(winner[s] == {exp_won[k][3*s+1], exp_won[k][3*s]},
                    $sformatf("winner frame 1 SP%0d bx %0d", s + 1, k));
              if (exp_won[k] != 0) n_win++;
            end else begin
              chk(winner == {N_SP{2'b01}}, "training pattern frame 1");
              n_train++;
            end
          end
        end
        bxc++;
      end else begin
        for (int s = 0; s < N_SP; s++) sp_frame[s] = f2_next[s];
        if (settle == 0 && check_on && applied.exists(bxc - 4)) begin
          int k;
          k = bxc - 4;
          if (!expect_training) begin
            for (int s = 0; s < N_SP; s++)
              chk(winner[s] == {1'b0, exp_won[k][3*s+2]}, $sformatf("winner frame 2 SP%0d", s + 1));
          end else begin
            chk(winner == '0, "training pattern frame 2");
          end
        end
      end
    end
  end

  int n_jtag = 0;
  always @(negedge clk) if (fpga_reload) n_reload++;
  always @(negedge clk) if (jtag_reset) n_jtag++;

  // ------------------------------------------------------------ bus tasks
  task automatic vme(logic wr, logic [23:0] a, logic [15:0] d, output logic [15:0] r);
    int c;
    @(posedge clk); #1;
    vme_addr = a[23:1]; vme_write = wr; vme_wdata = d; vme_am = 6'h39;
    vme_as = 1; vme_ds = 2'b11;
    c = 0;
    while (!vme_dtack && c < 50) begin @(posedge clk); #1; c++; end
    chk(vme_dtack, $sformatf("DTACK for %h", a));
    r = vme_rdata;
    vme_as = 0; vme_ds = 0;
    while (vme_dtack) begin @(posedge clk); #1; end
  endtask

  task automatic vw(logic [23:0] a, logic [15:0] d);
    logic [15:0] r;
    settle = 12;
    vme(1, a, d, r);
    if (a == 24'h700158) csr0_m = d;
    if (a == 24'h700170) csr9_m = d[11:0];
    settle = 8;
  endtask

  task automatic vr(logic [23:0] a, output logic [15:0] r);
    vme(0, a, 0, r);
  endtask

  task automatic ccb(logic [5:0] cmd);
    settle = 12;
    @(negedge clk); wait (!dut.frame2);
    @(negedge clk);                     // frame-2 cycle: the ce edge follows
    ccb_cmd = cmd; ccb_cmd_strobe = 1;
    @(negedge clk); @(negedge clk);
    ccb_cmd_strobe = 0;
  endtask

  task automatic wait_bx(int n);
    repeat (2 * n) @(posedge clk);
  endtask

  // Reads words until the buffer is empty: FIFO_D by its flag in CSR1,
  // FIFO_B/FIFO_C by the buffer's own flag (CSR1 shows the AND of four).
  task automatic read_fifo_all(logic [23:0] a, ref logic [31:0] q[$]);
    logic [15:0] lo, hi, flags;
    q.delete();
    for (int n = 0; n < 600; n++) begin
      vr(24'h70015A, flags);
      if (a[7:4] == 4'h5 ? flags[7] : per_fifo_empty(a)) break;
      vr(a, lo);
      vr(a + 2, hi);
      q.push_back({hi, lo});
    end
  endtask

  // EMPTY of one FIFO_B/FIFO_C buffer from the hierarchy (CSR1 shows the AND of four)
  function automatic bit per_fifo_empty(logic [23:0] a);
    int m;
    m = (a[3:0] >> 2);
    if (a[7:4] == 4'h3) return dut.b_empty[m];
    return dut.c_empty[m];
  endfunction

  // ------------------------------------------------------------ test sequence
  initial begin
    logic [15:0] r;
    logic [31:0] q[$];
    logic [31:0] ramq[$];
    sp_pattern_t [N_SP-1:0] tp [$];
    logic [31:0] exp_c [4][$];
    logic [31:0] exp_b [4][$];
    int n_tp;

    repeat (4) @(posedge clk);
    #1 rst = 0;
    wait_bx(4);

    // ---- Trigger mode, plain ----
    check_on = 1; stim_on = 1;
    for (int st = 0; st < 3; st++) begin
      stim_style = st;
      wait_bx(300);
    end
    // ---- MS_L1A_Request and an SP disabled ----
    vw(24'h700158, 16'h0200);
    vw(24'h700170, 16'h0010);   // SP5 off
    wait_bx(200);
    vw(24'h700170, 16'h0000);
    // ---- SyncEr from the SPs, then from the BX0 comparator; Bx from MASKER ----
    vw(24'h700158, 16'h0020);
    wait_bx(200);
    vw(24'h700158, 16'h00C0);
    wait_bx(200);
    // ---- Bx bits from BXN after L1Reset and BC0 ----
    vw(24'h700166, 16'h0005);   // CSR7
    vw(24'h700158, 16'h0100);
    ccb(6'h03);
    ccb(6'h01);
    settle = 8;
    wait_bx(200);
    // ---- winner delay: back to plain, training and winner mode via CCB ----
    vw(24'h700158, 16'h0000);
    ccb(6'h07);
    expect_training = 1; settle = 4;
    wait_bx(50);
    ccb(6'h06);
    expect_training = 0; settle = 4;
    wait_bx(100);
    stim_on = 0;
    wait_bx(10);
    check_on = 0;
    vr(24'h70015A, r);
    chk(r[5] == 0 && r[3] == 0, "FIFO_B/C hold words after Trigger mode");

    // ---- Soft_Reset ----
    vw(24'h700018, 0);
    vr(24'h70015A, r);
    chk(r[7:0] == 8'b1010_1010, $sformatf("CSR1 after Soft_Reset %h", r));
    if (r[7:0] == 8'b1010_1010) n_soft++;
    vw(24'h70016A, 0);          // Soft_Reset set training mode; back to winner mode

    // ---- Test mode from FIFO_A ----
    n_tp = 40;
    for (int t = 0; t < n_tp; t++) tp.push_back(rand_patterns(t % 3));
    for (int s = 0; s < N_SP; s++) begin
      for (int t = 0; t < n_tp; t++) begin
        logic [31:0] f1, f2;
        f1 = frame1_of(tp[t][s]);
        f2 = frame2_of(tp[t][s]);
        vw(24'h700100 + 24'(4*s), f1[15:0]); vw(24'h700102 + 24'(4*s), f1[31:16]);
        vw(24'h700100 + 24'(4*s), f2[15:0]); vw(24'h700102 + 24'(4*s), f2[31:16]);
      end
      vw(24'h700100 + 24'(4*s), 0); vw(24'h700102 + 24'(4*s), 0);   // closing 0 word
    end
    vr(24'h70015A, r);
    chk(r[1:0] == 2'b00, "FIFO_A loaded");
    for (int t = 0; t < n_tp; t++) begin
      int idx[4];
      logic bc0;
      logic [30:0] e0;
      top4(tp[t], idx);
      bc0 = 0;
      for (int s = 0; s < N_SP; s++) bc0 |= tp[t][s].bc0;
      if (idx[0] >= 0)
        for (int o = 0; o < 4; o++) exp_c[o].push_back(fifo_c_ref(tp[t], idx[o]));
      e0 = gmt_ref(tp[t], idx[0], bc0);
      if (e0[14:8] != 7'h7F)
        for (int o = 0; o < 4; o++) exp_b[o].push_back({1'b0, gmt_ref(tp[t], idx[o], bc0)});
    end
    vw(24'h700158, 16'h0001);   // Test mode
    vw(24'h70015E, 0);          // transmit
    wait_bx(300);
    vr(24'h70015A, r);
    chk(r[1] == 1, "FIFO_A empty after transmission");
    for (int o = 0; o < 4; o++) begin
      read_fifo_all(24'h700140 + 24'(4*o), q);
      chk(q.size() == exp_c[o].size(), $sformatf("FIFO_C%0d holds %0d words, expected %0d", o + 1, q.size(), exp_c[o].size()));
      for (int n = 0; n < q.size() && n < exp_c[o].size(); n++) begin
        chk(q[n] == exp_c[o][n], $sformatf("FIFO_C%0d word %0d: %h expected %h", o + 1, n, q[n], exp_c[o][n]));
        if (o == 0) n_test_words++;
      end
      read_fifo_all(24'h700130 + 24'(4*o), q);
      chk(q.size() == exp_b[o].size(), $sformatf("FIFO_B%0d holds %0d words, expected %0d", o + 1, q.size(), exp_b[o].size()));
      for (int n = 0; n < q.size() && n < exp_b[o].size(); n++)
        chk(q[n] == exp_b[o][n], $sformatf("FIFO_B%0d word %0d: %h expected %h", o + 1, n, q[n], exp_b[o][n]));
    end
    // second transmission started by the CCB Inject command
    for (int t = 0; t < 4; t++) begin
      logic [31:0] f2;
      f2 = frame2_of(tp[0][0]);
      vw(24'h700100, 16'h0000); vw(24'h700102, 16'h0000);
      vw(24'h700100, 16'h0000 | 16'(t + 1)); vw(24'h700102, 16'h0000);  // SP1 muon 1 rank t+1
    end
    vw(24'h700100, 0); vw(24'h700102, 0);
    ccb(6'h31);
    wait_bx(300);
    read_fifo_all(24'h700140, q);
    chk(q.size() == 4, $sformatf("Inject: FIFO_C1 holds %0d words", q.size()));
    for (int n = 0; n < q.size(); n++) chk(q[n][6:0] == 7'(n + 1) && q[n][27:24] == 4'd1, "Inject word");
    if (q.size() == 4) n_inject++;
    vw(24'h700158, 16'h0000);

    // ---- RAM playback with loop-back into FIFO_D ----
    vw(24'h70017A, 16'h00FF);   // all RAM halves
    for (int a = 0; a < 512; a++) begin
      logic [15:0] d;
      d = 16'($urandom);
      if (a % 5 != 0) d[14:8] = 7'h7F;      // most words empty (inverted Pt/Quality all ones)
      vw(24'h700178, 16'(a));
      vw(24'h70017C, d);
      ramq.push_back({d, d});
    end
    vw(24'h700158, 16'h0400);   // GMT source = RAM
    fork
      begin
        int seen;
        seen = 0;
        for (int c = 0; c < 2 * 600; c++) begin
          @(negedge clk);
          if (!dut.frame2 && dut.gmt_ram_on) begin
            chk(gmt_out[3][29:0] == ramq[seen][29:0] && gmt_out[3][30] == ~^ramq[seen][29:0],
                $sformatf("RAM word %0d on GMT", seen));
            seen++;
          end
        end
        n_ram_words = seen;
      end
      begin
        wait_bx(2);
        vw(24'h70017E, 0);
      end
    join
    chk(n_ram_words == 512, $sformatf("RAM playback sent %0d words", n_ram_words));
    begin
      logic [31:0] fd[$];
      logic [31:0] e[$];
      foreach (ramq[a]) if (ramq[a][14:8] != 7'h7F) e.push_back({1'b0, ~^ramq[a][29:0], ramq[a][29:0]});
      read_fifo_all(24'h700150, fd);
      chk(fd.size() == e.size(), $sformatf("FIFO_D holds %0d words, expected %0d", fd.size(), e.size()));
      for (int n = 0; n < fd.size() && n < e.size(); n++) chk(fd[n] == e[n], "FIFO_D word");
      n_fifo_d = fd.size();
    end
    // playback by the CCB bunch counter reset line
    @(negedge clk); wait (dut.frame2); ccb_bcntres = 1;
    @(negedge clk); @(negedge clk); ccb_bcntres = 0;
    wait_bx(520);
    read_fifo_all(24'h700150, q);
    chk(q.size() == n_fifo_d, "FIFO_D filled again by the CCB line");
    vw(24'h700158, 16'h0000);

    // ---- CLK40 LED counter: one step per bx ----
    begin
      logic [22:0] c0;
      @(negedge clk); c0 = dut.clk40_cnt;
      wait_bx(100);
      @(negedge clk);
      chk(23'(dut.clk40_cnt - c0) == 23'd100, $sformatf("CLK40 counter advanced %0d in 100 bx", 23'(dut.clk40_cnt - c0)));
      chk(led_clk40 == dut.clk40_cnt[22], "CLK40 LED is the counter MSB");
    end

    // ---- register paths: CSR2 and the LUTs of all four outputs ----
    vr(24'h70015C, r);
    chk(r == 16'd1252, $sformatf("CSR2 firmware date %0d", r));
    for (int m = 0; m < 4; m++) begin
      logic [23:0] a;
      logic [15:0] old;
      a = 24'h700400 + 24'(m * 24'h400) + 24'(2 * (37 + m));   // SP_ID 1, phi 5+m / rank 37+m
      vr(a, old);
      chk(old == {8'(37 + m), 8'(5 + m + 6)}, $sformatf("LUT%0d default %h", m + 1, old));
      vw(a, 16'hA55A ^ 16'(m));
      vr(a, r);
      chk(r == (16'hA55A ^ 16'(m)), $sformatf("LUT%0d rewrite %h", m + 1, r));
      if (r == (16'hA55A ^ 16'(m))) n_lut++;
      vw(a, old);
    end

    // ---- JTAG controller reset ----
    vw(24'h700010, 0);
    chk(n_jtag == 1, "JTAG controller reset pulse");

    // ---- reload pulse ----
    vw(24'h700016, 0);
    wait_bx(40);
    chk(n_reload == 40, $sformatf("reload pulse %0d cycles", n_reload));

    // ---- mechanism coverage ----
    $display("sorted=%0d ties=%0d empty=%0d winners=%0d training=%0d l1a=%0d disabled=%0d",
             n_sorted, n_ties, n_empty_out, n_win, n_train, n_l1a, n_disabled);
    $display("se_sp=%0d se_comp=%0d bx_er=%0d bx_bxn=%0d test=%0d inject=%0d ram=%0d fifo_d=%0d soft=%0d",
             n_se_sp, n_se_comp, n_bx_er, n_bx_bxn, n_test_words, n_inject, n_ram_words, n_fifo_d, n_soft);
    chk(n_sorted > 0, "sorting");
    chk(n_ties > 0, "tie-break");
    chk(n_empty_out > 0, "empty candidates");
    chk(n_win > 0, "winner bits");
    chk(n_train > 0, "training pattern");
    chk(n_l1a > 0, "L1A request");
    chk(n_disabled > 0, "SP disable");
    chk(n_se_sp > 0, "SyncEr from SP");
    chk(n_se_comp > 0, "SyncEr from comparator");
    chk(n_bx_er > 0, "Bx from muon");
    chk(n_bx_bxn > 0, "Bx from BXN");
    chk(n_test_words > 0, "Test mode");
    chk(n_inject > 0, "Inject command");
    chk(n_fifo_d > 0, "FIFO_D capture");
    chk(n_soft > 0, "Soft_Reset");
    chk(n_lut == 4, "LUT rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
