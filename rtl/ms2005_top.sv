// ms2005_top - main FPGA logic of the MS2005 muon sorter board.
//
// Every bunch crossing (bx, 25 ns) each of 12 Sector Processors (SP) sends
// up to three muon candidates in two 32-bit frames at 80 MHz.  The board
// selects the four best of the 36 candidates by their 7-bit rank, converts
// them with look-up tables to GMT units and sends them, in ranked order, on
// four cables to the Global Muon Trigger (GMT).  It tells every SP which of
// its muons won ("winner" bits), raises MS_L1A_Request when a muon was
// found, and carries test buffers:
//   FIFO_A1..12  test frames that can replace the SP inputs (Test mode),
//   FIFO_C1..4   sorter outputs before the LUTs,
//   FIFO_B1..4   GMT words,
//   RAM_1..4     GMT words that can replace the sorter on the cables,
//   FIFO_D       words received back on the on-board GMT-cable connector.
// Everything is controlled over VME and by commands from the Clock and
// Control Board (CCB).
//
// Clocking: one clock, clk, at 80 MHz (twice the 40.08 MHz LHC clock).  A
// frame-phase flop toggles every clk; it is 0 in the cycle that carries SP
// frame 1 and 1 in the cycle that carries frame 2 (the first cycle after
// reset carries frame 1).  The 40 MHz parts run on clk with the clock
// enable ce = frame2.  rst is a synchronous power-up reset.
//
// Pipeline, in bx: SP frames -> input register (end of the bx of frame 2)
// -> sorter register (+1 bx) -> LUT register (+1 bx) -> GMT output register
// (+1 bx).  FIFO_C is written from the sorter register, FIFO_B from the GMT
// word before the output register.  The board's BXN counter is compared
// with the muons' BX0 at the LUT stage; the CSR7 offset absorbs the pipeline
// delay.  The winner bits leave one bx after the sorter register (plus the
// programmed delay).
//
// Port conventions: all backplane and VME signals are active-high logic
// levels (board transceivers invert the active-low GTLP and VME lines).
// gmt_out[m] carries bits [30:0] of the GMT word of muon m+1; the cable's
// bit 31 is the 40 MHz clock, driven by the LVDS drivers.  gmt_rx is the
// word received on the on-board connector.  Clock managers, the clock
// delay chip, JTAG controller and configuration memories are outside: their
// control and status signals are ports.  The front-panel LED logic is
// here: led_test (Test mode), led_clk40 (blinks while the clock runs),
// fifo_flags (FIFO full/empty LEDs) and muon_valid (one per cable, for the
// LED one-shots, which are outside).
// The block structure and all registers follow the specification; the
// single-clock scheme, the pipeline register placement and the internal
// register bus are this design's choices.
module ms2005_top
  import ms_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  // Sector Processors
  input  logic [N_SP-1:0][31:0]   sp_frame,
  output logic [N_SP-1:0][1:0]    winner,
  // CCB
  input  logic [5:0]              ccb_cmd,
  input  logic                    ccb_cmd_strobe,
  input  logic                    ccb_bc0,
  input  logic                    ccb_bcntres,
  input  logic                    ms_hard_reset,
  output logic                    ms_l1a_request,
  // VME
  input  logic [4:0]              vme_ga,
  input  logic                    vme_as,
  input  logic [1:0]              vme_ds,
  input  logic                    vme_write,
  input  logic [5:0]              vme_am,
  input  logic [23:1]             vme_addr,
  input  logic [15:0]             vme_wdata,
  output logic [15:0]             vme_rdata,
  output logic                    vme_dtack,
  // GMT
  output logic [N_OUT-1:0][30:0]  gmt_out,
  input  logic [30:0]             gmt_rx,
  // configuration, clock managers, delay chip
  input  logic                    cfg_done,
  output logic                    fpga_reload,
  output logic                    jtag_enable,
  output logic                    jtag_reset,
  input  logic                    dcm1_psdone,
  input  logic                    dcm2_psdone,
  input  logic [2:0]              dcm1_status,
  input  logic [2:0]              dcm2_status,
  output logic                    dcm1_ps_en,
  output logic                    dcm2_ps_en,
  output logic                    dcm_ps_inc,
  output logic                    dcm1_rst,
  output logic                    dcm2_rst,
  output logic [7:0]              clk_delay,
  // front-panel indicators
  output logic                    led_test,
  output logic                    led_clk40,   // flashes at ~4.8 Hz while the clock runs
  output logic [7:0]              fifo_flags,
  output logic [N_OUT-1:0]        muon_valid
);

  // ---------------- frame phase ----------------
  logic frame2, ce;
  always_ff @(posedge clk) begin
    if (rst) frame2 <= 1'b0;
    else     frame2 <= ~frame2;
  end
  assign ce = frame2;

  // ---------------- register bus ----------------
  reg_req_t    reg_req;
  logic [15:0] rd_a [N_SP];
  logic [15:0] rd_b [N_OUT];
  logic [15:0] rd_c [N_OUT];
  logic [15:0] rd_l [N_OUT];
  logic [15:0] rd_d, rd_ram, rd_csr, rd_cpld;
  logic [15:0] reg_rdata;

  always_comb begin
    reg_rdata = rd_d | rd_ram | rd_csr | rd_cpld;
    for (int i = 0; i < N_SP; i++)  reg_rdata = reg_rdata | rd_a[i];
    for (int m = 0; m < N_OUT; m++) reg_rdata = reg_rdata | rd_b[m] | rd_c[m] | rd_l[m];
  end

  ms_vme_if u_vme (
    .clk, .rst, .vme_ga, .vme_as, .vme_ds, .vme_write, .vme_am, .vme_addr,
    .vme_wdata, .vme_rdata, .vme_dtack, .reg_req, .reg_rdata
  );

  // ---------------- control ----------------
  logic [15:0] csr0, csr7;
  logic [11:0] csr9;
  logic        send_a, csr_set_winner, csr_set_training;
  logic        soft_reset, ccb_reload;
  logic [15:0] bxn;
  logic        bxn_run, start_trig, stop_trig, inject, bxn_load;
  logic        training;

  ms_csr u_csr (
    .clk, .rst, .reg_req, .reg_rdata(rd_csr), .fifo_flags,
    .dcm1_psdone, .dcm2_psdone, .dcm1_status, .dcm2_status,
    .csr0, .csr7, .csr8(clk_delay), .csr9, .send_a,
    .set_winner(csr_set_winner), .set_training(csr_set_training),
    .dcm1_ps_en, .dcm2_ps_en, .dcm_ps_inc, .dcm1_rst, .dcm2_rst
  );

  ms_cpld_ctrl u_cpld (
    .clk, .rst, .reg_req, .reg_rdata(rd_cpld), .cfg_done,
    .ccb_reload_req(ccb_reload), .jtag_enable, .jtag_reset, .fpga_reload, .soft_reset
  );

  ms_ccb_if u_ccb (
    .clk, .rst, .ce, .ccb_cmd, .ccb_cmd_strobe, .ccb_bc0, .ms_hard_reset,
    .bxn_offset(csr7), .bxn, .bxn_run, .start_trig, .stop_trig,
    .reload_req(ccb_reload), .inject, .bxn_load
  );

  // ---------------- test sequencer ----------------
  logic       a_rd, a_valid, a_busy;
  logic [8:0] ram_addr;
  logic       ram_active, ram_valid, ram_send;

  ms_test_player u_player (
    .clk, .rst, .frame2, .ce, .test_mode(csr0[CSR0_TEST]), .ram_src(csr0[CSR0_RAM_SRC]),
    .start_a(send_a || inject), .start_ram(ram_send || (ce && ccb_bcntres)),
    .fifo_rd(a_rd), .fifo_valid(a_valid), .a_busy, .ram_addr, .ram_active, .ram_valid
  );

  // ---------------- inputs: FIFO_A, Test/Trigger multiplexer ----------------
  logic [31:0]              a_data [N_SP];
  logic [N_SP-1:0]          a_full, a_empty;
  sp_pattern_t [N_SP-1:0]   pat;

  for (genvar i = 0; i < N_SP; i++) begin : g_sp
    ms_fifo #(.BASE(A_FIFO_A + 19'(4*i))) u_fifo_a (
      .clk, .rst, .soft_rst(soft_reset), .wr_en(1'b0), .wr_data('0),
      .rd_en(a_rd), .rd_data(a_data[i]), .reg_req, .reg_rdata(rd_a[i]),
      .full(a_full[i]), .empty(a_empty[i])
    );
    ms_input_rx u_rx (
      .clk, .rst, .frame2, .test_mode(csr0[CSR0_TEST]), .disable_sp(csr9[i]),
      .sp_frame(sp_frame[i]), .fifo_frame(a_valid ? a_data[i] : 32'h0), .pat(pat[i])
    );
  end

  // ---------------- sorter ----------------
  sel_muon_t [N_OUT-1:0]          best;
  logic [N_OUT-1:0][N_IN-1:0]     sel;

  ms_sorter u_sorter (.clk, .rst, .ce, .pat, .best, .sel);

  logic bc0_s1, bc0_s2;   // OR of the SP BC0 bits, aligned with sorter and LUT stages
  always_ff @(posedge clk) begin
    if (rst) begin
      bc0_s1 <= 1'b0;
      bc0_s2 <= 1'b0;
    end else if (ce) begin
      logic any;
      any = 1'b0;
      for (int i = 0; i < N_SP; i++) any = any | pat[i].bc0;
      bc0_s1 <= any;
      bc0_s2 <= bc0_s1;
    end
  end

  // ---------------- winner bits ----------------
  ms_winner u_winner (
    .clk, .rst, .ce, .frame2, .sel, .delay(csr0[15:12]),
    .set_winner(csr_set_winner || start_trig),
    .set_training(csr_set_training || stop_trig || soft_reset),
    .training, .w(winner)
  );

  // ---------------- per output muon: FIFO_C, LUT, format, FIFO_B, RAM mux ----------------
  conv_muon_t [N_OUT-1:0]     conv;
  logic [N_OUT-1:0][30:0]     word;
  logic [N_OUT-1:0][31:0]     ram_data;
  logic [N_OUT-1:0]           b_full, b_empty, c_full, c_empty;
  logic                       c_we, b_we;

  assign c_we = ce && (best[0].mu.rank != 7'd0);
  assign b_we = ce && ({conv[0].quality[1:0], conv[0].pt} != 7'd0);

  for (genvar m = 0; m < N_OUT; m++) begin : g_mu
    ms_fifo #(.BASE(A_FIFO_C + 19'(4*m))) u_fifo_c (
      .clk, .rst, .soft_rst(soft_reset), .wr_en(c_we), .wr_data(fifo_c_word(best[m])),
      .rd_en(1'b0), .rd_data(), .reg_req, .reg_rdata(rd_c[m]),
      .full(c_full[m]), .empty(c_empty[m])
    );
    ms_out_lut #(.BASE(A_LUT + 19'(16'h400 * m))) u_lut (
      .clk, .rst, .ce, .in(best[m]), .out(conv[m]), .reg_req, .reg_rdata(rd_l[m])
    );
    ms_gmt_format u_fmt (
      .mu(conv[m]), .bxn(bxn[2:0]), .bc0_any(bc0_s2),
      .masksp(csr0[CSR0_MASKSP]), .maskcomp(csr0[CSR0_MASKCOMP]),
      .masker(csr0[CSR0_MASKER]), .maskbxn(csr0[CSR0_MASKBXN]), .word(word[m])
    );
    ms_fifo #(.BASE(A_FIFO_B + 19'(4*m))) u_fifo_b (
      .clk, .rst, .soft_rst(soft_reset), .wr_en(b_we), .wr_data({1'b0, word[m]}),
      .rd_en(1'b0), .rd_data(), .reg_req, .reg_rdata(rd_b[m]),
      .full(b_full[m]), .empty(b_empty[m])
    );
  end

  ms_out_ram u_ram (
    .clk, .rst, .soft_rst(soft_reset), .ce, .play_addr(ram_addr), .play_data(ram_data),
    .send_req(ram_send), .reg_req, .reg_rdata(rd_ram)
  );

  // GMT output multiplexer (CSR0[10]) and output register
  logic gmt_ram_on;   // gmt_out currently carries RAM words
  always_ff @(posedge clk) begin
    if (rst) begin
      gmt_out        <= '0;
      gmt_ram_on     <= 1'b0;
      ms_l1a_request <= 1'b0;
      muon_valid     <= '0;
    end else if (ce) begin
      gmt_ram_on     <= csr0[CSR0_RAM_SRC] && ram_valid;
      ms_l1a_request <= csr0[CSR0_L1A_EN] && (best[0].mu.rank != 7'd0);
      for (int m = 0; m < N_OUT; m++) begin
        if (csr0[CSR0_RAM_SRC])
          gmt_out[m] <= ram_valid ? {gmt_parity(ram_data[m][29:0]), ram_data[m][29:0]} : 31'd0;
        else
          gmt_out[m] <= word[m];
        muon_valid[m] <= !csr0[CSR0_RAM_SRC] && conv[m].pt != 5'd0;
      end
    end
  end

  // ---------------- FIFO_D: words looped back from a GMT cable ----------------
  logic d_full, d_empty, d_we;
  assign d_we = ce && gmt_ram_on && (gmt_rx[14:8] != 7'h7F);

  ms_fifo #(.BASE(A_FIFO_D)) u_fifo_d (
    .clk, .rst, .soft_rst(soft_reset), .wr_en(d_we), .wr_data({1'b0, gmt_rx}),
    .rd_en(1'b0), .rd_data(), .reg_req, .reg_rdata(rd_d),
    .full(d_full), .empty(d_empty)
  );

  assign fifo_flags = {d_empty, d_full, &c_empty, |c_full, &b_empty, |b_full, &a_empty, |a_full};
  assign led_test   = csr0[CSR0_TEST];

  // CLK40 indicator: bit 22 of a bx counter toggles every 2^22 bx, so the
  // LED flashes at 40.08 MHz / 2^23 = 4.8 Hz.
  logic [22:0] clk40_cnt;
  always_ff @(posedge clk) begin
    if (rst)     clk40_cnt <= '0;
    else if (ce) clk40_cnt <= clk40_cnt + 1'b1;
  end
  assign led_clk40 = clk40_cnt[22];

endmodule
