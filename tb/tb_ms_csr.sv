// tb_ms_csr - self-checking test of the FPGA control and status registers.
//
// Writes and reads back CSR0, CSR7, CSR8 and CSR9 (with their widths), reads
// CSR1, CSR2 and CSR5, checks the sticky PSDONE bits and their reset, and the
// one-clk command pulses with the DCM phase direction.
module tb_ms_csr;
  import ms_pkg::*;

  logic clk = 0, rst = 1;
  reg_req_t reg_req = '0;
  logic [15:0] reg_rdata;
  logic [7:0] fifo_flags = 8'h96;
  logic dcm1_psdone = 0, dcm2_psdone = 0;
  logic [2:0] dcm1_status = 3'b101, dcm2_status = 3'b010;
  logic [15:0] csr0, csr7;
  logic [7:0] csr8;
  logic [11:0] csr9;
  logic send_a, set_winner, set_training, dcm1_ps_en, dcm2_ps_en, dcm_ps_inc, dcm1_rst, dcm2_rst;
  int checks = 0, failures = 0;
  int n_send = 0, n_win = 0, n_train = 0, n_ps1 = 0, n_ps2 = 0, n_r1 = 0, n_r2 = 0;

  ms_csr dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    n_send += send_a; n_win += set_winner; n_train += set_training;
    n_ps1 += dcm1_ps_en; n_ps2 += dcm2_ps_en; n_r1 += dcm1_rst; n_r2 += dcm2_rst;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic vme(logic wr, logic [18:0] a, logic [15:0] d, output logic [15:0] r);
    reg_req = '{wr: wr, rd: !wr, addr: a[18:1], wdata: d};
    @(posedge clk);
    #1 reg_req = '0;
    r = reg_rdata;
  endtask

  initial begin
    logic [15:0] r;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    vme(0, A_CSR0, 0, r); chk(r == 0 && csr0 == 0, "CSR0 zero after reset");
    for (int t = 0; t < 50; t++) begin
      logic [15:0] d;
      d = 16'($urandom);
      vme(1, A_CSR0, d, r); vme(0, A_CSR0, 0, r); chk(r == d && csr0 == d, "CSR0");
      vme(1, A_CSR7, d, r); vme(0, A_CSR7, 0, r); chk(r == d && csr7 == d, "CSR7");
      vme(1, A_CSR8, d, r); vme(0, A_CSR8, 0, r); chk(r == {8'h0, d[7:0]} && csr8 == d[7:0], "CSR8");
      vme(1, A_CSR9, d, r); vme(0, A_CSR9, 0, r); chk(r == {4'h0, d[11:0]} && csr9 == d[11:0], "CSR9");
    end
    vme(0, A_CSR1, 0, r); chk(r == 16'h0096, "CSR1");
    vme(0, A_CSR2, 0, r); chk(r == 16'd1252, "CSR2");
    vme(0, A_CSR5, 0, r); chk(r == {8'h0, 3'b010, 3'b101, 2'b00}, "CSR5 status");
    dcm2_psdone = 1; @(posedge clk); #1 dcm2_psdone = 0;
    vme(0, A_CSR5, 0, r); chk(r[1:0] == 2'b10, "PSDONE sticky");
    vme(1, A_PSDONE_RST, 0, r);
    vme(0, A_CSR5, 0, r); chk(r[1:0] == 2'b00, "PSDONE reset");
    vme(1, A_SEND_A, 0, r);
    vme(1, A_WIN_MODE, 0, r);
    vme(1, A_TRAIN_MODE, 0, r);
    vme(1, A_DCM1_PS, 16'h0001, r); @(posedge clk); #1 chk(dcm_ps_inc, "phase increase");
    vme(1, A_DCM2_PS, 16'h0000, r); @(posedge clk); #1 chk(!dcm_ps_inc, "phase decrease");
    vme(1, A_DCM1_RST, 0, r);
    vme(1, A_DCM2_RST, 0, r);
    vme(1, 19'h00176, 0, r);      // unused address
    @(posedge clk); #1;
    chk(n_send == 1 && n_win == 1 && n_train == 1 && n_ps1 == 1 && n_ps2 == 1 && n_r1 == 1 && n_r2 == 1,
        "one pulse per command");
    vme(0, 19'h00176, 0, r); chk(r == 0, "unused address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
