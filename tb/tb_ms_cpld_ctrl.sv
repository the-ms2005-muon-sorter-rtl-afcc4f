// tb_ms_cpld_ctrl - self-checking test of the control-PLD functions.
//
// Checks CSR3/CSR4 access, the 40-cycle (500 ns at 80 MHz) reload pulse from
// the VME command, that CCB reload requests are ignored while CSR4[1] = 0 and
// produce the same pulse when it is 1, and the one-cycle Soft_Reset and
// JTAG-controller reset pulses.
module tb_ms_cpld_ctrl;
  import ms_pkg::*;

  logic clk = 0, rst = 1;
  reg_req_t reg_req = '0;
  logic [15:0] reg_rdata;
  logic cfg_done = 1, ccb_reload_req = 0;
  logic jtag_enable, jtag_reset, fpga_reload, soft_reset;
  int checks = 0, failures = 0, n_soft = 0, n_jtag = 0, reload_cycles = 0;

  ms_cpld_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) begin
    n_soft += soft_reset;
    n_jtag += jtag_reset;
    reload_cycles += fpga_reload;
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
    vme(0, A_CSR4, 0, r); chk(r == 0, "CSR4 zero after reset");
    vme(0, A_CSR3, 0, r); chk(r == 1, "CSR3 done");
    vme(1, A_HARD_RST, 0, r);
    repeat (60) @(posedge clk); #1;
    chk(reload_cycles == 40, $sformatf("VME reload pulse %0d cycles", reload_cycles));
    ccb_reload_req = 1; @(posedge clk); #1 ccb_reload_req = 0;
    repeat (60) @(posedge clk); #1;
    chk(reload_cycles == 40, "CCB reload disabled by CSR4[1] = 0");
    vme(1, A_CSR4, 16'h0003, r);
    vme(0, A_CSR4, 0, r); chk(r == 3 && jtag_enable, "CSR4 write");
    ccb_reload_req = 1; @(posedge clk); #1 ccb_reload_req = 0;
    repeat (60) @(posedge clk); #1;
    chk(reload_cycles == 80, "CCB reload enabled");
    vme(1, A_SOFT_RST, 0, r);
    @(posedge clk); #1;
    chk(n_soft == 1, "Soft_Reset pulse");
    chk(n_jtag == 0, "no JTAG reset yet");
    vme(1, A_JTAG_RST, 0, r);
    repeat (3) @(posedge clk); #1;
    chk(n_jtag == 1, "JTAG controller reset pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
