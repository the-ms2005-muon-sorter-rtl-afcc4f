// tb_ms_ccb_if - self-checking test of the CCB command decoder and BXN counter.
//
// Sends every command code (and a few unused ones) with the command strobe,
// checks the decoded pulses, and checks that L1Reset / Bunch Counter Reset
// load CSR7 and hold BXN, that BXN counts once per bx from the bx after
// BC0 (command or dedicated line), and that it wraps at 2^16.
module tb_ms_ccb_if;
  logic clk = 0, rst = 1, ce = 0;
  logic [5:0] ccb_cmd = 0;
  logic ccb_cmd_strobe = 0, ccb_bc0 = 0, ms_hard_reset = 0;
  logic [15:0] bxn_offset = 0, bxn;
  logic bxn_run, start_trig, stop_trig, reload_req, inject, bxn_load;
  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_reload = 0, n_inject = 0, n_load = 0;

  ms_ccb_if dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) ce <= rst ? 1'b0 : !ce;

  always @(negedge clk) begin
    n_start  += start_trig;
    n_stop   += stop_trig;
    n_reload += reload_req;
    n_inject += inject;
    n_load   += bxn_load;
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

  // hold the inputs for one full bx (two clk cycles, one of them with ce)
  task automatic one_bx(logic [5:0] cmd, logic strobe, logic bc0_line, logic hr_line);
    ccb_cmd = cmd; ccb_cmd_strobe = strobe; ccb_bc0 = bc0_line; ms_hard_reset = hr_line;
    @(posedge clk); @(posedge clk); #1;
    ccb_cmd_strobe = 0; ccb_bc0 = 0; ms_hard_reset = 0;
  endtask

  initial begin
    logic [15:0] b0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    // command pulses
    one_bx(6'h06, 1, 0, 0); chk(n_start == 1, "Start Trigger");
    one_bx(6'h07, 1, 0, 0); chk(n_stop == 1, "Stop Trigger");
    one_bx(6'h04, 1, 0, 0); chk(n_reload == 1, "Hard Reset");
    one_bx(6'h11, 1, 0, 0); chk(n_reload == 2, "MS_Hard_Reset");
    one_bx(6'h00, 0, 0, 1); chk(n_reload == 3, "MS_hard_reset line");
    one_bx(6'h31, 1, 0, 0); chk(n_inject == 1, "Inject");
    one_bx(6'h31, 0, 0, 0); chk(n_inject == 1, "no strobe, no command");
    one_bx(6'h05, 1, 0, 0);
    chk(n_start == 1 && n_stop == 1 && n_reload == 3 && n_inject == 1 && n_load == 0, "unused code");
    // L1Reset loads the offset and holds
    bxn_offset = 16'h1234;
    one_bx(6'h03, 1, 0, 0);
    chk(bxn == 16'h1234 && n_load == 1, "L1Reset loads CSR7");
    repeat (3) one_bx(0, 0, 0, 0);
    chk(bxn == 16'h1234, "BXN holds before BC0");
    one_bx(6'h01, 1, 0, 0);
    chk(bxn == 16'h1234, "BXN starts on the bx after BC0");
    for (int n = 1; n <= 10; n++) begin
      one_bx(0, 0, 0, 0);
      chk(bxn == 16'(16'h1234 + n), $sformatf("BXN count %h", bxn));
    end
    // Bunch Counter Reset, then dedicated BC0 line, then wrap
    bxn_offset = 16'hFFFE;
    one_bx(6'h32, 1, 0, 0);
    chk(bxn == 16'hFFFE && !bxn_run && n_load == 2, "BCR loads CSR7");
    one_bx(0, 0, 1, 0);
    one_bx(0, 0, 0, 0); chk(bxn == 16'hFFFF, "count after BC0 line");
    one_bx(0, 0, 0, 0); chk(bxn == 16'h0000, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
