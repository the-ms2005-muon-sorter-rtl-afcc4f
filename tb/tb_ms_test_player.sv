// tb_ms_test_player - self-checking test of the test-transmission sequencer.
//
// FIFO_A playback: the read strobe must last exactly 510 clk cycles, start in
// a frame-2 cycle, be ignored outside Test mode and while busy.
// RAM playback: the address must step 0..511 once per bx, ram_active must
// last 512 bx (12.8 us at 40 MHz), ram_valid must follow it by one bx, and a
// start must be ignored while CSR0[10] = 0.
module tb_ms_test_player;
  logic clk = 0, rst = 1, frame2 = 0, ce;
  logic test_mode = 0, ram_src = 0, start_a = 0, start_ram = 0;
  logic fifo_rd, fifo_valid, a_busy;
  logic [8:0] ram_addr;
  logic ram_active, ram_valid;
  int checks = 0, failures = 0;

  assign ce = frame2;
  ms_test_player dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) frame2 <= rst ? 1'b0 : !frame2;

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

  // cycle-by-cycle: fifo_valid is fifo_rd one clk later, ram_valid is
  // ram_active one bx later, a_busy covers the read strobe
  logic rd_q = 0, act_q = 0;
  always @(negedge clk) begin
    if (!rst) begin
      chk(fifo_valid == rd_q, "fifo_valid follows fifo_rd by one clk");
      if (fifo_rd) chk(a_busy, "a_busy during playback");
      if (!frame2) chk(ram_valid == act_q, "ram_valid follows ram_active by one bx");
    end
    rd_q = fifo_rd;
    if (frame2) act_q = ram_active;   // value entering the next ce edge
  end

  task automatic pulse_a();
    start_a = 1; @(posedge clk); #1 start_a = 0;
  endtask

  initial begin
    int rd_cycles, first_phase, act_bx, val_bx, last_addr, addr_err, t;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk); #1;
    pulse_a();
    repeat (5) @(posedge clk); #1;
    chk(!fifo_rd && !a_busy, "no playback in Trigger mode");
    test_mode = 1;
    pulse_a();
    rd_cycles = 0; first_phase = -1; t = 0;
    while (t < 2000) begin
      @(posedge clk); #1;
      if (fifo_rd) begin
        if (first_phase < 0) first_phase = frame2;   // phase of the first read cycle
        rd_cycles++;
        if (rd_cycles == 100) start_a = 1;           // ignored while busy
        else start_a = 0;
      end
      t++;
    end
    chk(rd_cycles == 510, $sformatf("FIFO_A read cycles %0d", rd_cycles));
    chk(first_phase == 1, "playback starts in a frame-2 cycle");
    // a second transmission after the first one ended
    pulse_a();
    rd_cycles = 0;
    repeat (1200) begin
      @(posedge clk); #1;
      rd_cycles += fifo_rd;
    end
    chk(rd_cycles == 510, $sformatf("second FIFO_A transmission %0d cycles", rd_cycles));
    // RAM playback
    start_ram = 1; @(posedge clk); #1 start_ram = 0;
    repeat (4) @(posedge clk); #1;
    chk(!ram_active, "no RAM playback when CSR0[10] = 0");
    ram_src = 1;
    @(negedge clk);
    start_ram = 1; @(posedge clk); #1 start_ram = 0;
    act_bx = 0; val_bx = 0; last_addr = -1; addr_err = 0;
    for (int c = 0; c < 1200 * 2; c++) begin
      @(posedge clk); #1;
      if (!frame2) begin   // just after a ce edge
        if (ram_active) begin
          act_bx++;
          if (int'(ram_addr) != last_addr + 1) addr_err++;
          last_addr = ram_addr;
        end
        if (ram_valid) val_bx++;
      end
    end
    chk(act_bx == 512, $sformatf("ram_active for %0d bx", act_bx));
    chk(val_bx == 512, $sformatf("ram_valid for %0d bx", val_bx));
    chk(addr_err == 0 && last_addr == 511, "addresses 0..511 in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
