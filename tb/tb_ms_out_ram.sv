// tb_ms_out_ram - self-checking test of the four output RAM buffers.
//
// Fills random words into RAM_1..RAM_4 through the address counter and the
// CSR6 half-word enables, reads them back over VME, reads them through the
// playback port (one bx after the address), checks the send command pulse
// and that Soft_Reset clears the address counter.  A reference array holds
// the expected contents.
module tb_ms_out_ram;
  import ms_pkg::*;

  logic clk = 0, rst = 1, soft_rst = 0, ce = 0;
  logic [8:0] play_addr = 0;
  logic [N_OUT-1:0][31:0] play_data;
  logic send_req;
  reg_req_t reg_req = '0;
  logic [15:0] reg_rdata;
  logic [31:0] ref_mem [N_OUT][64];
  int checks = 0, failures = 0, sends = 0;

  ms_out_ram dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) sends += send_req;

  initial begin
    #2000000;
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
    for (int a = 0; a < 64; a++) begin
      vme(1, A_RAM_ADDR, 16'(a), r);
      for (int h = 0; h < 2 * N_OUT; h++) begin
        logic [15:0] d;
        d = 16'($urandom);
        vme(1, A_CSR6, 16'(1 << h), r);
        vme(1, A_RAM_DATA, d, r);
        if (h % 2 == 0) ref_mem[h/2][a][15:0] = d; else ref_mem[h/2][a][31:16] = d;
      end
    end
    vme(0, A_CSR6, 0, r);
    chk(r == 16'h0080, "CSR6 read-back");
    // VME read-back
    for (int a = 0; a < 64; a++) begin
      vme(1, A_RAM_ADDR, 16'(a), r);
      vme(0, A_RAM_ADDR, 0, r);
      chk(r == 16'(a), "address counter read-back");
      for (int h = 0; h < 2 * N_OUT; h++) begin
        vme(1, A_CSR6, 16'(1 << h), r);
        vme(0, A_RAM_DATA, 0, r);
        chk(r == ((h % 2 == 0) ? ref_mem[h/2][a][15:0] : ref_mem[h/2][a][31:16]),
            $sformatf("VME read RAM%0d half %0d addr %0d", h/2 + 1, h % 2, a));
      end
    end
    // playback port
    for (int a = 0; a < 64; a++) begin
      play_addr = 9'(a); ce = 1;
      @(posedge clk); #1 ce = 0;
      for (int m = 0; m < N_OUT; m++)
        chk(play_data[m] == ref_mem[m][a], $sformatf("playback RAM%0d addr %0d", m + 1, a));
    end
    vme(1, A_SEND_RAM, 0, r);
    @(posedge clk); #1;
    chk(sends == 1, "send command");
    vme(1, A_RAM_ADDR, 16'h1FF, r);
    soft_rst = 1; @(posedge clk); #1 soft_rst = 0;
    vme(0, A_RAM_ADDR, 0, r);
    chk(r == 0, "Soft_Reset clears the address counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
