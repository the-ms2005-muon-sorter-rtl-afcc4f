// tb_ms_vme_if - self-checking test of the VME A24 slave decoder.
//
// A small register model behind the internal bus answers reads with a
// function of the address one cycle after the strobe.  The test runs word
// writes and reads at slot 14 (base 700000h) with AM 39h and 3Dh and checks
// the strobes, address, data and DTACK; cycles with another geographical
// address, another AM code or a single data strobe must get no DTACK and
// produce no strobe.
module tb_ms_vme_if;
  import ms_pkg::*;

  logic clk = 0, rst = 1;
  logic [4:0] vme_ga = 5'd14;
  logic vme_as = 0, vme_write = 0;
  logic [1:0] vme_ds = 0;
  logic [5:0] vme_am = 0;
  logic [23:1] vme_addr = 0;
  logic [15:0] vme_wdata = 0, vme_rdata;
  logic vme_dtack;
  reg_req_t reg_req;
  logic [15:0] reg_rdata;
  int checks = 0, failures = 0, strobes = 0;
  logic [18:1] last_addr;
  logic [15:0] last_wdata;
  logic last_wr;

  ms_vme_if dut (.*);

  always #5 clk = ~clk;

  // register model: read data = address bits XOR a constant, one cycle later
  always @(posedge clk) begin
    reg_rdata <= reg_req.rd ? (16'(reg_req.addr) ^ 16'h5A5A) : 16'h0;
    if (reg_req.wr || reg_req.rd) begin
      strobes++;
      last_addr  <= reg_req.addr;
      last_wdata <= reg_req.wdata;
      last_wr    <= reg_req.wr;
    end
  end

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

  // one bus cycle; returns whether DTACK came and the read data
  task automatic cycle(logic wr, logic [23:0] a, logic [5:0] am, logic [1:0] ds,
                       logic [15:0] d, output logic acked, output logic [15:0] r);
    vme_addr = a[23:1]; vme_am = am; vme_write = wr; vme_wdata = d;
    vme_as = 1; vme_ds = ds;
    acked = 0;
    for (int c = 0; c < 30 && !acked; c++) begin
      @(posedge clk); #1;
      if (vme_dtack) acked = 1;
    end
    r = vme_rdata;
    vme_as = 0; vme_ds = 0;
    repeat (4) @(posedge clk); #1;
    chk(!vme_dtack, "DTACK released");
  endtask

  initial begin
    logic acked;
    logic [15:0] r;
    int s0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      logic [23:0] a;
      logic [15:0] d;
      logic wr;
      a = {5'd14, 18'($urandom), 1'b0};
      d = 16'($urandom);
      wr = 1'($urandom);
      s0 = strobes;
      cycle(wr, a, (t % 2) ? 6'h39 : 6'h3D, 2'b11, d, acked, r);
      chk(acked && strobes == s0 + 1 && last_addr == a[18:1] && last_wr == wr, "accepted cycle");
      if (wr) chk(last_wdata == d, "write data");
      else    chk(r == (16'(a[18:1]) ^ 16'h5A5A), "read data");
    end
    s0 = strobes;
    cycle(0, 24'h680000, 6'h39, 2'b11, 0, acked, r);  chk(!acked, "other slot ignored");
    cycle(0, 24'h700010, 6'h29, 2'b11, 0, acked, r);  chk(!acked, "other AM ignored");
    cycle(1, 24'h700010, 6'h39, 2'b01, 0, acked, r);  chk(!acked, "byte cycle ignored");
    chk(strobes == s0, "no strobes for ignored cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
