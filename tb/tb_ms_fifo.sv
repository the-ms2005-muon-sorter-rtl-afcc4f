// tb_ms_fifo - self-checking test of the 511 x 32 test FIFO.
//
// A queue is the reference.  The test fills the FIFO from the datapath port
// until FULL (511 words), checks that a further write is dropped, empties it
// from the VME side (low half, then high half which pops), refills it from
// VME, drains it from the datapath read port, mixes random operations, and
// checks that Soft_Reset empties it and that reading an empty FIFO gives 0.
module tb_ms_fifo;
  import ms_pkg::*;

  localparam logic [18:0] BASE = 19'h00130;

  logic clk = 0, rst = 1, soft_rst = 0, wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  reg_req_t reg_req = '0;
  logic [15:0] reg_rdata;
  logic full, empty;
  logic [31:0] q[$];
  int checks = 0, failures = 0, fulls = 0;

  ms_fifo #(.BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic push_dp(logic [31:0] d);
    wr_en = 1; wr_data = d;
    @(posedge clk);
    #1 wr_en = 0;
    if (q.size() < 511) q.push_back(d);
  endtask

  task automatic pop_dp();
    logic [31:0] e;
    rd_en = 1;
    @(posedge clk);
    #1 rd_en = 0;
    e = (q.size() > 0) ? q.pop_front() : 32'h0;
    chk(rd_data === e, $sformatf("datapath pop: got %h expected %h", rd_data, e));
  endtask

  task automatic vme(logic wr, logic [18:0] a, logic [15:0] d, output logic [15:0] r);
    reg_req = '{wr: wr, rd: !wr, addr: a[18:1], wdata: d};
    @(posedge clk);
    #1 reg_req = '0;
    r = reg_rdata;
  endtask

  task automatic push_vme(logic [31:0] d);
    logic [15:0] r;
    vme(1, BASE, d[15:0], r);
    vme(1, BASE + 2, d[31:16], r);
    if (q.size() < 511) q.push_back(d);
  endtask

  task automatic pop_vme();
    logic [15:0] lo, hi;
    logic [31:0] e;
    vme(0, BASE, 0, lo);
    vme(0, BASE + 2, 0, hi);
    e = (q.size() > 0) ? q.pop_front() : 32'h0;
    chk({hi, lo} === e, $sformatf("VME pop: got %h expected %h", {hi, lo}, e));
  endtask

  initial begin
    logic [15:0] r;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk);
    #1 chk(empty && !full, "empty after reset");
    for (int i = 0; i < 511; i++) push_dp($urandom);
    chk(full, "full after 511 words");
    if (full) fulls++;
    push_dp(32'hDEADBEEF);      // dropped
    for (int i = 0; i < 511; i++) pop_vme();
    chk(empty, "empty after draining");
    pop_vme();                  // empty read gives 0
    for (int i = 0; i < 300; i++) push_vme($urandom);
    for (int i = 0; i < 300; i++) pop_dp();
    pop_dp();                   // empty pop gives 0
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(0, 3))
        0: push_dp($urandom);
        1: push_vme($urandom);
        2: pop_dp();
        default: pop_vme();
      endcase
      chk(empty == (q.size() == 0) && full == (q.size() == 511), "flags");
    end
    for (int i = 0; i < 20; i++) push_dp($urandom);
    soft_rst = 1;
    @(posedge clk);
    #1 soft_rst = 0;
    q.delete();
    chk(empty && !full, "Soft_Reset empties");
    vme(0, BASE + 4, 0, r);
    chk(r == 0, "other address reads 0");
    chk(fulls == 1, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
