// tb_ms_out_lut - self-checking test of the Rank/Phi LUTs and eta decoder.
//
// Checks the power-up contents through the datapath (Rank LUT identity,
// Phi offsets 6, 30, 54, 78, 102, 126 for SP1/7 .. SP6/12, eta bit 5 set for
// SP7..SP12), one bx latency, VME read-back of both tables, and that words
// written over VME change the conversion.
module tb_ms_out_lut;
  import ms_pkg::*;

  localparam logic [18:0] BASE = 19'h00800;
  localparam int OFS [6] = '{6, 30, 54, 78, 102, 126};

  logic clk = 0, rst = 1, ce = 0;
  sel_muon_t in;
  conv_muon_t out;
  reg_req_t reg_req = '0;
  logic [15:0] reg_rdata;
  int checks = 0, failures = 0;

  ms_out_lut #(.BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic vme(logic wr, int a, logic [15:0] d, output logic [15:0] r);
    reg_req = '{wr: wr, rd: !wr, addr: 18'((BASE + 19'(2*a)) >> 1), wdata: d};
    @(posedge clk);
    #1 reg_req = '0;
    r = reg_rdata;
  endtask

  task automatic convert(sel_muon_t s);
    in = s; ce = 1;
    @(posedge clk);
    #1 ce = 0;
  endtask

  initial begin
    logic [15:0] r;
    in = '0;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      sel_muon_t s;
      int id;
      s = sel_muon_t'({$urandom});
      id = $urandom_range(1, 12);
      s.sp_id = 4'(id);
      convert(s);
      chk(out.pt == s.mu.rank[4:0] && out.quality == {1'b0, s.mu.rank[6:5]}, "rank identity");
      chk(out.phi == 8'(s.mu.phi + OFS[(id - 1) % 6]), $sformatf("phi sp %0d phi %0d -> %0d", id, s.mu.phi, out.phi));
      chk(out.eta == {id >= 7, s.mu.eta}, "eta decoder");
      chk(out.hl == s.mu.hl && out.c == s.mu.c && out.vc == s.mu.vc &&
          out.se == s.se && out.bx0 == s.bx0 && out.valid == (s.mu.rank != 0), "pass-through bits");
    end
    // VME read-back of the default tables
    vme(0, 9'h05A, 0, r);   // rank address 0x5A, SP_ID 2, phi 26
    chk(r == {8'h5A, 8'(26 + 30)}, $sformatf("VME read %h", r));
    // overwrite one word and use it
    vme(1, 9'h063, 16'hA5C3, r);
    vme(0, 9'h063, 0, r);
    chk(r == 16'hA5C3, "VME write/read");
    begin
      sel_muon_t s;
      s = '0;
      s.mu.rank = 7'h63; s.sp_id = 4'd3; s.mu.phi = 5'd3;   // address 0x63 in both tables
      convert(s);
      chk({out.quality, out.pt} == 8'hA5 && out.phi == 8'hC3, "converted with written LUT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
