// tb_ms_gmt_format - self-checking test of the GMT word builder.
//
// Random converted muons and mask settings; the expected word is built
// field by field from the GMT cable bit table (inversion of Pt and Quality,
// empty-candidate coding, Bx and SyncEr masking, XNOR parity over [29:0]).
module tb_ms_gmt_format;
  import ms_pkg::*;

  conv_muon_t mu;
  logic [2:0] bxn;
  logic bc0_any, masksp, maskcomp, masker, maskbxn;
  logic [30:0] word;
  int checks = 0, failures = 0, n_empty = 0, n_se = 0;

  ms_gmt_format dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [30:0] e;
      logic se_e;
      logic [2:0] bx_e;
      int ones;
      mu = conv_muon_t'({$urandom, $urandom});
      if ($urandom_range(0, 4) == 0) mu.pt = 0;
      {bxn, bc0_any, masksp, maskcomp, masker, maskbxn} = 8'($urandom);
      #1;
      e = '0;
      if (maskbxn) bx_e = bxn; else if (masker) bx_e = {2'b0, mu.bx0}; else bx_e = 0;
      se_e = (masksp & mu.se) | (maskcomp & mu.valid & (mu.bx0 ^ bxn[0]));
      e[27:25] = bx_e;
      e[28] = bc0_any;
      e[29] = se_e;
      if (mu.pt == 0) begin
        e[7:0] = 8'hFF; e[12:8] = 5'h1F; e[15:13] = 3'h7;
        n_empty++;
      end else begin
        e[7:0] = mu.phi;
        for (int b = 0; b < 5; b++) e[8+b] = !mu.pt[b];
        for (int b = 0; b < 3; b++) e[13+b] = !mu.quality[b];
        e[21:16] = mu.eta;
        e[22] = mu.hl; e[23] = mu.c; e[24] = mu.vc;
      end
      ones = 0;
      for (int b = 0; b < 30; b++) ones += e[b];
      e[30] = (ones % 2 == 0);
      if (se_e) n_se++;
      checks++;
      if (word !== e) begin
        failures++;
        $display("mismatch: got %h expected %h", word, e);
      end
    end
    checks++;
    if (n_empty == 0 || n_se == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
