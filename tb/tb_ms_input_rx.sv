// tb_ms_input_rx - self-checking test of the SP input selector / frame assembler.
//
// Sends random frame pairs in Trigger mode, Test mode and with the SP
// disabled, and checks every field of the assembled pattern against the bit
// positions of the SP-to-MS frame format, one bx after frame 2.
module tb_ms_input_rx;
  import ms_pkg::*;

  logic clk = 0, rst = 1, frame2 = 0, test_mode = 0, disable_sp = 0;
  logic [31:0] sp_frame = 0, fifo_frame = 0;
  sp_pattern_t pat;
  int checks = 0, failures = 0;

  ms_input_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_fields(logic [31:0] f1, logic [31:0] f2);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (pat.mu[k].phi  !== f1[10*k+4 -: 5] || pat.mu[k].eta !== f1[10*k+9 -: 5] ||
          pat.mu[k].rank !== f2[10*k+6 -: 7] || pat.mu[k].vc  !== f2[10*k+7] ||
          pat.mu[k].c    !== f2[10*k+8]      || pat.mu[k].hl  !== f2[10*k+9]) begin
        failures++;
        $display("muon %0d wrong: f1=%h f2=%h pat=%h", k, f1, f2, pat);
      end
    end
    checks++;
    if (pat.bc0 !== f1[30] || pat.se !== f1[31] || pat.bx0 !== f2[30] || pat.sp !== f2[31]) begin
      failures++;
      $display("common bits wrong");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 600; t++) begin
      logic [31:0] a1, a2, b1, b2;
      int mode;
      mode = t % 3;            // 0 trigger, 1 test, 2 disabled
      a1 = $urandom; a2 = $urandom; b1 = $urandom; b2 = $urandom;
      test_mode  <= (mode == 1);
      disable_sp <= (mode == 2);
      frame2 <= 0; sp_frame <= a1; fifo_frame <= b1;
      @(posedge clk);
      frame2 <= 1; sp_frame <= a2; fifo_frame <= b2;
      @(posedge clk);
      #1;
      case (mode)
        0: expect_fields(a1, a2);
        1: expect_fields(b1, b2);
        default: begin
          checks++;
          if (pat !== '0) begin failures++; $display("disabled SP not zero"); end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
