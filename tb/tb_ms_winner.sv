// tb_ms_winner - self-checking test of the winner-bit logic.
//
// Random sorter selections are applied one per bx.  For every delay
// setting 0..15 the two frames on the 24 lines are compared with the
// encoding Wi[0] = Muon_1 / Muon_3, Wi[1] = Muon_2 / 0 of the selection made
// `delay` bx earlier.  Training-pattern mode (a 1-0 pattern on Wi[0]) and the
// switch back to winner-bit mode are checked too.
module tb_ms_winner;
  import ms_pkg::*;

  logic clk = 0, rst = 1, ce, frame2 = 0;
  logic [N_OUT-1:0][N_IN-1:0] sel = '0;
  logic [3:0] delay = 0;
  logic set_winner = 0, set_training = 0, training;
  logic [N_SP-1:0][1:0] w;
  logic [N_IN-1:0] hist [$];
  int checks = 0, failures = 0;

  assign ce = frame2;
  ms_winner dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_OUT-1:0][N_IN-1:0] rand_sel();
    logic [N_OUT-1:0][N_IN-1:0] s;
    s = '0;
    for (int p = 0; p < N_OUT; p++)
      if ($urandom_range(0, 5) != 0) s[p][$urandom_range(0, N_IN - 1)] = 1'b1;
    return s;
  endfunction

  // one bx: frame-1 cycle then frame-2 cycle; returns lines after each edge
  task automatic bx(logic [N_OUT-1:0][N_IN-1:0] s,
                    output logic [N_SP-1:0][1:0] wf2, output logic [N_SP-1:0][1:0] wf1);
    logic [N_IN-1:0] won;
    sel = s; frame2 = 0;
    @(posedge clk); #1 wf2 = w;      // frame 2 of the previous result
    frame2 = 1;
    @(posedge clk); #1 wf1 = w;      // frame 1 of this result
    won = '0;
    for (int p = 0; p < N_OUT; p++) won |= s[p];
    hist.push_front(won);
    frame2 = 0;
  endtask

  initial begin
    logic [N_SP-1:0][1:0] f1, f2, f1_prev;
    logic [N_IN-1:0] e, e_prev;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int d = 0; d < 16; d++) begin
      delay = 4'(d);
      hist.delete();
      for (int n = 0; n < 40; n++) begin
        bx(rand_sel(), f2, f1);
        if (n > d + 1) begin
          e = hist[d];
          e_prev = hist[d + 1];
          for (int i = 0; i < N_SP; i++) begin
            checks++;
            if (f1[i] !== {e[3*i+1], e[3*i]} || f2[i] !== {1'b0, e_prev[3*i+2]}) begin
              failures++;
              $display("delay %0d SP%0d: f1=%b f2=%b expected %b %b", d, i + 1, f1[i], f2[i],
                       {e[3*i+1], e[3*i]}, {1'b0, e_prev[3*i+2]});
            end
          end
        end
      end
    end
    // training pattern mode
    set_training = 1; @(posedge clk); #1 set_training = 0;
    checks++;
    if (!training) failures++;
    for (int n = 0; n < 10; n++) begin
      bx(rand_sel(), f2, f1);
      checks++;
      if (f1 !== {N_SP{2'b01}} || f2 !== '0) begin failures++; $display("training pattern wrong"); end
    end
    set_winner = 1; @(posedge clk); #1 set_winner = 0;
    checks++;
    if (training) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
