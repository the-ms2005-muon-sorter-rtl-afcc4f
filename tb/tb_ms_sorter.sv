// tb_ms_sorter - self-checking test of the 4-of-36 sorter.
//
// Drives random SP patterns (with many equal ranks and zero ranks to
// exercise the tie-break and the empty outputs) and compares the four
// outputs and one-hot addresses, one bx later, with a reference that picks
// the maximum four times, preferring the larger input index on equal rank.
module tb_ms_sorter;
  import ms_pkg::*;

  logic clk = 0, rst = 1, ce = 0;
  sp_pattern_t [N_SP-1:0] pat;
  sel_muon_t   [N_OUT-1:0] best;
  logic [N_OUT-1:0][N_IN-1:0] sel;
  int checks = 0, failures = 0, ties = 0, empties = 0;

  ms_sorter dut (.clk, .rst, .ce, .pat, .best, .sel);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] rank_of(sp_pattern_t [N_SP-1:0] p, int i);
    return p[i/3].mu[i%3].rank;
  endfunction

  task automatic check_against(sp_pattern_t [N_SP-1:0] p);
    logic [N_IN-1:0] used;
    int winner;
    used = '0;
    for (int o = 0; o < N_OUT; o++) begin
      winner = -1;
      for (int i = 0; i < N_IN; i++)
        if (!used[i] && rank_of(p, i) != 0 &&
            (winner < 0 || rank_of(p, i) >= rank_of(p, winner)))
          winner = i;
      checks++;
      if (winner < 0) begin
        empties++;
        if (best[o] != '0 || sel[o] != '0) begin
          failures++;
          $display("out %0d should be empty: sel=%h", o, sel[o]);
        end
      end else begin
        used[winner] = 1'b1;
        if (sel[o] != (N_IN'(1) << winner) || best[o].sp_id != 4'(winner/3 + 1) ||
            best[o].mu != p[winner/3].mu[winner%3] || best[o].bx0 != p[winner/3].bx0 ||
            best[o].se != p[winner/3].se || best[o].bc0 != p[winner/3].bc0) begin
          failures++;
          $display("out %0d: expected input %0d rank %0d, got sel=%h sp_id=%0d rank=%0d",
                   o, winner, rank_of(p, winner), sel[o], best[o].sp_id, best[o].mu.rank);
        end
      end
    end
  endtask

  initial begin
    pat = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    ce  <= 1;
    for (int t = 0; t < 3000; t++) begin
      sp_pattern_t [N_SP-1:0] p;
      int mode;
      mode = $urandom_range(0, 3);
      for (int s = 0; s < N_SP; s++) begin
        p[s] = sp_pattern_t'({$urandom, $urandom});
        for (int k = 0; k < N_MU_SP; k++) begin
          case (mode)
            0: p[s].mu[k].rank = 7'($urandom_range(0, 3));          // many ties
            1: p[s].mu[k].rank = ($urandom_range(0, 9) == 0) ? 7'($urandom) : 7'd0; // sparse
            default: p[s].mu[k].rank = 7'($urandom);
          endcase
        end
      end
      pat <= p;
      @(posedge clk);
      #1;
      check_against(p);
      // count tie cases the reference had to break
      for (int i = 0; i < N_IN; i++)
        for (int j = i + 1; j < N_IN; j++)
          if (rank_of(p, i) == rank_of(p, j) && rank_of(p, i) != 0) ties++;
    end
    // ce low holds the outputs
    ce <= 0;
    begin
      sel_muon_t [N_OUT-1:0] held;
      held = best;
      pat <= '0;
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (best != held) begin failures++; $display("outputs changed with ce low"); end
    end
    checks++;
    if (ties == 0 || empties == 0) begin failures++; $display("ties or empty outputs never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
