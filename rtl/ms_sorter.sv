// ms_sorter - the "4 out of 36" sorter with pattern merging.
//
// Inputs are the patterns of the 12 SPs (36 muons, each with a 7-bit rank).
// Muon i (i = 3*(SP_ID-1) + muon number - 1) beats muon j when its rank is
// larger, or when the ranks are equal and i > j; so on equal rank the SP with
// the larger physical address wins, as the specification requires.  For every
// muon the number of muons that beat it is counted; a muon with count p
// (p < 4) and non-zero rank is the (p+1)-th best.  Because the order is
// strict, each output position gets at most one muon.  The four 36-bit
// one-hot addresses (`sel`) then merge the chosen patterns onto four ranked
// outputs with an AND-OR multiplexer.  A rank-0 muon is never selected, so
// an output with no candidate is all zero (sp_id = 0).
//
// Timing: combinational selection, one register stage updated on `ce`
// (once per bx): outputs appear one bx after the inputs.
// The ranking rule follows the specification; the counting structure, the
// tie-break between the three muons of the same SP (higher muon number
// wins) and the register stage are this design's choices.
module ms_sorter
  import ms_pkg::*;
#(
  parameter int N_IN_P = N_IN   // must equal N_SP*N_MU_SP; kept for readability
)(
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       ce,
  input  sp_pattern_t [N_SP-1:0]     pat,
  output sel_muon_t   [N_OUT-1:0]    best,
  output logic [N_OUT-1:0][N_IN_P-1:0] sel
);

  sel_muon_t [N_IN_P-1:0] cand;
  logic [N_OUT-1:0][N_IN_P-1:0] sel_d;
  sel_muon_t [N_OUT-1:0] best_d;

  // Flatten the SP patterns into 36 candidates carrying their SP bits.
  always_comb begin
    for (int s = 0; s < N_SP; s++)
      for (int k = 0; k < N_MU_SP; k++) begin
        cand[s*N_MU_SP + k].mu    = pat[s].mu[k];
        cand[s*N_MU_SP + k].sp_id = 4'(s + 1);
        cand[s*N_MU_SP + k].bc0   = pat[s].bc0;
        cand[s*N_MU_SP + k].se    = pat[s].se;
        cand[s*N_MU_SP + k].bx0   = pat[s].bx0;
        cand[s*N_MU_SP + k].sp    = pat[s].sp;
      end
  end

  always_comb begin
    int cnt;
    sel_d  = '0;
    best_d = '0;
    for (int i = 0; i < N_IN_P; i++) begin
      cnt = 0;
      for (int j = 0; j < N_IN_P; j++)
        if (j != i)
          if ((cand[j].mu.rank > cand[i].mu.rank) ||
              ((cand[j].mu.rank == cand[i].mu.rank) && (j > i)))
            cnt++;
      for (int p = 0; p < N_OUT; p++)
        if (cnt == p && cand[i].mu.rank != 7'd0)
          sel_d[p][i] = 1'b1;
    end
    for (int p = 0; p < N_OUT; p++)
      for (int i = 0; i < N_IN_P; i++)
        if (sel_d[p][i])
          best_d[p] = best_d[p] | cand[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      best <= '0;
      sel  <= '0;
    end else if (ce) begin
      best <= best_d;
      sel  <= sel_d;
    end
  end

  // Each output position holds at most one muon.
  for (genvar p = 0; p < N_OUT; p++) begin : g_chk
    a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(sel[p]));
  end

endmodule
