// avd_survivor_contender: survivor state contender (rule 2) of the
// adaptive ACS.
//
// Of the up to 2*NMAX candidates left after threshold selection and state
// merge, at most nmax_i survive. The contender keeps the best ones: each
// eligible candidate is ranked by counting the eligible candidates with a
// smaller key {metric, state} (keys are unique, since merge leaves one
// candidate per state). A candidate whose rank is below nmax_i is kept and
// its rank is the survivor slot it moves to, so the new survivor list is
// compact and sorted, with the best path in slot 0. Keeping the smallest
// keys is this design's reading of "keep the most likely states".
//
// Interface: elig_i and key_i per candidate, nmax_i (1..NMAX); per slot,
// slot_valid_o and slot_src_o (index of the candidate that fills it), and
// count_o, the number of survivors. Timing: purely combinational.
module avd_survivor_contender #(
  parameter int unsigned NMAX  = avd_pkg::NMAX_DEF,
  parameter int unsigned KEY_W = avd_pkg::pm_width(avd_pkg::Q_DEF, avd_pkg::T_MAX_DEF) + avd_pkg::K_DEF - 1,
  localparam int unsigned NC   = 2 * NMAX,
  localparam int unsigned C_W  = $clog2(NC),
  localparam int unsigned N_W  = $clog2(NMAX + 1),
  localparam int unsigned I_W  = (NMAX > 1) ? $clog2(NMAX) : 1,
  localparam int unsigned R_W  = $clog2(NC + 1)
) (
  input  logic [NC-1:0]             elig_i,
  input  logic [NC-1:0][KEY_W-1:0]  key_i,
  input  logic [N_W-1:0]            nmax_i,
  output logic [NMAX-1:0]           slot_valid_o,
  output logic [NMAX-1:0][C_W-1:0]  slot_src_o,
  output logic [N_W-1:0]            count_o
);

  logic [NC-1:0][R_W-1:0] rank;
  logic [R_W-1:0]         n_elig;
  logic [R_W-1:0]         lim;     // nmax_i, clipped to the NMAX slots

  assign lim = (R_W'(nmax_i) < R_W'(NMAX)) ? R_W'(nmax_i) : R_W'(NMAX);

  always_comb begin
    n_elig = '0;
    for (int c = 0; c < NC; c++) begin
      rank[c] = '0;
      for (int d = 0; d < NC; d++)
        if (d != c && elig_i[d] && key_i[d] < key_i[c])
          rank[c] = rank[c] + R_W'(1);
      n_elig = n_elig + R_W'(elig_i[c]);
    end
  end

  always_comb begin
    slot_valid_o = '0;
    slot_src_o   = '0;
    for (int c = 0; c < NC; c++) begin
      if (elig_i[c] && rank[c] < lim) begin
        slot_valid_o[rank[c][I_W-1:0]] = 1'b1;
        slot_src_o[rank[c][I_W-1:0]]   = C_W'(c);
      end
    end
    count_o = N_W'((n_elig < lim) ? n_elig : lim);
  end

endmodule
