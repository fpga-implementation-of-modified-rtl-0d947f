// avd_min_path: min path calculation of the adaptive ACS.
//
// Finds the smallest metric among the candidates that are kept by the
// threshold rule; this is the stage minimum PMmin(n+1) the next stage's
// threshold refers to, and the amount every new metric is rescaled by. It
// works in parallel with merge and contender. The search is a binary tree
// of compare-select nodes over the 2*NMAX candidates; masked-out entries
// enter the tree as "empty".
//
// Interface: valid_i masks pm_i; min_o is the minimum (0 when the mask is
// empty) and any_o tells whether the mask had any bit set.
// Timing: purely combinational, log2(2*NMAX) comparator levels.
module avd_min_path #(
  parameter int unsigned N    = 2 * avd_pkg::NMAX_DEF,
  parameter int unsigned PM_W = avd_pkg::pm_width(avd_pkg::Q_DEF, avd_pkg::T_MAX_DEF)
) (
  input  logic [N-1:0]           valid_i,
  input  logic [N-1:0][PM_W-1:0] pm_i,
  output logic [PM_W-1:0]        min_o,
  output logic                   any_o
);

  localparam int unsigned LEAVES = 1 << $clog2(N);

  // Tree stored heap-style: node n has children 2n and 2n+1, leaves at
  // LEAVES .. 2*LEAVES-1, root at 1.
  logic [2*LEAVES-1:1]           nv;
  logic [2*LEAVES-1:1][PM_W-1:0] nm;

  always_comb begin
    for (int l = 0; l < LEAVES; l++) begin
      nv[LEAVES+l] = (l < N) ? valid_i[l] : 1'b0;
      nm[LEAVES+l] = (l < N) ? pm_i[l] : '0;
    end
    for (int n = LEAVES - 1; n >= 1; n--) begin
      if (nv[2*n] && (!nv[2*n+1] || nm[2*n] <= nm[2*n+1])) begin
        nv[n] = 1'b1;
        nm[n] = nm[2*n];
      end else begin
        nv[n] = nv[2*n+1];
        nm[n] = nm[2*n+1];
      end
    end
    any_o = nv[1];
    min_o = nv[1] ? nm[1] : '0;
  end

endmodule
