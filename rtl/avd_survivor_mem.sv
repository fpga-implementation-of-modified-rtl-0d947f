// avd_survivor_mem: survivor memory of the adaptive Viterbi decoder.
//
// One row per survivor slot, each holding the last TB_LEN decision bits
// (decoded input bits) of the path that ends in that slot. Because the
// contender reorders survivors every stage, the memory is managed by
// register exchange: when a stage is loaded, row k takes the row of its
// parent slot, shifted by one, with the new decision bit appended. The
// contender keeps slot 0 for the best path, so the decoded output is the
// oldest bit of row 0, TB_LEN-1 stages behind the newest one. Register
// exchange and the depth TB_LEN = 5K are choices of this design.
//
// Interface: init_i clears all rows; load_i takes one stage given, per new
// slot, parent_i (old slot) and bit_i. dec_bit_o is valid whenever at least
// TB_LEN stages have been loaded since init (tracked by the control path).
// Timing: one register stage; dec_bit_o comes straight from a register.
module avd_survivor_mem #(
  parameter int unsigned NMAX   = avd_pkg::NMAX_DEF,
  parameter int unsigned TB_LEN = avd_pkg::TB_LEN_DEF,
  localparam int unsigned I_W   = (NMAX > 1) ? $clog2(NMAX) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init_i,
  input  logic                     load_i,
  input  logic [NMAX-1:0][I_W-1:0] parent_i,
  input  logic [NMAX-1:0]          bit_i,
  output logic                     dec_bit_o
);

  logic [NMAX-1:0][TB_LEN-1:0] path_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      path_q <= '0;
    end else if (init_i) begin
      path_q <= '0;
    end else if (load_i) begin
      for (int k = 0; k < NMAX; k++)
        path_q[k] <= {path_q[parent_i[k]][TB_LEN-2:0], bit_i[k]};
    end
  end

  assign dec_bit_o = path_q[0][TB_LEN-1];

endmodule
