// avd_bmu: branch metric unit of the adaptive Viterbi decoder.
//
// For one received symbol (two code bits, each a Q-bit soft level where 0
// is a confident 0 and 2^Q-1 a confident 1) it produces the branch metric
// against each of the four code pairs a branch can carry. As in the
// classic hard-decision unit, each received bit is XORed with the expected
// bit and the resulting "ones" are counted: with Q-bit levels the XOR with
// the replicated expected bit gives r or (2^Q-1)-r, and the two values are
// summed. With Q = 1 this is exactly the Hamming distance. The ACS picks one
// of the four metrics per branch from the branch's expected code.
//
// Interface: rx_i[b] is the level of code bit b (b = 0 belongs to
// generator G0); bm_o[c] is the metric for expected pair c = {c1, c0}.
// Timing: purely combinational.
module avd_bmu #(
  parameter int unsigned Q    = avd_pkg::Q_DEF,
  parameter int unsigned BM_W = avd_pkg::bm_width(Q)
) (
  input  logic [1:0][Q-1:0]    rx_i,
  output logic [3:0][BM_W-1:0] bm_o
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [Q-1:0] d0, d1;
      d0 = rx_i[0] ^ {Q{c[0]}};
      d1 = rx_i[1] ^ {Q{c[1]}};
      bm_o[c] = BM_W'(d0) + BM_W'(d1);
    end
  end

endmodule
