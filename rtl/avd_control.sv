// avd_control: control path of the adaptive Viterbi decoder.
//
// Sequences the datapath, one trellis stage per received symbol:
//  * start_i begins a new stream: the survivor list returns to the single
//    state 0 with metric 0 and the survivor memory is cleared;
//  * a symbol (in_valid_i) is loaded as a stage if the ACS reports a valid
//    path; if no candidate met the threshold (path_valid_i low), the
//    decoder restarts as on start_i and pulses lost_o (this recovery is a
//    choice of this design);
//  * the controller stays in FILL until TB_LEN stages have been loaded,
//    then in RUN, where every loaded stage yields one decoded bit
//    (out_valid_o, registered, aligned with the survivor memory output).
// start_i has priority over in_valid_i; a symbol presented with start_i is
// dropped.
module avd_control #(
  parameter int unsigned TB_LEN = avd_pkg::TB_LEN_DEF,
  localparam int unsigned CNT_W = $clog2(TB_LEN + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  input  logic in_valid_i,
  input  logic path_valid_i,
  output logic init_o,
  output logic load_o,
  output logic out_valid_o,
  output logic lost_o
);

  typedef enum logic {FILL, RUN} state_e;

  state_e           state_q;
  logic [CNT_W-1:0] cnt_q;    // stages loaded while in FILL
  logic             lost;

  assign lost   = in_valid_i && !start_i && !path_valid_i;
  assign load_o = in_valid_i && !start_i && path_valid_i;
  assign init_o = start_i || lost;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= FILL;
      cnt_q       <= '0;
      out_valid_o <= 1'b0;
      lost_o      <= 1'b0;
    end else begin
      lost_o      <= lost;
      out_valid_o <= 1'b0;
      if (init_o) begin
        state_q <= FILL;
        cnt_q   <= '0;
      end else if (load_o) begin
        unique case (state_q)
          FILL: begin
            cnt_q <= cnt_q + CNT_W'(1);
            if (cnt_q == CNT_W'(TB_LEN - 1)) begin
              state_q     <= RUN;
              out_valid_o <= 1'b1;
            end
          end
          RUN: out_valid_o <= 1'b1;
        endcase
      end
    end
  end

endmodule
