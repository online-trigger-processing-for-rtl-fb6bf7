// coinc_validation: the coincidence validation block.
//
// Multiple coincidences are rejected: a coincidence is accepted only when the
// matrix holds exactly one north/south pair, so a third hit within the window
// (two north channels with one south channel, or the reverse) vetoes the
// event. Because a cluster of hits may be reported by the matrix in two
// consecutive words, a single pair in one word is accepted only when the
// words just before and just after hold no pair at all. An accepted pair
// drives a one-cycle (4 ns) pulse on its north channel's n_coinc_o bit and its
// south channel's s_coinc_o bit; coinc_o marks the accepted event and veto_o
// a rejected one.
//
// The rejection of multiple coincidences and the per-channel trigger outputs
// follow the trigger system being modelled; the three-word decision span is
// this design's own choice. It also rejects two separate pairs reported in
// adjacent words (4 to 8 ns apart), which at the expected ~100 kHz coincidence
// rate is rare.
//
// Timing: a matrix presented in cycle n gives its outputs in cycle n+2 (the
// block waits one word for the following matrix).
module coinc_validation
  import trig_pkg::*;
#(
  parameter int unsigned N_N = N_NORTH,
  parameter int unsigned N_S = N_SOUTH
)(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N_S-1:0] ec_trigger_i [N_N],
  output logic [N_N-1:0] n_coinc_o,
  output logic [N_S-1:0] s_coinc_o,
  output logic           coinc_o,
  output logic           veto_o
);

  logic [N_N*N_S-1:0] m_in, m_cur_q, m_prev_q;
  logic               single, accept, reject;
  logic [N_N-1:0]     n_hit;
  logic [N_S-1:0]     s_hit;

  always_comb begin
    for (int i = 0; i < N_N; i++)
      for (int j = 0; j < N_S; j++)
        m_in[i*N_S + j] = ec_trigger_i[i][j];

    single = (m_cur_q != '0) && ((m_cur_q & (m_cur_q - 1'b1)) == '0);
    accept = single && (m_prev_q == '0) && (m_in == '0);
    reject = (m_cur_q != '0) && !accept;

    n_hit = '0;
    s_hit = '0;
    for (int i = 0; i < N_N; i++)
      for (int j = 0; j < N_S; j++)
        if (m_cur_q[i*N_S + j]) begin
          n_hit[i] = 1'b1;
          s_hit[j] = 1'b1;
        end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_cur_q   <= '0;
      m_prev_q  <= '0;
      n_coinc_o <= '0;
      s_coinc_o <= '0;
      coinc_o   <= 1'b0;
      veto_o    <= 1'b0;
    end else begin
      m_prev_q  <= m_cur_q;
      m_cur_q   <= m_in;
      n_coinc_o <= accept ? n_hit : '0;
      s_coinc_o <= accept ? s_hit : '0;
      coinc_o   <= accept;
      veto_o    <= reject;
    end
  end

  // An accepted event names exactly one channel on each side.
  a_one_pair: assert property (@(posedge clk) disable iff (!rst_n)
    coinc_o |-> ($countones(n_coinc_o) == 1 && $countones(s_coinc_o) == 1));

endmodule
