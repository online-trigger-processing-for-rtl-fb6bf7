// coinc_counters: edge and coincidence counters used to characterise the
// trigger.
//
// Three counters run side by side: the number of edges found in all north
// channels, the number found in all south channels, and the number of accepted
// coincidences. A pulse on start_i clears them and starts them together; they
// all stop in the cycle the first of them reaches CNT_MAX (32767), and done_o
// then stays high until the next start. The ratio coinc_cnt / n_edge_cnt is
// the detected fraction of coincidences. Because a 4 ns word may hold several
// edges, each edge counter adds the number of edge bits in the word and
// saturates at CNT_MAX.
//
// Counting edges and coincidences and stopping all counters at 32767 follow
// the trigger system being modelled; summing over the channels of each side,
// the start pulse and the saturation are this design's own choices.
module coinc_counters
  import trig_pkg::*;
#(
  parameter int unsigned N_N = N_NORTH,
  parameter int unsigned N_S = N_SOUTH,
  parameter int unsigned W   = CNT_W,
  parameter int unsigned MAX = CNT_MAX
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  word_t        n_e_bits [N_N],
  input  word_t        s_e_bits [N_S],
  input  logic         coinc_i,
  output logic [W-1:0] n_edge_cnt,
  output logic [W-1:0] s_edge_cnt,
  output logic [W-1:0] coinc_cnt,
  output logic         running_o,
  output logic         done_o
);

  localparam int unsigned SW = W + 1;

  logic [SW-1:0] n_add, s_add;
  logic [SW-1:0] n_next, s_next, c_next;
  logic          hit_max;

  always_comb begin
    n_add = '0;
    s_add = '0;
    for (int i = 0; i < N_N; i++) n_add = n_add + SW'($countones(n_e_bits[i]));
    for (int j = 0; j < N_S; j++) s_add = s_add + SW'($countones(s_e_bits[j]));
    n_next = SW'(n_edge_cnt) + n_add;
    s_next = SW'(s_edge_cnt) + s_add;
    c_next = SW'(coinc_cnt) + SW'(coinc_i);
    if (n_next > SW'(MAX)) n_next = SW'(MAX);
    if (s_next > SW'(MAX)) s_next = SW'(MAX);
    if (c_next > SW'(MAX)) c_next = SW'(MAX);
    hit_max = (n_next == SW'(MAX)) || (s_next == SW'(MAX)) || (c_next == SW'(MAX));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_edge_cnt <= '0;
      s_edge_cnt <= '0;
      coinc_cnt  <= '0;
      running_o  <= 1'b0;
      done_o     <= 1'b0;
    end else if (start_i) begin
      n_edge_cnt <= '0;
      s_edge_cnt <= '0;
      coinc_cnt  <= '0;
      running_o  <= 1'b1;
      done_o     <= 1'b0;
    end else if (running_o) begin
      n_edge_cnt <= W'(n_next);
      s_edge_cnt <= W'(s_next);
      coinc_cnt  <= W'(c_next);
      if (hit_max) begin
        running_o <= 1'b0;
        done_o    <= 1'b1;
      end
    end
  end

endmodule
