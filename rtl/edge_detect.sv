// edge_detect: the edge detection block of one time channel.
//
// An edge is a low-to-high transition of the sampled hit signal. With the
// filter width e_filter = F, a transition at sample t counts only when sample
// t-1 is low and samples t .. t+F-1 are all high, so high pulses shorter than
// F samples (~0.33 ns each) are dropped as noise; F = 1 turns filtering off.
// The output word has a 1 at every sample position where an edge starts. A
// new edge needs the signal to return low first, so the block has no dead
// time beyond that.
//
// To look up to EF_MAX-1 samples ahead, the block judges the word it received
// one cycle earlier, using the newest input word as look-ahead and the last
// sample of the word before as look-behind. e_bits_o is registered: an edge
// in the word presented at bits_i in cycle n appears on e_bits_o in cycle n+2.
//
// PROGRAMMABLE = 1 reads e_filter_i at run time; PROGRAMMABLE = 0 is the
// hard-wired variant that uses the parameter E_FILTER and lets synthesis prune
// the unused compare logic. Both variants and the filter's purpose follow the
// trigger system being modelled; the exact filter rule, the EF_MAX range and
// the one-word look-ahead are this design's own choices. Values of e_filter
// outside 1..EF_MAX are clamped into it. After reset the line is taken as
// high, so a signal already high at reset gives no edge.
module edge_detect
  import trig_pkg::*;
#(
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned E_FILTER     = 1
)(
  input  logic            clk,
  input  logic            rst_n,
  input  word_t           bits_i,
  input  logic [EF_W-1:0] e_filter_i,
  output word_t           e_bits_o
);

  word_t cur_q;        // word under judgement
  logic  last_q;       // newest sample of the word before cur_q

  // stream[0] = last_q, stream[1 +: WORD_W] = cur_q, then bits_i.
  logic [2*WORD_W:0] stream;
  int unsigned       ef;
  word_t             edges;

  always_comb begin
    stream = {bits_i, cur_q, last_q};
    ef     = PROGRAMMABLE ? clamp_ef(e_filter_i) : clamp_ef(EF_W'(E_FILTER));
    for (int t = 0; t < WORD_W; t++) begin
      edges[t] = !stream[t];
      for (int m = 0; m < EF_MAX; m++)
        if (m < ef) edges[t] = edges[t] & stream[t+1+m];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_q    <= '1;
      last_q   <= 1'b1;
      e_bits_o <= '0;
    end else begin
      last_q   <= cur_q[WORD_W-1];
      cur_q    <= bits_i;
      e_bits_o <= edges;
    end
  end

endmodule
