// coinc_matrix: the coincidence matrix block.
//
// For every pair of one north and one south time channel it checks whether
// their edges lie within the coincidence window: two edges at samples a and b
// coincide when |a - b| <= cw_size - 1, so cw_size = 1 (~0.33 ns) asks for the
// same sample and cw_size = 4 (~1.3 ns) allows three samples of separation.
// The result is the ec_trigger matrix, one row per north channel and one
// column per south channel, with a 1 where the pair coincided.
//
// A coincident pair is reported once, in the cycle of the word holding the
// later of its two edges. To see pairs that straddle a word boundary the block
// keeps the newest CW_MAX-1 edge bits of each channel's previous word. The
// matrix is registered: edges presented in cycle n give ec_trigger_o in cycle
// n+1, one word clock (4 ns) later.
//
// PROGRAMMABLE = 1 reads cw_size_i at run time; PROGRAMMABLE = 0 is the
// hard-wired variant that uses the parameter CW_SIZE. Window values outside
// 1..CW_MAX are clamped into it. The matrix, its orientation, the ~0.33 ns
// window step and both variants follow the trigger system being modelled; the
// exact distance rule and the word-boundary handling are this design's own.
module coinc_matrix
  import trig_pkg::*;
#(
  parameter int unsigned N_N          = N_NORTH,
  parameter int unsigned N_S          = N_SOUTH,
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned CW_SIZE      = 2
)(
  input  logic            clk,
  input  logic            rst_n,
  input  word_t           n_e_bits [N_N],
  input  word_t           s_e_bits [N_S],
  input  logic [CW_W-1:0] cw_size_i,
  output logic [N_S-1:0]  ec_trigger_o [N_N]
);

  localparam int unsigned H = CW_MAX - 1;     // history bits kept per channel

  logic [H-1:0]        n_hist [N_N];
  logic [H-1:0]        s_hist [N_S];
  logic [WORD_W+H-1:0] n_ext  [N_N];          // index H + t = sample t of this word
  logic [WORD_W+H-1:0] s_ext  [N_S];
  logic [N_S-1:0]      hit    [N_N];
  int unsigned         cw;

  always_comb begin
    cw = PROGRAMMABLE ? clamp_cw(cw_size_i) : clamp_cw(CW_W'(CW_SIZE));
    for (int i = 0; i < N_N; i++) n_ext[i] = {n_e_bits[i], n_hist[i]};
    for (int j = 0; j < N_S; j++) s_ext[j] = {s_e_bits[j], s_hist[j]};
    for (int i = 0; i < N_N; i++) begin
      for (int j = 0; j < N_S; j++) begin
        hit[i][j] = 1'b0;
        for (int t = H; t < WORD_W + H; t++) begin
          for (int k = 0; k < CW_MAX; k++) begin
            if (k < cw) begin
              // north edge now, south edge k samples earlier or at once
              if (n_ext[i][t] && s_ext[j][t-k]) hit[i][j] = 1'b1;
              // south edge now, north edge strictly earlier
              if (k > 0 && s_ext[j][t] && n_ext[i][t-k]) hit[i][j] = 1'b1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_N; i++) begin
        n_hist[i]       <= '0;
        ec_trigger_o[i] <= '0;
      end
      for (int j = 0; j < N_S; j++) s_hist[j] <= '0;
    end else begin
      for (int i = 0; i < N_N; i++) begin
        n_hist[i]       <= n_e_bits[i][WORD_W-1 -: H];
        ec_trigger_o[i] <= hit[i];
      end
      for (int j = 0; j < N_S; j++) s_hist[j] <= s_e_bits[j][WORD_W-1 -: H];
    end
  end

endmodule
