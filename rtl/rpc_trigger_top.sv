// rpc_trigger_top: online coincidence trigger for a six-plate RPC-PET camera.
//
// The camera is a cube with one resistive plate chamber per face. Each plate
// gives a fast hit signal (its time channel); the plates form a north group
// and a south group of three channels. A gamma pair is accepted when one
// north and one south channel rise within a sub-nanosecond window, and only
// then are the two plates' acquisition channels triggered.
//
// Data path, all but the first stage on the 250 MHz word clock:
//   sample_block   three pads per channel on a three-phase 500 MHz DDR clock
//                  give a 12-bit word of ~333 ps samples every 4 ns
//   edge_detect    per channel: low-to-high transitions, optional filter of
//                  pulses shorter than e_filter samples (n_e_bits, s_e_bits)
//   coinc_matrix   3x3 matrix of north/south pairs whose edges lie within
//                  cw_size samples (ec_trigger)
//   coinc_validation  accepts a lone pair, rejects multiple coincidences,
//                  drives 4 ns trigger pulses n_coinc_o / s_coinc_o
//   pulse_stretch  stretches the triggers to 20 ns (n_trig_o / s_trig_o)
//   coinc_counters counts north edges, south edges and coincidences, all
//                  stopping when the first reaches 32767
//
// Timing: an edge sampled at time t gives n_coinc_o/s_coinc_o between about
// 22 and 26 ns later, and n_trig_o/s_trig_o one word clock after that. Edges
// and coincidences are processed at full rate, without dead time. The
// structure, rates, channel counts and window range follow the trigger system
// being modelled; word layout, latencies and the validation span are this
// design's own choices (see the modules).
//
// Clocks: e_bit_clk[k] is phase k of the 500 MHz clock, delayed k/3 ns; the
// 250 MHz e_word_clk rises with every other rising edge of e_bit_clk[0].
// rst_n is synchronous to e_word_clk. e_filter and cw_size may change at any
// time (PROGRAMMABLE = 1); with PROGRAMMABLE = 0 the parameters E_FILTER and
// CW_SIZE are built in and the ports are ignored.
module rpc_trigger_top
  import trig_pkg::*;
#(
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned E_FILTER     = 1,
  parameter int unsigned CW_SIZE      = 2
)(
  input  logic [PINS-1:0]    e_bit_clk,
  input  logic               e_word_clk,
  input  logic               rst_n,
  input  logic [PINS-1:0]    n_pads [N_NORTH],
  input  logic [PINS-1:0]    s_pads [N_SOUTH],
  input  logic [EF_W-1:0]    e_filter,
  input  logic [CW_W-1:0]    cw_size,
  input  logic               cnt_start,
  output logic [N_NORTH-1:0] n_coinc_o,
  output logic [N_SOUTH-1:0] s_coinc_o,
  output logic [N_NORTH-1:0] n_trig_o,
  output logic [N_SOUTH-1:0] s_trig_o,
  output logic               coinc_o,
  output logic               veto_o,
  output logic [N_SOUTH-1:0] ec_trigger [N_NORTH],
  output logic [CNT_W-1:0]   n_edge_cnt,
  output logic [CNT_W-1:0]   s_edge_cnt,
  output logic [CNT_W-1:0]   coinc_cnt,
  output logic               cnt_running,
  output logic               cnt_done
);

  word_t n_bits   [N_NORTH];
  word_t s_bits   [N_SOUTH];
  word_t n_e_bits [N_NORTH];
  word_t s_e_bits [N_SOUTH];

  for (genvar i = 0; i < N_NORTH; i++) begin : g_north
    sample_block u_sample (
      .e_bit_clk  (e_bit_clk),
      .e_word_clk (e_word_clk),
      .rst_n      (rst_n),
      .pad_i      (n_pads[i]),
      .bits_o     (n_bits[i])
    );
    edge_detect #(.PROGRAMMABLE(PROGRAMMABLE), .E_FILTER(E_FILTER)) u_edge (
      .clk        (e_word_clk),
      .rst_n      (rst_n),
      .bits_i     (n_bits[i]),
      .e_filter_i (e_filter),
      .e_bits_o   (n_e_bits[i])
    );
  end

  for (genvar j = 0; j < N_SOUTH; j++) begin : g_south
    sample_block u_sample (
      .e_bit_clk  (e_bit_clk),
      .e_word_clk (e_word_clk),
      .rst_n      (rst_n),
      .pad_i      (s_pads[j]),
      .bits_o     (s_bits[j])
    );
    edge_detect #(.PROGRAMMABLE(PROGRAMMABLE), .E_FILTER(E_FILTER)) u_edge (
      .clk        (e_word_clk),
      .rst_n      (rst_n),
      .bits_i     (s_bits[j]),
      .e_filter_i (e_filter),
      .e_bits_o   (s_e_bits[j])
    );
  end

  coinc_matrix #(
    .N_N(N_NORTH), .N_S(N_SOUTH), .PROGRAMMABLE(PROGRAMMABLE), .CW_SIZE(CW_SIZE)
  ) u_matrix (
    .clk          (e_word_clk),
    .rst_n        (rst_n),
    .n_e_bits     (n_e_bits),
    .s_e_bits     (s_e_bits),
    .cw_size_i    (cw_size),
    .ec_trigger_o (ec_trigger)
  );

  coinc_validation #(.N_N(N_NORTH), .N_S(N_SOUTH)) u_valid (
    .clk          (e_word_clk),
    .rst_n        (rst_n),
    .ec_trigger_i (ec_trigger),
    .n_coinc_o    (n_coinc_o),
    .s_coinc_o    (s_coinc_o),
    .coinc_o      (coinc_o),
    .veto_o       (veto_o)
  );

  pulse_stretch #(.WIDTH(N_NORTH)) u_stretch_n (
    .clk     (e_word_clk),
    .rst_n   (rst_n),
    .pulse_i (n_coinc_o),
    .pulse_o (n_trig_o)
  );

  pulse_stretch #(.WIDTH(N_SOUTH)) u_stretch_s (
    .clk     (e_word_clk),
    .rst_n   (rst_n),
    .pulse_i (s_coinc_o),
    .pulse_o (s_trig_o)
  );

  coinc_counters #(.N_N(N_NORTH), .N_S(N_SOUTH)) u_counters (
    .clk        (e_word_clk),
    .rst_n      (rst_n),
    .start_i    (cnt_start),
    .n_e_bits   (n_e_bits),
    .s_e_bits   (s_e_bits),
    .coinc_i    (coinc_o),
    .n_edge_cnt (n_edge_cnt),
    .s_edge_cnt (s_edge_cnt),
    .coinc_cnt  (coinc_cnt),
    .running_o  (cnt_running),
    .done_o     (cnt_done)
  );

endmodule
