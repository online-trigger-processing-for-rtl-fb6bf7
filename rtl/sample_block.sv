// sample_block: the time-to-digital front end of one time channel.
//
// The channel's hit signal enters the FPGA on three pads. Each pad is sampled
// on both edges of its own phase of the 500 MHz bit clock (ddr_deser); the
// three phases are 1/3 ns apart, so together the pads take one sample every
// ~333 ps, three times the rate of a single DDR pad. Every 4 ns the word clock
// collects the four samples of each pad and interleaves them into one
// time-ordered 12-bit word: bit 3*j+k is sample j of pad k, bit 0 is the
// oldest sample and bit 11 the newest.
//
// Three pads, the DDR 500 MHz clock and the 250 MHz word clock follow the
// trigger system being modelled; the pad-to-bit ordering, the phase spacing
// and the use of generic flip-flops instead of a vendor deserializer are this
// design's own choices. This is the only block that depends on the FPGA.
//
// Interface: e_bit_clk[k] is the phase-k bit clock, phase 0 aligned with
// e_word_clk. bits_o is registered on e_word_clk and holds samples taken
// between 6 ns and 2.33 ns before the word-clock edge that loads it.
module sample_block
  import trig_pkg::*;
(
  input  logic [PINS-1:0] e_bit_clk,
  input  logic            e_word_clk,
  input  logic            rst_n,
  input  logic [PINS-1:0] pad_i,
  output word_t           bits_o
);

  logic [BITS_PER_PIN-1:0] hold [PINS];
  word_t                   ordered;

  for (genvar k = 0; k < PINS; k++) begin : g_pad
    ddr_deser u_deser (
      .bit_clk (e_bit_clk[k]),
      .pad_i   (pad_i[k]),
      .hold_o  (hold[k])
    );
  end

  always_comb begin
    for (int j = 0; j < BITS_PER_PIN; j++)
      for (int k = 0; k < PINS; k++)
        ordered[PINS*j + k] = hold[k][j];
  end

  always_ff @(posedge e_word_clk) begin
    if (!rst_n) bits_o <= '0;
    else        bits_o <= ordered;
  end

endmodule
