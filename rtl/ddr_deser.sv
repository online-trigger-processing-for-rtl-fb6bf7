// ddr_deser: one pad of the sampler, a 1:4 DDR deserializer.
//
// The pad is sampled on both edges of its own phase of the 500 MHz bit clock.
// At every rising edge the previous rising-edge sample and the falling-edge
// sample in between are shifted into a 4-bit register (oldest sample in bit 0),
// so that register always holds the last four samples, 1 ns apart. On the
// falling edge the register is copied into a holding register that stays
// stable for 2 ns around the rising edge of the 250 MHz word clock, which is
// where the word-clock domain picks it up. Generic flip-flops stand in for the
// vendor's input deserializer; the clocking scheme is this design's choice.
//
// Timing: the word clock must rise together with every other rising edge of
// phase 0 of the bit clock; the phase of bit_clk may trail it by up to 2/3 ns.
module ddr_deser
  import trig_pkg::*;
(
  input  logic                    bit_clk,
  input  logic                    pad_i,
  output logic [BITS_PER_PIN-1:0] hold_o     // bit_clk domain, bit 0 oldest
);

  logic                    rise_q;
  logic                    fall_q;
  logic [BITS_PER_PIN-1:0] shift_q;

  always_ff @(posedge bit_clk) begin
    rise_q  <= pad_i;
    shift_q <= {fall_q, rise_q, shift_q[BITS_PER_PIN-1:2]};
  end

  always_ff @(negedge bit_clk) begin
    fall_q <= pad_i;
    hold_o <= shift_q;
  end

endmodule
