// pulse_stretch: widens the 4 ns trigger pulses for the output connectors.
//
// Each of the WIDTH lines has its own down-counter. A high input loads the
// counter with STRETCH and the output stays high while the counter is above
// zero, so a one-cycle pulse becomes STRETCH cycles long (5 x 4 ns = 20 ns by
// default) and a pulse arriving while the output is still high restarts the
// count. Stretching 4 ns triggers to about 20 ns follows the trigger system
// being modelled; the retriggering behaviour is this design's own choice.
//
// Timing: the output rises one cycle after the input pulse.
module pulse_stretch
  import trig_pkg::*;
#(
  parameter int unsigned WIDTH   = N_NORTH,
  parameter int unsigned STRETCH = STRETCH_CYCLES
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] pulse_i,
  output logic [WIDTH-1:0] pulse_o
);

  localparam int unsigned CW = $clog2(STRETCH + 1);

  logic [CW-1:0] cnt_q [WIDTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < WIDTH; i++) begin
      if (!rst_n)          cnt_q[i] <= '0;
      else if (pulse_i[i]) cnt_q[i] <= CW'(STRETCH);
      else if (cnt_q[i] != '0) cnt_q[i] <= cnt_q[i] - 1'b1;
    end
  end

  always_comb
    for (int i = 0; i < WIDTH; i++) pulse_o[i] = (cnt_q[i] != '0);

endmodule
