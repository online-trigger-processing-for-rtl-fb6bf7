// tb_clkgen: clock source for the testbenches (time unit 1 ps).
//
// Produces the three phases of the 500 MHz DDR sampling clock, phase k
// delayed by k/3 ns (0, 333 and 667 ps), and the 250 MHz word clock. Phase k
// rises at PH[k] + 2000*m ps; the word clock rises at 2000 + 4000*n ps, i.e.
// together with every other rising edge of phase 0.
`timescale 1ps/1ps
module tb_clkgen (
  output logic [2:0] e_bit_clk,
  output logic       e_word_clk
);
  localparam int PH [3] = '{0, 333, 667};

  for (genvar k = 0; k < 3; k++) begin : g_ph
    initial begin
      e_bit_clk[k] = 1'b0;
      #(PH[k]);
      forever begin
        e_bit_clk[k] = 1'b1;
        #1000;
        e_bit_clk[k] = 1'b0;
        #1000;
      end
    end
  end

  initial begin
    e_word_clk = 1'b0;
    forever begin
      #2000 e_word_clk = 1'b1;
      #2000 e_word_clk = 1'b0;
    end
  end
endmodule
