// tb_pulse_stretch: checks that one-cycle triggers become 5-cycle (20 ns)
// pulses, that a pulse arriving while the output is high restarts the count,
// and that the lines are independent. The reference keeps, per line, the
// cycle of the last input pulse; the output must be high exactly in the
// STRETCH cycles that follow it.
`timescale 1ns/1ps
module tb_pulse_stretch;
  import trig_pkg::*;

  localparam int NC = 600;

  logic       clk = 1'b0, rst_n;
  logic [2:0] pin, pout;
  int         checks = 0, failures = 0, retrig = 0;
  int         last [3];

  always #2 clk = ~clk;

  pulse_stretch dut (.clk, .rst_n, .pulse_i(pin), .pulse_o(pout));

  initial begin
    rst_n = 1'b0;
    pin   = '0;
    for (int i = 0; i < 3; i++) last[i] = -100;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      // drive this cycle's input
      for (int i = 0; i < 3; i++) pin[i] = ($urandom_range(11) == 0);
      @(posedge clk);
      for (int i = 0; i < 3; i++)
        if (pin[i]) begin
          if (c - last[i] < STRETCH_CYCLES) retrig++;
          last[i] = c;
        end
      @(negedge clk);
      // after the edge of cycle c, the output covers cycles last+1 .. last+STRETCH
      for (int i = 0; i < 3; i++) begin
        automatic logic e = (c - last[i] >= 0) && (c - last[i] < STRETCH_CYCLES);
        checks++;
        if (pout[i] !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d line %0d: got %b want %b", c, i, pout[i], e);
        end
      end
    end
    checks++;
    if (retrig == 0) failures++;
    $display("retriggers=%0d", retrig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
