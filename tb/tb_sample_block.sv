// tb_sample_block: checks the three-pad DDR sampler against the ideal
// sampling of a known waveform.
//
// The pad waveform only changes 150 ps after a sample instant, so every sample
// has one defined value: global sample s is taken at 1000*(s/3) + PH[s%3] ps
// and sees level lvl[s]. The word loaded at the word-clock edge at time W must
// hold samples (W-6000)*3/1000 + b for b = 0..11, bit 0 oldest. Random run
// lengths of 1 to 7 samples exercise single-sample pulses and every pad.
`timescale 1ps/1ps
module tb_sample_block;
  import trig_pkg::*;

  localparam int NS = 3000;             // samples driven (1 us)
  localparam int PH [3] = '{0, 333, 667};

  logic [2:0] e_bit_clk;
  logic       e_word_clk;
  logic       rst_n;
  logic       sig;
  word_t      bits;
  bit         lvl [NS];
  int         checks = 0, failures = 0;

  tb_clkgen u_clk (.e_bit_clk(e_bit_clk), .e_word_clk(e_word_clk));

  sample_block dut (
    .e_bit_clk  (e_bit_clk),
    .e_word_clk (e_word_clk),
    .rst_n      (rst_n),
    .pad_i      ({3{sig}}),
    .bits_o     (bits)
  );

  function automatic longint stime(int s);
    return longint'(1000 * (s / 3) + PH[s % 3]);
  endfunction

  // waveform: random runs
  initial begin
    int s = 0;
    bit v = 1'b0;
    while (s < NS) begin
      int run = 1 + int'($urandom_range(6));
      for (int r = 0; r < run && s < NS; r++) lvl[s++] = v;
      v = !v;
    end
    sig = lvl[0];
    for (int s2 = 1; s2 < NS; s2++) begin
      #(stime(s2 - 1) + 150 - $time);
      sig = lvl[s2];
    end
  end

  // checker
  initial begin
    rst_n = 1'b0;
    repeat (2) @(posedge e_word_clk);
    rst_n = 1'b1;
    forever begin
      longint w;
      int     base;
      @(posedge e_word_clk);
      w = $time;
      @(negedge e_word_clk);
      if (w >= 8000) begin
        base = int'((w - 6000) * 3 / 1000);
        if (base + WORD_W >= NS) break;
        for (int b = 0; b < WORD_W; b++) begin
          checks++;
          if (bits[b] !== lvl[base + b]) begin
            failures++;
            if (failures < 10)
              $display("mismatch word@%0t bit %0d: got %b want %b", w, b, bits[b], lvl[base+b]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(NS) * 400 + 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
