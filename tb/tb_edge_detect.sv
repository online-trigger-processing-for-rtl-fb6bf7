// tb_edge_detect: checks edge detection and the noise filter on a random
// sample stream.
//
// The stream is built from random low runs (1-6 samples) and high runs (1-14
// samples). The reference marks an edge at sample s when s-1 is low and the
// high run that starts at s is at least F samples long. The programmable
// instance is run with F = 1, 2, 3, 5 and 12, switched while running; a
// hard-wired instance (E_FILTER = 3) runs alongside. Words presented in cycle
// n must come out in cycle n+2.
`timescale 1ns/1ps
module tb_edge_detect;
  import trig_pkg::*;

  localparam int NW  = 400;               // words per filter setting
  localparam int FS [5] = '{1, 2, 3, 5, 12};

  logic            clk = 1'b0, rst_n;
  word_t           bits;
  logic [EF_W-1:0] ef;
  word_t           e_prog, e_hard;
  int              checks = 0, failures = 0, edges_seen = 0, filtered = 0;

  always #2 clk = ~clk;

  edge_detect dut_p (.clk, .rst_n, .bits_i(bits), .e_filter_i(ef), .e_bits_o(e_prog));
  edge_detect #(.PROGRAMMABLE(1'b0), .E_FILTER(3)) dut_h
    (.clk, .rst_n, .bits_i(bits), .e_filter_i(4'd1), .e_bits_o(e_hard));

  bit stream [NW*WORD_W + 64];
  int runlen [NW*WORD_W + 64];           // length of the high run starting here

  function automatic word_t ref_edges(int w, int f);
    word_t r = '0;
    for (int b = 0; b < WORD_W; b++) begin
      int s = w*WORD_W + b;
      if (s > 0 && !stream[s-1] && stream[s] && runlen[s] >= f) r[b] = 1'b1;
    end
    return r;
  endfunction

  task automatic build_stream();
    int s = 0;
    while (s < NW*WORD_W + 64) begin
      int lo = 1 + int'($urandom_range(5));
      int hi = 1 + int'($urandom_range(13));
      for (int r = 0; r < lo && s < NW*WORD_W + 64; r++) stream[s++] = 1'b0;
      for (int r = 0; r < hi && s < NW*WORD_W + 64; r++) begin
        runlen[s] = hi - r;
        stream[s++] = 1'b1;
      end
    end
    for (int b = 0; b < WORD_W; b++) stream[b] = 1'b0;   // starts low
  endtask

  initial begin
    rst_n = 1'b0;
    bits  = '0;
    ef    = 4'd1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      build_stream();
      ef = EF_W'(FS[k]);
      // flush the previous setting with two low words
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      for (int w = 0; w < NW; w++) begin
        @(negedge clk);
        bits = '0;
        for (int b = 0; b < WORD_W; b++) bits[b] = stream[w*WORD_W + b];
        if (w >= 3) begin
          word_t exp_p, exp_h;
          // outputs now belong to the word presented two cycles ago
          exp_p = ref_edges(w-2, FS[k]);
          exp_h = ref_edges(w-2, 3);
          checks += 2;
          if (e_prog !== exp_p) begin
            failures++;
            if (failures < 10) $display("F=%0d word %0d: got %h want %h", FS[k], w-2, e_prog, exp_p);
          end
          if (e_hard !== exp_h) begin
            failures++;
            if (failures < 10) $display("hard word %0d: got %h want %h", w-2, e_hard, exp_h);
          end
          edges_seen += $countones(exp_p);
          filtered   += $countones(ref_edges(w-2, 1) & ~exp_p);
        end
      end
    end
    checks++;
    if (edges_seen == 0 || filtered == 0) begin
      failures++;
      $display("stimulus did not exercise edges/filter: %0d %0d", edges_seen, filtered);
    end
    $display("edges=%0d filtered_out=%0d", edges_seen, filtered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
