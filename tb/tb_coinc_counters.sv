// tb_coinc_counters: checks the characterisation counters at their full
// 15-bit size.
//
// Random edge words (0 to 2 edges per channel per word) and random
// coincidence pulses are fed in; a reference keeps the three sums and stops
// them when the first reaches 32767. The test checks the counts every cycle,
// that all three stop together, that done is raised, that nothing counts
// before the start pulse, and that a second start clears and restarts them.
`timescale 1ns/1ps
module tb_coinc_counters;
  import trig_pkg::*;

  logic             clk = 1'b0, rst_n, start, coinc;
  word_t            n_e [3], s_e [3];
  logic [CNT_W-1:0] nc, sc, cc;
  logic             running, done;
  int               checks = 0, failures = 0, stops = 0;
  int               rn, rs, rc;
  bit               rrun, rdone;

  always #2 clk = ~clk;

  coinc_counters dut (.clk, .rst_n, .start_i(start), .n_e_bits(n_e), .s_e_bits(s_e),
                      .coinc_i(coinc), .n_edge_cnt(nc), .s_edge_cnt(sc), .coinc_cnt(cc),
                      .running_o(running), .done_o(done));

  function automatic word_t rnd_edges();
    word_t w = '0;
    int k = int'($urandom_range(2));
    for (int e = 0; e < k; e++) w[$urandom_range(WORD_W-1)] = 1'b1;
    return w;
  endfunction

  task automatic run_cycle(bit st, int cbias);
    int an = 0, as_ = 0;
    @(negedge clk);
    start = st;
    coinc = ($urandom_range(cbias) == 0);
    for (int i = 0; i < 3; i++) begin
      n_e[i] = rnd_edges();
      s_e[i] = rnd_edges();
      an  += $countones(n_e[i]);
      as_ += $countones(s_e[i]);
    end
    @(posedge clk);
    if (st) begin
      rn = 0; rs = 0; rc = 0; rrun = 1; rdone = 0;
    end else if (rrun) begin
      rn = (rn + an  > CNT_MAX) ? CNT_MAX : rn + an;
      rs = (rs + as_ > CNT_MAX) ? CNT_MAX : rs + as_;
      rc = (rc + int'(coinc) > CNT_MAX) ? CNT_MAX : rc + int'(coinc);
      if (rn == CNT_MAX || rs == CNT_MAX || rc == CNT_MAX) begin
        rrun = 0; rdone = 1; stops++;
      end
    end
    #0.1;
    checks++;
    if (int'(nc) != rn || int'(sc) != rs || int'(cc) != rc || running !== rrun || done !== rdone) begin
      failures++;
      if (failures < 10)
        $display("t=%0t got %0d %0d %0d run=%b done=%b want %0d %0d %0d %b %b",
                 $time, nc, sc, cc, running, done, rn, rs, rc, rrun, rdone);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 0; coinc = 0;
    for (int i = 0; i < 3; i++) begin n_e[i] = '0; s_e[i] = '0; end
    rn = 0; rs = 0; rc = 0; rrun = 0; rdone = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 20; k++) run_cycle(0, 3);           // idle: no counting
    run_cycle(1, 3);
    while (rrun) run_cycle(0, 3);                            // runs to the stop
    for (int k = 0; k < 20; k++) run_cycle(0, 3);           // stays stopped
    run_cycle(1, 3);                                         // restart
    for (int k = 0; k < 500; k++) run_cycle(0, 3);
    checks++;
    if (stops != 1) failures++;
    $display("final n=%0d s=%0d c=%0d", nc, sc, cc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
