// tb_table1_workload: the square-wave coincidence measurement, run on the
// full design at its default size.
//
// A 9.990 MHz rectangular wave (period 100.1 ns, 50 % duty) drives north
// channel 1 and, delayed by a cable delay, south channel 1. For window
// sizes cw_size = 1..4 and delays between 0 and 1.5 ns the counters are started and run until the first reaches 32767; the
// detected fraction is coinc_cnt / n_edge_cnt. Two delays per window size
// are run: those around the size's detection limit. Since the period is not a
// whole number of 1/3 ns samples, the edges sweep across the sample grid and
// a delay that is not a whole number of samples gives a partial rate.
//
// The reference locates each edge at the first sample instant after it (the
// noise-free ideal) and counts the periods whose north and south edges are
// less than cw_size samples apart. Checks: every edge is counted (the edge
// counters reach 32767 together), and the coincidence count matches the ideal
// within 2 counts (the last pair may still be in the pipeline at the stop).
`timescale 1ps/1ps
module tb_table1_workload;
  import trig_pkg::*;

  localparam longint PERIOD = 100_100;
  localparam longint OFFS   = 50;              // keeps edges off the sample grid
  localparam int     NRUN   = 8;
  // (cw_size, delay in ps): for every window size, the two delays where the
  // detected fraction changes
  localparam int     RUN_CW  [NRUN] = '{1, 1, 2, 2, 3, 3, 4, 4};
  localparam int     RUN_DLY [NRUN] = '{0, 500, 500, 1000, 500, 1000, 1000, 1500};
  localparam int     PH [3] = '{0, 333, 667};

  logic [2:0]       e_bit_clk;
  logic             e_word_clk;
  logic             rst_n, cnt_start;
  logic [2:0]       n_pads [3], s_pads [3];
  logic [EF_W-1:0]  e_filter;
  logic [CW_W-1:0]  cw_size;
  logic [2:0]       n_co, s_co, n_tr, s_tr, ec [3];
  logic             co, veto, c_run, c_done;
  logic [CNT_W-1:0] n_cnt, s_cnt, c_cnt;
  logic             wn, ws;
  int               checks = 0, failures = 0;
  longint           t0;
  int               delay_ps;
  bit               wave_on;

  tb_clkgen u_clk (.e_bit_clk, .e_word_clk);

  rpc_trigger_top dut (
    .e_bit_clk, .e_word_clk, .rst_n, .n_pads, .s_pads, .e_filter, .cw_size,
    .cnt_start, .n_coinc_o(n_co), .s_coinc_o(s_co), .n_trig_o(n_tr), .s_trig_o(s_tr),
    .coinc_o(co), .veto_o(veto), .ec_trigger(ec), .n_edge_cnt(n_cnt),
    .s_edge_cnt(s_cnt), .coinc_cnt(c_cnt), .cnt_running(c_run), .cnt_done(c_done));

  assign n_pads[0] = {3{wn}};
  assign s_pads[0] = {3{ws}};
  assign n_pads[1] = '0;
  assign n_pads[2] = '0;
  assign s_pads[1] = '0;
  assign s_pads[2] = '0;

  // index of the first sample taken strictly after time t
  function automatic longint first_sample(longint t);
    longint m = t / 1000, r = t % 1000;
    if (r < 333) return 3*m + 1;
    if (r < 667) return 3*m + 2;
    return 3*m + 3;
  endfunction

  // the two waves, restarted for each measurement at time t0
  initial begin
    wn = 0;
    forever begin
      wait (wave_on);
      for (longint n = 0; wave_on; n++) begin
        #(t0 + n*PERIOD - $time);
        wn = 1;
        #(PERIOD/2) wn = 0;
      end
    end
  end
  initial begin
    ws = 0;
    forever begin
      wait (wave_on);
      for (longint n = 0; wave_on; n++) begin
        #(t0 + n*PERIOD + longint'(delay_ps) - $time);
        ws = 1;
        #(PERIOD/2) ws = 0;
      end
    end
  end

  initial begin
    rst_n = 0; cnt_start = 0; e_filter = 4'd1; cw_size = 3'd1; wave_on = 0;
    delay_ps = 0; t0 = 0;
    repeat (4) @(posedge e_word_clk);
    #100 rst_n = 1;
    $display("detected coincidences, ideal noise-free sampling");
    for (int r = 0; r < NRUN; r++) begin
      automatic int c = RUN_CW[r];
      automatic int ideal = 0;
      cw_size  = CW_W'(c);
      delay_ps = RUN_DLY[r];
      @(posedge e_word_clk) #100 cnt_start = 1;
      @(posedge e_word_clk) #100 cnt_start = 0;
      // first rising edge lands 1 us after the counters start
      t0 = ($time / 1000 + 1000) * 1000 + OFFS;
      for (longint n = 0; n < CNT_MAX; n++) begin
        automatic longint a = first_sample(t0 + n*PERIOD);
        automatic longint b = first_sample(t0 + n*PERIOD + longint'(delay_ps));
        if (b - a < longint'(c) && a - b < longint'(c)) ideal++;
      end
      wave_on = 1;
      wait (c_done);
      wave_on = 0;
      // let the waves return low and the pipeline drain
      #(PERIOD);
      checks += 2;
      // the counters stop at the first 32767; the other side may lack its last edge
      if (!((n_cnt == CNT_W'(CNT_MAX) && s_cnt >= CNT_W'(CNT_MAX - 1)) ||
            (s_cnt == CNT_W'(CNT_MAX) && n_cnt >= CNT_W'(CNT_MAX - 1)))) begin
        failures++;
        $display("edges lost: north %0d south %0d", n_cnt, s_cnt);
      end
      if (int'(c_cnt) > ideal || int'(c_cnt) < ideal - 2) begin
        failures++;
        $display("cw=%0d delay=%0d: coincidences %0d, ideal %0d", c, delay_ps, c_cnt, ideal);
      end
      $display("cw_size=%0d delay=%4.1f ns: %6.2f %% (%0d of %0d edges, ideal %0d)", c,
               real'(delay_ps) / 1000.0, 100.0 * real'(c_cnt) / real'(n_cnt), c_cnt, n_cnt,
               ideal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd2 * NRUN * CNT_MAX * PERIOD);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
