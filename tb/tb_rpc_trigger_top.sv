// tb_rpc_trigger_top: end-to-end test of the coincidence trigger at its
// default size (3 north + 3 south channels, 12-sample words).
//
// Hit pulses are placed on the six time channels with picosecond timing, 150
// ps after a sample instant so each sample sees a defined level. The test is
// a series of 200 ns slots; in each slot the window cw_size and the filter
// e_filter are reprogrammed, then a few pulses are placed within a few
// samples of each other. Directed slots come first (a pair inside the window,
// a pair just outside it, three hits vetoed as a multiple coincidence, a
// glitch removed by the filter, a pair straddling a word boundary), then
// random slots.
//
// The reference works on sample indices: it finds the edges (low sample, then
// a high run of at least e_filter samples), marks pair (i,j) of the matrix in
// the word of the later edge when the edges are less than cw_size samples
// apart, and accepts a word holding exactly one pair with empty neighbours.
// Every accepted pair must trigger exactly its two channels 20 ns after the
// word-clock edge that loaded the word, and less than 30 ns after the later
// edge was sampled. The stretched outputs must stay high 5 cycles per
// trigger; the edge and coincidence counters must match the reference. A
// final burst of dense square waves drives the edge counters to their 32767
// stop. Each mechanism is counted and must occur at least once.
`timescale 1ps/1ps
module tb_rpc_trigger_top;
  import trig_pkg::*;

  localparam int SLOT   = 600;                 // samples per slot (200 ns)
  localparam int FIRST  = 2;                   // first slot index used
  localparam int NSLOT  = 160;
  localparam int NSAMP  = (FIRST + NSLOT + 1) * SLOT;
  localparam int NWORD  = NSAMP / WORD_W;
  localparam int PH [3] = '{0, 333, 667};

  logic [2:0]       e_bit_clk;
  logic             e_word_clk;
  logic             rst_n, cnt_start;
  logic [2:0]       n_pads [3], s_pads [3];
  logic [EF_W-1:0]  e_filter;
  logic [CW_W-1:0]  cw_size;
  logic [2:0]       n_co, s_co, n_tr, s_tr, ec [3];
  logic             co, veto, c_run, c_done;
  logic [CNT_W-1:0] n_cnt, s_cnt, c_cnt;
  logic             sig [6];                   // 0..2 north, 3..5 south
  bit               dense, built;

  tb_clkgen u_clk (.e_bit_clk, .e_word_clk);

  rpc_trigger_top dut (
    .e_bit_clk, .e_word_clk, .rst_n, .n_pads, .s_pads, .e_filter, .cw_size,
    .cnt_start, .n_coinc_o(n_co), .s_coinc_o(s_co), .n_trig_o(n_tr), .s_trig_o(s_tr),
    .coinc_o(co), .veto_o(veto), .ec_trigger(ec), .n_edge_cnt(n_cnt),
    .s_edge_cnt(s_cnt), .coinc_cnt(c_cnt), .cnt_running(c_run), .cnt_done(c_done));

  for (genvar i = 0; i < 3; i++) begin : g_pad
    assign n_pads[i] = {3{sig[i]}};
    assign s_pads[i] = {3{sig[3+i]}};
  end

  // ---------------------------------------------------------------- stimulus
  bit  lvl  [6][NSAMP];                        // sampled level per channel
  int  slot_cw [NSLOT], slot_ef [NSLOT];
  int  checks = 0, failures = 0;

  // mechanism counters
  int m_acc = 0, m_out = 0, m_veto = 0, m_filt = 0, m_straddle = 0, m_switch = 0;
  int m_stop = 0, m_stretch = 0;

  function automatic longint stime(int s);
    return longint'(1000 * (s / 3) + PH[s % 3]);
  endfunction

  function automatic void pulse(int ch, int start, int len);
    for (int s = start; s < start + len; s++) lvl[ch][s] = 1'b1;
  endfunction

  // directed and random slot contents
  task automatic build();
    for (int c = 0; c < 6; c++)
      for (int s = 0; s < NSAMP; s++) lvl[c][s] = 1'b0;
    for (int k = 0; k < NSLOT; k++) begin
      automatic int b = (FIRST + k) * SLOT + 300;
      slot_cw[k] = 1 + int'($urandom_range(3));
      slot_ef[k] = 1 + int'($urandom_range(2));
      case (k)
        0: begin slot_cw[k] = 2; slot_ef[k] = 1; pulse(2, b, 6); pulse(4, b + 1, 6); end // in window
        1: begin slot_cw[k] = 2; slot_ef[k] = 1; pulse(0, b, 6); pulse(3, b + 3, 6); end // outside
        2: begin slot_cw[k] = 3; slot_ef[k] = 1;                                         // multiple
                 pulse(0, b, 6); pulse(1, b + 1, 6); pulse(5, b + 2, 6); end
        3: begin slot_cw[k] = 2; slot_ef[k] = 3; pulse(1, b, 2); pulse(3, b, 6); end     // glitch
        4: begin slot_cw[k] = 4; slot_ef[k] = 1;                                         // straddle
                 pulse(2, b - (b % WORD_W) + 11, 5); pulse(5, b - (b % WORD_W) + 13, 5); end
        5: begin slot_cw[k] = 1; slot_ef[k] = 1; pulse(1, b, 4); pulse(4, b, 4); end     // same sample
        default: begin
          automatic int np = 1 + int'($urandom_range(3));
          for (int p = 0; p < np; p++) begin
            automatic int ch = int'($urandom_range(5));
            automatic int st = b + int'($urandom_range(6));
            automatic int ln = 1 + int'($urandom_range(7));
            // keep one low sample before the pulse on this channel
            if (!lvl[ch][st-1] && !lvl[ch][st]) pulse(ch, st, ln);
          end
        end
      endcase
    end
  endtask

  for (genvar c = 0; c < 6; c++) begin : g_drv
    initial begin
      sig[c] = 1'b0;
      wait (built);
      for (int s = 1; s < NSAMP; s++) begin
        if (lvl[c][s] != lvl[c][s-1]) begin
          #(stime(s - 1) + 150 - $time);
          sig[c] = lvl[c][s];
        end
      end
      // dense square waves: 3 samples high, 3 low (period 2 ns)
      wait (dense);
      forever begin
        #(1000 - ($time % 1000) + 150);
        sig[c] = 1'b1;
        #1000 sig[c] = 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- reference
  int exp_word [$], exp_n [$], exp_s [$], exp_late [$];
  int ref_n_edges = 0, ref_s_edges = 0;

  task automatic reference();
    bit         edge_at [6][NSAMP];
    logic [8:0] m [NWORD];
    for (int w = 0; w < NWORD; w++) m[w] = '0;
    for (int c = 0; c < 6; c++)
      for (int s = 1; s < NSAMP; s++) begin
        automatic int k  = s / SLOT - FIRST;
        automatic int ef = (k >= 0 && k < NSLOT) ? slot_ef[k] : 1;
        automatic int run = 0;
        while (s + run < NSAMP && lvl[c][s + run]) run++;
        edge_at[c][s] = !lvl[c][s-1] && lvl[c][s] && run >= ef;
        if (!lvl[c][s-1] && lvl[c][s] && run < ef) m_filt++;
        if (edge_at[c][s]) begin
          if (c < 3) ref_n_edges++;
          else       ref_s_edges++;
        end
      end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int a = 1; a < NSAMP; a++) if (edge_at[i][a]) begin
          automatic int k  = a / SLOT - FIRST;
          automatic int cw = slot_cw[k];
          automatic bit near = 0;
          for (int b = a - 6; b <= a + 6; b++) if (b > 0 && b < NSAMP && edge_at[3+j][b]) begin
            automatic int d    = (a > b) ? a - b : b - a;
            automatic int late = (a > b) ? a : b;
            near = 1;
            if (d < cw) begin
              m[late / WORD_W][3*i+j] = 1'b1;
              if (a / WORD_W != b / WORD_W) m_straddle++;
            end else m_out++;
          end
        end
    for (int w = 1; w < NWORD - 1; w++) begin
      if (m[w] != 0 && $countones(m[w]) == 1 && m[w-1] == 0 && m[w+1] == 0) begin
        for (int p = 0; p < 9; p++) if (m[w][p]) begin
          exp_word.push_back(w);
          exp_n.push_back(p / 3);
          exp_s.push_back(p % 3);
        end
        begin
          automatic int late = 0;
          for (int s = w * WORD_W; s < (w + 1) * WORD_W; s++)
            for (int c = 0; c < 6; c++) if (edge_at[c][s]) late = s;
          exp_late.push_back(late);
        end
      end else if (m[w] != 0) m_veto++;
    end
  endtask

  // ---------------------------------------------------------------- monitor
  longint got_t [$];
  int     got_n [$], got_s [$];
  int     n_tr_cycles = 0, s_tr_cycles = 0, veto_cycles = 0;

  always @(posedge e_word_clk) begin
    #1;
    if (!dense && co) begin
      got_t.push_back($time - 1);
      got_n.push_back($clog2(int'(n_co)));
      got_s.push_back($clog2(int'(s_co)));
      checks++;
      if ($countones(n_co) != 1 || $countones(s_co) != 1) failures++;
    end
    if (!dense) begin
      n_tr_cycles += $countones(n_tr);
      s_tr_cycles += $countones(s_tr);
      veto_cycles += int'(veto);
    end
  end

  // ---------------------------------------------------------------- control
  initial begin
    rst_n = 1'b0; cnt_start = 1'b0; dense = 1'b0; built = 1'b0;
    e_filter = 4'd1; cw_size = 3'd2;
    build();
    reference();
    built = 1'b1;
    repeat (4) @(posedge e_word_clk);
    #100 rst_n = 1'b1;
    @(posedge e_word_clk) #100 cnt_start = 1'b1;
    @(posedge e_word_clk) #100 cnt_start = 1'b0;
    for (int k = 0; k < NSLOT; k++) begin
      // settings change at the start of each slot, while the pipeline is idle
      #(stime((FIRST + k) * SLOT) - $time);
      if (k > 0 && (slot_cw[k] != slot_cw[k-1] || slot_ef[k] != slot_ef[k-1])) m_switch++;
      cw_size  = CW_W'(slot_cw[k]);
      e_filter = EF_W'(slot_ef[k]);
    end
    #(stime(NSAMP) - $time);

    // triggers
    checks++;
    if (got_t.size() != exp_word.size()) begin
      failures++;
      $display("triggers: got %0d want %0d", got_t.size(), exp_word.size());
    end
    for (int e = 0; e < exp_word.size() && e < got_t.size(); e++) begin
      automatic longint want_t = 6000 + 4000 * longint'(exp_word[e]) + 20000;
      automatic longint lat    = got_t[e] - stime(exp_late[e]);
      checks += 2;
      if (got_t[e] != want_t || got_n[e] != exp_n[e] || got_s[e] != exp_s[e]) begin
        failures++;
        if (failures < 10)
          $display("trigger %0d: got t=%0t n%0d s%0d want t=%0t n%0d s%0d", e, got_t[e],
                   got_n[e], got_s[e], want_t, exp_n[e], exp_s[e]);
      end
      if (lat <= 0 || lat >= 30000) begin
        failures++;
        $display("trigger %0d latency %0d ps", e, lat);
      end
    end
    m_acc = got_t.size();

    // stretched outputs: 5 cycles per trigger on each side
    checks += 2;
    if (n_tr_cycles != STRETCH_CYCLES * m_acc) failures++;
    if (s_tr_cycles != STRETCH_CYCLES * m_acc) failures++;
    m_stretch = n_tr_cycles / STRETCH_CYCLES;

    // vetoes seen by the design
    checks++;
    if (veto_cycles != m_veto) begin
      failures++;
      $display("veto cycles %0d want %0d", veto_cycles, m_veto);
    end

    // counters
    checks++;
    if (int'(n_cnt) != ref_n_edges || int'(s_cnt) != ref_s_edges || int'(c_cnt) != m_acc
        || !c_run) begin
      failures++;
      $display("counters n=%0d s=%0d c=%0d want %0d %0d %0d", n_cnt, s_cnt, c_cnt,
               ref_n_edges, ref_s_edges, m_acc);
    end

    // dense burst until the counters stop
    dense = 1'b1;
    wait (c_done);
    m_stop++;
    repeat (20) @(posedge e_word_clk);
    #100;
    checks++;
    if ((n_cnt != CNT_W'(CNT_MAX) && s_cnt != CNT_W'(CNT_MAX)) || c_run) begin
      failures++;
      $display("stop: n=%0d s=%0d running=%b", n_cnt, s_cnt, c_run);
    end
    begin
      automatic logic [CNT_W-1:0] hold_n = n_cnt, hold_s = s_cnt;
      repeat (50) @(posedge e_word_clk);
      #100;
      checks++;
      if (n_cnt != hold_n || s_cnt != hold_s) failures++;
    end

    $display("mechanisms: accepted=%0d out_of_window=%0d vetoed=%0d filtered=%0d straddling=%0d",
             m_acc, m_out, m_veto, m_filt, m_straddle);
    $display("            setting_changes=%0d stretched=%0d counter_stop=%0d",
             m_switch, m_stretch, m_stop);
    checks++;
    if (m_acc == 0 || m_out == 0 || m_veto == 0 || m_filt == 0 || m_straddle == 0 ||
        m_switch == 0 || m_stretch == 0 || m_stop == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(NSAMP) * 334 + 200_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
