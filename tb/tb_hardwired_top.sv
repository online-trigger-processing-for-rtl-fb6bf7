// tb_hardwired_top: checks that the hard-wired build of the trigger behaves
// exactly like the programmable one.
//
// Two complete triggers see the same random hits on all six channels: one
// built with PROGRAMMABLE = 0, CW_SIZE = 3 and E_FILTER = 2 (its e_filter and
// cw_size ports tied to other values, which it must ignore), and one
// programmable instance set to cw_size = 3 and e_filter = 2 through its
// ports. Every output must agree in every word-clock cycle. The run fails if
// the hits produced no accepted or no vetoed coincidence.
`timescale 1ps/1ps
module tb_hardwired_top;
  import trig_pkg::*;

  localparam int NSAMP = 60000;           // 20 us of hits
  localparam int PH [3] = '{0, 333, 667};

  logic [2:0]       e_bit_clk;
  logic             e_word_clk;
  logic             rst_n, cnt_start;
  logic [2:0]       n_pads [3], s_pads [3];
  logic             sig [6];
  int               checks = 0, failures = 0, acc = 0, vet = 0;
  bit               done_stim;

  // outputs of the programmable (p) and hard-wired (h) builds
  logic [2:0]       p_nc, p_sc, p_nt, p_st, p_ec [3], h_nc, h_sc, h_nt, h_st, h_ec [3];
  logic             p_co, p_ve, p_run, p_done, h_co, h_ve, h_run, h_done;
  logic [CNT_W-1:0] p_n, p_s, p_c, h_n, h_s, h_c;

  tb_clkgen u_clk (.e_bit_clk, .e_word_clk);

  rpc_trigger_top u_prog (
    .e_bit_clk, .e_word_clk, .rst_n, .n_pads, .s_pads, .e_filter(4'd2), .cw_size(3'd3),
    .cnt_start, .n_coinc_o(p_nc), .s_coinc_o(p_sc), .n_trig_o(p_nt), .s_trig_o(p_st),
    .coinc_o(p_co), .veto_o(p_ve), .ec_trigger(p_ec), .n_edge_cnt(p_n), .s_edge_cnt(p_s),
    .coinc_cnt(p_c), .cnt_running(p_run), .cnt_done(p_done));

  rpc_trigger_top #(.PROGRAMMABLE(1'b0), .E_FILTER(2), .CW_SIZE(3)) u_hard (
    .e_bit_clk, .e_word_clk, .rst_n, .n_pads, .s_pads, .e_filter(4'd1), .cw_size(3'd1),
    .cnt_start, .n_coinc_o(h_nc), .s_coinc_o(h_sc), .n_trig_o(h_nt), .s_trig_o(h_st),
    .coinc_o(h_co), .veto_o(h_ve), .ec_trigger(h_ec), .n_edge_cnt(h_n), .s_edge_cnt(h_s),
    .coinc_cnt(h_c), .cnt_running(h_run), .cnt_done(h_done));

  for (genvar i = 0; i < 3; i++) begin : g_pad
    assign n_pads[i] = {3{sig[i]}};
    assign s_pads[i] = {3{sig[3+i]}};
  end

  function automatic longint stime(int s);
    return longint'(1000 * (s / 3) + PH[s % 3]);
  endfunction

  // Random bursts: every 90 samples (30 ns) up to three channels get a pulse
  // of 1-6 samples starting within 5 samples of each other.
  bit lvl [6][NSAMP];
  initial begin
    for (int c = 0; c < 6; c++) for (int s = 0; s < NSAMP; s++) lvl[c][s] = 0;
    for (int b = 300; b + 20 < NSAMP; b += 90) begin
      automatic int np = 1 + int'($urandom_range(2));
      for (int p = 0; p < np; p++) begin
        automatic int ch = int'($urandom_range(5));
        automatic int st = b + int'($urandom_range(5));
        automatic int ln = 1 + int'($urandom_range(5));
        for (int s = st; s < st + ln; s++) lvl[ch][s] = 1;
      end
    end
  end

  for (genvar c = 0; c < 6; c++) begin : g_drv
    initial begin
      sig[c] = 0;
      #1;
      for (int s = 1; s < NSAMP; s++)
        if (lvl[c][s] != lvl[c][s-1]) begin
          #(stime(s - 1) + 150 - $time);
          sig[c] = lvl[c][s];
        end
    end
  end

  always @(posedge e_word_clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (p_nc !== h_nc || p_sc !== h_sc || p_nt !== h_nt || p_st !== h_st ||
          p_co !== h_co || p_ve !== h_ve || {p_ec[0], p_ec[1], p_ec[2]} !== {h_ec[0], h_ec[1], h_ec[2]} ||
          p_n !== h_n || p_s !== h_s || p_c !== h_c || p_run !== h_run || p_done !== h_done) begin
        failures++;
        if (failures < 10) $display("t=%0t outputs differ", $time);
      end
      acc += int'(p_co);
      vet += int'(p_ve);
    end
  end

  initial begin
    rst_n = 0; cnt_start = 0;
    repeat (4) @(posedge e_word_clk);
    #100 rst_n = 1;
    @(posedge e_word_clk) #100 cnt_start = 1;
    @(posedge e_word_clk) #100 cnt_start = 0;
    #(stime(NSAMP) + 100000 - $time);
    checks++;
    if (acc == 0 || vet == 0) begin
      failures++;
      $display("stimulus gave accepted=%0d vetoed=%0d", acc, vet);
    end
    $display("accepted=%0d vetoed=%0d edges n=%0d s=%0d", acc, vet, p_n, p_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(NSAMP) * 400 + 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
