// tb_coinc_matrix: checks the 3x3 coincidence matrix against a pairwise
// reference.
//
// Each channel gets random edges (about one per 20 samples, at least two
// samples apart). The reference walks over every north/south pair of edges at
// samples a and b and, when |a-b| < cw_size, sets element (i,j) of the matrix
// for the word holding max(a,b). Edges presented in cycle n must show in the
// matrix in cycle n+1. All window sizes 1..4 are run, plus a hard-wired
// instance with CW_SIZE = 3; the count of pairs found across a word boundary
// is checked to be non-zero.
`timescale 1ns/1ps
module tb_coinc_matrix;
  import trig_pkg::*;

  localparam int NW = 300;
  localparam int NS = NW * WORD_W;

  logic            clk = 1'b0, rst_n;
  word_t           n_e [3], s_e [3];
  logic [CW_W-1:0] cw;
  logic [2:0]      ec_p [3], ec_h [3];
  int              checks = 0, failures = 0, pairs = 0, straddle = 0;

  always #2 clk = ~clk;

  coinc_matrix dut_p (.clk, .rst_n, .n_e_bits(n_e), .s_e_bits(s_e), .cw_size_i(cw),
                      .ec_trigger_o(ec_p));
  coinc_matrix #(.PROGRAMMABLE(1'b0), .CW_SIZE(3)) dut_h
    (.clk, .rst_n, .n_e_bits(n_e), .s_e_bits(s_e), .cw_size_i(3'd1), .ec_trigger_o(ec_h));

  bit            ne [3][NS], se [3][NS];
  logic [8:0]    exp_p [NW], exp_h [NW];   // bit 3*i+j

  task automatic build(int c);
    for (int i = 0; i < 3; i++)
      for (int s = 0; s < NS; s++) begin
        ne[i][s] = 1'b0;
        se[i][s] = 1'b0;
      end
    for (int i = 0; i < 3; i++)
      for (int s = 2; s < NS; s++) begin
        if (!ne[i][s-1] && $urandom_range(19) == 0) ne[i][s] = 1'b1;
        if (!se[i][s-1] && $urandom_range(19) == 0) se[i][s] = 1'b1;
      end
    for (int w = 0; w < NW; w++) begin
      exp_p[w] = '0;
      exp_h[w] = '0;
    end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int a = 0; a < NS; a++) if (ne[i][a])
          for (int b = a - 4; b <= a + 4; b++) if (b >= 0 && b < NS && se[j][b]) begin
            int d = (a > b) ? a - b : b - a;
            int late = (a > b) ? a : b;
            if (d < c) begin
              exp_p[late / WORD_W][3*i+j] = 1'b1;
              pairs++;
              if (a / WORD_W != b / WORD_W) straddle++;
            end
            if (d < 3) exp_h[late / WORD_W][3*i+j] = 1'b1;
          end
  endtask

  function automatic logic [8:0] flat(logic [2:0] m [3]);
    return {m[2], m[1], m[0]};
  endfunction

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < 3; i++) begin
      n_e[i] = '0;
      s_e[i] = '0;
    end
    cw = 3'd1;
    repeat (3) @(posedge clk);
    for (int c = 1; c <= 4; c++) begin
      build(c);
      @(negedge clk) rst_n = 1'b0;
      cw = CW_W'(c);
      @(negedge clk) rst_n = 1'b1;
      for (int w = 0; w <= NW; w++) begin
        @(negedge clk);
        if (w >= 1) begin
          checks += 2;
          if (flat(ec_p) !== exp_p[w-1]) begin
            failures++;
            if (failures < 10) $display("cw=%0d word %0d: got %b want %b", c, w-1, flat(ec_p), exp_p[w-1]);
          end
          if (flat(ec_h) !== exp_h[w-1]) begin
            failures++;
            if (failures < 10) $display("hard word %0d: got %b want %b", w-1, flat(ec_h), exp_h[w-1]);
          end
        end
        for (int i = 0; i < 3; i++)
          for (int b = 0; b < WORD_W; b++) begin
            n_e[i][b] = (w < NW) ? ne[i][w*WORD_W + b] : 1'b0;
            s_e[i][b] = (w < NW) ? se[i][w*WORD_W + b] : 1'b0;
          end
      end
    end
    checks++;
    if (pairs == 0 || straddle == 0) begin
      failures++;
      $display("stimulus too thin: pairs=%0d straddle=%0d", pairs, straddle);
    end
    $display("pairs=%0d straddling=%0d", pairs, straddle);
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
