// tb_coinc_validation: checks rejection of multiple coincidences.
//
// Directed cases first: a lone pair (accepted, triggers its north and south
// channel), two pairs in one word (vetoed), one pair followed by another in
// the next word (both vetoed), and a lone pair in every one of the nine
// positions. Then random sparse matrices. The reference accepts the matrix of
// word w when exactly one element is set in it and none in words w-1 and w+1;
// the outputs for word w must appear two cycles after it was presented.
`timescale 1ns/1ps
module tb_coinc_validation;
  import trig_pkg::*;

  localparam int NW = 2000;

  logic       clk = 1'b0, rst_n;
  logic [2:0] ec [3];
  logic [2:0] n_co, s_co;
  logic       co, veto;
  int         checks = 0, failures = 0, n_acc = 0, n_veto = 0;

  always #2 clk = ~clk;

  coinc_validation dut (.clk, .rst_n, .ec_trigger_i(ec), .n_coinc_o(n_co),
                        .s_coinc_o(s_co), .coinc_o(co), .veto_o(veto));

  logic [8:0] m [NW + 2];               // bit 3*i+j, words 0..NW-1, then zeros

  function automatic int ones(logic [8:0] v);
    int c = 0;
    for (int b = 0; b < 9; b++) c += int'(v[b]);
    return c;
  endfunction

  initial begin
    int w = 0;
    rst_n = 1'b0;
    for (int i = 0; i < 3; i++) ec[i] = '0;
    for (int k = 0; k < NW + 2; k++) m[k] = '0;
    // directed patterns, each separated by idle words
    m[4]  = 9'b000_010_000;              // north 1, south 1 alone
    m[10] = 9'b000_001_100;              // two pairs in one word
    m[16] = 9'b001_000_000;              // pair in one word ...
    m[17] = 9'b000_000_010;              // ... another in the next
    for (int p = 0; p < 9; p++) m[24 + 4*p] = 9'(1) << p;
    for (int k = 70; k < NW; k++)
      if ($urandom_range(5) == 0) m[k] = 9'(1) << $urandom_range(8);
      else if ($urandom_range(40) == 0) m[k] = 9'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (w = 0; w < NW + 2; w++) begin
      for (int i = 0; i < 3; i++) ec[i] = m[w][3*i +: 3];
      @(negedge clk);
      if (w >= 1) begin
        automatic int v = w - 1;
        logic      acc;
        logic [2:0] en, es;
        acc = (ones(m[v]) == 1) && (v == 0 || m[v-1] == 0) && m[v+1] == 0;
        en = '0;
        es = '0;
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++)
            if (acc && m[v][3*i+j]) begin
              en[i] = 1'b1;
              es[j] = 1'b1;
            end
        checks++;
        if (co !== acc || n_co !== en || s_co !== es ||
            veto !== (m[v] != 0 && !acc)) begin
          failures++;
          if (failures < 10)
            $display("word %0d m=%b: got co=%b n=%b s=%b veto=%b want co=%b n=%b s=%b",
                     v, m[v], co, n_co, s_co, veto, acc, en, es);
        end
        n_acc  += int'(acc);
        n_veto += int'(m[v] != 0 && !acc);
        // directed expectations spelled out
        if (v == 4)  begin checks++; if (!(co && n_co == 3'b010 && s_co == 3'b010)) failures++; end
        if (v == 10) begin checks++; if (co || !veto) failures++; end
        if (v == 16 || v == 17) begin checks++; if (co || !veto) failures++; end
      end
    end
    $display("accepted=%0d vetoed=%0d", n_acc, n_veto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
