// tb_branch_metric: exhaustive check of the four branch metrics.
//
// Every combination of two 3-bit soft symbols and two erasure flags is
// loaded; the expected metric is worked out from a table of soft levels
// (sign 1 = one: 4..7, sign 0 = zero: 3..0) as the sum of the distances to
// the hypothesised bits, with erased symbols counted as zero. Metrics must
// appear the cycle after 'load' and hold while 'load' is low.
module tb_branch_metric;
  import fec_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  pair_t pair = '0;
  bm_t   bm [4];

  branch_metric dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // soft level of symbol {sign, mag}
  const int lvl [8] = '{3, 2, 1, 0, 4, 5, 6, 7};

  function automatic int ref_bm(pair_t p, int c);
    int d1, d2;
    d1 = p.era_i ? 0 : (c[1] ? 7 - lvl[p.i] : lvl[p.i]);
    d2 = p.era_q ? 0 : (c[0] ? 7 - lvl[p.q] : lvl[p.q]);
    return d1 + d2;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 256; v++) begin
      pair = '{i: 3'(v), q: 3'(v >> 3), era_i: v[6], era_q: v[7]};
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      pair = '0;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm[c]) != ref_bm('{i: 3'(v), q: 3'(v >> 3), era_i: v[6], era_q: v[7]}, c)) begin
          failures++;
          $display("FAIL v=%0d c=%0d got %0d", v, c, bm[c]);
        end
      end
      @(negedge clk);
      checks++;
      if (int'(bm[0]) != ref_bm('{i: 3'(v), q: 3'(v >> 3), era_i: v[6], era_q: v[7]}, 0)) begin
        failures++;
        $display("FAIL: metric not held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
