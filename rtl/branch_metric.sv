// branch_metric: the four branch metrics of one received symbol pair.
//
// Each 3-bit sign-magnitude symbol {sign, mag} is first mapped onto a 0..7
// scale of "how much it looks like a one": v = 4 + mag when the sign says
// one, v = 3 - mag when it says zero. Its distance from a hypothesised zero
// is v and from a hypothesised one is 7 - v. A branch metric is the sum of
// the two symbol distances for the hypothesised pair {c1, c2}; an erased
// (punctured) symbol adds nothing to any of the four. That the metrics are
// distances of the received pair from the four hypotheses follows the
// document; the sign convention and the linear 0..7 scale are this design's
// own choices.
//
// Interface and timing: when 'load' is high the pair is taken and the four
// metrics appear on 'bm' in the next cycle, where they stay until the next
// load. bm[c] is the metric for c1 = c[1], c2 = c[0].
module branch_metric
  import fec_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  pair_t pair,
  output bm_t   bm [4]
);

  function automatic logic [2:0] level(input sym_t s);
    return s[2] ? (3'd4 + {1'b0, s[1:0]}) : (3'd3 - {1'b0, s[1:0]});
  endfunction

  // Distance of one symbol from hypothesis bit b.
  function automatic logic [2:0] sym_dist(input sym_t s, input logic era, input logic b);
    logic [2:0] v;
    v = level(s);
    if (era) return 3'd0;
    return b ? (3'd7 - v) : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++) bm[c] <= '0;
    end else if (load) begin
      for (int c = 0; c < 4; c++)
        bm[c] <= {1'b0, sym_dist(pair.i, pair.era_i, c[1])}
               + {1'b0, sym_dist(pair.q, pair.era_q, c[0])};
    end
  end

endmodule
