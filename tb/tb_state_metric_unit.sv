// tb_state_metric_unit: step-by-step comparison with a plain 64-state model.
//
// A frame of random branch metric sets is run through the unit. The model
// keeps all 64 metrics in an array and, for every step, applies the same
// rules: first step of the frame starts from state 0 (others at 63), later
// steps subtract the previous minimum, new metric = min over the two
// predecessors with the codewords of the reference encoder, saturation at
// 63, ties to the even predecessor. After each step the 8 pointer bytes
// written to the trellis port, the best state and the step length
// (68 clocks from 'start' to 'done') are checked. A second frame checks the
// restart, and 12 steps cover all six address rotations twice.
module tb_state_metric_unit;
  import fec_pkg::*;
  import fec_tb_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, frame_start = 1'b0, start = 1'b0;
  logic [5:0] slot = '0;
  bm_t        bm [4];
  logic       busy, done, tw_req;
  state_t     best_state;
  logic [8:0] tw_addr;
  logic [7:0] tw_data;

  state_metric_unit dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] tmem [512];
  int refm [64];
  int min_prev;

  always @(posedge clk) if (tw_req) tmem[tw_addr] <= tw_data;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run_step(input bit first, input int t);
    int old [64], nw [64];
    logic [63:0] dec;
    int em, es, ncyc;
    for (int c = 0; c < 4; c++) bm[c] = bm_t'($urandom_range(0, (t % 4 == 3) ? 14 : 8));
    for (int s = 0; s < 64; s++)
      old[s] = first ? ((s == 0) ? 0 : 63) : refm[s] - min_prev;
    for (int p = 0; p < 32; p++) begin
      logic [5:0] st;
      logic [1:0] c0, c1;
      int mi, mj, x, y;
      st = 6'(2 * p);     c0 = enc_step(st, 1'b0);
      st = 6'(2 * p + 1); c1 = enc_step(st, 1'b0);
      mi = bm[c0]; mj = bm[c1];
      x = old[2*p] + mi; y = old[2*p+1] + mj;
      nw[p] = (y < x) ? y : x;  dec[p] = (y < x);
      x = old[2*p] + mj; y = old[2*p+1] + mi;
      nw[p+32] = (y < x) ? y : x; dec[p+32] = (y < x);
      if (nw[p] > 63) nw[p] = 63;
      if (nw[p+32] > 63) nw[p+32] = 63;
    end
    em = 1000; es = 0;
    for (int p = 0; p < 32; p++) begin
      if (nw[p] < em)    begin em = nw[p];    es = p; end
      if (nw[p+32] < em) begin em = nw[p+32]; es = p + 32; end
    end
    slot = 6'(t);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    ncyc = 0;
    while (!done) begin @(negedge clk); ncyc++; end
    chk(ncyc == 68, $sformatf("step %0d took %0d clocks", t, ncyc));
    chk(int'(best_state) == es, $sformatf("step %0d best %0d exp %0d", t, best_state, es));
    for (int b = 0; b < 8; b++)
      chk(tmem[{6'(t), 3'(b)}] == dec[8*b +: 8],
          $sformatf("step %0d byte %0d: %h exp %h", t, b, tmem[{6'(t), 3'(b)}], dec[8*b +: 8]));
    refm = nw;
    min_prev = em;
  endtask

  initial begin
    for (int c = 0; c < 4; c++) bm[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      frame_start = 1'b1;
      @(negedge clk);
      frame_start = 1'b0;
      for (int t = 0; t < 14; t++) run_step(t == 0, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
