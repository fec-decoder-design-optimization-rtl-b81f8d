// tb_best_state: random searches for the minimum state metric.
//
// Each search offers 32 pairs of (metric, state), the first with 'clr'. The
// expected minimum and the state holding it (first offered wins ties) are
// computed in the testbench and compared in the cycle after the last pair.
module tb_best_state;
  import fec_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, clr = 1'b0, upd = 1'b0;
  sm_t    ma = '0, mb = '0, min_metric;
  state_t sta = '0, stb = '0, best;

  best_state dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      automatic int em = 1000, es = 0;
      for (int p = 0; p < 32; p++) begin
        clr = (p == 0); upd = 1'b1;
        ma = sm_t'($urandom_range(r % 3 == 0 ? 60 : 0, 63)); sta = state_t'(p);
        mb = sm_t'($urandom_range(r % 3 == 0 ? 60 : 0, 63)); stb = state_t'(p + 32);
        if (int'(ma) < em) begin em = int'(ma); es = p; end
        if (int'(mb) < em) begin em = int'(mb); es = p + 32; end
        @(negedge clk);
      end
      clr = 1'b0; upd = 1'b0;
      checks++;
      if (int'(min_metric) != em || int'(best) != es) begin
        failures++;
        $display("FAIL run %0d: got %0d@%0d exp %0d@%0d", r, min_metric, best, em, es);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
