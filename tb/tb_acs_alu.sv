// tb_acs_alu: random check of the add-compare-select unit.
//
// Operands are applied with add_en, sel_en follows one cycle later, and the
// result is read in the cycle after that (two-stage ADD/SEL pipeline). The
// expected metric is min(sa+ma, sb+mb) limited to 63 and the decision is 1
// only when the 2p+1 path is strictly smaller. A set of large operands
// exercises the saturation.
module tb_acs_alu;
  import fec_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, add_en = 1'b0, sel_en = 1'b0;
  sm_t  sa = '0, sb = '0, s_new;
  bm_t  ma = '0, mb = '0;
  logic dec;

  acs_alu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0, n_tie = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int x, y, e;
      logic ed;
      sa = sm_t'($urandom); sb = sm_t'($urandom);
      ma = bm_t'($urandom_range(0, 14)); mb = bm_t'($urandom_range(0, 14));
      if (n % 7 == 0) sb = sm_t'(int'(sa) + int'(ma) - int'(mb));   // ties
      x = sa + ma; y = sb + mb;
      e  = (y < x) ? y : x;
      ed = (y < x);
      if (e > 63) begin e = 63; n_sat++; end
      if (x == y) n_tie++;
      add_en = 1'b1;
      @(negedge clk);
      add_en = 1'b0; sel_en = 1'b1;
      @(negedge clk);
      sel_en = 1'b0;
      checks++;
      if (int'(s_new) != e || dec != ed) begin
        failures++;
        $display("FAIL sa=%0d sb=%0d ma=%0d mb=%0d got %0d/%0d exp %0d/%0d", sa, sb, ma, mb, s_new, dec, e, ed);
      end
    end
    checks++;
    if (n_sat == 0 || n_tie == 0) begin failures++; $display("FAIL: saturation or tie not exercised"); end
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
