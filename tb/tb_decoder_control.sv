// tb_decoder_control: sequencing and trellis port sharing.
//
// The state metric unit and the traceback are replaced by small models: the
// first stays busy for 68 clocks and posts pointer writes at fixed points,
// the second asks for the port until it has been granted 'depth' reads.
// The testbench checks that each pair starts exactly one step, that step
// slots count up modulo 64, that a traceback starts only once 'depth'
// steps of the frame are stored (35 at rate 1/2, 56 at rate 3/4) and always
// from the previous slot, that a write always wins the port, and that a
// step takes 71 clocks when pairs are always waiting.
module tb_decoder_control;
  import fec_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, frame_start = 1'b0, rate34 = 1'b0;
  logic       pair_valid = 1'b0, pair_ready, bm_load;
  logic       smu_start, smu_done, smu_busy, tb_start, tb_busy;
  logic [5:0] smu_slot, tb_slot;
  logic [6:0] tb_depth;
  logic       tw_req, tr_req, tr_grant, tm_en, tm_we;
  logic [8:0] tw_addr, tr_addr, tm_addr;

  decoder_control dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---- state metric unit model ----
  int smu_cnt = 0;
  assign smu_busy = (smu_cnt != 0);
  assign tw_req   = smu_busy && (smu_cnt % 16 == 3 || smu_cnt % 16 == 2);
  assign tw_addr  = {smu_slot, 3'(smu_cnt)};
  always @(posedge clk) begin
    smu_done <= 1'b0;
    if (!rst_n) smu_cnt <= 0;
    else if (smu_start && !smu_busy) smu_cnt <= 68;
    else if (smu_busy) begin
      smu_cnt <= smu_cnt - 1;
      if (smu_cnt == 1) smu_done <= 1'b1;
    end
  end

  // ---- traceback model ----
  int tb_left = 0;
  assign tb_busy = (tb_left != 0);
  assign tr_req  = tb_busy;
  assign tr_addr = 9'h1AB;
  always @(posedge clk) begin
    if (!rst_n) tb_left <= 0;
    else if (tb_start && !tb_busy) tb_left <= int'(tb_depth);
    else if (tr_req && tr_grant) tb_left <= tb_left - 1;
  end

  // ---- checks every clock ----
  int steps = 0, tbs = 0, loads = 0, exp_slot = 0, fill = 0;
  longint cyc = 0, last_start = -1;
  int n_conflict = 0;
  always @(negedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (tw_req) begin
      chk(tm_en && tm_we && tm_addr == tw_addr && !tr_grant, "write owns the port");
      if (tr_req) n_conflict++;
    end else if (tr_req)
      chk(tm_en && !tm_we && tm_addr == tr_addr && tr_grant, "read gets the port");
    else
      chk(!tm_en, "port idle");
    if (bm_load) loads++;
    if (smu_start && !smu_busy) begin
      chk(int'(smu_slot) == exp_slot, $sformatf("slot %0d exp %0d at %0t steps %0d loads %0d", smu_slot, exp_slot, $time, steps, loads));
      chk(loads == steps + 1, "one pair per step");
      if (last_start >= 0 && pair_valid) chk(cyc - last_start == 71, $sformatf("period %0d", cyc - last_start));
      last_start = cyc;
      chk(tb_start == (fill >= int'(tb_depth)), $sformatf("traceback start at fill %0d", fill));
      if (tb_start) begin
        tbs++;
        chk(tb_slot == 6'(exp_slot - 1), "traceback from previous slot");
      end
      steps++;
      fill++;
      exp_slot = (exp_slot + 1) % 64;
    end
  end

  task automatic frame(input bit r34, input int n);
    @(negedge clk);
    rate34 = r34; frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    steps = 0; loads = 0; exp_slot = 0; fill = 0; tbs = 0; last_start = -1;
    pair_valid = 1'b1;
    while (steps < n) @(negedge clk);
    pair_valid = 1'b0;
    repeat (100) @(negedge clk);
    chk(tb_depth == (r34 ? 7'd56 : 7'd35), "depth for the rate");
    chk(tbs == n - int'(tb_depth), $sformatf("%0d tracebacks", tbs));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    frame(1'b0, 80);
    frame(1'b1, 70);
    chk(n_conflict > 0, "port conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
