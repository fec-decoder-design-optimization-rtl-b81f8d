// tb_symbol_input: pairing and depuncturing of the demodulator symbols.
//
// For each of the four modes (rate 1/2 or 3/4, serial or parallel input) a
// frame of random symbols with random puncture flags is pushed while a
// consumer takes pairs with a random ready. The expected pair sequence is
// built from the pushed symbol stream: (s0,s1), (s2,s3), ... at rate 1/2 and
// (s0,s1), (s2,-), (-,s3), (s4,s5), ... at rate 3/4 ('-' = erased). A final
// burst checks the overflow flag and that frame_start clears it.
module tb_symbol_input;
  import fec_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, frame_start = 1'b0, rate34 = 1'b0, serial_mode = 1'b0;
  logic  sym_valid = 1'b0, punct_i = 1'b0, punct_q = 1'b0, pair_ready = 1'b0;
  sym_t  sym_i = '0, sym_q = '0;
  logic  pair_valid, overflow;
  pair_t pair;

  symbol_input dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef struct packed { sym_t s; logic e; } ent_t;
  ent_t  pushed [$];
  pair_t got [$];

  always @(posedge clk) begin
    if (rst_n && pair_valid && pair_ready) got.push_back(pair);
    pair_ready <= ($urandom_range(0, 1) == 1);
  end

  task automatic run(input bit r34, input bit ser);
    automatic int n_sym = ser ? 60 : 120;
    automatic int k = 0, ph = 0;
    automatic pair_t e;
    pushed.delete(); got.delete();
    @(negedge clk);
    rate34 = r34; serial_mode = ser; frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    while (pushed.size() < n_sym) begin
      sym_valid = 1'b1;
      sym_i = sym_t'($urandom); punct_i = ($urandom_range(0, 7) == 0);
      sym_q = sym_t'($urandom); punct_q = ($urandom_range(0, 7) == 0);
      pushed.push_back({sym_i, punct_i});
      if (!ser) pushed.push_back({sym_q, punct_q});
      @(negedge clk);
      sym_valid = 1'b0;
      repeat (ser ? 3 : 7) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    // expected pairs
    while (k < pushed.size()) begin
      e = '0;
      if (!r34 || ph == 0) begin
        e.i = pushed[k].s; e.era_i = pushed[k].e; e.q = pushed[k+1].s; e.era_q = pushed[k+1].e; k += 2;
      end else if (ph == 1) begin
        e.i = pushed[k].s; e.era_i = pushed[k].e; e.era_q = 1'b1; k += 1;
      end else begin
        e.era_i = 1'b1; e.q = pushed[k].s; e.era_q = pushed[k].e; k += 1;
      end
      if (r34) ph = (ph + 1) % 3;
      checks++;
      if (got.size() == 0) begin
        failures++; $display("FAIL r34=%0d ser=%0d: pair missing", r34, ser); break;
      end
      if (got[0] != e) begin
        failures++; $display("FAIL r34=%0d ser=%0d: got %h exp %h", r34, ser, got[0], e);
      end
      void'(got.pop_front());
    end
    checks++;
    if (got.size() != 0 || overflow) begin failures++; $display("FAIL: extra pairs or overflow"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, 1'b0);
    run(1'b0, 1'b1);
    run(1'b1, 1'b0);
    run(1'b1, 1'b1);
    run(1'b1, 1'b0);
    // overflow: eight parallel strobes in a row with nobody taking pairs
    force pair_ready = 1'b0;
    for (int i = 0; i < 8; i++) begin
      sym_valid = 1'b1;
      @(negedge clk);
    end
    sym_valid = 1'b0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL: no overflow"); end
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    release pair_ready;
    checks++;
    if (overflow || pair_valid) begin failures++; $display("FAIL: frame_start did not clear"); end
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
