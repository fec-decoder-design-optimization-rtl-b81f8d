// tb_fec_decoder: end-to-end test of the decoder at its default sizes.
//
// Random frames are encoded with the reference encoder, punctured for rate
// 3/4 where selected, corrupted (hard sign errors at full confidence, random
// loss of confidence, externally flagged dummy symbols carrying garbage) and
// fed to the decoder serially or in parallel at the pace of a 250 ksymbol/s
// demodulator and a 10 MHz clock (one symbol per 40 clocks) or slower. Every
// decoded bit is compared with the transmitted bit. The test also drives
// the input much faster than the decoder can go, to see the overflow flag
// and to measure the step period, which must fit the 80 clocks one
// information bit lasts at 250 ksymbol/s rate 1/2 with a 10 MHz clock.
// Each mechanism of the design (serial and parallel input, rate 3/4
// depuncturing, external puncture flags, error correction, traceback stall
// on a pointer write, metric saturation, all six address rotations,
// overflow, frame restart) is counted and must occur at least once.
module tb_fec_decoder;
  import fec_pkg::*;
  import fec_tb_pkg::*;

  localparam int D12 = 35, D34 = 56;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0, rate34 = 1'b0, serial_mode = 1'b0;
  logic sym_valid = 1'b0, punct_i = 1'b0, punct_q = 1'b0;
  sym_t sym_i = '0, sym_q = '0;
  logic out_valid, out_bit, overflow;

  fec_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_serial = 0, n_parallel = 0, n_r34 = 0, n_ext_punct = 0, n_errs_fixed = 0;
  int n_stall = 0, n_sat = 0, n_overflow = 0, n_frames = 0, n_era = 0;
  logic [5:0] rot_seen = '0;
  longint cyc = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- monitors ----------------
  logic got [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) got.push_back(out_bit);
    if (dut.u_tb.rd_req && !dut.u_tb.grant) n_stall++;
    if (dut.u_smu.do_sel && (dut.u_smu.u_alu0.win[SM_W] || dut.u_smu.u_alu1.win[SM_W])) n_sat++;
    if (dut.u_smu.do_rd) rot_seen[dut.u_smu.rot] <= 1'b1;
    if (dut.bm_load && (dut.pair.era_i || dut.pair.era_q)) n_era++;
  end

  // ---------------- one frame ----------------
  typedef struct { sym_t s; logic p; } chsym_t;

  task automatic run_frame(input int n_data, input bit r34, input bit ser,
                           input int err_every, input int punct_every, input int spacing);
    logic       data [$];
    chsym_t     ch [$];
    logic [5:0] st = '0;
    int d = r34 ? D34 : D12;
    int m, n_err = 0, k, wrong = 0;
    got.delete();
    // data, six-zero flush, then zeros to push the last bits through
    for (int i = 0; i < n_data; i++) data.push_back(1'($urandom));
    for (int i = 0; i < 6 + d; i++)  data.push_back(1'b0);
    while (data.size() % 3 != 0)     data.push_back(1'b0);
    m = data.size();
    for (int i = 0; i < m; i++) begin
      logic [1:0] c = enc_step(st, data[i]);
      if (!r34 || i % 3 == 0) begin
        ch.push_back('{mk_sym(c[1], 2'd3), 1'b0});
        ch.push_back('{mk_sym(c[0], 2'd3), 1'b0});
      end else if (i % 3 == 1) ch.push_back('{mk_sym(c[1], 2'd3), 1'b0});
      else                     ch.push_back('{mk_sym(c[0], 2'd3), 1'b0});
    end
    for (int j = 0; j < ch.size(); j++) begin
      if (j % 4 == 1) ch[j].s[1:0] = 2'($urandom_range(0, 3));     // weak symbols
      if (err_every > 0 && j % err_every == err_every / 2) begin
        ch[j].s = {~ch[j].s[2], 2'd3};                              // confident error
        n_err++;
      end else if (punct_every > 0 && j % punct_every == 3) begin
        ch[j].p = 1'b1;                                             // dummy symbol
        ch[j].s = 3'($urandom);
        n_ext_punct++;
      end
    end
    // start the frame
    @(negedge clk);
    rate34 = r34; serial_mode = ser; frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    n_frames++;
    // drive symbols
    k = 0;
    while (k < ch.size()) begin
      sym_valid = 1'b1;
      sym_i = ch[k].s; punct_i = ch[k].p;
      if (!ser) begin
        sym_q = ch[k+1].s; punct_q = ch[k+1].p;
        k += 2;
      end else k += 1;
      @(negedge clk);
      sym_valid = 1'b0;
      repeat ((ser ? spacing : 2 * spacing) - 1) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    $display("frame r34=%0d ser=%0d done at clock %0d, %0d errors injected", r34, ser, cyc, n_err);
    if (ser) n_serial++; else n_parallel++;
    if (r34) n_r34++;
    check(got.size() == m - d, $sformatf("frame r34=%0d ser=%0d: %0d bits out, expected %0d",
                                         r34, ser, got.size(), m - d));
    for (int i = 0; i < m - d && i < got.size(); i++) if (got[i] !== data[i]) wrong++;
    check(wrong == 0, $sformatf("frame r34=%0d ser=%0d: %0d decoded bits wrong", r34, ser, wrong));
    check(!overflow, "no overflow at the nominal rate");
    if (wrong == 0) n_errs_fixed += n_err;
  endtask

  // ---------------- overflow and step period ----------------
  task automatic run_burst();
    longint t0, t1;
    @(negedge clk);
    rate34 = 1'b0; serial_mode = 1'b0; frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    for (int i = 0; i < 12; i++) begin
      sym_valid = 1'b1; sym_i = mk_sym(1'b0, 2'd3); sym_q = mk_sym(1'b0, 2'd3);
      punct_i = 1'b0; punct_q = 1'b0;
      @(negedge clk);
    end
    sym_valid = 1'b0;
    check(overflow, "overflow flagged when symbols arrive too fast");
    if (overflow) n_overflow++;
    // the buffer is full: successive steps run back to back
    @(posedge dut.u_smu.done);
    t0 = cyc;
    $display("burst: first step done at clock %0d", cyc);
    @(posedge dut.u_smu.done);
    t1 = cyc;
    $display("step period: %0d clocks", t1 - t0);
    check(t1 - t0 == 71, "step period is 71 clocks");
    check(t1 - t0 <= 80, "step fits one bit period (10 MHz, 250 ksymbol/s)");
    repeat (400) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(300, 1'b0, 1'b0, 25, 0, 40);    // rate 1/2, QPSK pairs
    run_frame(300, 1'b0, 1'b1, 29, 17, 40);   // rate 1/2, serial, dummy symbols
    run_frame(300, 1'b1, 1'b0, 90, 0, 70);    // rate 3/4, QPSK pairs
    run_frame(240, 1'b1, 1'b1, 97, 0, 100);    // rate 3/4, serial
    run_burst();
    run_frame(200, 1'b0, 1'b0, 0, 0, 40);     // clean frame after the overflow
    $display("mechanisms: serial=%0d parallel=%0d rate34=%0d ext_punct=%0d erasures=%0d fixed=%0d stall=%0d sat=%0d rot=%b overflow=%0d frames=%0d",
             n_serial, n_parallel, n_r34, n_ext_punct, n_era, n_errs_fixed, n_stall, n_sat,
             rot_seen, n_overflow, n_frames);
    check(n_serial > 0,    "serial input used");
    check(n_parallel > 0,  "parallel input used");
    check(n_r34 > 0,       "rate 3/4 used");
    check(n_ext_punct > 0, "external puncture flags used");
    check(n_era > 0,       "erased positions reached the branch metrics");
    check(n_errs_fixed > 0, "channel errors corrected");
    check(n_stall > 0,     "traceback waited for a pointer write");
    check(n_sat > 0,       "state metric saturated");
    check(rot_seen == 6'h3F, "all six address rotations used");
    check(n_overflow > 0,  "overflow seen");
    check(n_frames > 1,    "frame restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
