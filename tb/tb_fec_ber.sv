// tb_fec_ber: decoding over a noisy soft-decision channel.
//
// Random frames are encoded, mapped to +/-1, disturbed by approximately
// Gaussian noise (sum of twelve uniform samples) and quantised to the 3-bit
// sign-magnitude format with a step of 0.5 (levels at -2 .. +1.5). The
// testbench counts the hard-decision errors of the raw channel symbols and
// the errors of the decoded bits. Rate 1/2 runs at noise sigma 0.70 (raw
// symbol error rate about 8 %) and rate 3/4 at sigma 0.45 (about 1.3 %); in
// both the
// decoded bit error count must be at most a tenth of the raw symbol error
// count. Symbols arrive in parallel (QPSK) at one pair per 80 clocks
// (rate 1/2) or one pair per 110 clocks (rate 3/4).
module tb_fec_ber;
  import fec_pkg::*;
  import fec_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0, rate34 = 1'b0, serial_mode = 1'b0;
  logic sym_valid = 1'b0, punct_i = 1'b0, punct_q = 1'b0;
  sym_t sym_i = '0, sym_q = '0;
  logic out_valid, out_bit, overflow;

  fec_decoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic got [$];
  always @(posedge clk) if (rst_n && out_valid) got.push_back(out_bit);

  // One noisy soft symbol for bit b; sigma in 1/1000.
  function automatic sym_t channel(input logic b, input int sigma_m, inout int raw_err);
    longint n = 0, r;
    int v;
    for (int i = 0; i < 12; i++) n += $urandom_range(0, 1023);
    n = n - 6138;                          // ~N(0, 1024^2)
    r = (b ? 256 : -256) + (n * sigma_m * 256) / (1024 * 1000);
    v = (r >= 0) ? int'(r / 128) + 4 : 3 - int'((-r - 1) / 128);
    if (v < 0) v = 0;
    if (v > 7) v = 7;
    if ((v >= 4) != b) raw_err++;
    return (v >= 4) ? sym_t'({1'b1, 2'(v - 4)}) : sym_t'({1'b0, 2'(3 - v)});
  endfunction

  task automatic run(input bit r34, input int n_data, input int sigma_m, input int spacing);
    logic data [$];
    sym_t ch [$];
    logic [5:0] st = '0;
    int d = r34 ? 56 : 35;
    int raw_err = 0, dec_err = 0, m;
    got.delete();
    for (int i = 0; i < n_data; i++) data.push_back(1'($urandom));
    for (int i = 0; i < 6 + d; i++)  data.push_back(1'b0);
    while (data.size() % 6 != 0)     data.push_back(1'b0);
    m = data.size();
    for (int i = 0; i < m; i++) begin
      logic [1:0] c = enc_step(st, data[i]);
      if (!r34 || i % 3 == 0) begin
        ch.push_back(channel(c[1], sigma_m, raw_err));
        ch.push_back(channel(c[0], sigma_m, raw_err));
      end else if (i % 3 == 1) ch.push_back(channel(c[1], sigma_m, raw_err));
      else                     ch.push_back(channel(c[0], sigma_m, raw_err));
    end
    @(negedge clk);
    rate34 = r34; frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
    for (int k = 0; k < ch.size(); k += 2) begin
      sym_valid = 1'b1; sym_i = ch[k]; sym_q = ch[k+1];
      @(negedge clk);
      sym_valid = 1'b0;
      repeat (spacing - 1) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    checks++;
    if (got.size() != m - d) begin
      failures++;
      $display("FAIL: %0d bits out, expected %0d", got.size(), m - d);
    end
    for (int i = 0; i < m - d && i < got.size(); i++) if (got[i] !== data[i]) dec_err++;
    $display("rate %s sigma %0d.%03d: %0d channel symbols, %0d raw errors, %0d bits, %0d decoded errors",
             r34 ? "3/4" : "1/2", sigma_m / 1000, sigma_m % 1000, ch.size(), raw_err, m - d, dec_err);
    checks++;
    if (raw_err == 0 || dec_err * 10 > raw_err) begin
      failures++;
      $display("FAIL: decoding gain too small");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0, 1500, 700, 80);
    run(1'b1, 1500, 450, 110);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
