// tb_traceback: traceback over a random trellis memory.
//
// The testbench plays the trellis memory (one-cycle read latency) and
// withholds the grant at random, as pointer writes do in the decoder. For
// each run it walks the same path itself (state <- state*2 + pointer,
// slot - 1 per step) and checks every read address, the number of reads,
// the decoded bit (top bit of the state at the last step) and, for runs
// without stalls, the latency of depth + 2 clocks.
module tb_traceback;
  import fec_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, grant = 1'b1;
  state_t     start_state = '0;
  logic [5:0] start_slot = '0;
  logic [6:0] depth = 7'd35;
  logic       busy, rd_req, bit_valid, bit_out;
  logic [8:0] rd_addr;
  logic [7:0] rdata = '0;
  logic [7:0] tmem [512];
  logic [8:0] exp_addr [$];
  bit         stall_mode = 1'b0;

  traceback dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_reads = 0;

  always @(negedge clk) grant <= stall_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && rd_req && grant) begin
      rdata <= tmem[rd_addr];
      n_reads <= n_reads + 1;
      checks++;
      if (exp_addr.size() == 0 || rd_addr != exp_addr[0]) begin
        failures++;
        $display("FAIL: read address %h exp %h (%0d left) at %0t", rd_addr, exp_addr.size() ? exp_addr[0] : 9'd0, exp_addr.size(), $time);
      end
      if (exp_addr.size() != 0) void'(exp_addr.pop_front());
    end
  end

  initial begin
    for (int a = 0; a < 512; a++) tmem[a] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 120; r++) begin
      automatic state_t s = state_t'($urandom);
      automatic logic [5:0] sl = 6'($urandom);
      automatic int d = (r % 2 == 0) ? 35 : 56;
      automatic logic eb = 1'b0;
      automatic int lat = 0;
      stall_mode = (r >= 20);
      start_state = s; start_slot = sl; depth = 7'(d);
      exp_addr.delete();
      for (int i = 0; i < d; i++) begin
        automatic logic [7:0] byt = tmem[{sl, s[5:3]}];
        exp_addr.push_back({sl, s[5:3]});
        eb = s[5];
        s  = {s[4:0], byt[s[2:0]]};
        sl = sl - 6'd1;
      end
      n_reads = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!bit_valid) begin @(negedge clk); lat++; end
      checks++;
      if (bit_out != eb) begin failures++; $display("FAIL run %0d: bit %0d exp %0d", r, bit_out, eb); end
      checks++;
      if (n_reads != d) begin failures++; $display("FAIL run %0d: %0d reads", r, n_reads); end
      if (!stall_mode) begin
        checks++;
        if (lat != d + 2) begin failures++; $display("FAIL run %0d: latency %0d", r, lat); end
      end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL: still busy"); end
    end
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
