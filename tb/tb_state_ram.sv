// tb_state_ram: write/read-back test of one 32 x 6 state RAM.
//
// All words are written with random data, then read in random order and in
// alternating read/write cycles; read data must appear one cycle after the
// read and hold while the RAM is idle or writing.
module tb_state_ram;
  logic       clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [4:0] addr = '0;
  logic [5:0] wdata = '0, rdata;
  logic [5:0] model [32];

  state_ram dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    @(negedge clk);
    for (int a = 0; a < 32; a++) begin
      en = 1'b1; we = 1'b1; addr = 5'(a); wdata = 6'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      automatic int a = $urandom_range(0, 31);
      en = 1'b1; we = 1'b0; addr = 5'(a);
      @(negedge clk);
      // write cycle to another address: read data must hold
      en = 1'b1; we = 1'b1; addr = 5'($urandom); wdata = 6'($urandom);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL addr %0d", a); end
      model[addr] = wdata;
      @(negedge clk);
      en = 1'b0; we = 1'b0;
      checks++;
      if (rdata != model[a] && addr != 5'(a)) begin failures++; $display("FAIL hold %0d", a); end
      @(negedge clk);
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
