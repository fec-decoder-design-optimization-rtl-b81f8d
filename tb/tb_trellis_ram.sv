// tb_trellis_ram: byte write/read-back test of the trellis pointer memory.
//
// All 512 bytes (64 steps x 8) are written, then random bytes are read with
// interleaved writes, as the decoder does; data must come one cycle after
// the read and survive the writes to other bytes.
module tb_trellis_ram;
  logic       clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [8:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [512];

  trellis_ram dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    @(negedge clk);
    for (int a = 0; a < 512; a++) begin
      en = 1'b1; we = 1'b1; addr = 9'(a); wdata = 8'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 1000; n++) begin
      automatic int a = $urandom_range(0, 511);
      en = 1'b1; we = 1'b0; addr = 9'(a);
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 9'($urandom); wdata = 8'($urandom);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL addr %0d", a); end
      model[addr] = wdata;
      @(negedge clk);
    end
    en = 1'b0;
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
