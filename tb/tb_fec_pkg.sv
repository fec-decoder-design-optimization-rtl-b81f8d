// tb_fec_pkg: checks of the shared helper functions.
//
// base_codeword(p) must equal the output of the reference encoder in state
// 2p with input 0, and the three other branches of the butterfly must carry
// the codeword or its complement as Eq. 5-8 require. st_parity must make
// 2p / 2p+1 and p / p+32 opposite, and rotl must be a 6-bit rotation
// (checked against repeated single-bit rotation).
module tb_fec_pkg;
  import fec_pkg::*;
  import fec_tb_pkg::*;

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int p = 0; p < 32; p++) begin
      logic [5:0] st;
      logic [1:0] c00, c10, c01, c11;
      st = 6'(2 * p);     c00 = enc_step(st, 1'b0);
      st = 6'(2 * p + 1); c10 = enc_step(st, 1'b0);
      st = 6'(2 * p);     c01 = enc_step(st, 1'b1);
      st = 6'(2 * p + 1); c11 = enc_step(st, 1'b1);
      chk(base_codeword(5'(p)) == c00, $sformatf("codeword of branch 2p->p, p=%0d", p));
      chk(c10 == ~c00 && c01 == ~c00 && c11 == c00, $sformatf("butterfly symmetry p=%0d", p));
      chk(st_parity(6'(2 * p)) != st_parity(6'(2 * p + 1)), "parity of 2p, 2p+1");
      chk(st_parity(6'(p)) != st_parity(6'(p + 32)), "parity of p, p+32");
    end
    for (int s = 0; s < 64; s++)
      for (int r = 0; r < 6; r++) begin
        automatic logic [5:0] e = 6'(s);
        for (int i = 0; i < r; i++) e = {e[4:0], e[5]};
        chk(rotl(6'(s), 3'(r)) == e, $sformatf("rotl %0d by %0d", s, r));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
