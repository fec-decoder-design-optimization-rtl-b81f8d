// fec_tb_pkg: transmit-side reference model for the decoder testbenches.
//
// It holds the k = 7 rate 1/2 convolutional encoder with generators 133 and
// 171 octal, and helpers to build 3-bit sign-magnitude soft symbols. The
// encoder register holds the last six input bits, newest in bit 5, and
// starts at zero at the beginning of a frame; it matches the state
// numbering of the decoder (state = six most recent bits, newest on top).
package fec_tb_pkg;

  // Returns {c1, c2} for input bit u and encoder state st, and advances st.
  function automatic logic [1:0] enc_step(inout logic [5:0] st, input logic u);
    logic [6:0] r;
    logic [1:0] c;
    r  = {u, st};
    c  = {^(r & 7'o133), ^(r & 7'o171)};
    st = {u, st[5:1]};
    return c;
  endfunction

  // Soft symbol for hard bit b with confidence mag (0..3).
  function automatic logic [2:0] mk_sym(input logic b, input logic [1:0] mag);
    return {b, mag};
  endfunction

endpackage
