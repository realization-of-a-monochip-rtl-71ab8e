// tb_ref_pkg: reference models shared by the testbenches, written from the
// code definition and independent of the RTL.
//
// ref_p/ref_q: parity of the (133, 171) code from an explicit list of taps.
// h[k] is the data bit k steps ago (h[0] the current one). 133 octal
// = 1 011 011 taps delays 0, 2, 3, 5, 6; 171 octal = 1 111 001 taps
// delays 0, 1, 2, 3, 6.
// soft_sym(): maps a transmitted bit to a 3-bit soft symbol with an error of
// up to 'noise' levels toward the other value.
package tb_ref_pkg;
  function automatic bit ref_p(input bit h[7]);
    return h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6];
  endfunction
  function automatic bit ref_q(input bit h[7]);
    return h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6];
  endfunction
  function automatic logic [2:0] soft_sym(input bit b, input int unsigned noise);
    int unsigned e;
    e = (noise == 0) ? 0 : ($urandom % (noise + 1));
    return b ? 3'(7 - e) : 3'(e);
  endfunction
endpackage
