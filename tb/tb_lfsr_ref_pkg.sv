// tb_lfsr_ref_pkg: bit-serial reference model of the programmable Galois LFSR
// used by the testbenches. One step shifts the state up by one place, takes
// the next input bit into the bottom, and adds the generating sequence when the
// bit shifted out of the top was 1. Widths up to 64 bits.
package tb_lfsr_ref_pkg;

  // state after one serial step; bits above n are cleared
  function automatic logic [63:0] ref_step(input logic [63:0] st, input logic [63:0] poly,
                                           input logic in_bit, input int n);
    logic [63:0] mask, nx;
    mask = (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
    nx   = ((st << 1) | 64'(in_bit)) ^ (st[n-1] ? poly : 64'd0);
    return nx & mask;
  endfunction

  // state after j serial steps, msg[0] entering first
  function automatic logic [63:0] ref_run(input logic [63:0] st, input logic [63:0] poly,
                                          input logic [63:0] msg, input int n, input int j);
    logic [63:0] s;
    s = st;
    for (int k = 0; k < j; k++) s = ref_step(s, poly, msg[k], n);
    return s;
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
