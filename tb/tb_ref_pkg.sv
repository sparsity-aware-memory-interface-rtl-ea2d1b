// tb_ref_pkg -- reference model of the XOR network used by the testbenches.
//
// It rebuilds the LUT connection matrix from its definition (row i = low
// LUT-input bits of {xs(a), a} with a = xs(xs(seed ^ 0x9E3779B9*(i+1))), xs being
// xorshift32, an empty row replaced by the single input i mod width) and
// evaluates a LUT output as a plain loop over input bits, without reusing any RTL
// function. It also provides a wide random-number helper.
package tb_ref_pkg;
  function automatic int unsigned ref_xs(int unsigned s);
    int unsigned t;
    t = s;
    t = t ^ (t << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  // connection row i for a LUT with lin (<= 64) inputs
  function automatic longint unsigned ref_row(int unsigned seed, int unsigned i, int unsigned lin);
    int unsigned s, a;
    longint unsigned r;
    s = seed ^ (32'h9E3779B9 * (i + 1));
    if (s == 0) s = 1;
    a = ref_xs(ref_xs(s));
    r = {ref_xs(a), a};
    if (lin < 64) r = r & ((64'd1 << lin) - 1);
    if (r == 0) r = 64'd1 << (i % lin);
    return r;
  endfunction

  // LUT output for input vector in (bit k = LUT input k); rows 0..yh-1 when half
  function automatic logic [127:0] ref_lut(int unsigned seed, longint unsigned in, int unsigned lin,
                                           int unsigned yh, int unsigned yf, bit half);
    logic [127:0] v;
    longint unsigned m;
    bit b;
    v = '0;
    for (int unsigned i = 0; i < (half ? yh : yf); i++) begin
      m = ref_row(seed, i, lin);
      b = 0;
      for (int unsigned k = 0; k < lin; k++) if (m[k] && in[k]) b = ~b;
      v[i] = b;
    end
    return v;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
endpackage
