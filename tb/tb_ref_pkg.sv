// tb_ref_pkg -- reference model of the check-symbol regeneration, used by the
// testbenches to work out expected values independently of the RTL.
//
// The model treats the output vector as an integer: with w bits left it takes
// A = v >> floor(w/2) and B = v mod 2**floor(w/2) and replaces v by A + B (add) or
// A - B + 2**ceil(w/2) (subtract), so that w becomes ceil(w/2) + 1, until w is at
// most k. Vectors of up to 256 bits are supported.
package tb_ref_pkg;

  typedef logic [255:0] vec_t;

  function automatic vec_t ref_compress(vec_t v, int n, int k, bit sub);
    int   w  = n;
    int   wa, wb;
    vec_t a, b;
    while (w > k) begin
      wa = (w + 1) / 2;
      wb = w / 2;
      a  = v >> wb;
      b  = v & ((vec_t'(1) << wb) - 1);
      v  = sub ? (a - b + (vec_t'(1) << wa)) : (a + b);
      w  = wa + 1;
    end
    return v;
  endfunction

  // Check symbol of a scheme: mode 0 = add, 1 = sub, 2 = mix ({sub, add}).
  function automatic vec_t ref_cs(vec_t v, int n, int k, int mode);
    case (mode)
      0:       return ref_compress(v, n, k, 1'b0);
      1:       return ref_compress(v, n, k, 1'b1);
      default: return (ref_compress(v, n, k, 1'b1) << k) | ref_compress(v, n, k, 1'b0);
    endcase
  endfunction

  function automatic int popcount(vec_t v);
    int c = 0;
    for (int i = 0; i < 256; i++) c += int'(v[i]);
    return c;
  endfunction

endpackage
