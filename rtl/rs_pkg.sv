// rs_pkg: Galois-field helpers shared by every block of the Reed-Solomon decoder.
//
// Elements of GF(2^m) are held in polynomial basis, LSB = coefficient of x^0, in a vector of
// GF_MAXW bits of which only the low m bits are used. The field is defined by a primitive
// polynomial given as an integer with bit m set (e.g. 'h11D for x^8+x^4+x^3+x^2+1); alpha is
// the element x (value 2). All functions are pure combinational logic; with a constant operand
// a synthesis tool reduces gf_mul to a small XOR network, which is how the constant multipliers
// of the syndrome and Chien MAC units are built.
package rs_pkg;

  // Widest symbol any instance may use. Symbol widths 2..9 are the intended range.
  localparam int GF_MAXW = 16;
  typedef logic [GF_MAXW-1:0] gf_t;

  // Multiply a and b in GF(2^m) modulo poly (shift-and-add, reduced every step).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b, input int m, input int poly);
    gf_t acc;
    gf_t sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < GF_MAXW; i++) begin
      if (i < m) begin
        if (b[i]) acc = acc ^ sh;
        sh = sh << 1;
        if (sh[m]) sh = sh ^ gf_t'(poly);
      end
    end
    return acc;
  endfunction

  // alpha^e for e >= 0 (alpha = x); the loop bound keeps it usable for constants only.
  function automatic gf_t gf_alpha_pow(input int e, input int m, input int poly);
    gf_t r;
    int  ord;
    int  ee;
    ord = (1 << m) - 1;
    ee  = e % ord;
    if (ee < 0) ee = ee + ord;
    r = gf_t'(1);
    for (int i = 0; i < ee; i++) r = gf_mul(r, gf_t'(2), m, poly);
    return r;
  endfunction

endpackage
