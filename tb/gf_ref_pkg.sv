// gf_ref_pkg: reference GF(2^83) arithmetic for the testbenches.
//
// Written independently of the RTL: multiplication forms the full 165-bit
// carry-less product first and then reduces it from the top with
// F(x) = x^83 + x^7 + x^4 + x^2 + 1. Elements travel in 84-bit words.
package gf_ref_pkg;
  typedef logic [83:0] elem_t;

  localparam logic [83:0] F_FULL = {1'b1, 83'h95};

  function automatic elem_t gf_mul(elem_t a, elem_t b);
    logic [167:0] prod;
    prod = '0;
    for (int i = 0; i < 83; i++)
      if (b[i]) prod = prod ^ (168'(a[82:0]) << i);
    for (int i = 166; i >= 83; i--)
      if (prod[i]) prod = prod ^ (168'(F_FULL) << (i - 83));
    return {1'b0, prod[82:0]};
  endfunction

  function automatic elem_t gf_add(elem_t a, elem_t b);
    return a ^ b;
  endfunction

  function automatic elem_t gf_sq(elem_t a);
    return gf_mul(a, a);
  endfunction

  function automatic elem_t rand_elem();
    logic [95:0] r;
    r = {$urandom(), $urandom(), $urandom()};
    return {1'b0, r[82:0]};
  endfunction
endpackage
