// mm_ref_pkg: reference results for the matrix testbenches.
//
// ref_dot_tree sums the products of two vectors by the same pairwise tree
// as the kernel's dot-product unit (leaf j pairs with leaf j^1, and so on
// upwards), each step rounded to single precision. The functions use only
// the double-precision reference arithmetic of fp_ref_pkg.
package mm_ref_pkg;
  import fp_ref_pkg::*;

  function automatic logic [31:0] ref_dot_tree(logic [31:0] a[], logic [31:0] b[]);
    logic [31:0] v[];
    int n;
    n = a.size();
    v = new[n];
    for (int j = 0; j < n; j++) v[j] = ref_mul(a[j], b[j]);
    while (n > 1) begin
      for (int j = 0; j < n / 2; j++) v[j] = ref_add(v[2*j], v[2*j+1]);
      n = n / 2;
    end
    return v[0];
  endfunction

  // Small random values: the exponent range keeps every sum well inside
  // the normal range.
  function automatic logic [31:0] rand_elem();
    return rand_f32(4);
  endfunction
endpackage
