// fam_pkg: sizes shared by the blocks of the fused add-multiply (FAM) operator.
//
// The operator computes Z = X * (A + B) for N-bit two's complement operands.
// The sum A + B is recoded straight into radix-4 Modified Booth (MB) digits,
// one digit per pair of bits. An odd N is first sign-extended by one bit, so
// every block works on NE = 2*K bits, where K is the number of MB digits.
// The product and every internal word are ZW = 2*NE bits wide.
package fam_pkg;

  // Number of MB digits needed for an n-bit operand: one per bit pair.
  function automatic int mb_digits(input int n);
    return (n + 1) / 2;
  endfunction

  // Operand width rounded up to an even number of bits.
  function automatic int even_width(input int n);
    return 2 * mb_digits(n);
  endfunction

  // Width of the product and of all partial-product words.
  function automatic int prod_width(input int n);
    return 2 * even_width(n);
  endfunction

endpackage
